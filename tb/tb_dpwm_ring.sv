// Self-checking testbench of the dpwm_ring model.
//
// Checks that the taps pulse one at a time, in order 0,1,..,31,0,..., one
// cell delay apart; that a revolution takes 32 cell delays (125 ns); that all
// taps stay low while run is low; and that after run rises the first pulse
// appears on tap 0.
module tb_dpwm_ring;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int  NCELLS = 32;
  localparam real TD     = 1000.0 / 256.0;
  localparam real TOL    = 0.001;

  logic              run;
  logic [NCELLS-1:0] q;
  int checks = 0, failures = 0;

  dpwm_ring dut (.run(run), .q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int      last_tap = -1;
  realtime last_t   = 0.0;
  int      n_pulses = 0;
  bit      first_after_start = 1'b0;

  always @(q) begin
    if (q != '0) begin
      int tap;
      tap = $clog2(q);
      check($onehot(q), "one tap at a time");
      if (first_after_start) begin
        check(tap == 0, "restart on tap 0");
        first_after_start = 1'b0;
      end else if (last_tap >= 0) begin
        check(tap == (last_tap + 1) % NCELLS, $sformatf("tap order %0d after %0d", tap, last_tap));
        check($realtime - last_t > TD - TOL && $realtime - last_t < TD + TOL, "tap spacing");
      end
      last_tap = tap;
      last_t   = $realtime;
      n_pulses++;
    end
  end

  realtime t_rev;
  initial begin
    run = 1'b0;
    #100;
    check(q == '0, "stopped ring is quiet");
    first_after_start = 1'b1;
    run = 1'b1;
    @(posedge q[NCELLS-1]);
    t_rev = $realtime;
    @(posedge q[NCELLS-1]);
    check($realtime - t_rev > 125.0 - TOL && $realtime - t_rev < 125.0 + TOL, "revolution 125 ns");
    #1000;
    check(n_pulses > 8 * NCELLS, "ring keeps running");
    run = 1'b0;
    #10;
    begin
      int n0;
      n0 = n_pulses;
      #200;
      check(n_pulses == n0 && q == '0, "ring stops when run is low");
    end
    last_tap = -1;
    first_after_start = 1'b1;
    run = 1'b1;
    #500;
    check(n_pulses > 0 && first_after_start == 1'b0, "ring restarts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
