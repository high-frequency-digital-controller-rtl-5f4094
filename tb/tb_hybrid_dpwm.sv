// Self-checking testbench of hybrid_dpwm.
//
// The testbench generates the ring taps itself (one-hot pulses, one every
// 1000/256 ns, each half a slot wide) so that the DPWM logic is tested on its
// own. For a list of duty commands, including values outside the clamp
// limits, it measures the high time and the period of the output and compares
// them with clamp(d) slots and 256 slots. It also checks the system-clock
// period (125 ns), the counter sequence, that d_in is only taken at the start
// of a period, and that the output stays low while en is low.
module tb_hybrid_dpwm;
  timeunit 1ns;
  timeprecision 1fs;

  localparam int  N_BITS = 8;
  localparam int  NC     = 3;
  localparam int  NR     = 32;
  localparam real TD     = 1000.0 / 256.0;
  localparam real TOL    = 0.01;

  logic              rst_n;
  logic [NR-1:0]     taps;
  logic              en;
  logic [N_BITS-1:0] d_in;
  logic              sys_clk;
  logic [NC-1:0]     cnt;
  logic              c_out;

  int checks = 0, failures = 0;

  hybrid_dpwm dut (.*);

  // Ring taps.
  initial begin
    taps = '0;
    forever begin
      for (int i = 0; i < NR; i++) begin
        taps[i] = 1'b1;
        #(TD / 2.0);
        taps[i] = 1'b0;
        #(TD / 2.0);
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int clampd(input int d);
    if (d < 8)   return 8;
    if (d > 249) return 249;
    return d;
  endfunction

  // Times of the output edges.
  realtime t_rise, t_fall, t_prev_rise;
  int n_rise = 0;
  always @(posedge c_out) begin
    t_prev_rise = t_rise;
    t_rise      = $realtime;
    n_rise++;
  end
  always @(negedge c_out) t_fall = $realtime;

  // Counter must step by one on every system clock.
  logic [NC-1:0] cnt_prev;
  realtime t_clk_prev = 0.0;
  int n_clk = 0;
  always @(posedge sys_clk) begin
    #0.1;
    if (n_clk > 1 && rst_n) begin
      check(cnt == cnt_prev + 1'b1, "counter increments");
      check($realtime - t_clk_prev > 125.0 - TOL && $realtime - t_clk_prev < 125.0 + TOL,
            "system clock period 125 ns");
    end
    cnt_prev   = cnt;
    t_clk_prev = $realtime;
    n_clk++;
  end

  initial begin
    int dl[] = '{0, 5, 8, 9, 11, 31, 32, 33, 64, 100, 127, 128, 129, 200, 224, 248, 249, 250, 255};
    rst_n = 1'b1;
    en    = 1'b0;
    d_in  = 8'd100;
    #1 rst_n = 1'b0;
    #50 rst_n = 1'b1;
    // en low: two periods with no output pulse.
    #2100;
    check(n_rise == 0 && c_out == 1'b0, "output low while en is low");
    en = 1'b1;
    foreach (dl[k]) begin
      int n0;
      d_in = N_BITS'(dl[k]);
      // Wait for the new value to take effect, then measure a whole period.
      n0 = n_rise;
      wait (n_rise == n0 + 2);
      @(negedge c_out);
      #1;
      check(t_fall - t_rise > clampd(dl[k]) * TD - TOL && t_fall - t_rise < clampd(dl[k]) * TD + TOL,
            $sformatf("high time for d=%0d: %0.3f ns, expected %0.3f", dl[k], t_fall - t_rise, clampd(dl[k]) * TD));
      check(t_rise - t_prev_rise > 1000.0 - TOL && t_rise - t_prev_rise < 1000.0 + TOL,
            $sformatf("period for d=%0d: %0.3f ns", dl[k], t_rise - t_prev_rise));
    end
    // d_in changes in the middle of a period do not disturb the pulse.
    d_in = 8'd128;
    begin
      int n0;
      n0 = n_rise;
      wait (n_rise == n0 + 2);
      #(300.0);
      d_in = 8'd20;           // mid-period: pulse must still end at 128 slots
      @(negedge c_out);
      check($realtime - t_rise > 128 * TD - TOL && $realtime - t_rise < 128 * TD + TOL,
            "d_in captured only at period start");
    end
    // Disable again: output goes low from the next period on.
    en = 1'b0;
    #2500;
    begin
      int n0;
      n0 = n_rise;
      #2000;
      check(n_rise == n0 && c_out == 1'b0, "output stays low after en falls");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
