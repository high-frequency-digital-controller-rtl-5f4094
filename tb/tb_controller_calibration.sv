// Testbench of the digital calibration of the delay-line A/D converter.
//
// Three controllers regulate identical buck power stages (5 V in, 1 A
// load). In both, every delay in the A/D delay line is 10 % longer than the
// design value (LINE_K_SCALE = 1.1), as a process or temperature shift would
// make it. The uncalibrated controller (CALIBRATE = 0) then regulates to a
// voltage well above the 2.7 V it was designed for, because the slower line
// needs a higher supply to reach the zero-error taps. The calibrated one
// (CALIBRATE = 1) converts the 2.7 V reference in the first half of every
// period and subtracts, and must regulate to 2.7 V within one bin. The test
// also checks that the calibrated converter's reference result e_ref shows
// the offset (is not 0) and that select toggles once per half period. A third
// controller repeats the reference conversion only every eighth period
// (CAL_INTERVAL = 8): it must regulate just as well, with a test pulse in
// 9 of every 16 half periods instead of in every one.
module tb_controller_calibration;
  timeunit 1ns;
  timeprecision 1fs;
  import dpwm_ctrl_pkg::*;

  localparam real VREF = 2.7;

  logic rst_n, ring_run;
  real  vg, r_load, v_ref;
  int checks = 0, failures = 0;

  real        vs   [3];
  real        il   [3];
  logic [4:0] addr [3];
  logic       rd   [3];
  logic [8:0] data [3];
  logic       out  [3];
  logic       sclk [3];
  logic       rdy  [3];
  logic [2:0] cnt  [3];
  logic       tst  [3], smp [3], sel [3], ev [3], dv [3];
  logic [7:0] q    [3], d [3];
  err_t       eref [3], e [3];

  for (genvar g = 0; g < 3; g++) begin : g_loop
    dpwm_controller_top #(.CALIBRATE(g != 0), .CAL_INTERVAL(g == 2 ? 8 : 1),
                          .LINE_K_SCALE(1.1)) dut (
      .rst_n, .ring_run, .v_sense(vs[g]), .v_ref, .mem_addr(addr[g]), .mem_rd(rd[g]),
      .mem_data(data[g]), .out(out[g]), .sys_clk(sclk[g]), .ready(rdy[g]), .cnt(cnt[g]),
      .test(tst[g]), .sample(smp[g]), .select(sel[g]), .adc_q(q[g]), .e_ref(eref[g]),
      .e(e[g]), .e_valid(ev[g]), .d(d[g]), .d_valid(dv[g]));
    ext_memory_model u_mem (.addr(addr[g]), .rd(rd[g]), .data(data[g]));
    buck_model u_buck (.c(out[g]), .vg(vg), .r_load(r_load), .vo(vs[g]), .il(il[g]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  int n_sel_rise = 0;
  int n_test_rise [3] = '{0, 0, 0};
  always @(posedge sel[1]) n_sel_rise++;
  always @(posedge tst[1]) n_test_rise[1]++;
  always @(posedge tst[2]) n_test_rise[2]++;

  real avg [3];
  initial begin
    rst_n = 1'b0; ring_run = 1'b0; vg = 5.0; r_load = 2.7; v_ref = VREF;
    #1 rst_n = 1'b1;
    #1 rst_n = 1'b0;
    #100 ring_run = 1'b1;
    #400 rst_n = 1'b1;
    #300000;
    avg = '{0.0, 0.0, 0.0};
    n_test_rise = '{0, 0, 0};
    for (int i = 0; i < 2000; i++) begin
      #10;
      avg[0] += vs[0] / 2000.0;
      avg[1] += vs[1] / 2000.0;
      avg[2] += vs[2] / 2000.0;
    end
    $display("uncalibrated: %0.4f V (e_ref unused), calibrated: %0.4f V, e_ref = %0d",
             avg[0], avg[1], eref[1]);
    $display("reference every 8th period: %0.4f V, e_ref = %0d, test pulses %0d (every period: %0d)",
             avg[2], eref[2], n_test_rise[2], n_test_rise[1]);
    check(avg[0] > VREF + 0.06, "uncalibrated converter is offset by the slow line");
    check(avg[1] > VREF - 0.04 && avg[1] < VREF + 0.04, "calibrated converter regulates to 2.7 V");
    check(eref[1] != 0, "reference conversion shows the offset");
    check(avg[2] > VREF - 0.04 && avg[2] < VREF + 0.04, "calibration every 8th period regulates to 2.7 V");
    check(eref[2] == eref[1], "same reference result with the longer interval");
    check(n_test_rise[1] >= 38 && n_test_rise[1] <= 42, $sformatf("two conversions per period (%0d)", n_test_rise[1]));
    check(n_test_rise[2] >= 21 && n_test_rise[2] <= 25, $sformatf("reference conversion every 8th period (%0d)", n_test_rise[2]));
    check(n_sel_rise > 250 && n_sel_rise < 350, $sformatf("select toggles once per period (%0d)", n_sel_rise));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
