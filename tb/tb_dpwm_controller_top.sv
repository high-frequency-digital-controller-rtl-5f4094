// End-to-end testbench of dpwm_controller_top at its default parameters.
//
// The controller closes the loop around a switched buck power stage model
// (Vg = 5 V, L = 1 uH, C = 100 uF, 1 A load) and loads PID tables
// (a = 25, b = -24, c = 1) from an external memory model. The run:
//   1. power-up: ring started, table load, output held low until ready;
//   2. soft start from zero duty (error saturated at +4) until the output sits in the zero-error bin around 2.7 V;
//   3. load step 1 A -> 2 A: the output must stay inside the +-180 mV
//      conversion range and return to the zero-error bin;
//   4. line step 5 V -> 6 V: the output returns to the zero-error bin;
//   5. load removed, then a controller reset: the output stage is held off
//      during reset and reloading, the tables are loaded again, the duty
//      command restarts from zero and the output returns to the zero bin.
// Throughout it checks the 1 us switching period, the 125 ns system clock,
// one conversion per period, and that every output pulse
// lasts exactly (duty command of that period) x 1000/256 ns. It counts how
// often each mechanism occurred (table writes, conversions, positive and
// negative errors, saturated error codes, steady zero error; the duty
// clamp never acts in closed loop and is covered by tb_hybrid_dpwm), and
// fails for any that never did.
module tb_dpwm_controller_top;
  timeunit 1ns;
  timeprecision 1fs;
  import dpwm_ctrl_pkg::*;

  localparam real TD   = 1000.0 / 256.0;
  localparam real VREF = 2.7;

  logic       rst_n, ring_run;
  real        v_sense, v_ref, vg, r_load, il;
  logic [4:0] mem_addr;
  logic       mem_rd;
  logic [8:0] mem_data;
  logic       out, sys_clk, ready, test, sample, select, e_valid, d_valid;
  logic [2:0] cnt;
  logic [7:0] adc_q, d;
  err_t       e_ref, e;

  int checks = 0, failures = 0;

  dpwm_controller_top dut (
    .rst_n, .ring_run, .v_sense, .v_ref, .mem_addr, .mem_rd, .mem_data, .out,
    .sys_clk, .ready, .cnt, .test, .sample, .select, .adc_q, .e_ref, .e,
    .e_valid, .d, .d_valid);

  ext_memory_model u_mem (.addr(mem_addr), .rd(mem_rd), .data(mem_data));

  buck_model u_buck (.c(out), .vg(vg), .r_load(r_load), .vo(v_sense), .il(il));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $realtime);
    end
  endtask

  // ---- mechanism counters
  int n_tbl_wr = 0, n_conv = 0, n_e_pos = 0, n_e_neg = 0, n_e_sat = 0;
  int n_zero_run = 0, n_out_before_ready = 0;
  int zero_streak = 0;

  always @(posedge sys_clk) begin
    if (rst_n && dut.tbl_wr.en) n_tbl_wr++;
  end

  always @(negedge sys_clk) begin
    if (e_valid) begin
      n_conv++;
      if (e > 0)  n_e_pos++;
      if (e < 0)  n_e_neg++;
      if (e == 4 || e == -4) n_e_sat++;
      if (e == 0) zero_streak++; else zero_streak = 0;
      if (zero_streak == 20) n_zero_run++;
    end
  end

  // ---- pulse width and period checks
  realtime t_rise = 0.0, t_prev = 0.0;
  int      d_period;        // duty command in force for the current period
  int      n_pulses = 0;
  always @(posedge out) begin
    if (!ready) n_out_before_ready++;
    t_prev = t_rise;
    t_rise = $realtime;
    d_period = int'(dut.u_dpwm.d_q);
    if (n_pulses > 1)
      check($realtime - t_prev > 999.99 && $realtime - t_prev < 1000.01, "switching period 1 us");
    n_pulses++;
  end
  always @(negedge out) begin
    if (ready && n_pulses > 1)
      check($realtime - t_rise > d_period * TD - 0.01 && $realtime - t_rise < d_period * TD + 0.01,
            $sformatf("pulse width %0.3f for d=%0d", $realtime - t_rise, d_period));
  end

  realtime t_clk = 0.0;
  int n_clk = 0;
  always @(posedge sys_clk) begin
    if (n_clk > 2)
      check($realtime - t_clk > 124.99 && $realtime - t_clk < 125.01, "system clock 125 ns");
    t_clk = $realtime;
    n_clk++;
  end

  // Average of v_sense over one switching period.
  task automatic avg_vo(output real v);
    real s;
    s = 0.0;
    for (int i = 0; i < 100; i++) begin
      #10;
      s += v_sense;
    end
    v = s / 100.0;
  endtask

  task automatic wait_settled(input int max_us, input string what);
    int t0;
    real v;
    t0 = 0;
    while (zero_streak < 20 && t0 < max_us) begin
      #1000;
      t0++;
    end
    avg_vo(v);
    check(zero_streak >= 20, {what, ": error code settles at 0"});
    check(v > VREF - 0.04 && v < VREF + 0.04, $sformatf("%s: output %0.4f V near 2.7 V", what, v));
    $display("%s: settled, vo = %0.4f V, d = %0d, t = %0t", what, v, d, $realtime);
  endtask

  real vmin, vmax;
  bit  track = 1'b0;
  always #5 if (track) begin
    if (v_sense < vmin) vmin = v_sense;
    if (v_sense > vmax) vmax = v_sense;
  end

  initial begin
    // Reset low from time 0, with a falling edge before the ring starts.
    rst_n = 1'b0; ring_run = 1'b0;
    vg = 5.0; r_load = 2.7; v_ref = VREF;
    #1 rst_n = 1'b1;
    #1 rst_n = 1'b0;
    #100 ring_run = 1'b1;
    #400 rst_n = 1'b1;
    // 1. table load
    wait (ready);
    check(n_tbl_wr == 27, $sformatf("27 table writes (%0d)", n_tbl_wr));
    check($realtime < 5000.0, "tables loaded within 5 us");
    check(n_out_before_ready == 0, "output low before tables are loaded");
    // 2. soft start
    wait_settled(600, "start-up");
    // 3. load step
    zero_streak = 0;
    vmin = 10.0; vmax = 0.0; track = 1'b1;
    r_load = 1.35;
    #5000;
    wait_settled(600, "load step 1 A -> 2 A");
    track = 1'b0;
    $display("load step: vo range %0.4f .. %0.4f V", vmin, vmax);
    check(vmin > VREF - 0.18 && vmax < VREF + 0.18, "load step stays within +-180 mV");
    // 4. line step
    zero_streak = 0;
    vg = 6.0;
    #5000;
    wait_settled(600, "line step 5 V -> 6 V");
    // 5. no load, then a controller reset: tables reloaded, accumulator
    //    restarts from zero.
    zero_streak = 0;
    r_load = 1000.0;
    rst_n = 1'b0;
    n_pulses = 0;
    #2000 rst_n = 1'b1;
    wait (ready);
    check(n_tbl_wr == 54, $sformatf("tables reloaded after reset (%0d writes)", n_tbl_wr));
    wait_settled(600, "restart after reset");
    // Mechanisms
    $display("table writes %0d, conversions %0d, e>0 %0d, e<0 %0d, |e|=4 %0d, settled %0d",
             n_tbl_wr, n_conv, n_e_pos, n_e_neg, n_e_sat, n_zero_run);
    check(n_conv > 100,     "conversions happened");
    check(n_e_pos > 0,      "positive error occurred");
    check(n_e_neg > 0,      "negative error occurred");
    check(n_e_sat > 0,      "saturated error code occurred");
    check(n_zero_run >= 4,  "steady zero error reached four times");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
