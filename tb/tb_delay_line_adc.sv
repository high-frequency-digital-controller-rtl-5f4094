// Self-checking testbench of delay_line_adc, both configurations.
//
// The testbench runs its own 3-bit slot counter on a 125 ns clock and drives
// random tap patterns that change every slot. For the basic configuration it
// checks in every slot the test, sample and select levels against the
// expected period timing (test low only in slot 7, sample in slot 6), that the
// taps present at the start of slot 6 are the ones captured, and that e equals
// 4 minus the number of ones, with e_valid during slot 6 only. For the
// calibrated configuration it checks test (low in slots 3 and 7), sample
// (slots 2 and 6), select (high in slots 3..6), and that the result in slot 7
// equals (ones_ref - 4) - (ones_sense - 4) limited to -4..+4. A third
// instance repeats the reference conversion only every fourth period: it must
// show the calibrated timing in those periods, no test pulse and no sample in
// the first half of the others, and results that use the last stored e_ref.
module tb_delay_line_adc;
  timeunit 1ns;
  timeprecision 1fs;
  import dpwm_ctrl_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [2:0] cnt;
  logic       en;
  logic [7:0] taps;
  logic       test0, sample0, select0, e_valid0;
  logic       test1, sample1, select1, e_valid1;
  logic       test2, sample2, select2, e_valid2;
  logic [7:0] q0, q1, q2;
  err_t       e0, e1, e2, eref0, eref1, eref2;
  int checks = 0, failures = 0;

  delay_line_adc #(.CALIBRATE(1'b0)) dut0 (
    .clk, .rst_n, .cnt, .en, .taps, .test(test0), .sample(sample0), .select(select0),
    .q(q0), .e(e0), .e_valid(e_valid0), .e_ref(eref0));
  delay_line_adc #(.CALIBRATE(1'b1)) dut1 (
    .clk, .rst_n, .cnt, .en, .taps, .test(test1), .sample(sample1), .select(select1),
    .q(q1), .e(e1), .e_valid(e_valid1), .e_ref(eref1));
  delay_line_adc #(.CALIBRATE(1'b1), .CAL_INTERVAL(4)) dut2 (
    .clk, .rst_n, .cnt, .en, .taps, .test(test2), .sample(sample2), .select(select2),
    .q(q2), .e(e2), .e_valid(e_valid2), .e_ref(eref2));

  always #62.5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (slot %0d, t=%0t)", what, cnt, $realtime);
    end
  endtask

  function automatic int ones(input logic [7:0] x);
    int n = 0;
    for (int i = 0; i < 8; i++) n += int'(x[i]);
    return n;
  endfunction

  logic [7:0] taps_at[8];   // taps present at the start of each slot
  int n_valid0 = 0, n_valid1 = 0, n_ref2 = 0, n_skip2 = 0;
  int period = 3;            // period index modulo 4, as the interval counter
  int eref_model = 0;        // e_ref expected in the interval instance

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cnt <= '1;
    else        cnt <= cnt + 1'b1;

  initial begin
    rst_n = 1'b1;
    en    = 1'b0;
    taps  = '0;
    #1 rst_n = 1'b0;
    #200 rst_n = 1'b1;
    en = 1'b1;
    repeat (400) begin
      @(posedge clk);
      #1;
      taps_at[cnt] = taps;
      if (cnt == 3'd0) period = (period + 1) % 4;
      // Basic configuration
      check(test0 == (cnt != 3'd7), "basic test");
      check(sample0 == (cnt == 3'd6), "basic sample");
      check(e_valid0 == (cnt == 3'd6), "basic e_valid in slot 6");
      if (cnt == 3'd6) begin
        check(q0 == taps_at[6], "basic sample flip-flops");
        check(int'(e0) == 4 - ones(taps_at[6]), $sformatf("basic e=%0d taps=%b", e0, taps_at[6]));
        n_valid0++;
      end
      // Calibrated configuration
      check(test1 == (cnt != 3'd3 && cnt != 3'd7), "calibrated test");
      check(sample1 == (cnt == 3'd2 || cnt == 3'd6), "calibrated sample");
      check(select1 == (cnt >= 3'd3 && cnt <= 3'd6), "calibrated select");
      check(e_valid1 == (cnt == 3'd7), "calibrated e_valid in slot 7");
      if (cnt == 3'd7) begin
        int exp_e;
        exp_e = (ones(taps_at[2]) - 4) - (ones(taps_at[6]) - 4);
        if (exp_e > 4)  exp_e = 4;
        if (exp_e < -4) exp_e = -4;
        check(int'(e1) == exp_e, $sformatf("calibrated e=%0d expected %0d", e1, exp_e));
        check(int'(eref1) == ones(taps_at[2]) - 4, "calibrated e_ref");
        n_valid1++;
      end
      // Calibrated, reference conversion every fourth period
      check(test2 == ((cnt >= 3'd4 && cnt <= 3'd6) || (period == 0 && cnt <= 3'd2)),
            $sformatf("interval test (period %0d)", period));
      check(sample2 == (cnt == 3'd6 || (period == 0 && cnt == 3'd2)),
            $sformatf("interval sample (period %0d)", period));
      check(select2 == select1, "interval select");
      check(e_valid2 == (cnt == 3'd7), "interval e_valid in slot 7");
      if (cnt == 3'd3 && period == 0) eref_model = ones(taps_at[2]) - 4;
      if (cnt == 3'd7) begin
        int exp_e;
        exp_e = eref_model - (ones(taps_at[6]) - 4);
        if (exp_e > 4)  exp_e = 4;
        if (exp_e < -4) exp_e = -4;
        check(int'(eref2) == eref_model, $sformatf("interval e_ref=%0d expected %0d", eref2, eref_model));
        check(int'(e2) == exp_e, $sformatf("interval e=%0d expected %0d", e2, exp_e));
        if (period == 0) n_ref2++;
        else             n_skip2++;
      end
      // New random taps in the middle of the slot; mostly thermometer codes.
      #30;
      if ($urandom_range(3) == 0) taps = 8'($urandom);
      else                        taps = 8'((1 << $urandom_range(8)) - 1);
    end
    check(n_valid0 > 40 && n_valid1 > 40, "conversions happened");
    check(n_ref2 > 10 && n_skip2 > 30, "reference and skipped periods happened");
    // Disabled: no conversions, test held low.
    en = 1'b0;
    repeat (16) begin
      @(posedge clk);
      #1;
      check(!test0 && !test1 && !test2 && !e_valid0 && !e_valid1 && !e_valid2, "disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
