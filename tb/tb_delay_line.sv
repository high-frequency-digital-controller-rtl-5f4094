// Self-checking testbench of the delay_line model.
//
// For supply voltages from 2.45 V to 2.95 V the test pulse is held high for
// 750 ns and the taps are read at that moment. The expected thermometer code
// is worked out here from the first-order delay law t_d = K*V/(V-Vth)^2:
// the pulse has passed floor(750 ns / t_d) cells and tap i sits at cell
// 33 + i. Voltages whose cell count lies within 2 % of a cell of a boundary
// are skipped. It also checks the zero-error code 11110000 at 2.7 V, the
// roughly 40 mV bin width, that the taps clear as soon as test falls, and
// that a slower line (K_SCALE = 1.1) yields fewer taps.
module tb_delay_line;
  timeunit 1ns;
  timeprecision 1fs;

  localparam real VTH   = 0.8;
  localparam real VNOM  = 2.7;
  localparam real TCONV = 750.0;
  localparam real PC    = 33.0 + 3.5;
  localparam real K     = (TCONV / PC) * (VNOM - VTH) * (VNOM - VTH) / VNOM;

  real        vdd;
  logic       test;
  logic [7:0] t, t_slow;
  int checks = 0, failures = 0;

  delay_line dut (.vdd(vdd), .test(test), .t(t));
  delay_line #(.K_SCALE(1.1)) dut_slow (.vdd(vdd), .test(test), .t(t_slow));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int ones(input logic [7:0] x);
    int n = 0;
    for (int i = 0; i < 8; i++) n += int'(x[i]);
    return n;
  endfunction

  task automatic convert(input real v, output logic [7:0] code, output logic [7:0] code_slow);
    vdd  = v;
    test = 1'b1;
    #(TCONV);
    code      = t;
    code_slow = t_slow;
    test = 1'b0;
    #0.01;
    check(t == '0 && t_slow == '0, "taps clear when test falls");
    #(124.99);
  endtask

  initial begin
    logic [7:0] code, code_slow;
    int prev_n;
    real first_v [9];
    foreach (first_v[i]) first_v[i] = 0.0;
    test = 1'b0;
    vdd  = 2.7;
    #200;
    prev_n = -1;
    for (int mv = 2450; mv <= 2950; mv += 5) begin
      real v, td, cells, frac;
      int  n_exp;
      v     = real'(mv) / 1000.0;
      td    = K * v / ((v - VTH) * (v - VTH));
      cells = TCONV / td;
      frac  = cells - $floor(cells);
      convert(v, code, code_slow);
      n_exp = 0;
      for (int i = 0; i < 8; i++) if (33 + i <= int'($floor(cells))) n_exp++;
      if (frac > 0.02 && frac < 0.98) begin
        check(code == 8'((1 << n_exp) - 1), $sformatf("code at %0d mV: %b expected %0d taps", mv, code, n_exp));
      end
      check(ones(code) >= prev_n, "monotonic");
      check(ones(code_slow) <= ones(code), "slower line passes fewer taps");
      if (ones(code) > prev_n && prev_n >= 0) first_v[ones(code)] = v;
      prev_n = ones(code);
    end
    convert(2.7, code, code_slow);
    check(code == 8'b0000_1111, "zero-error code at 2.7 V");
    // Bin width of the inner bins about 40 mV.
    for (int i = 2; i < 8; i++) begin
      real w;
      w = first_v[i + 1] - first_v[i];
      check(w > 0.030 && w < 0.050, $sformatf("bin %0d width %0.3f V", i, w));
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
