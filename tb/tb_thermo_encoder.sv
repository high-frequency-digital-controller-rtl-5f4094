// Self-checking testbench of thermo_encoder: every 8-bit input pattern is
// applied and the output compared with (number of ones) - 4; the document's
// zero-error pattern 11110000 (q1..q4 set) must give 0.
module tb_thermo_encoder;
  timeunit 1ns;
  timeprecision 1fs;

  logic        [7:0] q;
  logic signed [3:0] v;
  int checks = 0, failures = 0;

  thermo_encoder dut (.q(q), .v(v));

  initial begin
    for (int p = 0; p < 256; p++) begin
      int ones;
      q = 8'(p);
      #1;
      ones = 0;
      for (int i = 0; i < 8; i++) if (p & (1 << i)) ones++;
      checks++;
      if (int'(v) != ones - 4) begin
        failures++;
        $display("FAIL q=%b v=%0d", q, v);
      end
    end
    q = 8'b0000_1111;   // q1..q4 set
    #1;
    checks++;
    if (v != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
