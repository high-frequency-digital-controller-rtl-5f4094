// Self-checking testbench of the analog_switch model: the output must follow
// v_ref while select is low and v_sense while it is high, also when the
// selected input changes.
module tb_analog_switch;
  timeunit 1ns;
  timeprecision 1fs;

  real  v_ref, v_sense, v_out;
  logic select;
  int checks = 0, failures = 0;

  analog_switch dut (.*);

  task automatic check(input real expect_v);
    checks++;
    if (v_out != expect_v) begin
      failures++;
      $display("FAIL select=%b out=%f expected %f", select, v_out, expect_v);
    end
  endtask

  initial begin
    for (int i = 0; i < 20; i++) begin
      v_ref   = 2.5 + 0.01 * i;
      v_sense = 2.0 + 0.05 * i;
      select  = 1'b0;
      #1 check(v_ref);
      select  = 1'b1;
      #1 check(v_sense);
      v_sense = v_sense + 0.3;
      #1 check(v_sense);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
