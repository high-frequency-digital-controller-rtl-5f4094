// Self-checking testbench of lut_compensator.
//
// Fills the three tables with random entries of their widths (8, 9, 8 bits)
// through the write port, then applies a random error sequence -4..+4 with
// e_valid pulses at random spacing. A reference model kept here computes
// acc = limit(acc + A[e(n)] + B[e(n-1)] + C[e(n-2)], 0, 511) and the duty
// command acc[8:1]; d_out and d_valid are compared one clock after every
// e_valid. Some steps use PID-like tables so the accumulator also reaches and
// leaves both limits; those events are counted. With run low nothing changes.
module tb_lut_compensator;
  timeunit 1ns;
  timeprecision 1fs;
  import dpwm_ctrl_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  tbl_wr_t    wr;
  logic       run;
  err_t       e;
  logic       e_valid;
  logic [7:0] d_out;
  logic       d_valid;
  int checks = 0, failures = 0;

  lut_compensator dut (.*);

  always #62.5 clk = ~clk;

  int ta[9], tb_[9], tc[9];
  int acc_m, e1_m, e2_m;
  int n_top = 0, n_bottom = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic write(input tbl_sel_t t, input int i, input int v);
    @(negedge clk);
    wr.en = 1'b1; wr.tbl = t; wr.idx = 4'(i); wr.data = 9'(v);
    @(negedge clk);
    wr.en = 1'b0;
  endtask

  task automatic load(input bit pid);
    for (int i = 0; i < 9; i++) begin
      if (pid) begin
        ta[i] = 20 * (i - 4); tb_[i] = -17 * (i - 4); tc[i] = 3 * (i - 4);
      end else begin
        ta[i] = $urandom_range(255) - 128;
        tb_[i] = $urandom_range(511) - 256;
        tc[i] = $urandom_range(255) - 128;
      end
      write(TBL_A, i, ta[i]);
      write(TBL_B, i, tb_[i]);
      write(TBL_C, i, tc[i]);
    end
  endtask

  task automatic step(input int ev);
    int s;
    @(negedge clk);
    e = err_t'(ev); e_valid = 1'b1;
    @(negedge clk);
    e_valid = 1'b0;
    s = acc_m + ta[ev + 4] + tb_[e1_m + 4] + tc[e2_m + 4];
    if (s < 0)   begin s = 0;   n_bottom++; end
    if (s > 511) begin s = 511; n_top++;    end
    acc_m = s; e2_m = e1_m; e1_m = ev;
    check(d_valid == 1'b1, "d_valid one clock after e_valid");
    check(int'(d_out) == (acc_m >> 1), $sformatf("d=%0d expected %0d", d_out, acc_m >> 1));
    repeat ($urandom_range(3)) begin
      @(negedge clk);
      check(d_valid == 1'b0, "d_valid is a single pulse");
    end
  endtask

  initial begin
    rst_n = 1'b1; wr = '0; run = 1'b0; e = '0; e_valid = 1'b0;
    #1 rst_n = 1'b0;
    acc_m = 0; e1_m = 0; e2_m = 0;
    #300 rst_n = 1'b1;
    load(1'b0);
    // run low: e_valid ignored
    @(negedge clk); e = 4'sd3; e_valid = 1'b1;
    @(negedge clk); e_valid = 1'b0;
    check(d_out == 8'd0 && d_valid == 1'b0, "no update while run is low");
    run = 1'b1;
    for (int r = 0; r < 4; r++) begin
      load(r[0]);
      repeat (150) step(int'($urandom_range(8)) - 4);
      repeat (30) step(4);     // drive to the upper limit
      repeat (30) step(-4);    // and down to zero
    end
    check(n_top > 0 && n_bottom > 0, "both accumulator limits reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
