// Self-checking testbench of lut_loader.
//
// A random 27-word table image sits in an asynchronous memory written here.
// The testbench checks that the loader reads every address once, that each
// table write carries the table, entry and data of the word read (table A
// from words 0..8, B from 9..17, C from 18..26, entry = offset), that ready
// rises only after the last write on the 29th clock after reset, and that a
// second reset repeats the load.
module tb_lut_loader;
  timeunit 1ns;
  timeprecision 1fs;
  import dpwm_ctrl_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic [4:0] mem_addr;
  logic       mem_rd;
  logic [8:0] mem_data;
  tbl_wr_t    wr;
  logic       ready;
  int checks = 0, failures = 0;

  lut_loader dut (.*);

  always #62.5 clk = ~clk;

  logic [8:0] image [32];
  always_comb mem_data = mem_rd ? image[mem_addr] : 9'h1AA;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run_load();
    int n_wr, cycles;
    bit seen [27];
    foreach (seen[i]) seen[i] = 1'b0;
    foreach (image[i]) image[i] = 9'($urandom);
    rst_n = 1'b0;
    #200;
    @(negedge clk);
    rst_n = 1'b1;
    n_wr = 0;
    cycles = 0;
    while (!ready && cycles < 100) begin
      @(posedge clk);
      #1;
      cycles++;
      if (wr.en) begin
        int a;
        a = int'(wr.tbl) * 9 + int'(wr.idx);
        check(a < 27 && wr.idx < 9, "write in range");
        if (a < 27) begin
          check(!seen[a], "each entry written once");
          seen[a] = 1'b1;
          check(wr.data == image[a], $sformatf("data of entry %0d", a));
        end
        n_wr++;
      end
    end
    check(n_wr == 27, $sformatf("27 writes (%0d)", n_wr));
    check(cycles == 29, $sformatf("ready after 29 clocks (%0d)", cycles));
    @(posedge clk);
    #1;
    check(ready && !wr.en && !mem_rd, "idle after loading");
  endtask

  initial begin
    rst_n = 1'b1;
    #1;
    run_load();
    run_load();
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
