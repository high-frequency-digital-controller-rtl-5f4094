// Programmable look-up-table compensator.
//
// Computes, once per switching period, the control law
//   d(n+1) = d(n) + A(e(n)) + B(e(n-1)) + C(e(n-2))
// where A, B and C are three programmable tables addressed by the present and
// the two previous error codes. Because e takes only nine values (-4..+4),
// each table has nine entries and no multiplier is needed: for a PID law the
// entries are the products a*e, b*e and c*e computed in advance, and any
// nonlinear law can be loaded just as well. The sum is kept in an ACC_W-bit
// signed accumulator (the stored d(n)); the duty command is its magnitude
// bits without the sign bit and without the least significant bit.
//
// Interface: clk is the system clock. Table entries are written through wr
// (one entry per clock, from the programming interface). When run is high and
// e_valid pulses, the accumulator and the error history are updated on that
// clock edge; d_out follows at once and d_valid pulses for one clock. While
// run is low the accumulator and history hold.
//
// The three tables, their 8/9/8-bit entry widths (234 or 225 bits of storage;
// see the README), the 10-bit adder and the reduction to 8 bits follow the
// document. Limiting the accumulator to 0..2^(ACC_W-1)-1, so that it cannot
// wrap or go negative, and the reset value of 0 (the converter ramps up from
// zero duty) are this design's choices.
module lut_compensator
  import dpwm_ctrl_pkg::*;
#(
  parameter int A_W   = 8,
  parameter int B_W   = 9,
  parameter int C_W   = 8,
  parameter int ACC_W = 10,
  parameter int D_W   = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  tbl_wr_t        wr,
  input  logic           run,
  input  err_t           e,
  input  logic           e_valid,
  output logic [D_W-1:0] d_out,
  output logic           d_valid
);
  timeunit 1ns;
  timeprecision 1fs;

  localparam int N_E   = 2 * E_MAX + 1;
  localparam int SUM_W = ACC_W + 2;
  localparam logic signed [SUM_W-1:0] ACC_MAX = SUM_W'((1 << (ACC_W - 1)) - 1);

  logic signed [A_W-1:0] tab_a [N_E];
  logic signed [B_W-1:0] tab_b [N_E];
  logic signed [C_W-1:0] tab_c [N_E];

  logic signed [ACC_W-1:0] acc;     // d(n) before truncation
  err_t                    e1, e2;  // e(n-1), e(n-2)
  logic signed [SUM_W-1:0] sum;

  function automatic logic [3:0] index(input err_t x);
    return 4'(x + err_t'(E_MAX));
  endfunction

  // Table writes from the programming interface.
  always_ff @(posedge clk) begin
    if (wr.en) begin
      unique case (wr.tbl)
        TBL_A:   tab_a[wr.idx] <= A_W'(wr.data);
        TBL_B:   tab_b[wr.idx] <= B_W'(wr.data);
        TBL_C:   tab_c[wr.idx] <= C_W'(wr.data);
        default: ;
      endcase
    end
  end

  always_comb begin
    sum = SUM_W'(acc)
        + SUM_W'(tab_a[index(e)])
        + SUM_W'(tab_b[index(e1)])
        + SUM_W'(tab_c[index(e2)]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      e1      <= '0;
      e2      <= '0;
      d_valid <= 1'b0;
    end else begin
      d_valid <= 1'b0;
      if (run && e_valid) begin
        if (sum < 0)            acc <= '0;
        else if (sum > ACC_MAX) acc <= ACC_W'(ACC_MAX);
        else                    acc <= ACC_W'(sum);
        e1      <= e;
        e2      <= e1;
        d_valid <= 1'b1;
      end
    end
  end

  assign d_out = acc[ACC_W-2:1];

  // An error code outside -4..+4 would address past the tables.
  property p_e_in_range;
    @(posedge clk) disable iff (!rst_n)
      (run && e_valid) |-> (e >= -err_t'(E_MAX) && e <= err_t'(E_MAX));
  endproperty
  a_e_in_range: assert property (p_e_in_range);

  property p_wr_in_range;
    @(posedge clk) disable iff (!rst_n)
      wr.en |-> (wr.idx < 4'(N_E) && wr.tbl != tbl_sel_t'(2'd3));
  endproperty
  a_wr_in_range: assert property (p_wr_in_range);

endmodule
