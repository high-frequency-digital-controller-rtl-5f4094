// Hybrid delay-line/counter digital pulse-width modulator.
//
// An N_BITS duty command d is split into NC counter bits d[N_BITS-1:ND] and
// ND = N_BITS-NC delay-line bits d[ND-1:0]. The 2^ND taps of a free-running
// ring oscillator (dpwm_ring) divide one ring revolution into 2^ND slots; an
// NC-bit counter advanced once per revolution counts 2^NC revolutions per
// switching period, so a period has 2^N_BITS slots. Slot s = cnt*2^ND + j is
// the pulse of tap j while the counter holds cnt. The output SR flip-flop is
// set by tap 0 in counter state 0 (start of the period) and reset when the
// counter equals d[N_BITS-1:ND] and the pulse reaches the tap chosen by the
// 2^ND:1 multiplexer from d[ND-1:0]; the output is therefore high for d slots,
// duty = d/2^N_BITS.
//
// Interface: taps come from the ring; sys_clk is the inverted last tap, whose
// rising edge falls between two tap pulses and clocks the counter here and
// all synchronous logic of the controller. cnt is the counter (the phase of
// the switching period in eighths for the default sizes). d_in is captured at
// the start of each period after clamping to [DMIN, DMAX]. en is also captured
// at the start of a period; while it is low the output stays low.
//
// Timing: 1 MHz switching frequency, 8 MHz system clock, 8-bit resolution
// (NC = 3, 32-cell ring), as in the document's prototype. The clamp limits
// of 8/256 (3.1 %) and 249/256 (97.3 %) match the document's measured minimum
// and maximum duty ratios; how the prototype enforced them is not known, the
// clamp at the input is this design's choice. Counting from the inverted last
// tap and numbering the multiplexer inputs by tap index are also choices of
// this design.
//
// The output SR flip-flop is kept as a level-sensitive latch (always_latch),
// because set and reset are pulses from the asynchronous ring and no clock
// exists that is fast enough to sample them; a latch warning for c_q is
// expected.
module hybrid_dpwm #(
  parameter int N_BITS = 8,
  parameter int NC     = 3,
  parameter int DMIN   = 8,
  parameter int DMAX   = 249,
  localparam int ND    = N_BITS - NC,
  localparam int NR    = 1 << ND
) (
  input  logic              rst_n,
  input  logic [NR-1:0]     taps,
  input  logic              en,
  input  logic [N_BITS-1:0] d_in,
  output logic              sys_clk,
  output logic [NC-1:0]     cnt,
  output logic              c_out
);
  timeunit 1ns;
  timeprecision 1fs;

  logic [N_BITS-1:0] d_q;       // duty command for the current period
  logic              en_q;
  logic              cmp_hi;    // comparator 1: cnt == d[N_BITS-1:ND]
  logic              cmp_zero;  // comparator 2: cnt == 0
  logic              tap_sel;   // multiplexer output
  logic              set_p, reset_p;
  logic              c_q;

  assign sys_clk = ~taps[NR-1];

  function automatic logic [N_BITS-1:0] clamp(input logic [N_BITS-1:0] x);
    if (x < N_BITS'(DMIN))      return N_BITS'(DMIN);
    else if (x > N_BITS'(DMAX)) return N_BITS'(DMAX);
    else                        return x;
  endfunction

  // Counter; the reset value makes the first clock edge start period 0.
  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '1;
      d_q  <= N_BITS'(DMIN);
      en_q <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == '1) begin            // this edge starts a new period
        d_q  <= clamp(d_in);
        en_q <= en;
      end
    end
  end

  always_comb begin
    cmp_hi   = (cnt == d_q[N_BITS-1:ND]);
    cmp_zero = (cnt == '0);
    tap_sel  = taps[d_q[ND-1:0]];
    set_p    = en_q & cmp_zero & taps[0];
    reset_p  = ~en_q | (cmp_hi & tap_sel);
  end

  // Output SR flip-flop, reset dominant.
  always_latch begin
    if (!rst_n)       c_q = 1'b0;
    else if (reset_p) c_q = 1'b0;
    else if (set_p)   c_q = 1'b1;
  end

  assign c_out = c_q;

endmodule
