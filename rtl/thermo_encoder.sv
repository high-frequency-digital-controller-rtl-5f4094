// Encoder of the delay-line A/D converter.
//
// The sampled taps q[0..M-1] (q1..q8) hold a thermometer code: the number of
// ones tells how far the test pulse travelled, which grows with the supply of
// the delay line. The encoder returns that count minus M/2 as a signed code v,
// so the document's zero-error pattern 11110000 gives v = 0, a higher voltage
// gives positive v and a lower one negative v (-4..+4 for M = 8). The error
// signal e = V_ref - V_sense is -v; the A/D block applies that sign.
//
// Counting ones instead of locating the first zero also tolerates a stray
// bubble in the code; the document leaves the encoding scheme to a reference it
// does not reproduce, so this scheme is this design's choice. Purely
// combinational.
module thermo_encoder #(
  parameter int M   = 8,
  parameter int V_W = 4
) (
  input  logic                  [M-1:0] q,
  output logic signed [V_W-1:0]         v
);
  timeunit 1ns;
  timeprecision 1fs;

  always_comb begin
    int ones;
    ones = 0;
    for (int i = 0; i < M; i++) ones += int'(q[i]);
    v = V_W'(ones - M / 2);
  end

endmodule
