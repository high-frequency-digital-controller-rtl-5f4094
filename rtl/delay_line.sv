// Behavioural model (not synthesizable logic as written) of the A/D delay line.
//
// A chain of NCELLS identical delay cells is powered from the analog input
// vdd (the sensed output voltage, or the reference during calibration). Each
// cell passes a rising input to its output after a propagation delay
//   t_d = K * vdd / (vdd - VTH)^2
// (first-order CMOS gate delay), and its output is forced low while its reset
// input is high. The reset of every cell is the inverted test signal, so the
// line is cleared whenever test is low. When test rises, the pulse walks along
// the line; the delay of every step is evaluated with the supply at that
// moment, so a conversion averages vdd over the conversion time. The model
// advances in fixed steps of STEP_NS and moves the pulse on by STEP_NS/t_d of
// a cell per step. A higher
// supply gives shorter delays and the pulse gets further in a fixed time.
//
// Interface: NTAPS taps t[0..NTAPS-1] (t1..t8 in the document's numbering)
// are the outputs of cells FIRST_TAP, FIRST_TAP+TAP_STEP, ...
//
// Sizing (this design's choice, standing in for the transistor-level design):
// K is set so that at vdd = VNOM the pulse, after TCONV_NS, has passed exactly
// the first NTAPS/2 taps and is half-way to the next, i.e. the zero-error code
// 11110000. With VTH = 0.8 V, VNOM = 2.7 V and a first tap at cell 33 one tap
// step corresponds to about 40 mV, the bin width the document designed for.
// K_SCALE (default 1.0) scales all delays to mimic process and temperature
// variation.
module delay_line #(
  parameter int  NTAPS     = 8,
  parameter int  FIRST_TAP = 33,
  parameter int  TAP_STEP  = 1,
  parameter real VTH       = 0.8,
  parameter real VNOM      = 2.7,
  parameter real TCONV_NS  = 750.0,
  parameter real K_SCALE   = 1.0,
  parameter real STEP_NS   = 0.25,
  localparam int NCELLS    = FIRST_TAP + (NTAPS - 1) * TAP_STEP
) (
  input  real              vdd,
  input  logic             test,
  output logic [NTAPS-1:0] t
);
  timeunit 1ns;
  timeprecision 1fs;

  localparam real P_CENTER = real'(FIRST_TAP) + (real'(NTAPS) / 2.0 - 0.5) * real'(TAP_STEP);
  localparam real K = K_SCALE * (TCONV_NS / P_CENTER) * (VNOM - VTH) * (VNOM - VTH) / VNOM;

  logic [NCELLS:1] cells;

  function automatic real cell_delay(input real v);
    if (v <= VTH + 0.05) return 1.0e6;        // supply too low: the line stalls
    return K * v / ((v - VTH) * (v - VTH));
  endfunction

  logic step;          // every edge is one model step
  real  progress;
  int   k;             // cells passed by the test pulse

  initial step = 1'b0;
  always #(STEP_NS) step = ~step;

  always @(step) begin
    if (!test) begin
      progress = 0.0;
      k        = 0;
      cells    = '0;
    end else if (k < NCELLS) begin
      progress += STEP_NS / cell_delay(vdd);
      if (progress >= 1.0) begin
        progress -= 1.0;
        k++;
        cells[k] = 1'b1;
      end
    end
  end

  // The reset input of a cells acts at once on its output.
  always_comb begin
    for (int i = 0; i < NTAPS; i++)
      t[i] = test & cells[FIRST_TAP + i * TAP_STEP];
  end

endmodule
