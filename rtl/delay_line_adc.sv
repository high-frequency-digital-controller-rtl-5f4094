// Digital part of the delay-line A/D converter, with optional calibration.
//
// Basic configuration (CALIBRATE = 0): the switching period is split into
// S = 2^NC system-clock slots by the DPWM counter. The test pulse is high from
// the start of the period to the end of slot S-2 and low in the last slot,
// which clears the delay line. At the start of slot S-2 (6/8 of the period for
// NC = 3, the conversion time of the document's example) the taps are captured
// by the sample flip-flops, the encoder turns the thermometer code into v and
// e = -v (error = reference minus sensed voltage, +4 when the output is low)
// is read straight from the encoder, valid during slot S-2.
//
// Calibrated configuration (CALIBRATE = 1): two conversions per period. In the
// first half select is low, the line is supplied from V_ref and its result is
// stored as e_ref; in the second half select is high, the line converts
// V_sense, and the output register loads e_ref - v_sense. Any offset of the
// line (process, temperature) then cancels. Each half has a test-high time of
// H-1 slots, sampling at the start of slot H-2 of the half, and a reset slot
// (H = S/2); select rises in the first reset slot and falls in the last one,
// so the supply is switched only while the line is held reset. The result is
// limited to -4..+4, the range of the compensator tables. The reference
// conversion need not run in every period: with CAL_INTERVAL = N it runs in
// one period of every N (the first after reset), the test pulse stays low in
// the first half of the other periods, and e_ref keeps its last value. Until
// the first reference result is stored e_ref is 0.
//
// Interface: clk is the system clock, cnt the DPWM counter (slot of the
// period), en enables conversions. test and select drive the delay line and
// the input switch, sample marks the sampling slot. e_valid is high for one
// clock when e holds a new result (slot S-2 in the basic configuration, slot
// S-1 in the calibrated one); q is the last sampled code.
//
// The basic timing, the tap count, the zero-error code and the option of a
// reference conversion that is not repeated every period follow the document.
// The slot positions of the calibrated timing, the period count N, the register clocking by clock
// enables on the system clock, the reset value (e = 0) and the clipping of e
// are this design's choices.
module delay_line_adc
  import dpwm_ctrl_pkg::*;
#(
  parameter int NTAPS     = 8,
  parameter int NC        = 3,
  parameter bit CALIBRATE = 1'b0,
  parameter int CAL_INTERVAL = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NC-1:0]    cnt,
  input  logic             en,
  input  logic [NTAPS-1:0] taps,
  output logic             test,
  output logic             sample,
  output logic             select,
  output logic [NTAPS-1:0] q,
  output err_t             e,
  output logic             e_valid,
  output err_t             e_ref
);
  timeunit 1ns;
  timeprecision 1fs;

  localparam int S = 1 << NC;
  localparam int H = S / 2;
  localparam logic [NC-1:0] LAST        = NC'(S - 1);
  localparam logic [NC-1:0] SAMPLE_SENS = NC'(S - 2);
  localparam logic [NC-1:0] SAMPLE_REF  = NC'(H - 2);
  localparam logic [NC-1:0] HALF_RESET  = NC'(H - 1);

  localparam int PW = (CAL_INTERVAL > 1) ? $clog2(CAL_INTERVAL) : 1;

  err_t v;
  logic ref_period;     // this period starts with a reference conversion
  err_t e_cal;
  logic signed [E_W:0] diff;

  thermo_encoder #(.M(NTAPS), .V_W(E_W)) u_enc (.q(q), .v(v));

  // Timing of the delay line, decoded from the period slot.
  always_comb begin
    if (CALIBRATE) begin
      test   = en & (cnt != HALF_RESET) & (cnt != LAST) & (ref_period | (cnt > HALF_RESET));
      sample = en & (((cnt == SAMPLE_REF) & ref_period) | (cnt == SAMPLE_SENS));
      select = (cnt >= HALF_RESET) & (cnt != LAST);
    end else begin
      test   = en & (cnt != LAST);
      sample = en & (cnt == SAMPLE_SENS);
      select = 1'b1;
    end
  end

  function automatic err_t clip(input logic signed [E_W:0] x);
    if (x > (E_W + 1)'(E_MAX))       return err_t'(E_MAX);
    else if (x < -(E_W + 1)'(E_MAX)) return err_t'(-E_MAX);
    else                             return err_t'(x);
  endfunction

  assign diff = (E_W + 1)'(e_ref) - (E_W + 1)'(v);

  // Calibration interval counter, advanced as each period starts.
  if (CAL_INTERVAL > 1) begin : g_interval
    logic [PW-1:0] per;   // period index within the calibration interval
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)           per <= PW'(CAL_INTERVAL - 1);
      else if (cnt == LAST) per <= (per == PW'(CAL_INTERVAL - 1)) ? '0 : per + 1'b1;
    end
    assign ref_period = (per == '0);
  end else begin : g_every
    assign ref_period = 1'b1;
  end

  // cnt is the value before this edge; the edge starts slot cnt+1.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q       <= '0;
      e_cal   <= '0;
      e_ref   <= '0;
      e_valid <= 1'b0;
    end else begin
      e_valid <= 1'b0;
      if (!CALIBRATE) begin
        if (en && (cnt + 1'b1) == SAMPLE_SENS) begin          // sample flip-flops
          q       <= taps;
          e_valid <= 1'b1;
        end
      end else begin
        if (en && (((cnt + 1'b1) == SAMPLE_REF && ref_period) || (cnt + 1'b1) == SAMPLE_SENS))
          q <= taps;
        if (en && ref_period && (cnt + 1'b1) == HALF_RESET)
          e_ref <= v;                                        // select rises
        if (en && (cnt + 1'b1) == LAST) begin                // select falls
          e_cal   <= clip(diff);
          e_valid <= 1'b1;
        end
      end
    end
  end

  // Basic configuration: the encoder output is the result (no output
  // register); calibrated: the output register clocked as select falls.
  assign e = CALIBRATE ? e_cal : -v;

endmodule
