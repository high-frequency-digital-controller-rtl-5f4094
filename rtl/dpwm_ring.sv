// Behavioural model (not synthesizable logic as written) of the self-oscillating
// ring of the hybrid DPWM.
//
// The ring is a loop of NCELLS resettable flip-flop delay cells through which a
// single pulse travels. A tap q[i] pulses once per ring revolution; successive
// taps pulse one cell delay apart, so a revolution takes NCELLS cell delays and
// the taps divide it into NCELLS equal time slots. The last tap is the clock of
// the DPWM counter and the system clock of the whole controller.
//
// Interface: run gates the propagation. While run is low every cell is held
// reset; one cell delay after run rises the pulse is injected at cell 0.
//
// Timing: with the default cell delay of 1000/256 ns and 32 cells the ring runs
// at 8 MHz, so a 3-bit counter on the last tap gives a 1 MHz switching period
// split into 256 slots, as in the document's prototype. In this model a tap is
// high for half a cell delay (CELL_DELAY_NS/2), so no two taps are ever high
// together; this keeps the DPWM set/reset logic free of zero-delay races and is
// a modelling choice, not something the document specifies.
module dpwm_ring #(
  parameter int  NCELLS        = 32,
  parameter real CELL_DELAY_NS = 3.90625
) (
  input  logic              run,
  output logic [NCELLS-1:0] q
);
  timeunit 1ns;
  timeprecision 1fs;

  logic half;          // high in the first half of each cell delay
  int   pos;           // cell that holds the pulse, -1 when the ring is stopped

  initial begin
    half = 1'b0;
    pos  = -1;
  end

  always #(CELL_DELAY_NS / 2.0) half = ~half;

  // The pulse moves on between two tap pulses, so q never shows two taps.
  always @(negedge half) begin
    if (!run)         pos <= -1;                 // gated: ring held reset
    else if (pos < 0) pos <= 0;                  // restart: inject the pulse
    else              pos <= (pos + 1) % NCELLS;
  end

  always_comb begin
    q = '0;
    if (half && pos >= 0) q[pos] = 1'b1;
  end

endmodule
