// Shared types and constants of the digital PWM controller.
//
// The controller regulates a DC/DC converter output with three blocks on one
// system clock: a delay-line A/D converter that produces a small signed error
// code e(n) once per switching period, a compensator that adds three
// table-looked-up terms of e(n), e(n-1), e(n-2) to the previous duty ratio, and
// a hybrid counter/ring-oscillator DPWM. This package holds the error-code
// type, the table-select encoding and the table-write bundle that the
// programming interface hands to the compensator.
//
// Error range -4..+4 (nine codes) and the 8/9/8-bit table entry widths follow
// the document; the 4-bit encoding of e, the table numbering and the write
// bundle are this design's own choices.
package dpwm_ctrl_pkg;
  timeunit 1ns;
  timeprecision 1fs;

  // Error code from the A/D converter: -4..+4 held in 4-bit two's complement.
  localparam int E_W   = 4;
  localparam int E_MAX = 4;

  // Widest table entry (table B); the programming interface carries this width.
  localparam int TBL_DATA_W = 9;

  typedef logic signed [E_W-1:0] err_t;

  typedef enum logic [1:0] {
    TBL_A = 2'd0,   // addressed by e(n)
    TBL_B = 2'd1,   // addressed by e(n-1)
    TBL_C = 2'd2    // addressed by e(n-2)
  } tbl_sel_t;

  // One table write: entry idx (= e + E_MAX) of table tbl gets data.
  typedef struct packed {
    logic                          en;
    tbl_sel_t                      tbl;
    logic [3:0]                    idx;
    logic signed [TBL_DATA_W-1:0]  data;
  } tbl_wr_t;

endpackage
