// Digital PWM controller for a high-frequency DC/DC converter.
//
// The controller closes a voltage-mode PWM loop with three blocks and almost
// no analog circuitry:
//   * a delay-line A/D converter (delay_line model + delay_line_adc): once per
//     switching period a test pulse runs along a chain of gates powered from
//     the sensed output voltage; how far it gets in a fixed time, sampled on
//     eight taps, gives a nine-valued error code e = -4..+4 around a reference
//     set by the line length. With CALIBRATE = 1 the line also converts a
//     precise V_ref (each period, or every CAL_INTERVAL periods) and the
//     difference cancels the line's offset;
//   * a compensator (lut_compensator) that adds three look-up-table terms of
//     e(n), e(n-1), e(n-2) to the previous duty ratio;
//   * a hybrid DPWM (hybrid_dpwm + dpwm_ring) whose 32-cell ring oscillator
//     gives 5 bits of timing resolution and whose 3-bit counter gives the other
//     3, for an 8-bit duty ratio at a 1 MHz switching frequency. The ring's
//     8 MHz output is the system clock of every block.
// At power-up the table programming interface (lut_loader) copies the 27
// table entries from the external memory; only then are the A/D converter,
// the compensator and the output enabled.
//
// Interface: rst_n is the power-on reset, ring_run starts and stops the
// oscillator (and with it every clock). v_sense is the converter output
// voltage (real, volts) and v_ref the reference from the bandgap used by the
// calibrated configuration. mem_* is the external memory port; out is the
// switch control c(t). The remaining outputs (system clock, table-load done,
// period slot, A/D timing and results, duty command) are for observation.
//
// Timing per period (default sizes, eight 125 ns slots): test high in slots
// 0..6, taps sampled at the start of slot 6, compensator updated at the start
// of slot 7, new duty ratio used from the next period on.
//
// The architecture, the sizes and the 1 MHz / 8 MHz frequencies follow the
// document; the delay-line sizing, the period timing details and the memory
// interface are this design's choices, described in the sub-blocks.
module dpwm_controller_top
  import dpwm_ctrl_pkg::*;
#(
  parameter int  N_BITS             = 8,
  parameter int  NC                 = 3,
  parameter int  NTAPS              = 8,
  parameter bit  CALIBRATE          = 1'b0,
  parameter int  CAL_INTERVAL       = 1,
  parameter int  DMIN               = 8,
  parameter int  DMAX               = 249,
  parameter real RING_CELL_DELAY_NS = 3.90625,
  parameter real LINE_K_SCALE       = 1.0,
  parameter int  MEM_ADDR_W         = 5
) (
  input  logic                  rst_n,
  input  logic                  ring_run,
  input  real                   v_sense,
  input  real                   v_ref,
  output logic [MEM_ADDR_W-1:0] mem_addr,
  output logic                  mem_rd,
  input  logic [TBL_DATA_W-1:0] mem_data,
  output logic                  out,
  output logic                  sys_clk,
  output logic                  ready,
  output logic [NC-1:0]         cnt,
  output logic                  test,
  output logic                  sample,
  output logic                  select,
  output logic [NTAPS-1:0]      adc_q,
  output err_t                  e_ref,
  output err_t                  e,
  output logic                  e_valid,
  output logic [N_BITS-1:0]     d,
  output logic                  d_valid
);
  timeunit 1ns;
  timeprecision 1fs;

  localparam int  ND  = N_BITS - NC;
  localparam int  NR  = 1 << ND;
  localparam int  S   = 1 << NC;
  localparam real TS_NS = RING_CELL_DELAY_NS * real'(1 << N_BITS);
  // Conversion time: start of period (or half period) to the sampling slot.
  localparam real TCONV_NS = CALIBRATE ? TS_NS * real'(S / 2 - 2) / real'(S)
                                       : TS_NS * real'(S - 2) / real'(S);

  logic [NR-1:0]    ring_q;
  logic [NTAPS-1:0] line_t;
  real              v_line;
  tbl_wr_t          tbl_wr;

  dpwm_ring #(
    .NCELLS        (NR),
    .CELL_DELAY_NS (RING_CELL_DELAY_NS)
  ) u_ring (
    .run (ring_run),
    .q   (ring_q)
  );

  hybrid_dpwm #(
    .N_BITS (N_BITS),
    .NC     (NC),
    .DMIN   (DMIN),
    .DMAX   (DMAX)
  ) u_dpwm (
    .rst_n   (rst_n),
    .taps    (ring_q),
    .en      (ready),
    .d_in    (d),
    .sys_clk (sys_clk),
    .cnt     (cnt),
    .c_out   (out)
  );

  lut_loader #(
    .ADDR_W (MEM_ADDR_W)
  ) u_loader (
    .clk      (sys_clk),
    .rst_n    (rst_n),
    .mem_addr (mem_addr),
    .mem_rd   (mem_rd),
    .mem_data (mem_data),
    .wr       (tbl_wr),
    .ready    (ready)
  );

  analog_switch u_switch (
    .v_ref   (v_ref),
    .v_sense (v_sense),
    .select  (select),
    .v_out   (v_line)
  );

  delay_line #(
    .NTAPS    (NTAPS),
    .TCONV_NS (TCONV_NS),
    .K_SCALE  (LINE_K_SCALE)
  ) u_line (
    .vdd  (v_line),
    .test (test),
    .t    (line_t)
  );

  delay_line_adc #(
    .NTAPS     (NTAPS),
    .NC        (NC),
    .CALIBRATE    (CALIBRATE),
    .CAL_INTERVAL (CAL_INTERVAL)
  ) u_adc (
    .clk     (sys_clk),
    .rst_n   (rst_n),
    .cnt     (cnt),
    .en      (ready),
    .taps    (line_t),
    .test    (test),
    .sample  (sample),
    .select  (select),
    .q       (adc_q),
    .e       (e),
    .e_valid (e_valid),
    .e_ref   (e_ref)
  );

  lut_compensator #(
    .D_W (N_BITS)
  ) u_comp (
    .clk     (sys_clk),
    .rst_n   (rst_n),
    .wr      (tbl_wr),
    .run     (ready),
    .e       (e),
    .e_valid (e_valid),
    .d_out   (d),
    .d_valid (d_valid)
  );

endmodule
