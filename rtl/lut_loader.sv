// Look-up-table programming interface.
//
// After reset the controller must fill the three compensator tables from an
// external memory before it may regulate. This block reads the N_TBL * N_E
// entries (27 for three nine-entry tables) one per system clock from
// consecutive addresses starting at BASE_ADDR and turns each into a write of
// the compensator tables; when the last entry is written it raises ready,
// which releases the A/D converter, the compensator and the DPWM output.
//
// Memory layout: table A at addresses 0..8, table B at 9..17, table C at
// 18..26 (plus BASE_ADDR); inside a table, address offset i holds the entry for
// e = i - 4. Each word is a TBL_DATA_W-bit two's-complement value.
//
// Timing: mem_addr and mem_rd are registered; the memory is asynchronous and
// must return data within one system-clock period (125 ns at 8 MHz). The word
// present on mem_data at a clock edge belongs to the address driven during
// the clock before it. ready rises on the 29th clock edge after reset.
//
// The document states only that the entries are loaded from external memory
// at power-up, before the converter starts; the memory organisation, the
// word width and this handshake are this design's choices.
module lut_loader
  import dpwm_ctrl_pkg::*;
#(
  parameter int ADDR_W    = 5,
  parameter int BASE_ADDR = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  output logic [ADDR_W-1:0]     mem_addr,
  output logic                  mem_rd,
  input  logic [TBL_DATA_W-1:0] mem_data,
  output tbl_wr_t               wr,
  output logic                  ready
);
  timeunit 1ns;
  timeprecision 1fs;

  localparam int N_E   = 2 * E_MAX + 1;
  localparam int N_TBL = 3;

  typedef enum logic [1:0] {S_FIRST, S_LOAD, S_DONE} state_t;
  state_t     state;
  tbl_sel_t   tbl;   // table of the address now on mem_addr
  logic [3:0] idx;   // entry of the address now on mem_addr

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_FIRST;
      tbl      <= TBL_A;
      idx      <= '0;
      mem_addr <= ADDR_W'(BASE_ADDR);
      mem_rd   <= 1'b0;
      wr       <= '0;
      ready    <= 1'b0;
    end else begin
      wr.en <= 1'b0;
      unique case (state)
        S_FIRST: begin                      // put the first address out
          mem_rd <= 1'b1;
          state  <= S_LOAD;
        end
        S_LOAD: begin                       // data of mem_addr is valid now
          wr.en   <= 1'b1;
          wr.tbl  <= tbl;
          wr.idx  <= idx;
          wr.data <= mem_data;
          if (tbl == tbl_sel_t'(N_TBL - 1) && idx == 4'(N_E - 1)) begin
            mem_rd <= 1'b0;
            state  <= S_DONE;
          end else begin
            mem_addr <= mem_addr + 1'b1;
            if (idx == 4'(N_E - 1)) begin
              idx <= '0;
              tbl <= tbl_sel_t'(tbl + 1'b1);
            end else begin
              idx <= idx + 1'b1;
            end
          end
        end
        S_DONE: ready <= 1'b1;              // last write has been issued
        default: state <= S_FIRST;
      endcase
    end
  end

endmodule
