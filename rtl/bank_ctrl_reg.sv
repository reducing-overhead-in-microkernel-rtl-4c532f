// bank_ctrl_reg: the bank translation control register.
//
// A special purpose register holding the major bank id (bits 3..0), the
// minor bank id (bits 7..4) and the minor bank register count (bits 12..8);
// bits 31..13 are unused and read as zero. It is written explicitly by an
// instruction in its Write Back stage, and only in privileged mode: a write
// from unprivileged mode leaves the register unchanged and raises priv_fault
// for one cycle so the exception logic of the processor can trap it (what
// that trap does is outside this block).
//
// Timing: a write in cycle t is visible on ctrl in cycle t+1. Reset clears
// the register, so after reset bank 0 is the major bank and no minor bank
// registers are mapped. The reset value is this design's choice.
module bank_ctrl_reg
  import rb_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_en,     // explicit write in Write Back
  input  logic            wr_priv,   // writer runs in privileged mode
  input  logic [XLEN-1:0] wr_data,
  output bank_ctrl_t      ctrl,      // committed configuration
  output logic            priv_fault // unprivileged write attempt (pulse)
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl       <= '0;
      priv_fault <= 1'b0;
    end else begin
      priv_fault <= wr_en && !wr_priv;
      if (wr_en && wr_priv) begin
        ctrl        <= bank_ctrl_t'(wr_data);
        ctrl.unused <= '0;
      end
    end
  end
endmodule
