// banked_regfile: the general purpose register file with 16 banks.
//
// Two read ports and one write port, each addressed by a 4-bit set selector
// and a 5-bit register address, giving 16 non-overlapping sets of 32
// registers of 32 bits. It is built from two block RAMs: read port 0 uses one
// block, read port 1 the other, and every write goes to both blocks in the
// same cycle so they hold the same contents. Each block is addressed with the
// set selector on byte address bits 10..7, the register address on bits 6..2
// and zero on bits 1..0, which is the wiring the design describes.
//
// Timing: a read address presented in cycle t gives data in cycle t+1 (the
// block RAM output register). A write presented in cycle t is stored at the
// end of cycle t; a read of the same register in that cycle returns the old
// value, so the pipeline forwards write-back data itself.
// Register r0 is not special here: the pipeline supplies the constant zero.
module banked_regfile
  import rb_pkg::*;
(
  input  logic             clk,
  // read port 0
  input  logic [SET_W-1:0] r0_set,
  input  logic [REG_W-1:0] r0_reg,
  output logic [XLEN-1:0]  r0_data,
  // read port 1
  input  logic [SET_W-1:0] r1_set,
  input  logic [REG_W-1:0] r1_reg,
  output logic [XLEN-1:0]  r1_data,
  // write port
  input  logic             w_en,
  input  logic [SET_W-1:0] w_set,
  input  logic [REG_W-1:0] w_reg,
  input  logic [XLEN-1:0]  w_data
);
  logic [10:0] r0_addr, r1_addr, w_addr;
  logic [XLEN-1:0] unused_a0, unused_a1;

  assign r0_addr = {r0_set, r0_reg, 2'b00};
  assign r1_addr = {r1_set, r1_reg, 2'b00};
  assign w_addr  = {w_set,  w_reg,  2'b00};

  // Port A of each block is the shared write port, port B a read port.
  bram_18k u_blk0 (
    .clk,
    .a_en(w_en), .a_we(w_en), .a_addr(w_addr), .a_wdata(w_data), .a_rdata(unused_a0),
    .b_en(1'b1), .b_we(1'b0), .b_addr(r0_addr), .b_wdata('0),    .b_rdata(r0_data)
  );
  bram_18k u_blk1 (
    .clk,
    .a_en(w_en), .a_we(w_en), .a_addr(w_addr), .a_wdata(w_data), .a_rdata(unused_a1),
    .b_en(1'b1), .b_we(1'b0), .b_addr(r1_addr), .b_wdata('0),    .b_rdata(r1_data)
  );
endmodule
