// rb_alu: the arithmetic unit of the Execute stage.
//
// Computes the result of the register and immediate operations of the
// micro-operation set (add, subtract, and, or, xor, add immediate); for loads
// and stores the result is the effective address (rs1 + sign-extended
// immediate).
// The operation set is this design's minimal choice; the document only says
// that Execute performs the requested ALU operations in one cycle.
// Purely combinational.
module rb_alu
  import rb_pkg::*;
(
  input  op_e              op,
  input  logic [XLEN-1:0]  a,      // rs1 value
  input  logic [XLEN-1:0]  b,      // rs2 value
  input  logic [IMM_W-1:0] imm,
  output logic [XLEN-1:0]  result  // ALU result or effective address
);
  logic [XLEN-1:0] simm;

  always_comb begin
    simm = XLEN'(signed'(imm));
    unique case (op)
      OP_ADD:  result = a + b;
      OP_SUB:  result = a - b;
      OP_AND:  result = a & b;
      OP_OR:   result = a | b;
      OP_XOR:  result = a ^ b;
      OP_ADDI, OP_LW, OP_SW: result = a + simm;
      default: result = '0;
    endcase
  end
endmodule
