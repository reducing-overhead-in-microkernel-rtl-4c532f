// rb_pkg: types and constants shared by the register-bank processor blocks.
//
// The register file holds NUM_SETS banks ("sets") of 32 general purpose
// registers of 32 bits. An instruction names a register with a 6-bit encoded
// address: 0..31 are general purpose registers, 32..63 special purpose
// registers. The bank translation control register (bank_ctrl_t) selects the
// major bank, the minor bank and how many of the top encoded addresses map to
// the minor bank; its field layout (count in bits 12..8, minor id in 7..4,
// major id in 3..0, the rest unused) follows the published encoding.
//
// The micro-operation format (uop_t) and its opcodes are this design's own:
// the document names an ALU, loads, stores and explicit special purpose
// register writes but gives no instruction encoding, so a minimal decoded
// format carrying exactly those operations is used.
package rb_pkg;

  localparam int unsigned XLEN         = 32;  // data word width
  localparam int unsigned ENC_W        = 6;   // encoded register address width
  localparam int unsigned REG_W        = 5;   // register address within a set
  localparam int unsigned SET_W        = 4;   // set selector width
  localparam int unsigned NUM_SETS     = 16;  // banks held by the register file
  localparam int unsigned REGS_PER_SET = 32;
  localparam int unsigned CNT_W        = 5;   // minor bank register count width
  localparam int unsigned IMM_W        = 16;

  // Encoded address of the bank translation control register in the special
  // purpose half of the register address space (this design's choice).
  localparam logic [ENC_W-1:0] SPR_BANK_CTRL = 6'd48;

  // Translation control register, Figure "Control Register Encoding".
  typedef struct packed {
    logic [18:0]       unused;  // bits 31..13
    logic [CNT_W-1:0]  count;   // c: minor bank register count, bits 12..8
    logic [SET_W-1:0]  minor;   // m: minor bank id, bits 7..4
    logic [SET_W-1:0]  major;   // M: major bank id, bits 3..0
  } bank_ctrl_t;

  // Register file memory address of an operand: set selector plus the encoded
  // address. Special purpose registers carry set 0, as in the document, so
  // that forwarding compares them like any other operand.
  typedef struct packed {
    logic [SET_W-1:0] set;
    logic [ENC_W-1:0] enc;
  } rf_addr_t;

  typedef enum logic [3:0] {
    OP_NOP  = 4'd0,
    OP_ADD  = 4'd1,   // rd = rs1 + rs2
    OP_SUB  = 4'd2,   // rd = rs1 - rs2
    OP_AND  = 4'd3,   // rd = rs1 & rs2
    OP_OR   = 4'd4,   // rd = rs1 | rs2
    OP_XOR  = 4'd5,   // rd = rs1 ^ rs2
    OP_ADDI = 4'd6,   // rd = rs1 + sext(imm)
    OP_LW   = 4'd7,   // rd = mem[rs1 + sext(imm)]
    OP_SW   = 4'd8    // mem[rs1 + sext(imm)] = rs2
  } op_e;

  // Decoded micro-operation entering Operand Fetch. priv is the privilege
  // mode the instruction executes in.
  typedef struct packed {
    op_e              op;
    logic [ENC_W-1:0] rd;
    logic [ENC_W-1:0] rs1;
    logic [ENC_W-1:0] rs2;
    logic [IMM_W-1:0] imm;
    logic             priv;
  } uop_t;

  // A register write still in flight in Execute, Data Memory 1/2 or Write
  // Back, as seen by the forwarding logic.
  typedef struct packed {
    logic             wen;      // instruction writes its destination
    logic             is_load;  // value only exists after Data Memory
    rf_addr_t         dst;      // translated destination
    logic [XLEN-1:0]  data;     // result (valid unless a load before WB)
  } prod_t;

  // In-flight write of the bank translation control register.
  typedef struct packed {
    logic             wen;
    logic [XLEN-1:0]  data;
  } ctrl_wr_t;

  // Pipeline stages behind Operand Fetch, youngest first.
  localparam int unsigned N_LATE = 4;  // Execute, DM1, DM2, Write Back
  localparam int unsigned ST_EX  = 0;
  localparam int unsigned ST_DM1 = 1;
  localparam int unsigned ST_DM2 = 2;
  localparam int unsigned ST_WB  = 3;

  function automatic logic op_writes_rd(op_e op);
    return op inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_ADDI, OP_LW};
  endfunction

  function automatic logic op_reads_rs2(op_e op);
    return op inside {OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SW};
  endfunction

  function automatic logic op_reads_rs1(op_e op);
    return op != OP_NOP;
  endfunction

endpackage
