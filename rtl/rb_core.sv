// rb_core: register-bank pipeline back end (Operand Fetch to Write Back).
//
// The core keeps 16 banks of 32 general purpose registers in its register
// file. A context switch is a write of the bank translation control register,
// not a copy through memory. Each encoded register address is translated to a
// register file set: the top c general purpose addresses go to the minor bank,
// the rest to the major bank. Privileged code can therefore see part of a
// second context, for example a user bank, as ordinary registers.
//
// Stages (one cycle each, as in the processor the design extends):
//   OF   translate both sources with the OF view of the control register,
//        address the register file, decide forwarding, stall if needed
//   EX   register-file data arrives; ALU; destination translated with the EX
//        view of the control register
//   DM1  data memory request (external port)
//   DM2  load data returns from the external port
//   WB   register file write or control register commit
// Instruction fetch (three stages, with its cache and TLB) sits outside this
// block. Decoded micro-operations arrive on in_valid/in_uop. One is accepted
// per cycle when in_ready is high. in_ready falls while OF is stalled.
//
// Hazards:
//   - Result forwarding from EX, DM1, DM2, WB. Load forwarding only from WB,
//     so a dependent instruction behind a load stalls up to 3 cycles.
//     Forwarding compares set and encoded address.
//   - Control register: FWD_CTRL = 0 stalls OF until a write has committed
//     (4 cycles right behind the writer). FWD_CTRL = 1 forwards the value,
//     including the one the ALU is producing in EX.
//
// Special purpose registers (encoded addresses 32..63) are outside the
// register file. The only one built here is the bank translation control
// register at SPR_BANK_CTRL. Other special purpose addresses read zero and
// ignore writes. r0 reads zero and ignores writes. Loads must not write the
// control register (an assertion checks this): the forwarding scheme relies
// on it. Only privileged writes reach the control register. An unprivileged
// attempt raises priv_fault. The address of the control register, the
// micro-operation format, the ALU operations, the fixed 1-cycle memory
// response and the reset values are this design's own choices. The
// translation, the register file organisation, the stage split, the
// forwarding rules and both control register hazard schemes follow the
// document.
//
// Data memory port: dmem_req/we/addr/wdata are driven in DM1. For a load,
// dmem_rdata must hold the word in the following cycle (DM2).
// Constant outputs by design: bank_ctrl[31:13] (unused control register
// bits) and, in the stalling build, ev_fwd_ctrl.
module rb_core
  import rb_pkg::*;
#(
  parameter bit FWD_CTRL = 1'b0  // 0: stall on control register writes; 1: forward
) (
  input  logic             clk,
  input  logic             rst_n,
  // decoded instruction stream from instruction fetch
  input  logic             in_valid,
  input  uop_t             in_uop,
  output logic             in_ready,
  // data memory (Wishbone side is outside this block)
  output logic             dmem_req,
  output logic             dmem_we,
  output logic [XLEN-1:0]  dmem_addr,
  output logic [XLEN-1:0]  dmem_wdata,
  input  logic [XLEN-1:0]  dmem_rdata,
  // retirement: one pulse per instruction leaving Write Back
  output logic             wb_valid,
  output logic             wb_wen,      // a register was written
  output rf_addr_t         wb_dst,      // translated destination
  output logic [XLEN-1:0]  wb_data,
  // state and events for the exception logic and for observation
  output bank_ctrl_t       bank_ctrl,   // committed control register
  output logic             priv_fault,  // unprivileged control register write
  output logic             ev_stall_ctrl,
  output logic             ev_stall_load,
  output logic             ev_fwd_ctrl,
  output logic             ev_fwd_result,
  output logic             ev_fwd_load,
  output logic             ev_minor_access
);

  // ------------------------------------------------------------------
  // pipeline registers
  // ------------------------------------------------------------------
  typedef struct packed {
    logic             valid;
    uop_t             uop;
  } of_reg_t;

  typedef enum logic [1:0] { SRC_ZERO, SRC_RF, SRC_VAL } src_sel_e;

  typedef struct packed {
    logic             valid;
    uop_t             uop;
    src_sel_e         sel1, sel2;
    logic [XLEN-1:0]  val1, val2;
  } ex_reg_t;

  typedef struct packed {
    logic             valid;
    op_e              op;
    logic             wen;       // register file or control register write
    logic             ctrl_wr;   // write targets the control register
    logic             priv;
    rf_addr_t         dst;
    logic [XLEN-1:0]  data;      // ALU result / effective address
    logic [XLEN-1:0]  sdata;     // store data
  } mem_reg_t;

  of_reg_t  of_q;
  ex_reg_t  ex_q;
  mem_reg_t dm1_q, dm2_q, wb_q;

  // ------------------------------------------------------------------
  // control register and its hazard logic
  // ------------------------------------------------------------------
  bank_ctrl_t ctrl_q, ctrl_of, ctrl_ex;
  ctrl_wr_t   ctrl_late [N_LATE];
  logic       stall_ctrl, fwd_ctrl;

  // EX-stage signals (computed further below)
  logic [XLEN-1:0] ex_op1, ex_op2, ex_result, ex_wdata;
  logic [SET_W-1:0] ex_dset;
  logic             ex_dminor;
  logic             ex_wen, ex_ctrl_wr, ex_spr_try;

  always_comb begin
    ctrl_late[ST_EX]  = '{wen: ex_q.valid && ex_ctrl_wr, data: ex_wdata};
    ctrl_late[ST_DM1] = '{wen: dm1_q.valid && dm1_q.ctrl_wr, data: dm1_q.data};
    ctrl_late[ST_DM2] = '{wen: dm2_q.valid && dm2_q.ctrl_wr, data: dm2_q.data};
    ctrl_late[ST_WB]  = '{wen: wb_q.valid && wb_q.ctrl_wr,   data: wb_q.data};
  end

  bank_ctrl_reg u_ctrl (
    .clk, .rst_n,
    .wr_en     (wb_q.valid && wb_q.op != OP_LW && op_writes_rd(wb_q.op)
                && wb_q.dst.enc == SPR_BANK_CTRL),
    .wr_priv   (wb_q.priv),
    .wr_data   (wb_q.data),
    .ctrl      (ctrl_q),
    .priv_fault(priv_fault)
  );

  ctrl_hazard #(.FWD_CTRL(FWD_CTRL)) u_ctrl_hz (
    .ctrl_q, .late(ctrl_late), .ctrl_of, .ctrl_ex,
    .stall_of(stall_ctrl), .fwd_of(fwd_ctrl)
  );

  // ------------------------------------------------------------------
  // Operand Fetch
  // ------------------------------------------------------------------
  rf_addr_t         of_src1, of_src2;
  logic             of_minor1, of_minor2;
  logic             of_use1, of_use2;
  prod_t            late [N_LATE];
  logic             hit1, hit2, lstall1, lstall2, fl1, fl2;
  logic [XLEN-1:0]  fdata1, fdata2;
  logic [XLEN-1:0]  rf_d1, rf_d2;
  logic             of_stall, of_advance;

  bank_xlate u_xl_s1 (.enc(of_q.uop.rs1), .ctrl(ctrl_of), .set(of_src1.set), .minor(of_minor1));
  bank_xlate u_xl_s2 (.enc(of_q.uop.rs2), .ctrl(ctrl_of), .set(of_src2.set), .minor(of_minor2));
  assign of_src1.enc = of_q.uop.rs1;
  assign of_src2.enc = of_q.uop.rs2;
  assign of_use1 = of_q.valid && op_reads_rs1(of_q.uop.op) && of_q.uop.rs1 != '0;
  assign of_use2 = of_q.valid && op_reads_rs2(of_q.uop.op) && of_q.uop.rs2 != '0;

  always_comb begin
    late[ST_EX]  = '{wen: ex_q.valid && ex_wen, is_load: ex_q.uop.op == OP_LW,
                     dst: '{set: ex_dset, enc: ex_q.uop.rd}, data: ex_wdata};
    late[ST_DM1] = '{wen: dm1_q.valid && dm1_q.wen, is_load: dm1_q.op == OP_LW,
                     dst: dm1_q.dst, data: dm1_q.data};
    late[ST_DM2] = '{wen: dm2_q.valid && dm2_q.wen, is_load: dm2_q.op == OP_LW,
                     dst: dm2_q.dst, data: dm2_q.data};
    late[ST_WB]  = '{wen: wb_q.valid && wb_q.wen, is_load: wb_q.op == OP_LW,
                     dst: wb_q.dst, data: wb_q.data};
  end

  operand_fwd u_fwd1 (.used(of_use1), .src(of_src1), .late, .hit(hit1), .data(fdata1),
                      .stall(lstall1), .from_load(fl1));
  operand_fwd u_fwd2 (.used(of_use2), .src(of_src2), .late, .hit(hit2), .data(fdata2),
                      .stall(lstall2), .from_load(fl2));

  // The register file is addressed in OF; its data arrives in EX.
  banked_regfile u_rf (
    .clk,
    .r0_set(of_src1.set), .r0_reg(of_q.uop.rs1[REG_W-1:0]), .r0_data(rf_d1),
    .r1_set(of_src2.set), .r1_reg(of_q.uop.rs2[REG_W-1:0]), .r1_data(rf_d2),
    .w_en  (wb_q.valid && wb_q.wen && !wb_q.dst.enc[ENC_W-1]),
    .w_set (wb_q.dst.set), .w_reg(wb_q.dst.enc[REG_W-1:0]), .w_data(wb_q.data)
  );

  assign of_stall   = of_q.valid && (stall_ctrl || lstall1 || lstall2);
  assign of_advance = of_q.valid && !of_stall;
  assign in_ready   = !of_stall;

  // Operand source selection registered into EX: constant zero (r0, unused
  // operand), the register file output, or a value known in OF (forwarded
  // result or a special purpose register).
  src_sel_e         of_sel1, of_sel2;
  logic [XLEN-1:0]  of_val1, of_val2;

  always_comb begin
    of_sel1 = SRC_ZERO; of_val1 = '0;
    if (of_use1) begin
      if (hit1)                          begin of_sel1 = SRC_VAL; of_val1 = fdata1; end
      else if (of_q.uop.rs1[ENC_W-1])    begin
        of_sel1 = SRC_VAL;
        of_val1 = (of_q.uop.rs1 == SPR_BANK_CTRL) ? XLEN'(ctrl_q) : '0;
      end
      else                                of_sel1 = SRC_RF;
    end
    of_sel2 = SRC_ZERO; of_val2 = '0;
    if (of_use2) begin
      if (hit2)                          begin of_sel2 = SRC_VAL; of_val2 = fdata2; end
      else if (of_q.uop.rs2[ENC_W-1])    begin
        of_sel2 = SRC_VAL;
        of_val2 = (of_q.uop.rs2 == SPR_BANK_CTRL) ? XLEN'(ctrl_q) : '0;
      end
      else                                of_sel2 = SRC_RF;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      of_q <= '0;
      ex_q <= '0;
    end else begin
      if (in_ready) of_q <= '{valid: in_valid, uop: in_uop};
      ex_q.valid <= of_advance;
      if (of_advance) begin
        ex_q.uop  <= of_q.uop;
        ex_q.sel1 <= of_sel1;
        ex_q.val1 <= of_val1;
        ex_q.sel2 <= of_sel2;
        ex_q.val2 <= of_val2;
      end
    end
  end

  // ------------------------------------------------------------------
  // Execute
  // ------------------------------------------------------------------
  always_comb begin
    unique case (ex_q.sel1)
      SRC_RF:  ex_op1 = rf_d1;
      SRC_VAL: ex_op1 = ex_q.val1;
      default: ex_op1 = '0;
    endcase
    unique case (ex_q.sel2)
      SRC_RF:  ex_op2 = rf_d2;
      SRC_VAL: ex_op2 = ex_q.val2;
      default: ex_op2 = '0;
    endcase
  end

  rb_alu u_alu (.op(ex_q.uop.op), .a(ex_op1), .b(ex_op2), .imm(ex_q.uop.imm),
                .result(ex_result));

  bank_xlate u_xl_d (.enc(ex_q.uop.rd), .ctrl(ctrl_ex), .set(ex_dset), .minor(ex_dminor));

  always_comb begin
    ex_spr_try = op_writes_rd(ex_q.uop.op) && ex_q.uop.op != OP_LW
                 && ex_q.uop.rd == SPR_BANK_CTRL;
    ex_ctrl_wr = ex_spr_try && ex_q.uop.priv;
    if (!op_writes_rd(ex_q.uop.op) || ex_q.uop.rd == '0)
      ex_wen = 1'b0;
    else if (ex_q.uop.rd[ENC_W-1])
      ex_wen = ex_ctrl_wr;       // only the control register is implemented
    else
      ex_wen = 1'b1;
    // A control register value is stored with its unused bits cleared; do
    // that here so explicit reads forwarded from the pipeline agree with it.
    ex_wdata = ex_result;
    if (ex_ctrl_wr) ex_wdata = XLEN'(bank_ctrl_t'({19'b0, ex_result[12:0]}));
  end

  // ------------------------------------------------------------------
  // Data Memory 1, Data Memory 2, Write Back
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dm1_q <= '0;
      dm2_q <= '0;
      wb_q  <= '0;
    end else begin
      dm1_q <= '{valid: ex_q.valid, op: ex_q.uop.op, wen: ex_wen, ctrl_wr: ex_ctrl_wr,
                 priv: ex_q.uop.priv, dst: '{set: ex_dset, enc: ex_q.uop.rd},
                 data: ex_wdata, sdata: ex_op2};
      dm2_q <= dm1_q;
      wb_q  <= dm2_q;
      if (dm2_q.valid && dm2_q.op == OP_LW) wb_q.data <= dmem_rdata;
    end
  end

  assign dmem_req   = dm1_q.valid && (dm1_q.op == OP_LW || dm1_q.op == OP_SW);
  assign dmem_we    = dm1_q.valid && dm1_q.op == OP_SW;
  assign dmem_addr  = dm1_q.data;
  assign dmem_wdata = dm1_q.sdata;

  assign wb_valid = wb_q.valid;
  assign wb_wen   = wb_q.valid && wb_q.wen;
  assign wb_dst   = wb_q.dst;
  assign wb_data  = wb_q.data;
  assign bank_ctrl = ctrl_q;

  // ------------------------------------------------------------------
  // events
  // ------------------------------------------------------------------
  assign ev_stall_ctrl = of_q.valid && stall_ctrl;
  assign ev_stall_load = of_q.valid && !stall_ctrl && (lstall1 || lstall2);
  assign ev_fwd_ctrl   = of_advance && fwd_ctrl;
  assign ev_fwd_result = of_advance && ((hit1 && !fl1) || (hit2 && !fl2));
  assign ev_fwd_load   = of_advance && ((hit1 && fl1) || (hit2 && fl2));
  // a source in OF or the destination in EX was mapped to the minor bank
  assign ev_minor_access = (of_advance && ((of_use1 && of_minor1) || (of_use2 && of_minor2)))
                         || (ex_q.valid && ex_wen && ex_dminor);

  // ------------------------------------------------------------------
  // rules
  // ------------------------------------------------------------------
  // The control register may not be the destination of a load.
  a_no_load_to_ctrl: assert property (@(posedge clk) disable iff (!rst_n)
    ex_q.valid && ex_q.uop.op == OP_LW |-> ex_q.uop.rd != SPR_BANK_CTRL);
  // A stalled instruction stays in Operand Fetch.
  a_hold_on_stall: assert property (@(posedge clk) disable iff (!rst_n)
    of_stall |=> of_q.valid && of_q.uop == $past(of_q.uop));

endmodule
