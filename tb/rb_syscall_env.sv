// rb_syscall_env: system call round trips with register banks, as a test
// program and checker for one rb_core (the core itself is instantiated by
// the enclosing testbench, so each build can be tested at its own
// parameters).
//
// Bank 0 belongs to the kernel and banks 1..15 to fifteen user threads, one
// bank each. For each thread:
//   - bank assignment: the kernel selects the thread's bank as major bank and
//     fills r1..r31 (value 256*t + r), then switches back to bank 0;
//   - user mode (unprivileged) runs on its bank and computes into r29, r30,
//     and tries (in vain) to select the kernel bank;
//   - kernel entry stub: select major 0 with minor bank t mapped on the top
//     three registers (r29..r31 of the user), copy user r30/r29 into kernel
//     r28/r27, unmap (count 0);
//   - handler: r26 = r27 + r28, then map user r30 (count 2) and write the
//     result into it;
//   - kernel exit: select the user bank again; the user updates its own r28.
// Instructions are offered back to back, so each control register write is
// followed by an instruction that needs the new configuration. Checked
// latencies: 1 + 4 cycles after a control register write in the stalling
// build, 1 in the forwarding build; 1 + 3 after a load feeding the next
// instruction; 1 for ALU results. The entry stub and exit cycle counts are
// printed. At the end the kernel stores all 16 banks to memory (by making
// each the major bank) and every word is compared with values computed
// here: each thread's registers must survive the other threads' runs.
module rb_syscall_env
  import rb_pkg::*;
#(
  parameter bit FWD_CTRL = 1'b0   // build of the core under test
) (
  input  logic            clk,
  output logic            rst_n,
  output logic            in_valid,
  output uop_t            in_uop,
  input  logic            in_ready,
  input  logic            dmem_req,
  input  logic            dmem_we,
  input  logic [XLEN-1:0] dmem_addr,
  input  logic [XLEN-1:0] dmem_wdata,
  output logic [XLEN-1:0] dmem_rdata,
  input  logic            wb_valid,
  input  logic            ev_stall_ctrl,
  input  logic            ev_fwd_ctrl,
  output logic            done,      // all checks made
  output int              checks,
  output int              failures
);
  // cycles from a control register write to the next instruction
  localparam int CTRL_GAP = FWD_CTRL ? 1 : 5;

  initial begin checks = 0; failures = 0; done = 1'b0; end

  // data memory: 1024 words, response one cycle after the request
  logic [31:0] dmem [1024];
  always_ff @(posedge clk) begin
    if (dmem_req) begin
      dmem_rdata <= dmem[dmem_addr[11:2]];
      if (dmem_we) dmem[dmem_addr[11:2]] <= dmem_wdata;
    end
  end


  function automatic uop_t mk(op_e op, logic [5:0] rd, logic [5:0] rs1, logic [5:0] rs2,
                              logic [15:0] imm, logic priv);
    uop_t u;
    u.op = op; u.rd = rd; u.rs1 = rs1; u.rs2 = rs2; u.imm = imm; u.priv = priv;
    return u;
  endfunction

  function automatic logic [15:0] cfg(int cnt, int minor, int major);
    return 16'((cnt << 8) | (minor << 4) | major);
  endfunction

  longint cyc = 0;
  always @(posedge clk) cyc++;

  // issue one instruction; returns its program-order index
  int n_issued = 0;
  longint retire_cyc [$];
  always @(posedge clk) if (rst_n && wb_valid) retire_cyc.push_back(cyc);

  task automatic issue(input uop_t u, output longint idx);
    in_valid <= 1'b1;
    in_uop   <= u;
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    idx = longint'(n_issued);
    n_issued++;
  endtask

  // pairs (writer, next) whose retirement gap must be CTRL_GAP cycles
  typedef struct { longint a; longint b; string what; } gap_t;
  gap_t gaps [$];
  gap_t lat_pairs [$];

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  // a control register write followed by its first user, with the gap measured
  int n_ctrl_gaps = 0;
  task automatic ctrl_then(input logic [15:0] c, input uop_t next, input string what,
                           output longint t_next);
    longint t0;
    issue(mk(OP_ADDI, SPR_BANK_CTRL, 6'd0, 6'd0, c, 1'b1), t0);
    issue(next, t_next);
    gaps.push_back('{t0, t_next, what});
    n_ctrl_gaps++;
  endtask

  logic [31:0] exp_bank [16][32];
  int stall_cycles = 0, fwd_uses = 0;
  always @(posedge clk) begin
    if (ev_stall_ctrl) stall_cycles++;
    if (ev_fwd_ctrl)   fwd_uses++;
  end

  initial dmem[1000] = 32'hD00D_F00D;

  initial begin
    longint t, t_entry0, t_entry1, t_exit0, t_exit1, entry_a, entry_b, exit_a, exit_b;
    int n_ctrl_writes;
    rst_n = 0; in_valid = 0; in_uop = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    n_ctrl_writes = 0;

    // kernel bank 0: r1..r31 = 0xK000 + r
    for (int r = 1; r < 32; r++) begin
      issue(mk(OP_ADDI, 6'(r), 6'd0, 6'd0, 16'(16'h7000 + r), 1'b1), t);
      exp_bank[0][r] = 32'h7000 + r;
    end

    for (int th = 1; th < 16; th++) begin
      logic [31:0] a29, a30;
      // bank assignment for thread th
      ctrl_then(cfg(0, 0, th), mk(OP_ADDI, 6'd1, 6'd0, 6'd0, 16'(th * 256 + 1), 1'b1),
                "assign", t);
      n_ctrl_writes++;
      for (int r = 2; r < 32; r++)
        issue(mk(OP_ADDI, 6'(r), 6'd0, 6'd0, 16'(th * 256 + r), 1'b1), t);
      for (int r = 1; r < 32; r++) exp_bank[th][r] = th * 256 + r;
      // user mode: r29 = r3 + r4, r30 = r29 - r5 (unprivileged)
      issue(mk(OP_ADD, 6'd29, 6'd3, 6'd4, 16'd0, 1'b0), t);
      issue(mk(OP_SUB, 6'd30, 6'd29, 6'd5, 16'd0, 1'b0), t);
      a29 = exp_bank[th][3] + exp_bank[th][4];
      a30 = a29 - exp_bank[th][5];
      exp_bank[th][29] = a29;
      // an unprivileged attempt to reach the kernel bank is dropped
      issue(mk(OP_ADDI, SPR_BANK_CTRL, 6'd0, 6'd0, cfg(0, 0, 0), 1'b0), t);
      // kernel entry stub: map user r29..r31, copy the arguments, unmap
      ctrl_then(cfg(3, th, 0), mk(OP_OR, 6'd28, 6'd30, 6'd0, 16'd0, 1'b1), "entry map", t_entry0);
      t_entry0 -= 1;
      issue(mk(OP_OR, 6'd27, 6'd29, 6'd0, 16'd0, 1'b1), t);
      ctrl_then(cfg(0, 0, 0), mk(OP_ADD, 6'd26, 6'd27, 6'd28, 16'd0, 1'b1), "entry unmap", t_entry1);
      n_ctrl_writes += 2;
      exp_bank[0][28] = a30;
      exp_bank[0][27] = a29;
      exp_bank[0][26] = a29 + a30;
      // handler returns its result in user r30
      ctrl_then(cfg(2, th, 0), mk(OP_OR, 6'd30, 6'd26, 6'd0, 16'd0, 1'b1), "result map", t);
      exp_bank[th][30] = a29 + a30;
      // kernel exit: back to the user bank; the user reads its own r28
      issue(mk(OP_ADDI, SPR_BANK_CTRL, 6'd0, 6'd0, cfg(0, 0, th), 1'b1), t_exit0);
      issue(mk(OP_ADDI, 6'd28, 6'd28, 6'd0, 16'd1, 1'b0), t_exit1);
      gaps.push_back('{t_exit0, t_exit1, "exit"});
      n_ctrl_gaps++;
      n_ctrl_writes += 2;
      exp_bank[th][28] = exp_bank[th][28] + 1;
      if (th == 1) begin
        entry_a = t_entry0; entry_b = t_entry1; exit_a = t_exit0; exit_b = t_exit1;
      end
      // back to the kernel for the next thread
      ctrl_then(cfg(0, 0, 0), mk(OP_ADDI, 6'd0, 6'd0, 6'd0, 16'd0, 1'b1), "switch to kernel", t);
      n_ctrl_writes++;
    end

    // latencies: a load feeding the next instruction stalls 3 cycles (its
    // value is forwarded from Write Back); an ALU result feeding the next
    // instruction is forwarded from Execute with no stall. Kernel bank 0.
    begin
      longint i0, i1, i2, i3;
      issue(mk(OP_LW, 6'd9, 6'd0, 6'd0, 16'(1000 * 4), 1'b1), i0);
      issue(mk(OP_ADDI, 6'd10, 6'd9, 6'd0, 16'd3, 1'b1), i1);
      issue(mk(OP_ADDI, 6'd11, 6'd10, 6'd0, 16'd4, 1'b1), i2);
      issue(mk(OP_ADD, 6'd12, 6'd11, 6'd10, 16'd0, 1'b1), i3);
      lat_pairs.push_back('{i0, i1, "load-use"});
      lat_pairs.push_back('{i1, i2, "ALU result forwarding"});
      lat_pairs.push_back('{i2, i3, "ALU result forwarding, two operands"});
      exp_bank[0][9]  = 32'hD00D_F00D;
      exp_bank[0][10] = 32'hD00D_F00D + 3;
      exp_bank[0][11] = 32'hD00D_F00D + 7;
      exp_bank[0][12] = 2 * 32'hD00D_F00D + 10;
    end

    // dump all banks: word 32*b + r
    for (int bk = 0; bk < 16; bk++) begin
      issue(mk(OP_ADDI, SPR_BANK_CTRL, 6'd0, 6'd0, cfg(0, 0, bk), 1'b1), t);
      for (int r = 1; r < 32; r++)
        issue(mk(OP_SW, 6'd0, 6'd0, 6'(r), 16'((bk * 32 + r) * 4), 1'b1), t);
    end
    in_valid <= 1'b0;
    repeat (10) @(posedge clk);
    for (int bk = 0; bk < 16; bk++)
      for (int r = 1; r < 32; r++)
        chk(dmem[bk * 32 + r], exp_bank[bk][r], $sformatf("bank %0d r%0d", bk, r));
    chk(32'(retire_cyc[lat_pairs[0].b] - retire_cyc[lat_pairs[0].a]), 32'd4,
        "load-use: 1 + 3 stall cycles");
    chk(32'(retire_cyc[lat_pairs[1].b] - retire_cyc[lat_pairs[1].a]), 32'd1, lat_pairs[1].what);
    chk(32'(retire_cyc[lat_pairs[2].b] - retire_cyc[lat_pairs[2].a]), 32'd1, lat_pairs[2].what);
    foreach (gaps[i])
      chk(32'(retire_cyc[gaps[i].b] - retire_cyc[gaps[i].a]), 32'(CTRL_GAP),
          {gaps[i].what, ": cycles between a control write and the next instruction"});
    $display("thread 1: kernel entry stub %0d cycles from its first instruction to the handler's first, kernel exit %0d cycles to the first user instruction",
             retire_cyc[entry_b] - retire_cyc[entry_a], retire_cyc[exit_b] - retire_cyc[exit_a]);
    checks++;
    if (FWD_CTRL ? (stall_cycles != 0 || fwd_uses < n_ctrl_gaps)
                 : (stall_cycles < 4 * n_ctrl_gaps || fwd_uses != 0)) begin
      failures++;
      $display("FAIL control stall cycles %0d, forwarded uses %0d, for %0d writes followed by a user",
               stall_cycles, fwd_uses, n_ctrl_gaps);
    end
    $display("control register writes %0d, control stall cycles %0d, forwarded control values %0d",
             n_ctrl_writes, stall_cycles, fwd_uses);
    done = 1'b1;
  end
endmodule
