// rb_core_env: self-checking environment around one rb_core build.
//
// Drives a program into the core: first every register of all 16 banks is
// written (one control register write per bank, then 31 add-immediates),
// then a random stream of ALU operations, loads, stores, explicit control
// register reads and writes (some unprivileged) and bubbles. Register
// numbers are drawn from a small set near the top and bottom of the register
// space so that minor bank mapping, forwarding and load-use hazards are
// frequent. A sequential reference model (instruction by instruction, the
// translation formula written out here) predicts every retirement; each
// Write Back is compared with it, and data memory is compared at the end.
// Hazard event counts are reported to the enclosing testbench.
module rb_core_env
  import rb_pkg::*;
#(
  parameter bit FWD_CTRL = 1'b0,
  parameter int N_RANDOM = 4000
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_stall_ctrl, n_stall_load, n_fwd_ctrl, n_fwd_result, n_fwd_load,
  output int   n_minor, n_priv_fault, n_spr_read, n_bank_switch
);
  logic            in_valid, in_ready;
  uop_t            in_uop;
  logic            dmem_req, dmem_we;
  logic [XLEN-1:0] dmem_addr, dmem_wdata, dmem_rdata;
  logic            wb_valid, wb_wen;
  rf_addr_t        wb_dst;
  logic [XLEN-1:0] wb_data;
  bank_ctrl_t      bank_ctrl;
  logic            priv_fault;
  logic            ev_stall_ctrl, ev_stall_load, ev_fwd_ctrl, ev_fwd_result, ev_fwd_load,
                   ev_minor_access;

  if (FWD_CTRL) begin : g_fwd
    rb_core #(.FWD_CTRL(1'b1)) dut (.*);
  end else begin : g_stall
    rb_core dut (.*);
  end

  // ---------------- data memory model (64 words, response next cycle) ----
  logic [31:0] dmem [64];
  always_ff @(posedge clk) begin
    if (dmem_req) begin
      dmem_rdata <= dmem[dmem_addr[7:2]];
      if (dmem_we) dmem[dmem_addr[7:2]] <= dmem_wdata;
    end
  end

  // ---------------- reference model ----------------
  logic [31:0] m_rf [16][32];
  logic [31:0] m_mem [64];
  logic [31:0] m_ctrl;

  typedef struct packed {
    logic        wen;
    rf_addr_t    dst;
    logic [31:0] data;
  } exp_t;
  exp_t expq [$];

  function automatic logic [3:0] m_set(input logic [5:0] e, input logic [31:0] c);
    if (e >= 32) return 4'd0;
    if (int'(e) >= 32 - int'(c[12:8])) return c[7:4];
    return c[3:0];
  endfunction

  function automatic logic [31:0] m_read(input logic [5:0] e);
    if (e == 0) return 0;
    if (e == SPR_BANK_CTRL) return m_ctrl;
    if (e >= 32) return 0;
    return m_rf[m_set(e, m_ctrl)][e[4:0]];
  endfunction

  task automatic m_exec(input uop_t u);
    logic [31:0] a, b, r, simm;
    exp_t x;
    a = m_read(u.rs1); b = m_read(u.rs2);
    simm = {{16{u.imm[15]}}, u.imm};
    x = '0;
    x.dst.set = m_set(u.rd, m_ctrl);
    x.dst.enc = u.rd;
    case (u.op)
      OP_ADD:  r = a + b;
      OP_SUB:  r = a - b;
      OP_AND:  r = a & b;
      OP_OR:   r = a | b;
      OP_XOR:  r = a ^ b;
      OP_ADDI: r = a + simm;
      OP_LW:   r = m_mem[(a + simm) >> 2 & 63];
      default: r = 0;
    endcase
    if (u.op == OP_SW) m_mem[(a + simm) >> 2 & 63] = b;
    x.data = r;
    if (op_writes_rd(u.op) && u.rd != 0) begin
      if (u.rd < 32) begin
        x.wen = 1;
        m_rf[x.dst.set][u.rd[4:0]] = r;
      end else if (u.rd == SPR_BANK_CTRL && u.op != OP_LW && u.priv) begin
        x.wen = 1;
        m_ctrl = r & 32'h1FFF;
        x.data = m_ctrl;
      end
    end
    expq.push_back(x);
  endtask

  // ---------------- program ----------------
  uop_t prog [$];
  logic [5:0] pool [12] = '{6'd1, 6'd2, 6'd3, 6'd5, 6'd19, 6'd23, 6'd24, 6'd27,
                            6'd28, 6'd29, 6'd30, 6'd31};

  function automatic uop_t mk(op_e op, logic [5:0] rd, logic [5:0] rs1, logic [5:0] rs2,
                              logic [15:0] imm, logic priv = 1'b1);
    uop_t u;
    u.op = op; u.rd = rd; u.rs1 = rs1; u.rs2 = rs2; u.imm = imm; u.priv = priv;
    return u;
  endfunction

  function automatic logic [5:0] rreg();
    return pool[$urandom_range(0, 11)];
  endfunction

  initial begin
    for (int bk = 0; bk < 16; bk++) begin
      prog.push_back(mk(OP_ADDI, SPR_BANK_CTRL, 6'd0, 6'd0, 16'(bk)));
      for (int r = 1; r < 32; r++)
        prog.push_back(mk(OP_ADDI, 6'(r), 6'd0, 6'd0, 16'(bk * 256 + r)));
    end
    for (int w = 0; w < 64; w++)
      prog.push_back(mk(OP_SW, 6'd0, 6'd0, 6'(w % 31 + 1), 16'(w * 4)));
    for (int i = 0; i < N_RANDOM; i++) begin
      int k;
      k = $urandom_range(0, 99);
      if (k < 8)        // privileged control register write from an immediate
        prog.push_back(mk(OP_ADDI, SPR_BANK_CTRL, 6'd0, 6'd0, 16'($urandom & 32'h1FFF)));
      else if (k < 11)  // control register write from a computed register value
        prog.push_back(mk(OP_XOR, SPR_BANK_CTRL, rreg(), rreg(), 16'd0));
      else if (k < 14)  // unprivileged attempt
        prog.push_back(mk(OP_ADDI, SPR_BANK_CTRL, 6'd0, 6'd0, 16'($urandom & 32'h1FFF), 1'b0));
      else if (k < 17)  // explicit read of the control register
        prog.push_back(mk(OP_OR, rreg(), SPR_BANK_CTRL, 6'd0, 16'd0));
      else if (k < 29)
        prog.push_back(mk(OP_LW, rreg(), 6'd0, 6'd0, 16'($urandom_range(0, 63) * 4)));
      else if (k < 38)
        prog.push_back(mk(OP_SW, 6'd0, 6'd0, rreg(), 16'($urandom_range(0, 63) * 4)));
      else if (k < 40)  // write to an unimplemented special purpose register
        prog.push_back(mk(OP_ADDI, 6'd50, rreg(), 6'd0, 16'd1));
      else if (k < 42)  // writes to r0 are dropped
        prog.push_back(mk(OP_ADDI, 6'd0, rreg(), 6'd0, 16'd7));
      else begin
        op_e ops [6] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_ADDI};
        prog.push_back(mk(ops[$urandom_range(0, 5)], rreg(), rreg(), rreg(), 16'($urandom)));
      end
    end
  end

  // ---------------- driver, checker, counters ----------------
  int pc;
  int idle;
  logic [31:0] prev_ctrl;

  initial begin
    checks = 0; failures = 0; done = 0;
    n_stall_ctrl = 0; n_stall_load = 0; n_fwd_ctrl = 0; n_fwd_result = 0; n_fwd_load = 0;
    n_minor = 0; n_priv_fault = 0; n_spr_read = 0; n_bank_switch = 0;
    m_ctrl = 0; pc = 0; idle = 0; prev_ctrl = 0;
    in_valid = 0; in_uop = '0;
    foreach (dmem[i]) begin dmem[i] = 0; m_mem[i] = 0; end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      // handshake of the instruction offered during the cycle that just ended
      if (in_valid && in_ready) begin
        m_exec(in_uop);
        if (in_uop.op == OP_OR && in_uop.rs1 == SPR_BANK_CTRL) n_spr_read++;
        pc++;
      end
      // retirement check
      if (wb_valid) begin
        exp_t x;
        checks++;
        if (expq.size() == 0) begin
          failures++;
          $display("FAIL[fwd=%0d] retirement with nothing expected", FWD_CTRL);
        end else begin
          x = expq.pop_front();
          if (wb_wen !== x.wen || (x.wen && (wb_dst !== x.dst || wb_data !== x.data))) begin
            failures++;
            if (failures < 10)
              $display("FAIL[fwd=%0d] t=%0t wen %0d/%0d dst %0d.%0d/%0d.%0d data %h/%h",
                       FWD_CTRL, $time, wb_wen, x.wen, wb_dst.set, wb_dst.enc,
                       x.dst.set, x.dst.enc, wb_data, x.data);
          end
        end
      end
      if (32'(bank_ctrl) != prev_ctrl) n_bank_switch++;
      prev_ctrl = 32'(bank_ctrl);
      n_stall_ctrl += int'(ev_stall_ctrl);
      n_stall_load += int'(ev_stall_load);
      n_fwd_ctrl   += int'(ev_fwd_ctrl);
      n_fwd_result += int'(ev_fwd_result);
      n_fwd_load   += int'(ev_fwd_load);
      n_minor      += int'(ev_minor_access);
      n_priv_fault += int'(priv_fault);
      // next offer (held while not accepted)
      if (!(in_valid && !in_ready)) begin
        if (prog.size() > 0 && $urandom_range(0, 9) != 0) begin
          in_valid <= 1;
          in_uop   <= prog.pop_front();
        end else begin
          in_valid <= 0;
        end
      end
      if (prog.size() == 0 && !in_valid && expq.size() == 0) begin
        idle++;
        if (idle == 10 && !done) begin
          for (int w = 0; w < 64; w++) begin
            checks++;
            if (dmem[w] !== m_mem[w]) begin
              failures++;
              $display("FAIL[fwd=%0d] memory word %0d %h/%h", FWD_CTRL, w, dmem[w], m_mem[w]);
            end
          end
          checks++;
          if (32'(bank_ctrl) !== m_ctrl) failures++;
          done <= 1;
        end
      end
    end
  end
endmodule
