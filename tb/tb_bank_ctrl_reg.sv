// tb_bank_ctrl_reg: checks reset value, privileged writes (fields stored,
// unused bits cleared, visible the next cycle), and that unprivileged writes
// are dropped and raise priv_fault for one cycle.
module tb_bank_ctrl_reg;
  import rb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en, wr_priv;
  logic [XLEN-1:0] wr_data;
  bank_ctrl_t ctrl;
  logic priv_fault;
  logic [31:0] exp_q;
  int checks = 0, failures = 0;

  bank_ctrl_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got=%h exp=%h", what, got, exp);
    end
  endtask

  initial begin
    wr_en = 0; wr_priv = 0; wr_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(32'(ctrl), 32'h0, "reset value");
    exp_q = 0;
    for (int i = 0; i < 500; i++) begin
      logic en, pv;
      @(negedge clk);
      en = 1'($urandom); pv = ($urandom_range(0, 3) != 0);
      wr_en = en; wr_priv = pv; wr_data = $urandom;
      @(negedge clk);
      if (en && pv) exp_q = wr_data & 32'h0000_1FFF;
      chk(32'(ctrl), exp_q, "value");
      chk(32'(priv_fault), 32'(en && !pv), "priv_fault");
      checks++;
      if (ctrl.count != exp_q[12:8] || ctrl.minor != exp_q[7:4] || ctrl.major != exp_q[3:0])
        failures++;
      wr_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
