// tb_ctrl_hazard: random in-flight control register writes in EX, DM1, DM2
// and WB against both builds. Stalling build: no forwarding, stall whenever
// any write is in flight. Forwarding build: OF sees the youngest write
// (EX included), EX the youngest of DM1/DM2/WB, never a stall.
module tb_ctrl_hazard;
  import rb_pkg::*;
  bank_ctrl_t ctrl_q;
  ctrl_wr_t   late [N_LATE];
  bank_ctrl_t of_s, ex_s, of_f, ex_f;
  logic       st_s, st_f, fw_s, fw_f;
  int checks = 0, failures = 0;

  ctrl_hazard #(.FWD_CTRL(1'b0)) dut_s (.ctrl_q, .late, .ctrl_of(of_s), .ctrl_ex(ex_s),
                                        .stall_of(st_s), .fwd_of(fw_s));
  ctrl_hazard #(.FWD_CTRL(1'b1)) dut_f (.ctrl_q, .late, .ctrl_of(of_f), .ctrl_ex(ex_f),
                                        .stall_of(st_f), .fwd_of(fw_f));

  initial begin
    #100000;
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
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] e_of, e_ex;
      logic any, fwd;
      ctrl_q = bank_ctrl_t'($urandom & 32'h1FFF);
      for (int s = 0; s < N_LATE; s++) begin
        late[s].wen  = ($urandom_range(0, 2) == 0);
        late[s].data = $urandom;
      end
      #1;
      // reference: walk from the youngest (EX) to the oldest (WB)
      e_of = 32'(ctrl_q); e_ex = 32'(ctrl_q); any = 0; fwd = 0;
      for (int s = 0; s < N_LATE; s++)
        if (late[s].wen) begin any = 1; break; end
      for (int s = 0; s < N_LATE; s++)
        if (late[s].wen) begin e_of = late[s].data & 32'h1FFF; fwd = 1; break; end
      for (int s = ST_DM1; s < N_LATE; s++)
        if (late[s].wen) begin e_ex = late[s].data & 32'h1FFF; break; end
      chk(32'(of_s), 32'(ctrl_q), "stall build OF view");
      chk(32'(ex_s), 32'(ctrl_q), "stall build EX view");
      chk(32'(st_s), 32'(any), "stall build stall");
      chk(32'(fw_s), 0, "stall build fwd");
      chk(32'(of_f), e_of, "fwd build OF view");
      chk(32'(ex_f), e_ex, "fwd build EX view");
      chk(32'(st_f), 0, "fwd build stall");
      chk(32'(fw_f), 32'(fwd), "fwd build fwd");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
