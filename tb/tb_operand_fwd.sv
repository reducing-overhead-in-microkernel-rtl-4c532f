// tb_operand_fwd: random in-flight writers with destinations drawn from a
// few sets and registers (so set-only and address-only matches occur). The
// reference finds the youngest writer with the same set and address; a load
// outside WB means stall, otherwise its value is forwarded.
module tb_operand_fwd;
  import rb_pkg::*;
  logic            used;
  rf_addr_t        src;
  prod_t           late [N_LATE];
  logic            hit, stall, from_load;
  logic [XLEN-1:0] data;
  int checks = 0, failures = 0;
  int n_set_only = 0, n_stall = 0, n_hit = 0;

  operand_fwd dut (.*);

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
    for (int i = 0; i < 5000; i++) begin
      logic e_hit, e_stall, e_fl;
      logic [31:0] e_data;
      used = ($urandom_range(0, 7) != 0);
      src.set = 4'($urandom_range(0, 2));
      src.enc = 6'($urandom_range(1, 3));
      for (int s = 0; s < N_LATE; s++) begin
        late[s].wen     = 1'($urandom);
        late[s].is_load = ($urandom_range(0, 2) == 0);
        late[s].dst.set = 4'($urandom_range(0, 2));
        late[s].dst.enc = 6'($urandom_range(1, 3));
        late[s].data    = $urandom;
        if (late[s].wen && late[s].dst.enc == src.enc && late[s].dst.set != src.set)
          n_set_only++;
      end
      #1;
      e_hit = 0; e_stall = 0; e_fl = 0; e_data = 0;
      if (used)
        for (int s = 0; s < N_LATE; s++)
          if (late[s].wen && late[s].dst.set == src.set && late[s].dst.enc == src.enc) begin
            if (late[s].is_load && s != ST_WB) e_stall = 1;
            else begin e_hit = 1; e_data = late[s].data; e_fl = late[s].is_load; end
            break;
          end
      n_stall += e_stall; n_hit += e_hit;
      chk(32'(hit), 32'(e_hit), "hit");
      chk(32'(stall), 32'(e_stall), "stall");
      if (e_hit) begin
        chk(data, e_data, "data");
        chk(32'(from_load), 32'(e_fl), "from_load");
      end
    end
    checks++;
    if (n_set_only == 0 || n_stall == 0 || n_hit == 0) failures++;
    $display("set-only matches %0d, stalls %0d, hits %0d", n_set_only, n_stall, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
