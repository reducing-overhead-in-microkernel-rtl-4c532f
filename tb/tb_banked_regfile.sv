// tb_banked_regfile: writes every register of all 16 sets with a distinct
// value and reads all of them back through both read ports (one-cycle read
// latency), so a wrong set or register address wiring, or a write reaching
// only one of the two block RAMs, shows up. Also checks that a write does
// not disturb the same register of other sets.
module tb_banked_regfile;
  import rb_pkg::*;
  logic clk = 0;
  logic [SET_W-1:0] r0_set, r1_set, w_set;
  logic [REG_W-1:0] r0_reg, r1_reg, w_reg;
  logic [XLEN-1:0]  r0_data, r1_data, w_data;
  logic             w_en;
  logic [XLEN-1:0]  ref_rf [16][32];
  int checks = 0, failures = 0;

  banked_regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    w_en = 0; w_set = 0; w_reg = 0; w_data = 0;
    r0_set = 0; r0_reg = 0; r1_set = 0; r1_reg = 0;
    for (int s = 0; s < 16; s++)
      for (int r = 0; r < 32; r++) begin
        @(negedge clk);
        w_en = 1; w_set = 4'(s); w_reg = 5'(r);
        w_data = {8'(s), 8'(r), 16'($urandom)};
        ref_rf[s][r] = w_data;
      end
    @(negedge clk); w_en = 0;
    for (int s = 0; s < 16; s++)
      for (int r = 0; r < 32; r++) begin
        @(negedge clk);
        r0_set = 4'(s); r0_reg = 5'(r);
        r1_set = 4'(15 - s); r1_reg = 5'(31 - r);
        @(negedge clk);
        chk(r0_data, ref_rf[s][r], "port0");
        chk(r1_data, ref_rf[15-s][31-r], "port1");
      end
    // overwrite r7 of set 3 only
    @(negedge clk); w_en = 1; w_set = 4'd3; w_reg = 5'd7; w_data = 32'h1234_5678;
    ref_rf[3][7] = w_data;
    @(negedge clk); w_en = 0;
    for (int s = 0; s < 16; s++) begin
      r0_set = 4'(s); r0_reg = 5'd7; r1_set = 4'(s); r1_reg = 5'd7;
      @(negedge clk);
      chk(r0_data, ref_rf[s][7], "isolation p0");
      chk(r1_data, ref_rf[s][7], "isolation p1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
