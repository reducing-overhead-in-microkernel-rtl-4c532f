// tb_bram_18k: block RAM model check. Writes random words through both
// ports, reads them back with the one-cycle read latency, checks read-first
// behaviour on a writing port and that address bits 1..0 are ignored.
module tb_bram_18k;
  logic clk = 0;
  logic a_en, a_we, b_en, b_we;
  logic [10:0] a_addr, b_addr;
  logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [31:0] ref_mem [512];
  int checks = 0, failures = 0;

  bram_18k dut (.*);
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
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill: even words through A, odd through B, same cycle
    for (int w = 0; w < 512; w += 2) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = 11'(w * 4); a_wdata = $urandom; ref_mem[w] = a_wdata;
      b_en = 1; b_we = 1; b_addr = 11'((w + 1) * 4 + 3); b_wdata = $urandom; ref_mem[w+1] = b_wdata;
    end
    @(negedge clk); a_we = 0; b_we = 0;
    // read back, random words on both ports
    for (int i = 0; i < 600; i++) begin
      int wa, wb;
      wa = $urandom_range(0, 511); wb = $urandom_range(0, 511);
      @(negedge clk);
      a_addr = 11'(wa * 4 + $urandom_range(0, 3)); b_addr = 11'(wb * 4);
      @(negedge clk);
      chk(a_rdata, ref_mem[wa], "portA read");
      chk(b_rdata, ref_mem[wb], "portB read");
    end
    // read-first on a writing port, then the new value
    @(negedge clk);
    a_addr = 11'(100 * 4); a_we = 1; a_wdata = 32'hCAFE_0001;
    @(negedge clk);
    a_we = 0;
    chk(a_rdata, ref_mem[100], "read-first");
    ref_mem[100] = 32'hCAFE_0001;
    @(negedge clk);
    chk(a_rdata, 32'hCAFE_0001, "after write");
    // disabled port holds its output
    b_addr = 11'(100 * 4); @(negedge clk); b_en = 0; b_addr = 11'(5 * 4);
    @(negedge clk);
    chk(b_rdata, 32'hCAFE_0001, "hold when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
