// bram_18k: one FPGA block RAM as used for the register file.
//
// 512 words of 32 bits (the 18 Kibit block with its 4 parity bits per word
// left unused) behind two independent read/write ports. Each port takes an
// 11-bit byte address; the word is selected by bits 10..2 and bits 1..0 are
// ignored, as in the register file wiring of the design. Reads are
// synchronous: data for the address presented in cycle t is on rdata in cycle
// t+1 while en is held. A port that writes returns the old word (read-first).
// When both ports touch the same word in one cycle and one writes, the other
// port's read data is the old word; two simultaneous writes to the same word
// leave port B's data. These collision rules are this design's choice; the
// register file never reads and writes the same word through different
// ports in a cycle without forwarding covering it.
module bram_18k #(
  parameter int unsigned WORDS  = 512,
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ADDR_W = 11  // byte address width
) (
  input  logic              clk,
  // port A
  input  logic              a_en,
  input  logic              a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_rdata,
  // port B
  input  logic              b_en,
  input  logic              b_we,
  input  logic [ADDR_W-1:0] b_addr,
  input  logic [DATA_W-1:0] b_wdata,
  output logic [DATA_W-1:0] b_rdata
);
  localparam int unsigned WA_W = ADDR_W - 2;

  logic [DATA_W-1:0] mem [WORDS];

  logic [WA_W-1:0] a_word, b_word;
  assign a_word = a_addr[ADDR_W-1:2];
  assign b_word = b_addr[ADDR_W-1:2];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_word];
      if (a_we) mem[a_word] <= a_wdata;
    end
    if (b_en) begin
      b_rdata <= mem[b_word];
      if (b_we) mem[b_word] <= b_wdata;
    end
  end
endmodule
