// dmc_sram: word-wide storage array used for the information and the
// redundancy SRAM of the protected memory.
//
// DEPTH words of WIDTH bits. Writes are synchronous (we, addr, wdata sampled
// at the rising clock edge). The read port is asynchronous: rdata shows the
// word at raddr in the same cycle, so that decoding and correction fit in the
// read cycle and the memory's caller registers the corrected word.
// The upset port models radiation strikes for reliability evaluation: at a
// clock edge with upset_en high and no write, the word at upset_addr has the
// bits set in upset_mask inverted, i.e. a single or multiple cell upset.
// The array is not reset; a word must be written before it is read.
module dmc_sram #(
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DEPTH  = 1 << ADDR_W
) (
  input  logic              clk,
  input  logic              we,          // write enable
  input  logic [ADDR_W-1:0] waddr,       // write address
  input  logic [WIDTH-1:0]  wdata,       // write data
  input  logic [ADDR_W-1:0] raddr,       // read address
  output logic [WIDTH-1:0]  rdata,       // read data, combinational
  input  logic              upset_en,    // inject an upset
  input  logic [ADDR_W-1:0] upset_addr,  // word hit by the upset
  input  logic [WIDTH-1:0]  upset_mask   // cells flipped by the upset
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we)
      mem[waddr] <= wdata;
    else if (upset_en)
      mem[upset_addr] <= mem[upset_addr] ^ upset_mask;
  end

  always_comb rdata = mem[raddr];

endmodule
