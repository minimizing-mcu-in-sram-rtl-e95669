// dmc_sym_adder: decimal integer adder of one horizontal check group.
//
// The two M-bit symbols are read as unsigned integers and added; the full
// (M+1)-bit sum, carry included, is the horizontal check group, e.g.
// H4..H0 = D3..D0 + D11..D8. With M = 4: 1100 + 0110 = 10010.
// Purely combinational. The adder's internal structure is not prescribed;
// a plain unsigned addition is used.
module dmc_sym_adder #(
  parameter int unsigned M = dmc_pkg::SYM_W
) (
  input  logic [M-1:0] a,    // first symbol
  input  logic [M-1:0] b,    // second symbol
  output logic [M:0]   sum   // a + b, M+1 bits
);

  always_comb sum = {1'b0, a} + {1'b0, b};

endmodule
