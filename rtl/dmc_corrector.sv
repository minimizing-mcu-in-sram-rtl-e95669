// dmc_corrector: DMC error corrector.
//
// Inverts every received information bit that the locator marked, i.e.
// D_correct[j] = D'[j] ^ L[j]; for a located bit L[j] equals the vertical
// syndrome bit of its column, so this is D_correct = D' ^ S on the erroneous
// symbols. Purely combinational.
module dmc_corrector #(
  parameter int unsigned M = dmc_pkg::SYM_W
) (
  input  logic [dmc_pkg::data_w(M)-1:0] d_recv,    // received information bits D'
  input  logic [dmc_pkg::data_w(M)-1:0] err_loc,   // located error bits
  output logic [dmc_pkg::data_w(M)-1:0] d_correct  // corrected information bits
);

  always_comb d_correct = d_recv ^ err_loc;

endmodule
