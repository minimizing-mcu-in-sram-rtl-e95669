// dmc_locator: DMC error locator.
//
// A nonzero horizontal syndrome of group g says that one or both symbols of
// that group hold errors; a set vertical syndrome bit S[c] says that one of
// the two bits in column c (D[c] in row 0, D[c+N/2] in row 1) is flipped.
// Information bit j is marked erroneous when both hold: the horizontal
// group covering its symbol has a nonzero syndrome and the vertical syndrome
// of its column is set. The row is thus chosen by the horizontal syndrome
// and the bit by the vertical one.
// Also reports whether any syndrome is nonzero (error detected).
// Purely combinational.
module dmc_locator #(
  parameter int unsigned M = dmc_pkg::SYM_W
) (
  input  logic [dmc_pkg::h_w(M)-1:0]    dh,        // horizontal syndrome
  input  logic [dmc_pkg::v_w(M)-1:0]    s,         // vertical syndrome
  output logic [dmc_pkg::data_w(M)-1:0] err_loc,   // 1 = bit j is in error
  output logic                          detected   // some syndrome is nonzero
);

  localparam int unsigned N  = dmc_pkg::data_w(M);
  localparam int unsigned HG = dmc_pkg::hgrp_w(M);
  localparam int unsigned NV = dmc_pkg::v_w(M);

  logic [dmc_pkg::GROUPS-1:0] grp_err;

  always_comb begin
    for (int g = 0; g < int'(dmc_pkg::GROUPS); g++)
      grp_err[g] = |dh[g*HG +: HG];
    for (int j = 0; j < int'(N); j++)
      err_loc[j] = grp_err[dmc_pkg::group_of_sym(j / M)] & s[j % NV];
    detected = (|grp_err) | (|s);
  end

endmodule
