// dmc_syndrome: DMC syndrome calculator (subtracters and XORs).
//
// Horizontal syndrome, per group: dH = H' - H, the recomputed group minus the
// stored group, as an (M+1)-bit decimal integer difference (e.g. 10110 - 10010
// = 00100). Both operands lie in 0..2^(M+1)-2, so the modulo-2^(M+1) result is
// zero exactly when the two groups are equal.
// Vertical syndrome: S = V' ^ V, bit by bit.
// Purely combinational.
module dmc_syndrome #(
  parameter int unsigned M = dmc_pkg::SYM_W
) (
  input  logic [dmc_pkg::h_w(M)-1:0] h_recomp,  // H' from the received data
  input  logic [dmc_pkg::h_w(M)-1:0] h_stored,  // H read from memory
  input  logic [dmc_pkg::v_w(M)-1:0] v_recomp,  // V' from the received data
  input  logic [dmc_pkg::v_w(M)-1:0] v_stored,  // V read from memory
  output logic [dmc_pkg::h_w(M)-1:0] dh,        // horizontal syndrome, per group
  output logic [dmc_pkg::v_w(M)-1:0] s          // vertical syndrome
);

  localparam int unsigned HG = dmc_pkg::hgrp_w(M);

  always_comb begin
    for (int g = 0; g < int'(dmc_pkg::GROUPS); g++)
      dh[g*HG +: HG] = h_recomp[g*HG +: HG] - h_stored[g*HG +: HG];
    s = v_recomp ^ v_stored;
  end

endmodule
