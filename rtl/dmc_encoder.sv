// dmc_encoder: DMC encoder (horizontal adders and vertical XORs).
//
// Horizontal check bits: the N-bit word is split into eight M-bit symbols;
// group g of H (M+1 bits at H[g*(M+1)]) is the integer sum of symbols
// a = (g/2)*4 + g%2 and a+2, so with M = 4
//   H4..H0   = D3..D0   + D11..D8      H9..H5   = D7..D4   + D15..D12
//   H14..H10 = D19..D16 + D27..D24     H19..H15 = D23..D20 + D31..D28.
// Vertical check bits: V[i] = D[i] ^ D[i+N/2] for i = 0..N/2-1.
// U is the information word passed through unchanged, as in the DMC encoder
// diagram; it is a plain wire.
// Purely combinational. The same instance serves as encoder on a write and
// as the check-bit recomputation stage of the decoder on a read; the choice
// of operand is made by the caller (see dmc_ert_codec).
module dmc_encoder #(
  parameter int unsigned M = dmc_pkg::SYM_W
) (
  input  logic [dmc_pkg::data_w(M)-1:0] d,  // information bits D
  output logic [dmc_pkg::h_w(M)-1:0]    h,  // horizontal check bits H
  output logic [dmc_pkg::v_w(M)-1:0]    v,  // vertical check bits V
  output logic [dmc_pkg::data_w(M)-1:0] u   // information bits copied, U = D
);

  localparam int unsigned N  = dmc_pkg::data_w(M);
  localparam int unsigned HG = dmc_pkg::hgrp_w(M);
  localparam int unsigned NV = dmc_pkg::v_w(M);

  for (genvar g = 0; g < dmc_pkg::GROUPS; g++) begin : g_add
    localparam int unsigned SA = dmc_pkg::sym_a(g);
    dmc_sym_adder #(.M(M)) u_add (
      .a  (d[SA*M +: M]),
      .b  (d[(SA+2)*M +: M]),
      .sum(h[g*HG +: HG])
    );
  end

  always_comb begin
    v = d[NV-1:0] ^ d[N-1:NV];
    u = d;
  end

endmodule
