// dmc_ert_codec: DMC encoder and decoder sharing one encoder (encoder reuse).
//
// A single dmc_encoder is used for both directions. The enable en selects
// its operand:
//   en = EN_ENCODE   (write): the encoder sees the write data; its H and V
//                    outputs are the check bits to store.
//   en = EN_SYNDROME (read):  the encoder sees the received information bits
//                    D' and recomputes H' and V'; the syndrome calculator
//                    compares them with the stored H and V, the locator finds
//                    the flipped bits and the corrector inverts them.
// The decoder outputs are only meaningful with en = EN_SYNDROME; the
// detection and correction flags are forced low otherwise.
// Purely combinational; the caller registers what it needs.
module dmc_ert_codec
  import dmc_pkg::*;
#(
  parameter int unsigned M = dmc_pkg::SYM_W
) (
  input  ert_mode_e                     en,         // encode (write) or syndrome (read)
  input  logic [dmc_pkg::data_w(M)-1:0] d_wr,       // word to encode
  output logic [dmc_pkg::h_w(M)-1:0]    h_enc,      // H to store
  output logic [dmc_pkg::v_w(M)-1:0]    v_enc,      // V to store
  output logic [dmc_pkg::data_w(M)-1:0] u_enc,      // information bits to store
  input  logic [dmc_pkg::data_w(M)-1:0] d_rd,       // received information bits D'
  input  logic [dmc_pkg::h_w(M)-1:0]    h_rd,       // stored H read back
  input  logic [dmc_pkg::v_w(M)-1:0]    v_rd,       // stored V read back
  output logic [dmc_pkg::h_w(M)-1:0]    dh,         // horizontal syndrome
  output logic [dmc_pkg::v_w(M)-1:0]    s,          // vertical syndrome
  output logic [dmc_pkg::data_w(M)-1:0] d_correct,  // corrected word
  output logic                          detected,   // a syndrome is nonzero
  output logic                          corrected   // at least one bit was inverted
);

  localparam int unsigned N  = data_w(M);
  localparam int unsigned NH = h_w(M);
  localparam int unsigned NV = v_w(M);

  logic [N-1:0]  enc_d;
  logic [NH-1:0] enc_h;
  logic [NV-1:0] enc_v;
  logic [N-1:0]  enc_u;
  logic [N-1:0]  err_loc;
  logic          loc_detected;

  // Operand selection of the shared encoder.
  always_comb enc_d = (en == EN_SYNDROME) ? d_rd : d_wr;

  dmc_encoder #(.M(M)) u_encoder (
    .d(enc_d), .h(enc_h), .v(enc_v), .u(enc_u)
  );

  always_comb begin
    h_enc = enc_h;
    v_enc = enc_v;
    u_enc = enc_u;
  end

  dmc_syndrome #(.M(M)) u_syn (
    .h_recomp(enc_h), .h_stored(h_rd),
    .v_recomp(enc_v), .v_stored(v_rd),
    .dh(dh), .s(s)
  );

  dmc_locator #(.M(M)) u_loc (
    .dh(dh), .s(s), .err_loc(err_loc), .detected(loc_detected)
  );

  dmc_corrector #(.M(M)) u_cor (
    .d_recv(enc_u), .err_loc(err_loc), .d_correct(d_correct)
  );

  always_comb begin
    detected  = (en == EN_SYNDROME) & loc_detected;
    corrected = (en == EN_SYNDROME) & (|err_loc);
  end

endmodule
