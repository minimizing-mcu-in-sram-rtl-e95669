// dmc_memory: SRAM protected by the decimal matrix code with encoder reuse.
//
// Structure: one dmc_ert_codec, an information SRAM holding the N data bits
// (the encoder's U output) and a redundancy SRAM holding the horizontal and
// vertical check bits {V, H}. The encoder-reuse enable follows the access:
// a write encodes (En = encode), a read recomputes check bits from the
// received data (En = syndrome) and corrects it.
//
// Interface and timing (single port, one access per cycle):
//   write: we = 1 with addr and wdata; the word and its check bits are
//          stored at that clock edge.
//   read:  re = 1 with addr; the stored word is decoded and corrected in the
//          same cycle and appears on rdata, with rvalid, err_detected and
//          err_corrected, one cycle later.
//   we and re must not be high together (asserted); should it happen the
//   write is done and the read is dropped.
//   upset_*: flips the given bits of the stored 68-bit codeword
//          (bit layout {V, H, D}, D at bit 0) to emulate an MCU.
// The word width follows the symbol width M (N = 8*M); ADDR_W sets the
// depth, which is this design's own choice.
// The code, the two arrays and the shared encoder follow the DMC scheme; the
// port list, one-cycle latency, reset, status flags and upset port are this
// design's choices. The syndromes dH and S are used inside only and left
// unconnected at this level. rst_n also disables the access assertion, which
// is why it is seen both as an asynchronous reset and in a clocked context.
module dmc_memory
  import dmc_pkg::*;
#(
  parameter int unsigned M      = dmc_pkg::SYM_W,
  parameter int unsigned ADDR_W = 8
) (
  input  logic                                           clk,
  input  logic                                           rst_n,
  input  logic                                           we,
  input  logic                                           re,
  input  logic [ADDR_W-1:0]                              addr,
  input  logic [dmc_pkg::data_w(M)-1:0]                  wdata,
  output logic [dmc_pkg::data_w(M)-1:0]                  rdata,
  output logic                                           rvalid,
  output logic                                           err_detected,
  output logic                                           err_corrected,
  input  logic                                           upset_en,
  input  logic [ADDR_W-1:0]                              upset_addr,
  input  logic [dmc_pkg::data_w(M)+dmc_pkg::h_w(M)+dmc_pkg::v_w(M)-1:0] upset_mask
);

  localparam int unsigned N  = data_w(M);
  localparam int unsigned NH = h_w(M);
  localparam int unsigned NV = v_w(M);
  localparam int unsigned NR = NH + NV;

  ert_mode_e     en;
  logic [N-1:0]  u_enc, d_rd, d_correct;
  logic [NH-1:0] h_enc, h_rd, dh;
  logic [NV-1:0] v_enc, v_rd, s;
  logic [NR-1:0] r_rd;
  logic          detected, corrected, rd_go;

  // En is derived from the read and write strobes.
  always_comb begin
    rd_go = re & ~we;
    en    = rd_go ? EN_SYNDROME : EN_ENCODE;
  end

  dmc_ert_codec #(.M(M)) u_codec (
    .en(en), .d_wr(wdata),
    .h_enc(h_enc), .v_enc(v_enc), .u_enc(u_enc),
    .d_rd(d_rd), .h_rd(h_rd), .v_rd(v_rd),
    .dh(dh), .s(s), .d_correct(d_correct),
    .detected(detected), .corrected(corrected)
  );

  dmc_sram #(.WIDTH(N), .ADDR_W(ADDR_W)) u_sram_info (
    .clk(clk), .we(we), .waddr(addr), .wdata(u_enc), .raddr(addr), .rdata(d_rd),
    .upset_en(upset_en), .upset_addr(upset_addr), .upset_mask(upset_mask[N-1:0])
  );

  dmc_sram #(.WIDTH(NR), .ADDR_W(ADDR_W)) u_sram_red (
    .clk(clk), .we(we), .waddr(addr), .wdata({v_enc, h_enc}), .raddr(addr), .rdata(r_rd),
    .upset_en(upset_en), .upset_addr(upset_addr), .upset_mask(upset_mask[N +: NR])
  );

  always_comb {v_rd, h_rd} = r_rd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata         <= '0;
      rvalid        <= 1'b0;
      err_detected  <= 1'b0;
      err_corrected <= 1'b0;
    end else begin
      rvalid <= rd_go;
      if (rd_go) begin
        rdata         <= d_correct;
        err_detected  <= detected;
        err_corrected <= corrected;
      end
    end
  end

  // One access per cycle.
  a_one_access: assert property (@(posedge clk) disable iff (!rst_n) !(we && re))
    else $error("dmc_memory: write and read requested in the same cycle");

endmodule
