// dmc_ert_codec_tb: encode-then-decode checks of the encoder-reuse codec.
// In encode mode the shared encoder must output the reference check bits
// and the decoder flags must stay low. In syndrome mode the stored word is
// corrupted with error patterns and the corrected word compared with the
// original: every error burst inside one symbol, the two-symbol example
// (symbol 0 1100->1111, symbol 2 0110->0111), random multi-symbol patterns
// judged by the reference correctability rule, and check-bit upsets that must
// be detected without touching the data.
module dmc_ert_codec_tb;
  import dmc_pkg::*;
  import dmc_ref_pkg::*;

  ert_mode_e   en;
  logic [31:0] d_wr, u_enc, d_rd, d_correct;
  logic [19:0] h_enc, h_rd, dh;
  logic [15:0] v_enc, v_rd, s;
  logic        detected, corrected;
  int checks = 0, failures = 0;
  int n_corr = 0, n_uncorr = 0;

  dmc_ert_codec #(.M(4)) dut (
    .en(en), .d_wr(d_wr), .h_enc(h_enc), .v_enc(v_enc), .u_enc(u_enc),
    .d_rd(d_rd), .h_rd(h_rd), .v_rd(v_rd), .dh(dh), .s(s),
    .d_correct(d_correct), .detected(detected), .corrected(corrected)
  );

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Encode w, then read it back with data errors ed and check-bit errors eh, ev.
  task automatic trial(input logic [31:0] w, input logic [31:0] ed,
                       input logic [19:0] eh, input logic [15:0] ev, input bit expect_fix);
    logic [19:0] hw;
    logic [15:0] vw;
    en = EN_ENCODE; d_wr = w; d_rd = $urandom; h_rd = 20'($urandom); v_rd = 16'($urandom);
    #1;
    checks++;
    if (h_enc !== ref_h(w) || v_enc !== ref_v(w) || u_enc !== w || detected || corrected) begin
      failures++;
      $display("FAIL encode w=%h h=%h v=%h det=%b", w, h_enc, v_enc, detected);
    end
    hw = h_enc; vw = v_enc;
    en = EN_SYNDROME; d_wr = $urandom; d_rd = w ^ ed; h_rd = hw ^ eh; v_rd = vw ^ ev;
    #1;
    checks++;
    if (expect_fix && d_correct !== w) begin
      failures++;
      $display("FAIL decode w=%h ed=%h eh=%h ev=%h got %h", w, ed, eh, ev, d_correct);
    end
    checks++;
    if (detected !== ((ed | 32'(eh) | 32'(ev)) != 0 && (ref_h(w ^ ed) != (hw ^ eh) || ref_v(w ^ ed) != (vw ^ ev)))) begin
      failures++;
      $display("FAIL detect flag w=%h ed=%h eh=%h ev=%h det=%b", w, ed, eh, ev, detected);
    end
  endtask

  initial begin
    // Worked example: symbol 0 = 1100 -> 1111, symbol 2 = 0110 -> 0111.
    trial(32'h0000_060C, 32'h0000_0103, 20'h0, 16'h0, 1'b1);
    checks++;
    if (dh[4:0] !== 5'b00100) begin failures++; $display("FAIL example dH = %b", dh[4:0]); end
    // No errors.
    for (int i = 0; i < 200; i++) trial($urandom, 32'h0, 20'h0, 16'h0, 1'b1);
    // Every burst inside one symbol.
    for (int sym = 0; sym < 8; sym++)
      for (int m = 1; m < 16; m++)
        trial($urandom, 32'(m) << (sym * 4), 20'h0, 16'h0, 1'b1);
    // Single check-bit upsets: detected, data untouched.
    for (int b = 0; b < 20; b++) trial($urandom, 32'h0, 20'h1 << b, 16'h0, 1'b1);
    for (int b = 0; b < 16; b++) trial($urandom, 32'h0, 20'h0, 16'h1 << b, 1'b1);
    // Random multi-bit data patterns.
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] w, e;
      bit ok;
      w = $urandom;
      e = $urandom & $urandom & $urandom;
      ok = ref_correctable(w, e);
      if (ok) n_corr++; else n_uncorr++;
      trial(w, e, 20'h0, 16'h0, ok);
    end
    checks++;
    if (n_corr == 0) begin failures++; $display("FAIL no correctable random pattern"); end
    $display("random patterns: %0d correctable, %0d not", n_corr, n_uncorr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
