// dmc_encoder_tb: checks H, V and U of the encoder against the reference
// equations for directed and random 32-bit words.
module dmc_encoder_tb;
  import dmc_ref_pkg::*;
  logic [31:0] d, u;
  logic [19:0] h;
  logic [15:0] v;
  int checks = 0, failures = 0;

  dmc_encoder #(.M(4)) dut (.d(d), .h(h), .v(v), .u(u));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_word(input logic [31:0] w);
    d = w; #1;
    checks++;
    if (h !== ref_h(w) || v !== ref_v(w) || u !== w) begin
      failures++;
      $display("FAIL d=%h h=%h (exp %h) v=%h (exp %h) u=%h", w, h, ref_h(w), v, ref_v(w), u);
    end
  endtask

  initial begin
    check_word(32'h0);
    check_word(32'hFFFF_FFFF);
    // Symbol 0 = 1100, symbol 2 = 0110: H4..H0 = 10010.
    check_word(32'h0000_060C);
    checks++;
    if (h[4:0] !== 5'b10010) begin failures++; $display("FAIL example H4..H0 = %b", h[4:0]); end
    for (int i = 0; i < 32; i++) check_word(32'h1 << i);
    for (int i = 0; i < 2000; i++) check_word($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
