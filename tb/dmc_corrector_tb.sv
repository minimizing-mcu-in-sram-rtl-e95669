// dmc_corrector_tb: the corrector must invert exactly the located bits.
module dmc_corrector_tb;
  logic [31:0] d, e, dc;
  int checks = 0, failures = 0;

  dmc_corrector #(.M(4)) dut (.d_recv(d), .err_loc(e), .d_correct(dc));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] orig;
      orig = $urandom;
      e = (i < 32) ? (32'h1 << i) : $urandom;
      d = orig ^ e;
      #1;
      checks++;
      if (dc !== orig) begin failures++; $display("FAIL d=%h e=%h dc=%h", d, e, dc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
