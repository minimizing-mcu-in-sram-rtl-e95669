// dmc_syndrome_tb: checks the horizontal syndrome (per-group difference
// H' - H modulo 32) and the vertical syndrome (V' ^ V), with the worked
// example 10110 - 10010 = 00100.
module dmc_syndrome_tb;
  logic [19:0] hr, hs, dh;
  logic [15:0] vr, vs, s;
  int checks = 0, failures = 0;

  dmc_syndrome #(.M(4)) dut (.h_recomp(hr), .h_stored(hs), .v_recomp(vr), .v_stored(vs),
                             .dh(dh), .s(s));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hr = {15'h0, 5'b10110}; hs = {15'h0, 5'b10010}; vr = 16'h0; vs = 16'h0; #1;
    checks++;
    if (dh !== {15'h0, 5'b00100} || s !== 16'h0) begin
      failures++; $display("FAIL example dh=%b", dh);
    end
    for (int i = 0; i < 2000; i++) begin
      logic [19:0] exp_dh;
      hr = 20'($urandom); hs = (i % 3 == 0) ? hr : 20'($urandom);
      vr = 16'($urandom); vs = 16'($urandom);
      #1;
      for (int g = 0; g < 4; g++) begin
        int diff;
        diff = int'(hr[g*5 +: 5]) - int'(hs[g*5 +: 5]);
        if (diff < 0) diff += 32;
        exp_dh[g*5 +: 5] = 5'(diff);
      end
      checks++;
      if (dh !== exp_dh || s !== (vr ^ vs)) begin
        failures++; $display("FAIL hr=%h hs=%h dh=%h exp %h", hr, hs, dh, exp_dh);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
