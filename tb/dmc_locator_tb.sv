// dmc_locator_tb: checks that a data bit is marked in error exactly when its
// horizontal group syndrome is nonzero and its column's vertical syndrome is
// set, and that the detection flag follows any nonzero syndrome.
module dmc_locator_tb;
  import dmc_ref_pkg::*;
  logic [19:0] dh;
  logic [15:0] s;
  logic [31:0] err_loc;
  logic        detected;
  int checks = 0, failures = 0;

  dmc_locator #(.M(4)) dut (.dh(dh), .s(s), .err_loc(err_loc), .detected(detected));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now();
    logic [31:0] exp_loc;
    for (int j = 0; j < 32; j++)
      exp_loc[j] = (dh[ref_group(j)*5 +: 5] != 5'd0) && s[j % 16];
    checks++;
    if (err_loc !== exp_loc || detected !== ((dh != 0) || (s != 0))) begin
      failures++;
      $display("FAIL dh=%h s=%h loc=%h exp %h det=%b", dh, s, err_loc, exp_loc, detected);
    end
  endtask

  initial begin
    // Symbol 0 and symbol 2 errors of the worked example.
    dh = {15'h0, 5'b00100}; s = 16'h0103; #1; check_now();
    checks++;
    if (err_loc !== 32'h0000_0103) begin failures++; $display("FAIL example loc=%h", err_loc); end
    dh = 20'h0; s = 16'h0; #1; check_now();
    for (int g = 0; g < 4; g++) begin
      dh = 20'(5'd1) << (g * 5); s = 16'hFFFF; #1; check_now();
    end
    for (int i = 0; i < 3000; i++) begin
      for (int g = 0; g < 4; g++) dh[g*5 +: 5] = ($urandom % 2) ? 5'($urandom) : 5'd0;
      s = ($urandom % 4 == 0) ? 16'h0 : 16'($urandom);
      #1; check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
