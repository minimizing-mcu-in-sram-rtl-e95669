// dmc_sym_adder_tb: exhaustive check of the 4-bit symbol adder against
// integer addition, including the worked example 1100 + 0110 = 10010.
module dmc_sym_adder_tb;
  logic [3:0] a, b;
  logic [4:0] sum;
  int checks = 0, failures = 0;

  dmc_sym_adder #(.M(4)) dut (.a(a), .b(b), .sum(sum));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int k = 0; k < 16; k++) begin
        a = 4'(i); b = 4'(k);
        #1;
        checks++;
        if (int'(sum) != i + k) begin
          failures++;
          $display("FAIL %0d + %0d gave %0d", i, k, sum);
        end
      end
    a = 4'b1100; b = 4'b0110; #1;
    checks++;
    if (sum !== 5'b10010) begin failures++; $display("FAIL example: %b", sum); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
