// dmc_memory_tb: end-to-end test of the protected memory at its default
// size (32-bit words, 256 words). It fills the whole memory, reads it back,
// strikes stored codewords with upsets (bursts inside a symbol, the
// two-symbol example, column-aligned bursts across symbols of one row,
// check-bit upsets, and random patterns judged by the reference
// correctability rule) and checks the corrected data, the flags and the
// one-cycle read latency. Each mechanism is counted and must occur.
module dmc_memory_tb;
  import dmc_ref_pkg::*;

  localparam int AW = 8, DEPTH = 1 << AW;
  logic          clk = 0, rst_n = 0;
  logic          we = 0, re = 0, upset_en = 0;
  logic [AW-1:0] addr = 0, upset_addr = 0;
  logic [31:0]   wdata = 0, rdata;
  logic [67:0]   upset_mask = 0;
  logic          rvalid, err_detected, err_corrected;
  logic [31:0]   golden [DEPTH];
  int checks = 0, failures = 0;
  int n_write = 0, n_clean = 0, n_fixed = 0, n_check_only = 0, n_uncorr = 0;

  dmc_memory dut (
    .clk(clk), .rst_n(rst_n), .we(we), .re(re), .addr(addr), .wdata(wdata),
    .rdata(rdata), .rvalid(rvalid), .err_detected(err_detected), .err_corrected(err_corrected),
    .upset_en(upset_en), .upset_addr(upset_addr), .upset_mask(upset_mask)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_word(input logic [AW-1:0] a, input logic [31:0] w);
    @(negedge clk);
    we = 1; re = 0; addr = a; wdata = w;
    @(negedge clk);
    we = 0;
    golden[a] = w;
    n_write++;
  endtask

  task automatic upset(input logic [AW-1:0] a, input logic [67:0] m);
    @(negedge clk);
    upset_en = 1; upset_addr = a; upset_mask = m;
    @(negedge clk);
    upset_en = 0;
  endtask

  // Read a and compare; exp_fix says whether the data must come back intact,
  // exp_det and exp_cor give the expected flags (checked when chk_flags).
  task automatic read_check(input logic [AW-1:0] a, input bit exp_fix,
                            input bit chk_flags, input bit exp_det, input bit exp_cor);
    @(negedge clk);
    re = 1; we = 0; addr = a;
    @(negedge clk);
    re = 0;
    checks++;
    if (!rvalid) begin failures++; $display("FAIL rvalid low one cycle after read"); end
    if (exp_fix) begin
      checks++;
      if (rdata !== golden[a]) begin
        failures++; $display("FAIL addr %0d: %h exp %h", a, rdata, golden[a]);
      end
    end
    if (chk_flags) begin
      checks++;
      if (err_detected !== exp_det || err_corrected !== exp_cor) begin
        failures++;
        $display("FAIL flags addr %0d: det=%b cor=%b exp %b %b", a, err_detected, err_corrected, exp_det, exp_cor);
      end
    end
    @(negedge clk);
    checks++;
    if (rvalid) begin failures++; $display("FAIL rvalid held after read"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Fill the memory and read every word back clean.
    for (int a = 0; a < DEPTH; a++) write_word(AW'(a), $urandom);
    for (int a = 0; a < DEPTH; a++) begin
      read_check(AW'(a), 1'b1, 1'b1, 1'b0, 1'b0);
      n_clean++;
    end
    // Worked example: symbol 0 1100 -> 1111, symbol 2 0110 -> 0111.
    write_word(8'd7, 32'h0000_060C);
    upset(8'd7, 68'h0_0000_0000_0000_0103);
    read_check(8'd7, 1'b1, 1'b1, 1'b1, 1'b1);
    n_fixed++;
    // Burst of up to four adjacent cells inside each symbol.
    for (int i = 0; i < 400; i++) begin
      logic [AW-1:0] a;
      int sym;
      a = AW'($urandom);
      sym = $urandom % 8;
      write_word(a, $urandom);
      upset(a, 68'(32'(1 + $urandom % 15) << (sym * 4)));
      read_check(a, 1'b1, 1'b1, 1'b1, 1'b1);
      n_fixed++;
    end
    // Upset of two symbols of different groups in one row (up to 8 bits).
    for (int i = 0; i < 100; i++) begin
      logic [AW-1:0] a;
      a = AW'($urandom);
      write_word(a, $urandom);
      upset(a, 68'({4'(1 + $urandom % 15), 4'(1 + $urandom % 15)}) << (16 * ($urandom % 2)));
      read_check(a, 1'b1, 1'b1, 1'b1, 1'b1);
      n_fixed++;
    end
    // Check-bit upsets: detected, data returned unchanged, nothing inverted.
    for (int i = 0; i < 100; i++) begin
      logic [AW-1:0] a;
      a = AW'($urandom);
      write_word(a, $urandom);
      upset(a, 68'h1 << (32 + $urandom % 36));
      read_check(a, 1'b1, 1'b1, 1'b1, 1'b0);
      n_check_only++;
    end
    // Random data-bit patterns.
    for (int i = 0; i < 400; i++) begin
      logic [AW-1:0] a;
      logic [31:0] w, e;
      bit ok;
      a = AW'($urandom);
      w = $urandom;
      e = $urandom & $urandom & $urandom;
      if (e == 0) e = 32'h1;
      ok = ref_correctable(w, e);
      write_word(a, w);
      upset(a, 68'(e));
      read_check(a, ok, 1'b0, 1'b0, 1'b0);
      if (ok) n_fixed++; else n_uncorr++;
    end
    // A write and read in the same cycle would violate the single-access rule;
    // not exercised. Mechanism coverage:
    $display("writes=%0d clean_reads=%0d corrected=%0d check_bit_only=%0d beyond_code=%0d",
             n_write, n_clean, n_fixed, n_check_only, n_uncorr);
    checks++; if (n_write == 0)      begin failures++; $display("FAIL no write"); end
    checks++; if (n_clean == 0)      begin failures++; $display("FAIL no clean read"); end
    checks++; if (n_fixed == 0)      begin failures++; $display("FAIL no corrected read"); end
    checks++; if (n_check_only == 0) begin failures++; $display("FAIL no check-bit upset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
