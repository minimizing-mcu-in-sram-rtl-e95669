// dmc_sram_tb: write/read of the storage array against a shadow copy, with
// upsets injected and a write given priority over a same-cycle upset.
module dmc_sram_tb;
  localparam int W = 36, AW = 4;
  logic          clk = 0;
  logic          we = 0, upset_en = 0;
  logic [AW-1:0] waddr = 0, raddr = 0, upset_addr = 0;
  logic [W-1:0]  wdata = 0, rdata, upset_mask = 0;
  logic [W-1:0]  shadow [16];
  int checks = 0, failures = 0;

  dmc_sram #(.WIDTH(W), .ADDR_W(AW)) dut (
    .clk(clk), .we(we), .waddr(waddr), .wdata(wdata), .raddr(raddr), .rdata(rdata),
    .upset_en(upset_en), .upset_addr(upset_addr), .upset_mask(upset_mask)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      @(negedge clk);
      we = 1; waddr = 4'(a); wdata = {4'($urandom), 32'($urandom)}; shadow[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      we = 0; upset_en = 0;
      case ($urandom % 3)
        0: begin we = 1; waddr = 4'($urandom); wdata = {4'($urandom), 32'($urandom)}; end
        1: begin upset_en = 1; upset_addr = 4'($urandom); upset_mask = {4'($urandom), 32'($urandom)}; end
        default: ;
      endcase
      if ($urandom % 8 == 0) begin
        we = 1; upset_en = 1; waddr = 4'($urandom); upset_addr = waddr;
        wdata = {4'($urandom), 32'($urandom)}; upset_mask = '1;
      end
      raddr = 4'($urandom);
      #1;
      checks++;
      if (rdata !== shadow[raddr]) begin failures++; $display("FAIL addr %0d: %h exp %h", raddr, rdata, shadow[raddr]); end
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      else if (upset_en) shadow[upset_addr] = shadow[upset_addr] ^ upset_mask;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
