// tb_neptun_ram_iso: self-checking test of the RAM block isolation.
// Normal mode: the RAM is written and read through the wrapper and the scan
// registers stay at zero. Test mode: the RAM output is replaced by the
// data-in scan registers; a capture loads CS, WE, address and data in;
// shifting moves the captured bits out of ScanOut in chain order
// (data in LSB first, address, WE, CS) and a shifted-in pattern appears
// on the RAM output.
module tb_neptun_ram_iso;
  localparam int AW = 4, WD = 8, N = WD + AW + 2;
  logic clk = 0, cs_n = 1, we_n = 1, tm = 0, se = 0, si = 0, so;
  logic [AW-1:0] addr = 0;
  logic [WD-1:0] din = 0, dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  neptun_ram_iso #(.DEPTH(16), .WIDTH(WD), .AW(AW)) dut (.ClkxCI(clk), .CSxSBI(cs_n), .WExSBI(we_n),
    .AddrxDI(addr), .DataxDI(din), .DataxDO(dout), .TestModexTI(tm), .ScanEnxTI(se),
    .ScanInxTI(si), .ScanOutxTO(so));

  task automatic ck(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [N-1:0] cap, pat, got;
    // normal operation
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); cs_n = 0; we_n = 0; addr = AW'(i); din = WD'(8'h30 + i * 7);
    end
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); cs_n = 0; we_n = 1; addr = AW'(i);
      @(negedge clk); cs_n = 1;
      ck("normal read", dout, WD'(8'h30 + i * 7));
      ck("scan regs idle", so, 1'b0);
    end
    // capture in test mode
    @(negedge clk); tm = 1; se = 0; cs_n = 1; we_n = 0; addr = 4'hA; din = 8'hC5;
    cap = {1'b1, 1'b0, 4'hA, 8'hC5};
    @(negedge clk);
    ck("test mode output = captured data in", dout, 8'hC5);
    // shift out the captured bits, shift in a pattern
    pat = N'(14'h2D3B);
    se = 1;
    for (int i = 0; i < N; i++) begin
      got[N-1-i] = so;
      si = pat[N-1-i];
      @(negedge clk);
    end
    ck("captured chain", got, cap);
    ck("pattern on RAM output", dout, pat[WD-1:0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
