// tb_neptun_sram: self-checking test of the synchronous single-port RAM.
// Writes random words to random addresses of a 5120 x 16 RAM, then reads
// them back, checking one-cycle read latency, that the output holds while
// the RAM is not selected or is being written, and that a deselected
// write changes nothing.
module tb_neptun_sram;
  logic clk = 0, cs_n = 1, we_n = 1;
  logic [12:0] addr;
  logic [15:0] din, dout;
  logic [15:0] model [5120];
  bit          valid [5120];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  neptun_sram #(.DEPTH(5120), .WIDTH(16)) dut (.ClkxCI(clk), .CSxSBI(cs_n), .WExSBI(we_n),
    .AddrxDI(addr), .DataxDI(din), .DataxDO(dout));

  task automatic ck(input string what, input logic [15:0] got, input logic [15:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    addr = 0; din = 0;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      addr = 13'($urandom_range(0, 5119)); din = 16'($urandom); cs_n = 0; we_n = 0;
      model[addr] = din; valid[addr] = 1;
    end
    // a write with chip select high must be ignored
    @(negedge clk); cs_n = 1; we_n = 0; addr = 13'd7; din = ~model[7]; if (!valid[7]) begin model[7] = 0; end
    @(negedge clk); cs_n = 0; we_n = 0; addr = 13'd7; din = 16'h5A5A; model[7] = 16'h5A5A; valid[7] = 1;
    @(negedge clk); cs_n = 1; we_n = 0; din = 16'hFFFF;
    for (int i = 0; i < 5120; i++) begin
      if (!valid[i]) continue;
      @(negedge clk); addr = 13'(i); cs_n = 0; we_n = 1;
      @(negedge clk); cs_n = 1;
      ck($sformatf("read %0d", i), dout, model[i]);
      @(negedge clk);
      ck("output held while idle", dout, model[i]);
      cs_n = 0; we_n = 0; addr = 13'(i); din = model[i];   // rewrite same value
      @(negedge clk); cs_n = 1; we_n = 1;
      ck("output held during write", dout, model[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
