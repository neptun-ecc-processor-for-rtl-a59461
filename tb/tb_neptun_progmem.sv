// tb_neptun_progmem: self-checking test of the program memory.
// While PC < 8000h: the program word comes from the bootloader table
// (a look-up model in this bench, word = ~address), and the program RAM
// is written and read over the bus. Then the PC moves to 8000h and up:
// the RAM, addressed by the next PC, delivers the word of the current PC
// in the same cycle, and bus writes to the RAM are ignored.
module tb_neptun_progmem;
  import neptun_pkg::*;
  localparam int unsigned DEPTH = 64;
  logic  clk = 0;
  word_t pc_p = 0, pc_n = 0, pw, bus_do, baddr = 0, bdin = 0;
  logic  ben = 0, bwe = 0, so;
  logic [9:0] boot_a;
  word_t boot_pw;
  word_t model [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  assign boot_pw = ~{6'd0, boot_a};

  neptun_progmem #(.PROG_DEPTH(DEPTH)) dut (.ClkxCI(clk), .PCxDP(pc_p), .PCxDN(pc_n),
    .BootAddrxDO(boot_a), .BootPWxDI(boot_pw), .PWxDO(pw), .BusEnxSI(ben), .BusWExSI(bwe),
    .BusAddrxDI(baddr), .BusDataxDI(bdin), .BusDataxDO(bus_do), .TestModexTI(1'b0),
    .ScanEnxTI(1'b0), .ScanInxTI(1'b0), .ScanOutxTO(so));

  task automatic ck(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  // PC register model: pc_p follows pc_n at each clock edge
  always_ff @(posedge clk) pc_p <= pc_n;

  initial begin
    // ---- bootloader region: word from the look-up table
    for (int i = 0; i < 20; i++) begin
      @(negedge clk);
      pc_n = 16'($urandom_range(0, 1023));
      @(negedge clk);
      ck("boot word", pw, ~{6'd0, pc_p[9:0]});
    end
    // ---- load the program RAM over the bus (PC stays in the bootloader)
    @(negedge clk); pc_n = 16'h0010;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      model[i] = 16'($urandom);
      ben = 1; bwe = 1; baddr = PROG_BASE + 16'(i); bdin = model[i];
    end
    @(negedge clk); ben = 0; bwe = 0;
    for (int i = 0; i < 10; i++) begin
      int k = $urandom_range(0, DEPTH - 1);
      @(negedge clk); ben = 1; baddr = PROG_BASE + 16'(k);
      @(negedge clk); ben = 0;
      ck("bus read back", bus_do, model[k]);
    end
    // ---- jump into the RAM: fetch by next PC
    @(negedge clk); pc_n = PROG_BASE;
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      ck("fetch sequential", pw, model[pc_p - PROG_BASE]);
      pc_n = (i % 7 == 6) ? PROG_BASE + 16'($urandom_range(0, DEPTH - 1)) : pc_p + 1;
      if (pc_n >= PROG_BASE + DEPTH) pc_n = PROG_BASE;
    end
    // ---- bus writes are ignored while the program runs from the RAM
    @(negedge clk); ben = 1; bwe = 1; baddr = PROG_BASE + 16'd5; bdin = ~model[5]; pc_n = PROG_BASE + 16'd9;
    @(negedge clk); ben = 0; bwe = 0; pc_n = PROG_BASE + 16'd5;
    @(negedge clk);
    ck("fetch during bus write", pw, model[5]);
    // ---- back to the bootloader: word from the table again
    pc_n = 16'h0123;
    @(negedge clk);
    ck("return to boot", pw, ~16'h0123);
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
