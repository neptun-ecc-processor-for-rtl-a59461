// tb_neptun_memory: self-checking test of the data-memory system.
// Checks the address decode of the four regions and the peripherals, the
// data and constant RAMs against a model, the program-RAM forwarding, the
// write-through view of the memory result, reads of unmapped registers,
// the parallel port, the UART clock-divider register, the registers of all
// three timers, and a timer taking over parallel output pin 9+i.
module tb_neptun_memory;
  import neptun_pkg::*;
  localparam int unsigned DEPTH = 64;
  logic  clk = 0, rst_n = 0, en = 0, we = 0, tx, so;
  word_t addr = 0, din = 0, dout, pin = 0, pout, prog_do;
  logic  prog_en, prog_we;
  word_t dmodel [DEPTH], cmodel [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  neptun_memory #(.DATA_DEPTH(DEPTH), .CONST_DEPTH(DEPTH)) dut (.ClkxCI(clk), .RstxRBI(rst_n),
    .MemAddrxD(addr), .MemDataInxD(din), .MemEnxS(en), .MemWExS(we), .MemDataOutxD(dout),
    .ProgEnxS(prog_en), .ProgWExS(prog_we), .ProgDataxD(prog_do), .SerialRXxDI(1'b1),
    .SerialTXxDO(tx), .ParallelInxDI(pin), .ParallelOutxDO(pout), .TestModexTI(1'b0),
    .ScanEnxTI(1'b0), .ScanInxTI(1'b0), .ScanOutxTO(so));

  // program memory stand-in: returns the inverted address one cycle after a read
  always_ff @(posedge clk) if (prog_en && !prog_we) prog_do <= ~addr;

  task automatic ck(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask
  task automatic wr(input word_t a, input word_t d);
    @(negedge clk); en = 1; we = 1; addr = a; din = d;
    @(negedge clk); en = 0; we = 0;
  endtask
  task automatic rd(input word_t a, output word_t d);
    @(negedge clk); en = 1; we = 0; addr = a;
    @(negedge clk); en = 0; d = dout;
  endtask

  initial begin
    word_t v;
    int cnt;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- RAMs
    for (int i = 0; i < DEPTH; i++) begin
      dmodel[i] = 16'($urandom); cmodel[i] = 16'($urandom);
      wr(16'(i), dmodel[i]);
      ck("write-through data", dout, dmodel[i]);
      wr(16'h4000 + 16'(i), cmodel[i]);
    end
    for (int i = 0; i < 200; i++) begin
      int k = $urandom_range(0, DEPTH - 1);
      if ($urandom_range(0, 1) == 0) begin rd(16'(k), v); ck("data RAM read", v, dmodel[k]); end
      else begin rd(16'h4000 + 16'(k), v); ck("const RAM read", v, cmodel[k]); end
    end
    // result is held until the next access
    rd(16'd3, v);
    repeat (5) @(negedge clk);
    ck("result held", dout, dmodel[3]);
    // ---- program RAM region is forwarded
    @(negedge clk); en = 1; addr = 16'h8123;
    #1;
    ck("prog enable", 16'(prog_en), 16'd1);
    @(negedge clk); en = 0;
    ck("prog read data", dout, ~16'h8123);
    @(negedge clk); addr = 16'h0005; en = 1;
    #1;
    ck("no prog enable for data", 16'(prog_en), 16'd0);
    @(negedge clk); en = 0;
    // ---- parallel port
    rd(16'hC040, v);
    ck("PIO reset value", v, 16'h2000);
    wr(16'hC040, 16'h0155);
    ck("PIO pins", pout, 16'h0155);
    pin = 16'hBEEF;
    repeat (2) @(negedge clk);
    rd(16'hC041, v);
    ck("PIO input", v, 16'hBEEF);
    pin = 16'h0000;
    // ---- UART divider register
    wr(16'hC008, 16'h0123);
    rd(16'hC008, v);
    ck("UART divider", v, 16'h0123);
    rd(16'hC001, v);
    ck("UART status TX empty", v & 16'h0020, 16'h0020);
    // ---- timers: compare registers of each timer
    for (int t = 0; t < 3; t++) begin
      word_t base;
      base = 16'hC080 + 16'(t * 64);
      wr(base + 3, 16'h1100 + 16'(t));
      wr(base + 4, 16'h2200 + 16'(t));
    end
    for (int t = 0; t < 3; t++) begin
      word_t base;
      base = 16'hC080 + 16'(t * 64);
      rd(base + 3, v); ck("timer compare A", v, 16'h1100 + 16'(t));
      rd(base + 4, v); ck("timer compare B", v, 16'h2200 + 16'(t));
    end
    // ---- unmapped register reads give 0
    rd(16'hC200, v);
    ck("unmapped read", v, 16'h0000);
    rd(16'hE000, v);
    ck("unmapped read high", v, 16'h0000);
    // ---- timer 1 drives parallel pin 10 (PWM, override)
    wr(16'hC0C3, 16'd2);
    wr(16'hC0C4, 16'd5);
    wr(16'hC0C0, 16'h1000 | 16'h0400 | 16'h0200 | 16'h0080 | 16'h0010 | 16'h0001);
    cnt = 0;
    for (int i = 0; i < 60; i++) begin @(negedge clk); cnt += int'(pout[10]); end
    checks++;
    if (cnt < 20 || cnt > 40) begin failures++; $display("FAIL timer pin high %0d of 60", cnt); end
    ck("other pins keep PIO value", pout & 16'hF1FF, 16'h0155 & 16'hF1FF);
    wr(16'hC0C0, 16'h2000);                                  // stop, no override
    ck("override released", pout, 16'h0155);
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
