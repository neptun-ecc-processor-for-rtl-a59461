// tb_neptun_pio: self-checking test of the parallel I/O port.
// Reset value 2000h on the outputs, output register write and read back,
// registered input pins (one cycle of delay, then read back), and that a
// write to the read-only input register changes nothing.
module tb_neptun_pio;
  import neptun_pkg::*;
  logic clk = 0, rst_n = 0, sel = 0, we = 0, a = 0;
  word_t wd = 0, rd, pin = 0, pout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  neptun_pio dut (.ClkxCI(clk), .RstxRBI(rst_n), .SelxSI(sel), .WExSI(we), .AddrxDI(a),
    .WDataxDI(wd), .RDataxDO(rd), .InxDI(pin), .OutxDO(pout));

  task automatic ck(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask
  task automatic acc(input logic w, input logic ad, input word_t d);
    @(negedge clk); sel = 1; we = w; a = ad; wd = d;
    @(negedge clk); sel = 0; we = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    ck("reset value", pout, 16'h2000);
    for (int i = 0; i < 50; i++) begin
      word_t v, p;
      v = 16'($urandom); p = 16'($urandom);
      acc(1, 0, v);
      ck("output pins", pout, v);
      acc(0, 0, 0);
      ck("output read", rd, v);
      pin = p;
      acc(1, 1, ~v);                 // write to input register is ignored
      ck("input write ignored", pout, v);
      acc(0, 1, 0);
      ck("input read", rd, p);
    end
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
