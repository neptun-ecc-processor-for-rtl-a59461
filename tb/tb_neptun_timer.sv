// tb_neptun_timer: self-checking test of the timer/counter.
// PWM: compare A sets, compare B clears and restarts the counter; checks
// high time (B - A cycles) and period (B + 1 cycles) of the output.
// Stop on compare B, the start/stop/reset force bits, counter write and
// read back, counting only while the (inverted) trigger is high, reset of
// the counter on a trigger rising edge, the toggle action, the status
// register and the output-override flag.
module tb_neptun_timer;
  import neptun_pkg::*;
  logic clk = 0, rst_n = 0, sel = 0, we = 0, trig = 0, out, ovr;
  logic [2:0] a = 0;
  word_t wd = 0, rd;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  neptun_timer dut (.ClkxCI(clk), .RstxRBI(rst_n), .SelxSI(sel), .WExSI(we), .AddrxDI(a),
    .WDataxDI(wd), .RDataxDO(rd), .TrigxDI(trig), .OutxDO(out), .OverridexSO(ovr));

  task automatic ck(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask
  task automatic wr(input logic [2:0] ad, input word_t d);
    @(negedge clk); sel = 1; we = 1; a = ad; wd = d;
    @(negedge clk); sel = 0; we = 0;
  endtask
  task automatic rdreg(input logic [2:0] ad, output word_t d);
    @(negedge clk); sel = 1; we = 0; a = ad;
    @(negedge clk); sel = 0; d = rd;
  endtask

  initial begin
    word_t v;
    int hi, per, t_rise, t_fall, t_rise2;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- PWM
    wr(3'd3, 16'd3);
    wr(3'd4, 16'd9);
    wr(3'd0, 16'h1000 | 16'h0400 | 16'h0200 | 16'h0080 | 16'h0010 | 16'h0001);  // start, override, restart B, B clear, A set, enable
    ck("override flag", 16'(ovr), 16'd1);
    @(posedge out); t_rise = $time;
    @(negedge out); t_fall = $time;
    @(posedge out); t_rise2 = $time;
    ck("PWM high time", 16'((t_fall - t_rise) / 10), 16'd6);
    ck("PWM period", 16'((t_rise2 - t_rise) / 10), 16'd10);
    rdreg(3'd1, v);
    ck("status counting", v & 16'h1, 16'h1);
    // ---- stop on B
    wr(3'd0, 16'h2000 | 16'h4000 | 16'h0100 | 16'h0001);   // force stop + reset, stop on B, enable
    rdreg(3'd2, v);
    ck("force stop+reset", v, 16'd0);
    wr(3'd0, 16'h1000 | 16'h0100 | 16'h0001);              // start
    repeat (30) @(negedge clk);
    rdreg(3'd2, v);
    ck("stopped at compare B", v, 16'd9);
    rdreg(3'd1, v);
    ck("status not counting", v & 16'h1, 16'h0);
    // ---- counter write, count only while the trigger is high (inverted input)
    wr(3'd0, 16'h2000 | 16'h0001);
    wr(3'd2, 16'd100);
    rdreg(3'd2, v);
    ck("counter write", v, 16'd100);
    wr(3'd4, 16'hFFFF);
    trig = 1;                                              // inverted -> low -> no counting
    wr(3'd0, 16'h1000 | 16'h0008 | 16'h0002 | 16'h0001);
    repeat (10) @(negedge clk);
    rdreg(3'd2, v);
    ck("no count while trigger low", v, 16'd100);
    trig = 0;                                              // inverted -> high
    repeat (20) @(negedge clk);
    trig = 1;
    repeat (3) @(negedge clk);
    rdreg(3'd2, v);
    checks++;
    if (v < 16'd119 || v > 16'd123) begin failures++; $display("FAIL counted %0d while high", v); end
    // ---- reset on trigger rising edge, toggle on A
    wr(3'd0, 16'h2000 | 16'h4000);
    trig = 0;
    wr(3'd3, 16'd2);
    wr(3'd0, 16'h1000 | 16'h0004 | 16'h0030 | 16'h0001);   // start, reset on posedge, A toggle, enable
    repeat (40) @(negedge clk);
    trig = 1;
    @(negedge clk); @(negedge clk);
    rdreg(3'd2, v);
    checks++;
    if (v > 16'd3) begin failures++; $display("FAIL trigger reset, counter %0d", v); end
    rdreg(3'd1, v);
    ck("toggle happened once", v & 16'h2, 16'h2);  // after PWM cleared at B, toggled once at A
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
