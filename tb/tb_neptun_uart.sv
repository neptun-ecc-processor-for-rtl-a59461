// tb_neptun_uart: self-checking test of the EIA-232 interface.
// With divider 6 (bit time 7 cycles): transmits two bytes written back to
// back (double buffering), decoding the TX line and checking start bit,
// data LSB first, stop bit and the bit time in cycles; checks the status
// flags (transmitting, buffer empty). Receives bytes driven on RX: data
// ready, receive buffer, ready cleared by reading the buffer, overrun
// (data error) when a byte arrives before the previous one was read, and
// frame error for a zero stop bit, cleared by reading the status.
module tb_neptun_uart;
  import neptun_pkg::*;
  localparam int DIV = 6, BT = DIV + 1;
  logic clk = 0, rst_n = 0, sel = 0, we = 0, rx = 1, tx;
  logic [3:0] a = 0;
  word_t wd = 0, rd;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  neptun_uart dut (.ClkxCI(clk), .RstxRBI(rst_n), .SelxSI(sel), .WExSI(we), .AddrxDI(a),
    .WDataxDI(wd), .RDataxDO(rd), .RxxDI(rx), .TxxDO(tx));

  task automatic ck(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask
  task automatic wr(input logic [3:0] ad, input word_t d);
    @(negedge clk); sel = 1; we = 1; a = ad; wd = d;
    @(negedge clk); sel = 0; we = 0;
  endtask
  task automatic rdreg(input logic [3:0] ad, output word_t d);
    @(negedge clk); sel = 1; we = 0; a = ad;
    @(negedge clk); sel = 0; d = rd;
  endtask

  // TX line decoder: measures the start-bit length and samples mid-bit
  logic [7:0] rx_bytes [$];
  int         low_len [$];   // cycles from start edge to the first rising edge
  initial begin
    forever begin
      logic [7:0] b;
      int t0;
      @(negedge tx);
      t0 = cyc;
      fork begin @(posedge tx); low_len.push_back(cyc - t0); end join_none
      repeat (BT / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (BT) @(posedge clk);
        b[i] = tx;
      end
      repeat (BT) @(posedge clk);
      if (tx !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      rx_bytes.push_back(b);
    end
  end

  task automatic send_rx(input logic [7:0] b, input logic stop);
    rx = 0; repeat (BT) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (BT) @(posedge clk); end
    rx = stop; repeat (BT) @(posedge clk);
    rx = 1; repeat (2) @(posedge clk);
  endtask

  initial begin
    word_t s, d;
    int t_start, t_end;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wr(4'd8, 16'(DIV));
    wr(4'd0, 16'h3);
    rdreg(4'd1, s);
    ck("idle status (tx buffer empty)", s, 16'h0020);
    // two bytes back to back
    wr(4'd2, 16'h00A5);
    t_start = cyc;
    wr(4'd2, 16'h003C);
    rdreg(4'd1, s);
    ck("transmitting, buffer full", s & 16'h0030, 16'h0010);
    wait (rx_bytes.size() == 2);
    t_end = cyc;
    ck("tx byte 0", 16'(rx_bytes[0]), 16'h00A5);
    ck("tx byte 1", 16'(rx_bytes[1]), 16'h003C);
    ck("bit time: start bit of A5h", 16'(low_len[0]), 16'(BT));
    ck("bit time: start + 2 zero bits of 3Ch", 16'(low_len[1]), 16'(3 * BT));
    // time of two frames: 20 bit times plus the decoder's half bit, within 3 cycles
    checks++;
    if ((t_end - t_start) < 20 * BT - BT || (t_end - t_start) > 20 * BT + BT) begin
      failures++; $display("FAIL two-frame time %0d", t_end - t_start);
    end
    repeat (2 * BT) @(posedge clk);
    rdreg(4'd1, s);
    ck("tx done status", s, 16'h0020);
    // receive
    send_rx(8'h5E, 1);
    rdreg(4'd1, s);
    ck("rx ready", s & 16'h0007, 16'h0001);
    rdreg(4'd5, d);
    ck("rx data", d, 16'h005E);
    rdreg(4'd1, s);
    ck("ready cleared by read", s & 16'h0001, 16'h0000);
    // overrun
    send_rx(8'h11, 1);
    send_rx(8'h22, 1);
    rdreg(4'd1, s);
    ck("overrun -> data error", s & 16'h0007, 16'h0005);
    rdreg(4'd5, d);
    ck("latest byte kept", d, 16'h0022);
    rdreg(4'd1, s);
    ck("errors cleared by status read", s & 16'h0007, 16'h0000);
    // frame error
    send_rx(8'h81, 0);
    rdreg(4'd1, s);
    ck("frame error", s & 16'h0003, 16'h0003);
    rdreg(4'd8, d);
    ck("divider readback", d, 16'(DIV));
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
