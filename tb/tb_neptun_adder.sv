// tb_neptun_adder: self-checking test of the 16-bit adder.
// Checks ADD/ADDC/SUB/SUBC (control table UseCarry/Inc with operand B
// inverted outside the adder) against a reference computed with wider
// integers, including carry and signed overflow, for corner values and
// random operands, and the 2-word carry propagation examples (A = 1010b
// added to / minus every B) done with a 2-bit adder instance.
module tb_neptun_adder;
  logic [15:0] a, b, r;
  logic        cin, uc, inc, co, ov;
  logic [1:0]  a2, b2, r2;
  logic        cin2, uc2, inc2, co2, ov2;
  int checks = 0, failures = 0;

  neptun_adder #(.WIDTH(16)) dut (.OpAxDI(a), .OpBxDI(b), .CarryInxDI(cin),
    .UseCarryxSI(uc), .IncxSI(inc), .ResultxDO(r), .CarryOutxDO(co), .OverflowxDO(ov));
  neptun_adder #(.WIDTH(2)) dut2 (.OpAxDI(a2), .OpBxDI(b2), .CarryInxDI(cin2),
    .UseCarryxSI(uc2), .IncxSI(inc2), .ResultxDO(r2), .CarryOutxDO(co2), .OverflowxDO(ov2));

  task automatic check16(input logic [15:0] ta, input logic [15:0] tb_, input logic tc,
                         input logic tuc, input logic tinc);
    logic [16:0] ref_sum;
    logic        ref_v, c_in;
    a = ta; b = tb_; cin = tc; uc = tuc; inc = tinc;
    #1;
    c_in    = tuc ? tc : tinc;
    ref_sum = 17'(ta) + 17'(tb_) + 17'(c_in);
    ref_v   = (ta[15] == tb_[15]) && (ref_sum[15] != ta[15]);
    checks++;
    if ({co, r} !== ref_sum || ov !== ref_v) begin
      failures++;
      $display("FAIL add a=%h b=%h cin=%b uc=%b inc=%b -> %b %h v=%b", ta, tb_, tc, tuc, tinc, co, r, ov);
    end
  endtask

  initial begin
    // corner values
    check16(16'hFFFF, 16'h0001, 0, 0, 0);
    check16(16'h7FFF, 16'h0001, 0, 0, 0);
    check16(16'h8000, 16'h8000, 0, 0, 0);
    check16(16'hFFFF, 16'hFFFF, 1, 1, 0);
    check16(16'h1234, ~16'h1234, 0, 0, 1);   // SUB equal -> 0, carry 1
    for (int i = 0; i < 2000; i++) begin
      logic [15:0] x, y;
      logic [1:0]  mode;
      x = 16'($urandom); y = 16'($urandom); mode = 2'($urandom);
      unique case (mode)
        2'd0: check16(x, y, 1'($urandom), 0, 0);   // ADD
        2'd1: check16(x, y, 1'($urandom), 1, 0);   // ADDC
        2'd2: check16(x, ~y, 1'($urandom), 0, 1);  // SUB
        default: check16(x, ~y, 1'($urandom), 1, 0); // SUBC
      endcase
    end
    // 4-bit numbers with a 2-bit adder: ADD then ADDC, SUB then SUBC
    for (int bv = 0; bv < 16; bv++) begin
      logic [1:0] lo;
      logic       c;
      logic [4:0] exp_add, exp_sub;
      // addition of 1010b + B
      a2 = 2'b10; b2 = 2'(bv); uc2 = 0; inc2 = 0; cin2 = 0; #1;
      lo = r2; c = co2;
      a2 = 2'b10; b2 = 2'(bv >> 2); uc2 = 1; cin2 = c; #1;
      exp_add = 5'(10 + bv);
      checks++;
      if ({co2, r2, lo} !== exp_add) begin failures++; $display("FAIL 2-bit add B=%0d", bv); end
      // subtraction 0101b - B: carry out is the inverted borrow
      a2 = 2'b01; b2 = ~2'(bv); uc2 = 0; inc2 = 1; #1;
      lo = r2; c = co2;
      a2 = 2'b01; b2 = ~2'(bv >> 2); uc2 = 1; cin2 = c; #1;
      exp_sub = 5'(5 - bv);
      checks++;
      if ({r2, lo} !== exp_sub[3:0] || co2 !== (bv <= 5)) begin
        failures++; $display("FAIL 2-bit sub B=%0d got %b%b c=%b", bv, r2, lo, co2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
