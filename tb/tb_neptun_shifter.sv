// tb_neptun_shifter: self-checking test of the barrel shifter.
// Left, logical right and arithmetic right shifts by every amount 0..15
// on random and corner data, compared with the language's shift operators.
module tb_neptun_shifter;
  logic [15:0] d, r;
  logic [3:0]  amt;
  logic        left, arith;
  int checks = 0, failures = 0;

  neptun_shifter #(.WIDTH(16)) dut (.DataxDI(d), .AmountxDI(amt), .ShiftLeftxSI(left),
    .ShiftArithxSI(arith), .ResultxDO(r));

  initial begin
    for (int i = 0; i < 600; i++) begin
      logic [15:0] e;
      d = (i < 3) ? ((i == 0) ? 16'h8000 : (i == 1) ? 16'hFFFF : 16'h0001) : 16'($urandom);
      amt = 4'(i % 16);
      for (int m = 0; m < 3; m++) begin
        left = (m == 0); arith = (m == 2);
        #1;
        e = (m == 0) ? d << amt : (m == 1) ? d >> amt : 16'($signed(d) >>> amt);
        checks++;
        if (r !== e) begin
          failures++; $display("FAIL m=%0d d=%h amt=%0d got %h exp %h", m, d, amt, r, e);
        end
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
