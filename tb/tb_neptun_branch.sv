// tb_neptun_branch: self-checking test of the branch decision.
// For every status value, selected bit and polarity, checks whether the
// branch is taken (selected bit equal to BraIfHigh; bit 6 = 0, bit 7 = 1)
// and that the offset reaches the adder only when taken.
module tb_neptun_branch;
  logic       en, high, taken;
  logic [2:0] sel;
  logic [5:0] st;
  logic [15:0] off, ob;
  int checks = 0, failures = 0;

  neptun_branch #(.WIDTH(16)) dut (.EnBranchxSI(en), .BraIfHighxSI(high), .BraStatexSI(sel),
    .StatexDI(st), .OffsetxDI(off), .TakenxSO(taken), .OpBxDO(ob));

  initial begin
    for (int s = 0; s < 64; s++)
      for (int k = 0; k < 8; k++)
        for (int h = 0; h < 2; h++)
          for (int e = 0; e < 2; e++) begin
            logic bitv, exp;
            st = 6'(s); sel = 3'(k); high = 1'(h); en = 1'(e);
            off = 16'($urandom) | 16'h1;
            #1;
            bitv = (k < 6) ? st[k] : (k == 7);
            exp  = e && (bitv == h);
            checks++;
            if (taken !== exp || ob !== (exp ? off : 16'h0)) begin
              failures++;
              $display("FAIL st=%b sel=%0d high=%0d en=%0d taken=%b", st, k, h, e, taken);
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
