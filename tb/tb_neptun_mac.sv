// tb_neptun_mac: self-checking test of the multiply-accumulate unit.
// Random operands: product output (zero when the multiplier is disabled),
// accumulate and subtract of the product, add and subtract of operand A,
// all against 48-bit reference arithmetic, including the worst case
// FFFFh * FFFFh summed twelve times (a P-192 column) without overflow.
module tb_neptun_mac;
  logic [15:0] a, b;
  logic        en, selm, sub;
  logic [47:0] acc, accn;
  logic [31:0] prod;
  int checks = 0, failures = 0;

  neptun_mac #(.WIDTH(16)) dut (.OpAxDI(a), .OpBxDI(b), .EnMulxSI(en), .SelMulAccxSI(selm),
    .SubAccxSI(sub), .AccxDPI(acc), .MulResultxDO(prod), .AccxDNO(accn));

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [47:0] addend, e;
      a = 16'($urandom); b = 16'($urandom); acc = {16'($urandom), 32'($urandom)};
      en = 1'($urandom); selm = 1'($urandom); sub = 1'($urandom);
      #1;
      addend = selm ? (en ? 48'(a) * 48'(b) : 48'd0) : 48'(a);
      e = sub ? acc - addend : acc + addend;
      checks++;
      if (accn !== e || prod !== (en ? 32'(a) * 32'(b) : 32'd0)) begin
        failures++;
        $display("FAIL a=%h b=%h en=%b selm=%b sub=%b acc=%h -> %h exp %h", a, b, en, selm, sub, acc, accn, e);
      end
    end
    // a full column of worst-case products
    acc = '0; a = 16'hFFFF; b = 16'hFFFF; en = 1; selm = 1; sub = 0;
    for (int i = 0; i < 12; i++) begin #1; acc = accn; end
    checks++;
    if (acc !== 48'd12 * 48'hFFFE0001) begin failures++; $display("FAIL column sum %h", acc); end
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
