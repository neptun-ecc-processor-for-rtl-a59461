// tb_neptun_alu: self-checking test of the ALU with its flag logic.
// Random operands through ADD/ADDC/SUB/SUBC (carry, zero with the old-zero
// rule, overflow, negative), the logic and shift results, branch taken /
// not taken (PC + offset + 1 or PC + 1), multiply and accumulate, and the
// derived status bits 4 (N xor V) and 5 (not C).
module tb_neptun_alu;
  import neptun_pkg::*;

  ctrl_t c;
  word_t a, b, r;
  logic [5:0] st, stn;
  logic [47:0] acc, accn;
  logic [31:0] mr;
  logic taken;
  int checks = 0, failures = 0;

  neptun_alu dut (.CtrlxSI(c), .OperandAxDI(a), .OperandBxDI(b), .StatexDPI(st), .AccxDPI(acc),
    .ResultxDO(r), .StatexDNO(stn), .MulResultxDO(mr), .AccxDNO(accn), .BranchTakenxSO(taken));

  task automatic ck(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h (a=%h b=%h)", what, got, exp, a, b); end
  endtask

  function automatic logic [5:0] mkst(input logic cf, input logic z, input logic v, input logic n);
    return {~cf, n ^ v, n, v, z, cf};
  endfunction

  initial begin
    for (int i = 0; i < 2000; i++) begin
      logic [16:0] e;
      word_t nb;
      logic cin, oz, isub, usec, v, z;
      a = 16'($urandom); b = 16'($urandom);
      if (i % 7 == 0) b = a;
      cin = 1'($urandom); oz = 1'($urandom); isub = 1'($urandom); usec = 1'($urandom);
      st = mkst(cin, oz, 1'($urandom), 1'($urandom));
      acc = {16'($urandom), 32'($urandom)};
      c = CTRL_NOP;
      c.sel_res = RES_ADD; c.flags_zn = 1; c.flags_cv = 1;
      c.inv_b = isub; c.use_carry = usec; c.inc = isub & ~usec; c.use_old_zero = usec;
      #1;
      nb = isub ? ~b : b;
      e = 17'(a) + 17'(nb) + 17'(usec ? cin : isub);
      v = (a[15] == nb[15]) && (e[15] != a[15]);
      z = (e[15:0] == 0) && (!usec || oz);
      ck("add result", r, e[15:0]);
      ck("add flags", stn, mkst(e[16], z, v, e[15]));
      // logic and shifts
      c = CTRL_NOP; c.flags_zn = 1;
      c.sel_res = RES_AND; #1; ck("and", r, a & b);
      ck("and keeps C,V", {stn[0], stn[2]}, {st[0], st[2]});
      c.sel_res = RES_OR;  #1; ck("or", r, a | b);
      c.sel_res = RES_XOR; #1; ck("xor", r, a ^ b);
      ck("xor Z", stn[1], (a ^ b) == 0);
      c.sel_res = RES_SHIFT; c.shift_left = 1; #1; ck("lsl", r, 16'(a << b[3:0]));
      c.shift_left = 0; c.shift_arith = 1; #1; ck("asr", r, {48'h0, 16'($signed(a) >>> b[3:0])});
      // branch on Z
      c = CTRL_NOP; c.en_branch = 1; c.bra_state = 3'd1; c.bra_if_high = 1'($urandom);
      c.sel_res = RES_ADD; c.inc = 1;
      #1;
      ck("branch", {taken, r}, {(st[1] == c.bra_if_high), (st[1] == c.bra_if_high) ? 16'(a + b + 16'd1) : 16'(a + 16'd1)});
      ck("branch keeps flags", stn, st);
      // multiply-accumulate
      c = CTRL_NOP; c.en_mul = 1; c.acc_we = 1; c.sel_mul_acc = 1; c.sub_acc = 1'($urandom);
      #1;
      ck("mul", mr, 32'(a) * 32'(b));
      ck("mac", accn, c.sub_acc ? acc - 48'(a) * 48'(b) : acc + 48'(a) * 48'(b));
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
