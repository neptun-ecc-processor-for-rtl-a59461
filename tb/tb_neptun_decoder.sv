// tb_neptun_decoder: self-checking test of the program-word decoder.
// Encodes instructions field by field and checks the control vector:
// operand and destination selects, immediates (zero- and sign-extended),
// adder and flag controls, multiplier/accumulator controls, memory
// base/offset/direction, the two-cycle LDI (second word is the constant)
// and the stack helper instructions.
module tb_neptun_decoder;
  import neptun_pkg::*;
  `include "neptun_asm.svh"

  logic  clk = 0, rst_n = 0, ldi;
  word_t pw;
  ctrl_t c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  neptun_decoder dut (.ClkxCI(clk), .RstxRBI(rst_n), .PWxDI(pw), .CtrlxSO(c), .LdiDataxSO(ldi));

  task automatic ck(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h (pw=%h)", what, got, exp, pw); end
  endtask

  // apply a word just after a falling edge, so no clock edge intervenes
  task automatic put(input word_t w);
    @(negedge clk);
    pw = w; #1;
  endtask

  initial begin
    pw = 16'h0000;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    put(i_ADDC(R_BASEB, R_ACC1, B_WORK2));
    ck("ADDC a", c.sel_a, R_ACC1); ck("ADDC b", c.sel_b, B_WORK2); ck("ADDC wr", {c.reg_we, c.sel_wr}, {1'b1, R_BASEB});
    ck("ADDC adder", {c.sel_res, c.use_carry, c.inv_b, c.flags_cv, c.use_old_zero}, {RES_ADD, 4'b1011});
    put(i_SUB(R_WORK1, R_WORK2, B_MEM));
    ck("SUB ctl", {c.sel_res, c.use_carry, c.inc, c.inv_b, c.flags_cv, c.flags_zn}, {RES_ADD, 5'b01111});
    put(i_SUBI(R_SP, 8'h81));
    ck("SUBI", {c.sel_a, c.sel_wr, c.b_imm, c.imm, c.inv_b, c.inc}, {R_SP, R_SP, 1'b1, 16'h0081, 2'b11});
    put(i_OR(R_WORK3, R_PC, B_WORK0));  ck("OR", {c.sel_res, c.flags_cv, c.flags_zn}, {RES_OR, 2'b01});
    put(i_AND(R_WORK3, R_PC, B_WORK0)); ck("AND", c.sel_res, RES_AND);
    put(i_XOR(R_WORK3, R_PC, B_WORK0)); ck("XOR", c.sel_res, RES_XOR);
    put(i_MOVNF(R_BASEC, R_MEM)); ck("MOVNF", {c.sel_a, c.sel_wr, c.reg_we, c.flags_zn, c.flags_cv}, {R_MEM, R_BASEC, 3'b100});
    put(i_LS(R_WORK1, R_WORK1, B_WORK3)); ck("LS", {c.sel_res, c.shift_left, c.sel_b}, {RES_SHIFT, 1'b1, B_WORK3});
    put(i_ASRI(R_WORK2, 4'd9)); ck("ASRI", {c.sel_res, c.shift_left, c.shift_arith, c.imm}, {RES_SHIFT, 2'b01, 16'd9});
    put(i_LDSI(R_BASEA, 7'h55)); ck("LDSI", {c.sel_a, c.imm, c.sel_wr, c.reg_we}, {R_ZERO, 16'h0055, R_BASEA, 1'b1});
    put(i_CMPI(R_WORK0, 8'h10)); ck("CMPI", {c.reg_we, c.inv_b, c.inc, c.flags_cv, c.imm}, {4'b0111, 16'h0010});
    put(i_BRA(1, 3'd5, 8'hF0));
    ck("BRA", {c.en_branch, c.bra_if_high, c.bra_state, c.imm, c.sel_a, c.sel_wr, c.inc},
              {1'b1, 1'b1, 3'd5, 16'hFFF0, R_PC, R_PC, 1'b1});
    put(i_MUL(R_WORK0, B_WORK1, 1)); ck("MUL", {c.en_mul, c.mul_we, c.mul_hi_pair, c.acc_we}, 4'b1110);
    put(i_MULACC(R_MEM, B_WORK1)); ck("MULACC", {c.en_mul, c.mul_we, c.acc_we, c.sel_mul_acc, c.acc_shift}, 5'b10110);
    put(i_SUBACC(R_WORK2)); ck("SUBACC", {c.acc_we, c.sub_acc, c.sel_mul_acc, c.sel_a}, {3'b110, R_WORK2});
    put(i_RSACC()); ck("RSACC", {c.acc_we, c.acc_shift, c.en_mul, c.sel_mul_acc}, 4'b1101);
    put(i_CUSTOM1()); ck("Custom1", {c.sel_a, c.imm, c.mem_en, c.mem_we, c.mem_base, c.mem_rel, c.reg_we},
                                    {R_PC, 16'd4, 2'b11, BASE_SP, 4'd0, 1'b0});
    put(i_CUSTOM2()); ck("Custom2", {c.sel_a, c.imm, c.mem_en, c.mem_we, c.mem_rel, c.sel_wr, c.reg_we},
                                    {R_SP, 16'd1, 2'b10, 4'd1, R_SP, 1'b1});
    put(i_CUSTOM3()); ck("Custom3", {c.sel_a, c.inv_b, c.inc, c.sel_wr, c.mem_en}, {R_SP, 2'b11, R_SP, 1'b0});
    put(i_MOV_LD(BASE_C, R_WORK1, 4'd11));
    ck("MOV_LD", {c.sel_a, c.sel_wr, c.reg_we, c.mem_en, c.mem_we, c.mem_base, c.mem_rel},
                 {R_MEM, R_WORK1, 3'b110, BASE_C, 4'd11});
    put(i_STR(BASE_SP, R_ACC2, 4'd3)); ck("STR", {c.sel_a, c.mem_we, c.mem_base, c.reg_we, c.mem_din_acc}, {R_ACC2, 1'b1, BASE_SP, 2'b00});
    put(i_SUBACC_ST(1, BASE_B, R_WORK3, 4'd7));
    ck("SUBACC_ST", {c.acc_we, c.sub_acc, c.acc_shift, c.mem_we, c.mem_din_acc, c.mem_base, c.mem_rel},
                    {5'b11111, BASE_B, 4'd7});
    put(i_MULACC_LD(BASE_A, 2'd0, 2'd3, 4'd2));
    ck("MULACC_LD", {c.sel_a, c.sel_b, c.en_mul, c.acc_we, c.mem_we, c.mem_rel}, {R_MEM, B_WORK3, 3'b110, 4'd2});
    put(i_MULACC_ST(0, BASE_A, 2'd2, 2'd1, 4'd2));
    ck("MULACC_ST", {c.sel_a, c.sel_b, c.mem_we, c.mem_din_acc, c.acc_shift}, {R_WORK2, B_WORK1, 3'b110});
    put(i_SUBC_ST(1, BASE_C, 2'd1, 2'd0, 4'd9));
    ck("SUBC_ST", {c.sel_a, c.sel_b, c.use_carry, c.inv_b, c.inc, c.acc_shift, c.mem_we, c.mem_din_acc},
                  {R_WORK1, B_WORK0, 6'b110110});
    // LDI: two cycles, second word is the constant
    put(i_LDI(R_BASEC)); ck("LDI 1st", {c.reg_we, c.mem_en}, 2'b00);
    put(16'hCAFE); ck("LDI 2nd", {ldi, c.reg_we, c.sel_wr, c.imm, c.b_imm}, {2'b11, R_BASEC, 16'hCAFE, 1'b1});
    put(i_LDI(R_PC)); ck("after LDI", ldi, 1'b0);
    put(i_LDI(R_WORK0)); ck("LDI word that looks like LDI", {ldi, c.sel_wr, c.imm}, {1'b1, R_PC, i_LDI(R_WORK0)});
    put(16'h0000);
    ck("no third LDI cycle", ldi, 1'b0);
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
