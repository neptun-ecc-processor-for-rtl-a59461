// tb_neptun_cpu: self-checking program-level test of decoder + CPU.
//
// A program ROM and a one-cycle data memory (result of the last access,
// written words visible right away) are modelled here. The program uses
// nearly every instruction: a 4-word addition with ADD_ST/ADDC_ST carry
// propagation, a 4x4-word product-scanning multiplication with
// MULACC_LD/MULACC_ST and the accumulator shift, MUL, logic and shift
// instructions, ADDACC/SUBACC, a counted loop with a conditional branch,
// CALL/RET with PUSH/POP, and a final branch-to-self. Memory results are
// compared with values computed in the testbench; the cycle counts of
// CALL (4), RET (2) and LDI (2) are measured.
module tb_neptun_cpu;
  import neptun_pkg::*;
  `include "neptun_asm.svh"

  logic  clk = 0, rst_n = 0;
  word_t pc_p, pc_n, maddr, mdin, mdout, pw;
  logic  men, mwe, taken, ldi;
  ctrl_t ctrl;
  word_t rom [1024];
  word_t mem [1024];
  int    n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  neptun_decoder u_dec (.ClkxCI(clk), .RstxRBI(rst_n), .PWxDI(pw), .CtrlxSO(ctrl), .LdiDataxSO(ldi));
  neptun_cpu u_cpu (.ClkxCI(clk), .RstxRBI(rst_n), .CtrlxSI(ctrl), .PCxDP(pc_p), .PCxDN(pc_n),
    .MemAddrxD(maddr), .MemDataInxD(mdin), .MemEnxS(men), .MemWExS(mwe),
    .MemDataOutxD(mdout), .BranchTakenxSO(taken));

  assign pw = rom[pc_p[9:0]];

  always_ff @(posedge clk) begin
    if (men) begin
      if (mwe) begin mem[maddr[9:0]] <= mdin; mdout <= mdin; end
      else mdout <= mem[maddr[9:0]];
    end
  end

  task automatic emit(input word_t w); rom[n] = w; n++; endtask
  task automatic check(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  logic [63:0]  A, B;
  logic [64:0]  S;
  logic [127:0] P;
  int call_at, sub_at, ret_at, back_at, ldi_at;

  initial begin
    A = {32'($urandom), 32'($urandom)} | 64'hF000_0000_0000_0000;
    B = {32'($urandom), 32'($urandom)} | 64'hF000_0000_0000_0000;
    S = 65'(A) + 65'(B);
    P = 128'(A) * 128'(B);
    for (int i = 0; i < 1024; i++) begin rom[i] = i_BRA(1, 3'd7, 8'hFF); mem[i] = '0; end
    for (int i = 0; i < 4; i++) begin mem[16+i] = A[16*i +: 16]; mem[32+i] = B[16*i +: 16]; end

    // ---- setup
    emit(i_LDSI(R_BASEA, 7'h10));
    emit(i_LDSI(R_BASEB, 7'h20));
    emit(i_LDSI(R_BASEC, 7'h30));
    ldi_at = n;
    emit(i_LDI(R_SP)); emit(16'h03FF);
    // ---- 4-word addition, carry kept in the status register
    emit(i_LD(BASE_A, 0));
    emit(i_MOV_LD(BASE_B, R_WORK0, 0));
    emit(i_ADD_ST(0, BASE_C, 2'd0, 2'd0, 0));
    for (int i = 1; i < 4; i++) begin
      emit(i_LD(BASE_A, 4'(i)));
      emit(i_MOV_LD(BASE_B, R_WORK0, 4'(i)));
      emit(i_ADDC_ST(0, BASE_C, 2'd0, 2'd0, 4'(i)));
    end
    emit(i_STR(BASE_C, R_STATE, 4));
    // ---- product scanning 4x4 words into 0x40..0x47
    emit(i_LDSI(R_BASEC, 7'h40));
    for (int k = 0; k < 7; k++) begin
      int lo, hi;
      lo = (k > 3) ? k - 3 : 0;
      hi = (k < 3) ? k : 3;
      emit(i_LD(BASE_A, 4'(lo)));
      for (int i = lo; i <= hi; i++) begin
        emit(i_MOV_LD(BASE_B, R_WORK1, 4'(k - i)));
        if (i == hi) emit(i_MULACC_ST(1, BASE_C, 2'd0, 2'd1, 4'(k)));
        else         emit(i_MULACC_LD(BASE_A, 2'd0, 2'd1, 4'(i + 1)));
      end
    end
    emit(i_ADDACC_ST(1, BASE_C, R_ZERO, 7));
    // ---- MUL and logic, results at 0x50..
    emit(i_LDSI(R_BASEC, 7'h50));
    emit(i_LDI(R_WORK2)); emit(16'hBEEF);
    emit(i_LDI(R_WORK3)); emit(16'h1234);
    emit(i_MUL(R_WORK2, B_WORK3, 0));
    emit(i_STR(BASE_C, R_WORK0, 0));
    emit(i_STR(BASE_C, R_WORK1, 1));
    emit(i_AND(R_WORK0, R_WORK2, B_WORK3)); emit(i_STR(BASE_C, R_WORK0, 2));
    emit(i_OR (R_WORK0, R_WORK2, B_WORK3)); emit(i_STR(BASE_C, R_WORK0, 3));
    emit(i_XOR(R_WORK0, R_WORK2, B_WORK3)); emit(i_STR(BASE_C, R_WORK0, 4));
    emit(i_MVN(R_WORK0, R_WORK2));          emit(i_STR(BASE_C, R_WORK0, 5));
    emit(i_MOVNF(R_WORK0, R_WORK2)); emit(i_ASRI(R_WORK0, 4'd4)); emit(i_STR(BASE_C, R_WORK0, 6));
    emit(i_MOVNF(R_WORK0, R_WORK2)); emit(i_LSI(R_WORK0, 4'd3));  emit(i_STR(BASE_C, R_WORK0, 7));
    emit(i_LDSI(R_WORK1, 7'd5)); emit(i_RS(R_WORK0, R_WORK3, B_WORK1)); emit(i_STR(BASE_C, R_WORK0, 8));
    emit(i_SUB(R_WORK0, R_WORK3, B_WORK2)); emit(i_STR(BASE_C, R_STATE, 9)); emit(i_STR(BASE_C, R_WORK0, 10));
    // accumulator: Acc = 0 + Work2 - Work3, then shift
    emit(i_MOV(R_ACC0, R_ZERO)); emit(i_MOV(R_ACC1, R_ZERO)); emit(i_MOV(R_ACC2, R_ZERO));
    emit(i_ADDACC(R_WORK2)); emit(i_SUBACC(R_WORK3)); emit(i_SUBACC(R_WORK3));
    emit(i_STR(BASE_C, R_ACC0, 11)); emit(i_STR(BASE_C, R_ACC1, 12));
    emit(i_RSACC()); emit(i_STR(BASE_C, R_ACC0, 13));
    // ---- counted loop: Work2 = 3 * 5
    emit(i_LDSI(R_WORK3, 7'd5)); emit(i_LDSI(R_WORK2, 7'd0));
    emit(i_ADDI(R_WORK2, 8'd3)); emit(i_SUBI(R_WORK3, 8'd1));
    emit(i_BRA(0, 3'(ST_Z), 8'hFD));                 // while Z == 0
    emit(i_STR(BASE_C, R_WORK2, 14));
    // ---- CALL / RET with PUSH / POP
    call_at = n;
    emit(i_CUSTOM1()); emit(i_CUSTOM3()); emit(i_LDI(R_PC)); emit(16'h0);  // target patched
    back_at = n;
    emit(i_STR(BASE_C, R_WORK3, 15));
    emit(i_CMPI(R_WORK3, 8'hF0));
    emit(i_STR(BASE_B, R_STATE, 15));                // 0x2F: status after compare
    emit(i_BRA(1, 3'd7, 8'hFF));                      // halt
    sub_at = n;
    rom[call_at + 3] = word_t'(sub_at);
    emit(i_STR(BASE_SP, R_WORK2, 0)); emit(i_CUSTOM3());   // PUSH Work2
    emit(i_LSI(R_WORK2, 4'd4));
    emit(i_CUSTOM2()); emit(i_MOVNF(R_WORK3, R_MEM));       // POP Work3
    emit(i_ADD(R_WORK3, R_WORK3, B_WORK2));                 // 15 + 240
    ret_at = n;
    emit(i_CUSTOM2()); emit(i_MOVNF(R_PC, R_MEM));          // RET

    repeat (3) @(posedge clk);
    rst_n = 1;
  end

  // cycle measurements
  int cyc = 0, t_call = -1, t_sub = -1, t_ret = -1, t_back = -1, t_ldi = -1, t_after_ldi = -1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (pc_p == word_t'(call_at) && t_call < 0) t_call = cyc;
    if (pc_p == word_t'(sub_at)  && t_sub  < 0) t_sub  = cyc;
    if (pc_p == word_t'(ret_at)  && t_ret  < 0) t_ret  = cyc;
    if (pc_p == word_t'(back_at) && t_back < 0 && t_ret >= 0) t_back = cyc;
    if (pc_p == word_t'(ldi_at)  && t_ldi  < 0) t_ldi  = cyc;
    if (pc_p == word_t'(ldi_at + 2) && t_after_ldi < 0) t_after_ldi = cyc;
  end

  initial begin
    word_t gb;
    logic [63:0] w;
    wait (rst_n);
    wait (t_back >= 0);
    $display("done at %0t cyc=%0d call=%0d sub=%0d ret=%0d back=%0d", $time, cyc, t_call, t_sub, t_ret, t_back);
    repeat (20) @(posedge clk);
    for (int i = 0; i < 4; i++) check($sformatf("sum[%0d]", i), mem[48+i], S[16*i +: 16]);
    check("sum carry", word_t'(mem[52][0]), word_t'(S[64]));
    for (int i = 0; i < 8; i++) check($sformatf("prod[%0d]", i), mem[64+i], P[16*i +: 16]);
    w = 32'hBEEF * 32'h1234;
    check("MUL lo", mem[80], w[15:0]);
    check("MUL hi", mem[81], w[31:16]);
    check("AND", mem[82], 16'hBEEF & 16'h1234);
    check("OR",  mem[83], 16'hBEEF | 16'h1234);
    check("XOR", mem[84], 16'hBEEF ^ 16'h1234);
    check("MVN", mem[85], ~16'hBEEF);
    check("ASRI", mem[86], 16'hFBEE);
    check("LSI", mem[87], 16'hBEEF << 3);
    check("RS",  mem[88], 16'h1234 >> 5);
    gb = 16'h1234 - 16'hBEEF;
    check("SUB", mem[90], gb);
    // borrow: C = 0, Z = 0, V = 0, N = 0 ... compute flags
    check("SUB flags", mem[89][5:0], {1'b1, 1'b0 ^ 1'b0, gb[15], 1'b0, 1'b0, 1'b0} | {2'b00, 1'b0, 3'b000});
    w = 64'hBEEF - 64'h1234 - 64'h1234;
    check("ACC0", mem[91], w[15:0]);
    check("ACC1", mem[92], w[31:16]);
    check("RSACC", mem[93], w[31:16]);
    check("loop", mem[94], 16'd15);
    check("CALL/PUSH/POP", mem[95], 16'd15 + 16'd240);
    check("CMPI flags (255 >= 240: C=1, Z=0)", {14'd0, mem[47][1:0]}, 16'b01);
    check("LDI cycles", word_t'(t_after_ldi - t_ldi), 16'd2);
    check("CALL cycles", word_t'(t_sub - t_call), 16'd4);
    check("RET cycles", word_t'(t_back - t_ret), 16'd2);
    check("stack pointer restored", u_cpu.sp_q, 16'h03FF);
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
