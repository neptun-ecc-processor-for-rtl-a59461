// tb_neptun_p192mul: NIST P-192 field multiplication on the full chip.
//
// The field multiplication is the kernel that dominates an ECDSA
// signature. This bench runs it end to end at the default sizes:
//   1. The boot program (a look-up table model here) sets up the serial
//      interface, receives the application as 16-bit words (low byte
//      first) over EIA-232, writes them to the program RAM from 8000h and
//      calls it.
//   2. The application writes the operands A and B (12 words each) to the
//      data RAM, computes the 24-word product by product scanning
//      (MULACC_LD / MULACC_ST, one column per result word), and reduces it
//      with the P-192 identity 2^192 = 2^64 + 1 (mod p): every result word
//      is a column sum of up to four product words in the accumulator,
//      followed by one fold of the remaining carry.
//   3. It sends the 12 result words back over EIA-232 and returns.
// The bench checks the received result against A * B mod p (the result
// is below 2^192 and congruent to the product; it may exceed p by one p),
// and checks that multiplication plus reduction take at most 401 cycles.
module tb_neptun_p192mul;
  import neptun_pkg::*;
  `include "neptun_asm.svh"

  localparam int unsigned DIV = 3;                 // bit time DIV + 1 cycles
  localparam logic [191:0] P192 = 192'hFFFFFFFF_FFFFFFFF_FFFFFFFF_FFFFFFFE_FFFFFFFF_FFFFFFFF;

  logic  clk = 0, rst_n = 0, rx = 1, tx, so;
  logic [9:0] boot_a;
  word_t boot_pw, pout;
  word_t boot [1024];
  word_t app [$];
  int    nb = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  assign boot_pw = boot[boot_a];

  neptun_top dut (.ClkxCI(clk), .RstxRBI(rst_n), .BootAddrxDO(boot_a), .BootPWxDI(boot_pw),
    .SerialRXxDI(rx), .SerialTXxDO(tx), .ParallelInxDI(16'h0000), .ParallelOutxDO(pout),
    .ScanEnxTI(1'b0), .TestModexTI(1'b0), .ScanInxTI(1'b0), .ScanOutxTO(so));

  task automatic b(input word_t w); boot[nb] = w; nb++; endtask
  task automatic a(input word_t w); app.push_back(w); endtask

  // poll a status bit of the serial interface (BaseC = C000h) until it is 1
  task automatic poll_boot(input logic [6:0] mask);
    int at = nb;
    b(i_LD(BASE_C, 1)); b(i_LDSI(R_WORK1, mask)); b(i_AND(R_WORK2, R_WORK1, B_MEM));
    b(i_BRA(1, 3'(ST_Z), 8'(at - nb - 1)));
  endtask
  task automatic poll_app(input base_e base, input logic [6:0] mask);
    int at = app.size();
    a(i_LD(base, 1)); a(i_LDSI(R_WORK1, mask)); a(i_AND(R_WORK2, R_WORK1, B_MEM));
    a(i_BRA(1, 3'(ST_Z), 8'(at - int'(app.size()) - 1)));
  endtask

  // product word i lives at 40h + i: BaseA = 40h for 0..15, BaseB = 50h for 16..23
  task automatic ld_c(input int i);
    if (i < 16) a(i_LD(BASE_A, 4'(i))); else a(i_LD(BASE_B, 4'(i - 16)));
  endtask
  task automatic addacc_ld_c(input int i);
    if (i < 16) a(i_ADDACC_LD(BASE_A, R_MEM, 4'(i))); else a(i_ADDACC_LD(BASE_B, R_MEM, 4'(i - 16)));
  endtask

  logic [191:0] A, B, R;
  logic [383:0] PROD;
  logic [191:0] expect_r;
  int mul_start, red_start, red_end;

  initial begin
    int loop, sendl;
    A = {6{32'($urandom)}} ^ {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    B = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    if (A >= P192) A = A - P192;
    if (B >= P192) B = B - P192;
    PROD = 384'(A) * 384'(B);
    expect_r = 192'(PROD % 384'(P192));
    for (int i = 0; i < 1024; i++) boot[i] = i_BRA(1, 3'd7, 8'hFF);

    // ---------------- application (linked at 8000h)
    a(i_LDSI(R_BASEA, 7'h10)); a(i_LDSI(R_BASEB, 7'h20));
    for (int i = 0; i < 12; i++) begin
      a(i_LDI(R_WORK0)); a(A[16*i +: 16]); a(i_STR(BASE_A, R_WORK0, 4'(i)));
      a(i_LDI(R_WORK0)); a(B[16*i +: 16]); a(i_STR(BASE_B, R_WORK0, 4'(i)));
    end
    // product scanning, 12 x 12 words -> 40h..57h
    mul_start = app.size();
    a(i_MOV(R_ACC0, R_ZERO)); a(i_MOV(R_ACC1, R_ZERO)); a(i_MOV(R_ACC2, R_ZERO));
    a(i_LDSI(R_BASEC, 7'h40));
    for (int k = 0; k < 23; k++) begin
      int lo, hi;
      lo = (k > 11) ? k - 11 : 0;
      hi = (k < 11) ? k : 11;
      if (k == 16) a(i_LDSI(R_BASEC, 7'h50));
      a(i_LD(BASE_A, 4'(lo)));
      for (int i = lo; i <= hi; i++) begin
        a(i_MOV_LD(BASE_B, R_WORK1, 4'(k - i)));
        if (i == hi) a(i_MULACC_ST(1, BASE_C, 2'd0, 2'd1, 4'(k % 16)));
        else         a(i_MULACC_LD(BASE_A, 2'd0, 2'd1, 4'(i + 1)));
      end
    end
    a(i_ADDACC_ST(1, BASE_C, R_ZERO, 4'(23 - 16)));
    // reduction: r_j = c_j + [b<2] c_{12+o} + [1<=b<=2] c_{16+o} + c_{20+o}, b = j/4, o = j%4
    red_start = app.size();
    a(i_LDSI(R_BASEA, 7'h40)); a(i_LDSI(R_BASEB, 7'h50)); a(i_LDSI(R_BASEC, 7'h60));
    for (int j = 0; j < 12; j++) begin
      int src [$];
      int bl, o;
      bl = j / 4; o = j % 4;
      src.delete();
      src.push_back(j);
      if (bl < 2)  src.push_back(12 + o);
      if (bl >= 1) src.push_back(16 + o);
      src.push_back(20 + o);
      ld_c(src[0]);
      for (int s = 1; s < src.size(); s++) addacc_ld_c(src[s]);
      a(i_ADDACC_ST(1, BASE_C, R_MEM, 4'(j)));
    end
    // fold the carry k: + k at word 0 and at word 4
    a(i_STR(BASE_C, R_ACC0, 12));
    a(i_MOV(R_ACC0, R_ZERO));
    for (int j = 0; j < 12; j++) begin
      if (j == 0 || j == 4) begin a(i_LD(BASE_C, 12)); a(i_ADDACC_LD(BASE_C, R_MEM, 4'(j))); end
      else a(i_LD(BASE_C, 4'(j)));
      a(i_ADDACC_ST(1, BASE_C, R_MEM, 4'(j)));
    end
    a(i_STR(BASE_C, R_ACC0, 13));
    red_end = app.size();
    // send r_0..r_11 (low byte first); BaseB = serial interface
    a(i_LDI(R_BASEB)); a(16'hC000);
    a(i_LDSI(R_WORK3, 7'd12));
    sendl = app.size();
    a(i_LD(BASE_C, 0)); a(i_MOVNF(R_WORK0, R_MEM));
    poll_app(BASE_B, 7'h20);
    a(i_STR(BASE_B, R_WORK0, 2));
    a(i_RSI(R_WORK0, 4'd8));
    poll_app(BASE_B, 7'h20);
    a(i_STR(BASE_B, R_WORK0, 2));
    a(i_ADDI(R_BASEC, 8'd1)); a(i_SUBI(R_WORK3, 8'd1));
    a(i_BRA(0, 3'(ST_Z), 8'(sendl - int'(app.size()) - 1)));
    poll_app(BASE_B, 7'h20);                                   // last byte handed over
    a(i_CUSTOM2()); a(i_MOVNF(R_PC, R_MEM));                   // RET

    // ---------------- boot program: receive the application over EIA-232
    b(i_LDI(R_BASEC)); b(16'hC000);
    b(i_LDSI(R_WORK0, 7'(DIV))); b(i_STR(BASE_C, R_WORK0, 8));
    b(i_LDSI(R_WORK0, 7'd3));    b(i_STR(BASE_C, R_WORK0, 0));
    b(i_LDI(R_BASEA)); b(PROG_BASE);
    b(i_LDI(R_WORK3)); b(word_t'(app.size()));
    b(i_LDI(R_SP)); b(16'h01FF);
    loop = nb;
    poll_boot(7'h01);
    b(i_LD(BASE_C, 5)); b(i_MOVNF(R_WORK0, R_MEM));
    poll_boot(7'h01);
    b(i_LD(BASE_C, 5)); b(i_MOVNF(R_WORK2, R_MEM));
    b(i_LSI(R_WORK2, 4'd8)); b(i_OR(R_WORK0, R_WORK0, B_WORK2));
    b(i_STR(BASE_A, R_WORK0, 0));
    b(i_ADDI(R_BASEA, 8'd1)); b(i_SUBI(R_WORK3, 8'd1));
    b(i_BRA(0, 3'(ST_Z), 8'(loop - nb - 1)));
    b(i_CUSTOM1()); b(i_CUSTOM3()); b(i_LDI(R_PC)); b(PROG_BASE);
    b(i_BRA(1, 3'd7, 8'hFF));                                  // halt

    repeat (4) @(posedge clk);
    rst_n = 1;
  end

  // ---------------- serial partner
  task automatic send_byte(input logic [7:0] v);
    @(negedge clk);
    rx = 0;
    repeat (DIV + 1) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rx = v[i]; repeat (DIV + 1) @(negedge clk); end
    rx = 1;
    repeat (2 * (DIV + 1)) @(negedge clk);
  endtask
  task automatic recv_byte(output logic [7:0] v);
    @(negedge tx);
    #(10.0 * (DIV + 1) * 1.5);
    for (int i = 0; i < 8; i++) begin v[i] = tx; #(10.0 * (DIV + 1)); end
  endtask

  int cyc = 0, t_mul = -1, t_red = -1, t_end = -1;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.pc_p == PROG_BASE + word_t'(mul_start) && t_mul < 0) t_mul = cyc;
    if (dut.pc_p == PROG_BASE + word_t'(red_start) && t_red < 0) t_red = cyc;
    if (dut.pc_p == PROG_BASE + word_t'(red_end)   && t_end < 0) t_end = cyc;
  end

  initial begin
    logic [7:0] lo, hi;
    wait (rst_n);
    repeat (40) @(posedge clk);
    foreach (app[i]) begin
      send_byte(app[i][7:0]);
      send_byte(app[i][15:8]);
    end
    for (int j = 0; j < 12; j++) begin
      recv_byte(lo);
      recv_byte(hi);
      R[16*j +: 16] = {hi, lo};
    end
    $display("program %0d words; multiplication %0d cycles, reduction %0d cycles",
             app.size(), t_red - t_mul, t_end - t_red);
    // the parallel instruction set needs 401 cycles for a field multiplication
    // without keeping operands in the work registers
    checks++;
    if (t_end - t_mul > 401) begin failures++; $display("FAIL %0d cycles", t_end - t_mul); end
    checks++;
    if (R !== expect_r && R !== expect_r + P192) begin
      failures++;
      $display("FAIL A*B mod p: got %h exp %h", R, expect_r);
    end
    checks++;
    if (dram(16'h6D) !== 16'h0000) begin failures++; $display("FAIL final carry %h", dram(16'h6D)); end
    for (int i = 0; i < 24; i++) begin
      checks++;
      if (dram(16'h40 + i) !== PROD[16*i +: 16]) begin
        failures++; $display("FAIL product word %0d: got %h exp %h", i, dram(16'h40 + i), PROD[16*i +: 16]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic word_t dram(input int i); return dut.u_memory.u_data_ram.u_ram.mem[i]; endfunction

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
