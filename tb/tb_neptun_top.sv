// tb_neptun_top: end-to-end test of the Neptun chip at its default sizes.
//
// The bootloader look-up table is modelled here (boot[], read through the
// BootAddrxDO / BootPWxDI ports). The boot program writes an application
// into the program RAM at 8000h over the data bus, writes the operands
// into the constant and data RAMs, sets up the stack and CALLs 8000h.
// The application, running from the program RAM:
//   - adds two 4-word numbers (ADD_ST / ADDC_ST, carry chain),
//   - multiplies them 4 x 4 words by product scanning (MULACC_LD/_ST with
//     the accumulator shift),
//   - programs the serial interface, sends a byte, waits for a received
//     byte (polling the status register with a conditional branch),
//   - writes the parallel output and reads the parallel input,
//   - starts timer 0 as a PWM that takes over parallel output 9,
//   - calls a subroutine with PUSH/POP and returns,
//   - runs a counted loop, tries a (blocked) write to its own program RAM,
//   - returns to the bootloader, which reads the program RAM back over the
//     bus and halts.
// The bench plays the serial partner and checks the results in the data
// RAM, the pins, the bit time and the cycle count of CALL. Finally the
// block-isolation scan chain (program, data, constant RAM) is shifted in
// test mode and its length checked. Every mechanism is counted; one that
// never happened counts as a failure.
module tb_neptun_top;
  import neptun_pkg::*;
  `include "neptun_asm.svh"

  localparam int unsigned DIV      = 4;            // bit time DIV + 1 cycles
  localparam int unsigned CHAIN    = (16 + 13 + 2) + 2 * (16 + 9 + 2);
  localparam logic [7:0]  TX_BYTE  = 8'hA5;   // bit 0 = 1 ends the start bit
  localparam logic [7:0]  RX_BYTE  = 8'hC3;
  localparam word_t       PIO_OUT  = 16'h2A5A;
  localparam word_t       PIO_IN   = 16'h0123;

  logic  clk = 0, rst_n = 0, rx = 1, tx, scan_en = 0, test_mode = 0, scan_in = 0, scan_out;
  logic [9:0] boot_a;
  word_t boot_pw, pin = PIO_IN, pout;
  word_t boot [1024];
  word_t app [$];
  int    nb = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  assign boot_pw = boot[boot_a];

  neptun_top dut (.ClkxCI(clk), .RstxRBI(rst_n), .BootAddrxDO(boot_a), .BootPWxDI(boot_pw),
    .SerialRXxDI(rx), .SerialTXxDO(tx), .ParallelInxDI(pin), .ParallelOutxDO(pout),
    .ScanEnxTI(scan_en), .TestModexTI(test_mode), .ScanInxTI(scan_in), .ScanOutxTO(scan_out));

  task automatic b(input word_t w); boot[nb] = w; nb++; endtask
  task automatic a(input word_t w); app.push_back(w); endtask
  task automatic ck(input string what, input word_t got, input word_t exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask
  function automatic word_t dram(input int i); return dut.u_memory.u_data_ram.u_ram.mem[i]; endfunction

  logic [63:0]  A, B;
  logic [64:0]  S;
  logic [127:0] P;
  int call_at, sub_at, halt_at, app_call, app_sub;

  // ---------------------------------------------------------------- programs
  initial begin
    int poll;
    A = {32'($urandom), 32'($urandom)} | 64'h8000_0000_0000_0000;
    B = {32'($urandom), 32'($urandom)} | 64'h8000_0000_0000_0000;
    S = 65'(A) + 65'(B);
    P = 128'(A) * 128'(B);
    for (int i = 0; i < 1024; i++) boot[i] = i_BRA(1, 3'd7, 8'hFF);

    // ---- application, linked at 8000h
    a(i_LDI(R_BASEA)); a(16'h4000);
    a(i_LDSI(R_BASEB, 7'h20));
    a(i_LDSI(R_BASEC, 7'h30));
    a(i_LD(BASE_A, 0));
    a(i_MOV_LD(BASE_B, R_WORK0, 0));
    a(i_ADD_ST(0, BASE_C, 2'd0, 2'd0, 0));
    for (int i = 1; i < 4; i++) begin
      a(i_LD(BASE_A, 4'(i)));
      a(i_MOV_LD(BASE_B, R_WORK0, 4'(i)));
      a(i_ADDC_ST(0, BASE_C, 2'd0, 2'd0, 4'(i)));
    end
    a(i_STR(BASE_C, R_STATE, 4));
    a(i_LDSI(R_BASEC, 7'h38));
    for (int k = 0; k < 7; k++) begin
      int lo, hi;
      lo = (k > 3) ? k - 3 : 0;
      hi = (k < 3) ? k : 3;
      a(i_LD(BASE_A, 4'(lo)));
      for (int i = lo; i <= hi; i++) begin
        a(i_MOV_LD(BASE_B, R_WORK1, 4'(k - i)));
        if (i == hi) a(i_MULACC_ST(1, BASE_C, 2'd0, 2'd1, 4'(k)));
        else         a(i_MULACC_LD(BASE_A, 2'd0, 2'd1, 4'(i + 1)));
      end
    end
    a(i_ADDACC_ST(1, BASE_C, R_ZERO, 7));
    // serial interface: divider, enable, send, wait for a received byte
    a(i_LDI(R_BASEC)); a(16'hC000);
    a(i_LDSI(R_WORK0, 7'(DIV))); a(i_STR(BASE_C, R_WORK0, 8));
    a(i_LDSI(R_WORK0, 7'd3));    a(i_STR(BASE_C, R_WORK0, 0));
    a(i_LDI(R_WORK0)); a(16'(TX_BYTE)); a(i_STR(BASE_C, R_WORK0, 2));
    poll = app.size();
    a(i_LD(BASE_C, 1));
    a(i_LDSI(R_WORK1, 7'd1));
    a(i_AND(R_WORK0, R_WORK1, B_MEM));
    a(i_BRA(1, 3'(ST_Z), 8'(poll - int'(app.size()) - 1)));
    a(i_LD(BASE_C, 5)); a(i_MOVNF(R_WORK2, R_MEM));
    // parallel port
    a(i_LDI(R_BASEC)); a(16'hC040);
    a(i_LDI(R_WORK0)); a(PIO_OUT); a(i_STR(BASE_C, R_WORK0, 0));
    a(i_LD(BASE_C, 1)); a(i_MOVNF(R_WORK3, R_MEM));
    // timer 0: compare A = 2 sets, compare B = 5 clears and restarts, override pin 9
    a(i_LDI(R_BASEC)); a(16'hC080);
    a(i_LDSI(R_WORK0, 7'd2)); a(i_STR(BASE_C, R_WORK0, 3));
    a(i_LDSI(R_WORK0, 7'd5)); a(i_STR(BASE_C, R_WORK0, 4));
    a(i_LDI(R_WORK0)); a(16'h1691); a(i_STR(BASE_C, R_WORK0, 0));
    // results, subroutine call, loop, blocked program-RAM write, return
    a(i_LDSI(R_BASEC, 7'h40));
    a(i_STR(BASE_C, R_WORK2, 0));
    a(i_STR(BASE_C, R_WORK3, 1));
    app_call = app.size();
    a(i_CUSTOM1()); a(i_CUSTOM3()); a(i_LDI(R_PC)); a(16'h0);   // patched below
    a(i_STR(BASE_C, R_WORK2, 3));
    a(i_LDSI(R_WORK3, 7'd5)); a(i_LDSI(R_WORK2, 7'd0));
    a(i_ADDI(R_WORK2, 8'd3)); a(i_SUBI(R_WORK3, 8'd1));
    a(i_BRA(0, 3'(ST_Z), 8'hFD));
    a(i_STR(BASE_C, R_WORK2, 4));
    a(i_LDI(R_BASEA)); a(PROG_BASE);
    a(i_LDI(R_WORK0)); a(16'hDEAD); a(i_STR(BASE_A, R_WORK0, 1));
    a(i_CUSTOM2()); a(i_MOVNF(R_PC, R_MEM));                   // RET to the bootloader
    app_sub = app.size();
    app[app_call + 3] = PROG_BASE + word_t'(app_sub);
    a(i_STR(BASE_SP, R_WORK2, 0)); a(i_CUSTOM3());            // PUSH Work2
    a(i_ADDI(R_WORK2, 8'd1)); a(i_STR(BASE_C, R_WORK2, 2));
    a(i_CUSTOM2()); a(i_MOVNF(R_WORK2, R_MEM));                // POP Work2
    a(i_CUSTOM2()); a(i_MOVNF(R_PC, R_MEM));                   // RET

    // ---- bootloader
    b(i_LDI(R_BASEA)); b(PROG_BASE);
    for (int i = 0; i < app.size(); i++) begin
      b(i_LDI(R_WORK0)); b(app[i]);
      b(i_STR(BASE_A, R_WORK0, 4'(i % 16)));
      if (i % 16 == 15) b(i_ADDI(R_BASEA, 8'd16));
    end
    b(i_LDI(R_BASEA)); b(16'h4000);
    b(i_LDSI(R_BASEB, 7'h20));
    for (int i = 0; i < 4; i++) begin
      b(i_LDI(R_WORK0)); b(A[16*i +: 16]); b(i_STR(BASE_A, R_WORK0, 4'(i)));
      b(i_LDI(R_WORK0)); b(B[16*i +: 16]); b(i_STR(BASE_B, R_WORK0, 4'(i)));
    end
    b(i_LDI(R_SP)); b(16'h01FF);
    call_at = nb;
    b(i_CUSTOM1()); b(i_CUSTOM3()); b(i_LDI(R_PC)); b(PROG_BASE);
    b(i_LDI(R_BASEA)); b(PROG_BASE);
    b(i_LD(BASE_A, 1)); b(i_MOVNF(R_WORK0, R_MEM));
    b(i_LDSI(R_BASEC, 7'h40));
    b(i_STR(BASE_C, R_WORK0, 5));
    halt_at = nb;
    b(i_BRA(1, 3'd7, 8'hFF));
    if (nb > 1024) $fatal(1, "boot program too long");

    repeat (4) @(posedge clk);
    rst_n = 1;
  end

  // ---------------------------------------------------------------- mechanism counters
  int n_boot_fetch = 0, n_ram_fetch = 0, n_prog_load = 0, n_prog_blocked = 0, n_const_rd = 0;
  int n_carry = 0, n_mac = 0, n_acc_shift = 0, n_taken = 0, n_not_taken = 0, n_ldi = 0;
  int n_call = 0, n_ret = 0, n_tx = 0, n_rx = 0, n_pio_rd = 0, n_pwm = 0, n_scan = 0, n_mmio = 0;
  int cyc = 0, t_call = -1, t_app = -1;
  logic pwm_q = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.pc_p[15]) n_ram_fetch++; else n_boot_fetch++;
    if (dut.mem_en && dut.mem_we && dut.mem_addr[15:14] == 2'b10) begin
      if (dut.pc_p[15]) n_prog_blocked++; else n_prog_load++;
    end
    if (dut.mem_en && !dut.mem_we && dut.mem_addr[15:14] == 2'b01) n_const_rd++;
    if (dut.mem_en && dut.mem_addr[15:14] == 2'b11) n_mmio++;
    if (dut.mem_en && !dut.mem_we && dut.mem_addr == 16'hC041) n_pio_rd++;
    if (dut.ctrl.use_carry) n_carry++;
    if (dut.ctrl.en_mul && dut.ctrl.acc_we) n_mac++;
    if (dut.ctrl.acc_shift) n_acc_shift++;
    if (dut.ctrl.en_branch) begin
      if (dut.u_cpu.BranchTakenxSO) n_taken++; else n_not_taken++;
    end
    if (dut.ctrl.reg_we && dut.ctrl.sel_wr == R_PC && !dut.ctrl.en_branch) begin
      if (dut.ctrl.sel_a == R_MEM) n_ret++;
    end
    if (dut.pw == i_CUSTOM1()) n_call++;
    if (dut.pw[15:12] == 4'h5 && dut.pw[3:0] == 4'hF) n_ldi++;
    if (dut.pc_p == word_t'(call_at) && t_call < 0) t_call = cyc;
    if (dut.pc_p == PROG_BASE && t_app < 0) t_app = cyc;
    pwm_q <= pout[9];
    if (pout[9] && !pwm_q) n_pwm++;
  end

  // ---------------------------------------------------------------- serial partner
  logic [7:0] got_tx = 0;
  int start_len = 0;
  realtime t0;
  initial begin
    wait (rst_n);
    @(negedge tx);
    t0 = $realtime;
    @(posedge tx);
    start_len = int'(($realtime - t0) / 10.0);
    // now at the start of bit 0 (which is 1); sample each bit in its middle
    #(5.0 * (DIV + 1));
    for (int i = 0; i < 8; i++) begin
      got_tx[i] = tx;
      #(10.0 * (DIV + 1));
    end
    ck("stop bit", 16'(tx), 16'd1);
    n_tx++;
    repeat (3 * (DIV + 1)) @(posedge clk);
    @(negedge clk);
    rx = 0;
    repeat (DIV + 1) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      rx = RX_BYTE[i];
      repeat (DIV + 1) @(negedge clk);
    end
    rx = 1;
    repeat (DIV + 1) @(negedge clk);
    n_rx++;
  end

  // ---------------------------------------------------------------- run and check
  initial begin
    int stable, same;
    logic [CHAIN+63:0] pattern;
    wait (rst_n);
    stable = 0;
    while (stable < 20) begin
      @(posedge clk);
      stable = (dut.pc_p == word_t'(halt_at)) ? stable + 1 : 0;
    end
    $display("halted after %0d cycles (boot %0d, application %0d)", cyc, n_boot_fetch, n_ram_fetch);
    for (int i = 0; i < 4; i++) ck($sformatf("sum[%0d]", i), dram(16'h30 + i), S[16*i +: 16]);
    ck("sum carry", 16'(dram(16'h34) & 16'h1), 16'(S[64]));
    for (int i = 0; i < 8; i++) ck($sformatf("product[%0d]", i), dram(16'h38 + i), P[16*i +: 16]);
    ck("sent byte", 16'(got_tx), 16'(TX_BYTE));
    ck("start bit length", 16'(start_len), 16'(DIV + 1));
    ck("received byte", dram(16'h40), 16'(RX_BYTE));
    ck("parallel input", dram(16'h41), PIO_IN);
    ck("parallel output", pout & 16'hF1FF, PIO_OUT & 16'hF1FF);
    ck("subroutine", dram(16'h42), 16'(RX_BYTE) + 16'd1);
    ck("POP restored", dram(16'h43), 16'(RX_BYTE));
    ck("loop", dram(16'h44), 16'd15);
    ck("program RAM write blocked", dram(16'h45), app[1]);
    ck("stack pointer back", dut.u_cpu.sp_q, 16'h01FF);
    ck("CALL cycles", 16'(t_app - t_call), 16'd4);

    // ---- block-isolation scan chain
    for (int i = 0; i < CHAIN + 64; i++) pattern[i] = 1'($urandom);
    @(negedge clk); test_mode = 1; scan_en = 1;
    same = 0;
    for (int i = 0; i < CHAIN + 64; i++) begin
      scan_in = pattern[i];
      @(posedge clk); #1;
      if (i >= CHAIN - 1 && i - (CHAIN - 1) < 64) begin
        checks++;
        if (scan_out !== pattern[i - (CHAIN - 1)]) failures++; else same++;
      end
      n_scan++;
    end
    @(negedge clk); test_mode = 0; scan_en = 0;
    checks++;
    if (same != 64) $display("FAIL scan chain: %0d of 64 bits after %0d shifts", same, CHAIN);

    $display("mechanisms: boot fetch %0d, RAM fetch %0d, program load %0d, blocked write %0d,",
             n_boot_fetch, n_ram_fetch, n_prog_load, n_prog_blocked);
    $display("  const read %0d, carry %0d, MAC %0d, acc shift %0d, taken %0d, not taken %0d, LDI %0d,",
             n_const_rd, n_carry, n_mac, n_acc_shift, n_taken, n_not_taken, n_ldi);
    $display("  CALL %0d, RET %0d, TX %0d, RX %0d, PIO read %0d, MMIO %0d, PWM %0d, scan %0d",
             n_call, n_ret, n_tx, n_rx, n_pio_rd, n_mmio, n_pwm, n_scan);
    begin
      int m [19];
      m = '{n_boot_fetch, n_ram_fetch, n_prog_load, n_prog_blocked, n_const_rd, n_carry,
                   n_mac, n_acc_shift, n_taken, n_not_taken, n_ldi, n_call, n_ret, n_tx, n_rx,
                   n_pio_rd, n_mmio, n_pwm, n_scan};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
