// neptun_cpu: register set, operand selection and write-back of Neptun.
//
// A single-cycle, non-pipelined datapath driven by the control vector of
// the instruction decoder. Registers (all 16 bit): PC, SP, BaseA, BaseB,
// BaseC, the 48-bit accumulator Acc2:Acc1:Acc0, the status register and
// Work0-3. Operand A can be any register, the memory result MemDataOutxD
// or zero; operand B a work register, the memory result, zero or the
// immediate of the control vector. The ALU result can be written to any
// register; a write to PC is a jump, otherwise PC is incremented by a
// dedicated +1. Branches compute the new PC in the ALU adder. MUL writes
// its 32-bit product to Work1:Work0 or Work3:Work2.
//
// Memory: the address is BaseA/B/C or SP plus a 4-bit offset; written data
// is the ALU result or the next value of Acc0 (so a multiply-accumulate
// can store its low word in the same cycle). MemDataOutxD is the result of
// the last access and is usable in the very next cycle (LD + use = one
// cycle each). PCxDN, the next PC, addresses a synchronous program RAM.
//
// Timing: all registers on the rising edge of ClkxCI, synchronous
// active-low reset RstxRBI (all registers cleared, PC = 0, the bootloader
// entry). The register set and datapath follow the design description;
// the reset values and the write priority (an explicit register write to
// Acc0-2 or a work register wins over the accumulator/multiplier update)
// are own choices.
module neptun_cpu
  import neptun_pkg::*;
(
  input  logic  ClkxCI,
  input  logic  RstxRBI,
  input  ctrl_t CtrlxSI,
  output word_t PCxDP,
  output word_t PCxDN,
  output word_t MemAddrxD,
  output word_t MemDataInxD,
  output logic  MemEnxS,
  output logic  MemWExS,
  input  word_t MemDataOutxD,
  output logic  BranchTakenxSO
);
  word_t            pc_q, sp_q, base_q [3], work_q [4];
  logic [ACC_W-1:0] acc_q, acc_n, acc_next;
  logic [3:0]       state_q;            // C, Z, V, N
  logic [5:0]       state_view, state_n;
  word_t            opa, opb, result, base;
  logic [2*W-1:0]   mul_res;

  assign state_view = {~state_q[ST_C], state_q[ST_N] ^ state_q[ST_V], state_q};

  // operand A: every register, the memory result or zero
  always_comb begin
    unique case (CtrlxSI.sel_a)
      R_WORK0, R_WORK1, R_WORK2, R_WORK3: opa = work_q[CtrlxSI.sel_a[1:0]];
      R_BASEA: opa = base_q[0];
      R_BASEB: opa = base_q[1];
      R_BASEC: opa = base_q[2];
      R_SP:    opa = sp_q;
      R_PC:    opa = pc_q;
      R_ACC0:  opa = acc_q[W-1:0];
      R_ACC1:  opa = acc_q[2*W-1:W];
      R_ACC2:  opa = acc_q[3*W-1:2*W];
      R_STATE: opa = {{(W-6){1'b0}}, state_view};
      R_MEM:   opa = MemDataOutxD;
      default: opa = '0;
    endcase
  end

  // operand B: work registers, memory result, zero or the immediate
  always_comb begin
    if (CtrlxSI.b_imm)
      opb = CtrlxSI.imm;
    else begin
      unique case (CtrlxSI.sel_b)
        B_WORK0, B_WORK1, B_WORK2, B_WORK3: opb = work_q[CtrlxSI.sel_b[1:0]];
        B_MEM:   opb = MemDataOutxD;
        default: opb = '0;
      endcase
    end
  end

  neptun_alu u_alu (
    .CtrlxSI       (CtrlxSI),
    .OperandAxDI   (opa),
    .OperandBxDI   (opb),
    .StatexDPI     (state_view),
    .AccxDPI       (acc_q),
    .ResultxDO     (result),
    .StatexDNO     (state_n),
    .MulResultxDO  (mul_res),
    .AccxDNO       (acc_n),
    .BranchTakenxSO(BranchTakenxSO)
  );

  // address generation and memory write data
  always_comb begin
    unique case (CtrlxSI.mem_base)
      BASE_A:  base = base_q[0];
      BASE_B:  base = base_q[1];
      BASE_C:  base = base_q[2];
      default: base = sp_q;
    endcase
    MemAddrxD   = base + {{(W-4){1'b0}}, CtrlxSI.mem_rel};
    MemDataInxD = CtrlxSI.mem_din_acc ? acc_n[W-1:0] : result;
    MemEnxS     = CtrlxSI.mem_en;
    MemWExS     = CtrlxSI.mem_en & CtrlxSI.mem_we;
    acc_next    = CtrlxSI.acc_shift ? (acc_n >> W) : acc_n;
  end

  assign PCxDN = (CtrlxSI.reg_we && CtrlxSI.sel_wr == R_PC) ? result : pc_q + 16'd1;
  assign PCxDP = pc_q;

  always_ff @(posedge ClkxCI) begin
    if (!RstxRBI) begin
      pc_q    <= '0;
      sp_q    <= '0;
      base_q  <= '{default: '0};
      work_q  <= '{default: '0};
      acc_q   <= '0;
      state_q <= '0;
    end else begin
      pc_q    <= PCxDN;
      state_q <= state_n[3:0];
      if (CtrlxSI.acc_we) acc_q <= acc_next;
      if (CtrlxSI.mul_we) begin
        work_q[{CtrlxSI.mul_hi_pair, 1'b0}] <= mul_res[W-1:0];
        work_q[{CtrlxSI.mul_hi_pair, 1'b1}] <= mul_res[2*W-1:W];
      end
      if (CtrlxSI.reg_we) begin
        unique case (CtrlxSI.sel_wr)
          R_WORK0, R_WORK1, R_WORK2, R_WORK3: work_q[CtrlxSI.sel_wr[1:0]] <= result;
          R_BASEA: base_q[0] <= result;
          R_BASEB: base_q[1] <= result;
          R_BASEC: base_q[2] <= result;
          R_SP:    sp_q <= result;
          R_ACC0:  acc_q[W-1:0] <= result;
          R_ACC1:  acc_q[2*W-1:W] <= result;
          R_ACC2:  acc_q[3*W-1:2*W] <= result;
          default: ;   // PC handled above; State, MemOut, Zero are read-only
        endcase
      end
    end
  end
endmodule
