// neptun_pkg: types and constants shared by the Neptun processor.
//
// Neptun is a 16-bit, non-pipelined Harvard processor for elliptic-curve
// signatures over NIST P-192. A 16-bit instruction is expanded by the
// instruction decoder into the control vector ctrl_t, which drives the CPU
// datapath for exactly one clock cycle.
//
// From the design description: the 16-bit word size, the register set
// (PC, SP, BaseA-C, Acc0-2, State, Work0-3), the opcode layout of the
// instruction set, the ALU result select (And/Or/Xor/Shift/Adder), the
// status bits (bit 4 = N xor V, bit 5 = not C) and the memory map.
// Own choices: the numeric codes of the registers other than SP (6) and
// PC (7), the 3-bit operand-B codes, the 2-bit operand codes of the
// parallel instructions, and the exact fields of ctrl_t (the original
// control vector is 76 bits wide, ctrl_t is narrower).
package neptun_pkg;

  localparam int unsigned W = 16;             // datapath word size
  localparam int unsigned ACC_W = 3 * W;      // accumulator Acc2:Acc1:Acc0

  typedef logic [W-1:0] word_t;

  // 4-bit register index, used for operand A and for the result register.
  typedef enum logic [3:0] {
    R_WORK0 = 4'd0,  R_WORK1 = 4'd1,  R_WORK2 = 4'd2,  R_WORK3 = 4'd3,
    R_BASEA = 4'd4,  R_BASEB = 4'd5,  R_SP    = 4'd6,  R_PC    = 4'd7,
    R_BASEC = 4'd8,  R_ACC0  = 4'd9,  R_ACC1  = 4'd10, R_ACC2  = 4'd11,
    R_STATE = 4'd12, R_MEM   = 4'd13, R_ZERO  = 4'd14, R_NONE  = 4'd15
  } reg_e;

  // 3-bit operand-B select (only the work registers and the memory result).
  typedef enum logic [2:0] {
    B_WORK0 = 3'd0, B_WORK1 = 3'd1, B_WORK2 = 3'd2, B_WORK3 = 3'd3,
    B_MEM   = 3'd4, B_ZERO  = 3'd5, B_ZERO6 = 3'd6, B_ZERO7 = 3'd7
  } opb_e;

  // Base register select of memory instructions.
  typedef enum logic [1:0] {
    BASE_A = 2'd0, BASE_B = 2'd1, BASE_C = 2'd2, BASE_SP = 2'd3
  } base_e;

  // ALU result select (numbering as printed on the ALU result multiplexer).
  typedef enum logic [2:0] {
    RES_AND = 3'd0, RES_OR = 3'd1, RES_XOR = 3'd2, RES_SHIFT = 3'd3, RES_ADD = 3'd4
  } res_e;

  // Status register bit positions.
  localparam int unsigned ST_C  = 0;  // carry
  localparam int unsigned ST_Z  = 1;  // zero
  localparam int unsigned ST_V  = 2;  // overflow
  localparam int unsigned ST_N  = 3;  // negative
  localparam int unsigned ST_LT = 4;  // N xor V
  localparam int unsigned ST_NC = 5;  // not C (borrow)

  // Major opcodes, instruction bits [15:12].
  typedef enum logic [3:0] {
    OP_ADD   = 4'h0, OP_SUB   = 4'h1, OP_ADDI  = 4'h2, OP_SUBI = 4'h3,
    OP_ANDOR = 4'h4, OP_XORMV = 4'h5, OP_SHIFT = 4'h6, OP_CMPI = 4'h7,
    OP_SHI   = 4'h8, OP_BRA   = 4'h9, OP_MULX  = 4'hA, OP_MEM  = 4'hB,
    OP_ACCST = 4'hC, OP_MACM  = 4'hD, OP_ADDST = 4'hE, OP_SUBST = 4'hF
  } opcode_e;

  // Control vector: everything the datapath needs for one cycle.
  typedef struct packed {
    reg_e   sel_a;          // operand A register
    logic   b_imm;          // operand B is the immediate below
    opb_e   sel_b;          // operand B register when b_imm = 0
    word_t  imm;            // immediate / constant operand
    res_e   sel_res;        // ALU result select
    logic   use_carry;      // adder carry-in from the carry flag
    logic   inc;            // adder carry-in = 1 when use_carry = 0
    logic   inv_b;          // invert operand B (subtraction)
    logic   shift_left;     // shifter direction
    logic   shift_arith;    // arithmetic right shift
    logic   en_branch;      // this is a branch
    logic   bra_if_high;    // branch when the selected bit is 1
    logic [2:0] bra_state;  // status bit tested by the branch
    logic   flags_zn;       // update Z and N
    logic   flags_cv;       // update C and V
    logic   use_old_zero;   // Z = old Z and (result == 0)  (ADDC/SUBC)
    logic   reg_we;         // write ALU result to register sel_wr
    reg_e   sel_wr;         // destination register
    logic   en_mul;         // enable the multiplier (operand isolation)
    logic   mul_we;         // write the 32-bit product to a work pair
    logic   mul_hi_pair;    // product to Work3:Work2 instead of Work1:Work0
    logic   acc_we;         // update the accumulator
    logic   sel_mul_acc;    // accumulate the product (else operand A)
    logic   sub_acc;        // subtract from the accumulator
    logic   acc_shift;      // shift the accumulator right by W after the op
    logic   mem_en;         // memory access this cycle
    logic   mem_we;         // the access is a write
    base_e  mem_base;       // base register of the address
    logic [3:0] mem_rel;    // 4-bit address offset
    logic   mem_din_acc;    // store Acc0 (next value) instead of the ALU result
  } ctrl_t;

  localparam ctrl_t CTRL_NOP = '{
    sel_a: R_ZERO, b_imm: 1'b0, sel_b: B_ZERO, imm: '0, sel_res: RES_OR,
    use_carry: 1'b0, inc: 1'b0, inv_b: 1'b0, shift_left: 1'b0,
    shift_arith: 1'b0, en_branch: 1'b0, bra_if_high: 1'b0, bra_state: 3'd0,
    flags_zn: 1'b0, flags_cv: 1'b0, use_old_zero: 1'b0, reg_we: 1'b0,
    sel_wr: R_NONE, en_mul: 1'b0, mul_we: 1'b0, mul_hi_pair: 1'b0,
    acc_we: 1'b0, sel_mul_acc: 1'b0, sub_acc: 1'b0, acc_shift: 1'b0,
    mem_en: 1'b0, mem_we: 1'b0, mem_base: BASE_A, mem_rel: 4'd0,
    mem_din_acc: 1'b0
  };

  // Memory map, selected by address bits [15:14].
  typedef enum logic [1:0] {
    REG_DATA = 2'b00, REG_CONST = 2'b01, REG_PROG = 2'b10, REG_MMIO = 2'b11
  } region_e;

  localparam word_t PROG_BASE = 16'h8000;  // first program-memory address

endpackage
