// neptun_decoder: program-word decoder of the Neptun processor.
//
// Expands a 16-bit instruction into the control vector ctrl_t for the CPU.
// Bits [15:12] are the major opcode; the usual fields are Result [11:8],
// SelOpA [7:4], a sub-opcode bit [3] and SelOpB [2:0]. Memory instructions
// carry a 2-bit Base field [9:8] and a 4-bit offset [3:0]; the parallel
// instructions (MULACC_LD/ST, ADD_ST, ADDC_ST, SUB_ST, SUBC_ST) carry
// two 2-bit operand fields [7:6] and [5:4], and bit [10] ('R') of the
// *_ST instructions shifts the accumulator right by one word afterwards.
//
// The only multi-cycle instruction with state here is LDI: in its first
// cycle the decoder remembers the destination register, in the second the
// program word itself is the 16-bit constant written to that register.
// With PC as destination this is an absolute jump. CALL, RET, PUSH, POP,
// LDR are instruction sequences (Custom1/2/3 are the stack helpers).
// Unused encodings execute as no-operation (PC + 1).
//
// Interface: PWxDI is the program word of the current PC; CtrlxSO is
// combinational from PWxDI and the LDI state, which is updated on the
// rising edge of ClkxCI (active-low synchronous reset RstxRBI).
// Opcode layout follows the design's instruction-set table; the choice of
// codes for MOVNF (bits [3:0] = 1000), undefined encodings, the 2-bit
// operand maps (operand A: MemOut, Work1, Work2, Work3; operand B:
// Work0-3) and which instructions update flags are own choices.
module neptun_decoder
  import neptun_pkg::*;
(
  input  logic  ClkxCI,
  input  logic  RstxRBI,
  input  word_t PWxDI,
  output ctrl_t CtrlxSO,
  output logic  LdiDataxSO     // high in the constant cycle of LDI
);
  logic ldi_q;
  reg_e ldi_dest_q;

  function automatic reg_e opa2(input logic [1:0] f);
    return (f == 2'd0) ? R_MEM : reg_e'({2'b00, f});
  endfunction

  always_comb begin
    ctrl_t      c;
    logic [3:0] op;
    reg_e       res, sa;
    opb_e       sb;
    logic       b3;

    c   = CTRL_NOP;
    op  = PWxDI[15:12];
    res = reg_e'(PWxDI[11:8]);
    sa  = reg_e'(PWxDI[7:4]);
    sb  = opb_e'(PWxDI[2:0]);
    b3  = PWxDI[3];

    if (ldi_q) begin
      // second LDI cycle: the program word is the constant
      c.sel_a  = R_ZERO;
      c.b_imm  = 1'b1;
      c.imm    = PWxDI;
      c.reg_we = 1'b1;
      c.sel_wr = ldi_dest_q;
    end else begin
      unique case (opcode_e'(op))
        OP_ADD, OP_SUB: begin
          c.sel_a = sa; c.sel_b = sb; c.reg_we = 1'b1; c.sel_wr = res;
          c.sel_res = RES_ADD; c.flags_zn = 1'b1; c.flags_cv = 1'b1;
          c.use_carry = b3; c.use_old_zero = b3;
          c.inv_b = (op == OP_SUB); c.inc = (op == OP_SUB) & ~b3;
        end
        OP_ADDI, OP_SUBI: begin
          c.sel_a = res; c.b_imm = 1'b1; c.imm = {8'h00, PWxDI[7:0]};
          c.reg_we = 1'b1; c.sel_wr = res; c.sel_res = RES_ADD;
          c.flags_zn = 1'b1; c.flags_cv = 1'b1;
          c.inv_b = (op == OP_SUBI); c.inc = (op == OP_SUBI);
        end
        OP_ANDOR: begin
          c.sel_a = sa; c.sel_b = sb; c.reg_we = 1'b1; c.sel_wr = res;
          c.sel_res = b3 ? RES_OR : RES_AND; c.flags_zn = 1'b1;
        end
        OP_XORMV: begin
          c.sel_a = sa; c.reg_we = 1'b1; c.sel_wr = res;
          if (!b3) begin                                 // XOR
            c.sel_b = sb; c.sel_res = RES_XOR; c.flags_zn = 1'b1;
          end else if (PWxDI[2:0] == 3'b000) begin       // MOVNF
            c.sel_b = B_ZERO; c.sel_res = RES_OR;
          end else if (PWxDI[2:0] == 3'b010) begin       // MVN
            c.b_imm = 1'b1; c.imm = '1; c.sel_res = RES_XOR; c.flags_zn = 1'b1;
          end else begin                                 // LDI (111) or unused
            c.reg_we = 1'b0;
          end
        end
        OP_SHIFT: begin
          c.sel_a = sa; c.sel_b = sb; c.reg_we = 1'b1; c.sel_wr = res;
          c.sel_res = RES_SHIFT; c.shift_left = b3; c.flags_zn = 1'b1;
        end
        OP_CMPI: begin
          c.sel_a = res; c.b_imm = 1'b1; c.imm = {8'h00, PWxDI[7:0]};
          c.sel_res = RES_ADD; c.inv_b = 1'b1; c.inc = 1'b1;
          c.flags_zn = 1'b1; c.flags_cv = 1'b1;
        end
        OP_SHI: begin
          c.reg_we = 1'b1; c.sel_wr = res; c.b_imm = 1'b1;
          if (PWxDI[7]) begin                            // LDSI
            c.sel_a = R_ZERO; c.imm = {9'h000, PWxDI[6:0]}; c.sel_res = RES_OR;
          end else if (PWxDI[6:5] == 2'b00 || PWxDI[6:4] == 3'b010) begin
            c.sel_a = res; c.imm = {12'h000, PWxDI[3:0]}; c.sel_res = RES_SHIFT;
            c.shift_left = (PWxDI[6:4] == 3'b010);        // LSI
            c.shift_arith = (PWxDI[6:4] == 3'b001);       // ASRI
            c.flags_zn = 1'b1;
          end else begin
            c.reg_we = 1'b0;
          end
        end
        OP_BRA: begin
          c.sel_a = R_PC; c.b_imm = 1'b1; c.imm = {{8{PWxDI[7]}}, PWxDI[7:0]};
          c.en_branch = 1'b1; c.bra_if_high = PWxDI[11]; c.bra_state = PWxDI[10:8];
          c.sel_res = RES_ADD; c.inc = 1'b1; c.reg_we = 1'b1; c.sel_wr = R_PC;
        end
        OP_MULX: begin
          c.sel_a = sa; c.sel_b = sb;
          unique case (PWxDI[11:8])
            4'b0000: begin c.en_mul = 1'b1; c.mul_we = 1'b1; c.mul_hi_pair = b3; end // MUL
            4'b0010: begin c.en_mul = 1'b1; c.acc_we = 1'b1; c.sel_mul_acc = 1'b1; end // MULACC
            4'b0100: begin c.acc_we = 1'b1; end                                   // ADDACC
            4'b0101: begin c.acc_we = 1'b1; c.sub_acc = 1'b1; end                 // SUBACC
            4'b1000: begin c.acc_we = 1'b1; c.sel_mul_acc = 1'b1; c.acc_shift = 1'b1; end // RSACC
            4'b1001: begin                                 // Custom1: [SP+0] <- PC+4
              c.sel_a = R_PC; c.b_imm = 1'b1; c.imm = 16'd4; c.sel_res = RES_ADD;
              c.mem_en = 1'b1; c.mem_we = 1'b1; c.mem_base = BASE_SP; c.mem_rel = 4'd0;
            end
            4'b1010: begin                                 // Custom2: SP <- SP+1, load [SP+1]
              c.sel_a = R_SP; c.b_imm = 1'b1; c.imm = 16'd1; c.sel_res = RES_ADD;
              c.reg_we = 1'b1; c.sel_wr = R_SP;
              c.mem_en = 1'b1; c.mem_base = BASE_SP; c.mem_rel = 4'd1;
            end
            4'b1100: begin                                 // Custom3: SP <- SP-1
              c.sel_a = R_SP; c.b_imm = 1'b1; c.imm = 16'd1; c.sel_res = RES_ADD;
              c.inv_b = 1'b1; c.inc = 1'b1; c.reg_we = 1'b1; c.sel_wr = R_SP;
            end
            default: ;
          endcase
        end
        OP_MEM: begin
          c.mem_en = 1'b1; c.mem_base = base_e'(PWxDI[9:8]); c.mem_rel = PWxDI[3:0];
          unique case (PWxDI[11:10])
            2'b00: begin                                   // MOV_LD (LD if Res is Zero/None)
              c.sel_a = R_MEM; c.reg_we = 1'b1; c.sel_wr = sa;
            end
            2'b01: begin c.sel_a = sa; c.mem_we = 1'b1; end  // STR
            2'b10: begin c.sel_a = sa; c.acc_we = 1'b1; end  // ADDACC_LD
            default: begin c.sel_a = sa; c.acc_we = 1'b1; c.sub_acc = 1'b1; end // SUBACC_LD
          endcase
        end
        OP_ACCST: begin                                    // ADDACC_ST / SUBACC_ST
          c.sel_a = sa; c.acc_we = 1'b1; c.sub_acc = PWxDI[11]; c.acc_shift = PWxDI[10];
          c.mem_en = 1'b1; c.mem_we = 1'b1; c.mem_din_acc = 1'b1;
          c.mem_base = base_e'(PWxDI[9:8]); c.mem_rel = PWxDI[3:0];
        end
        OP_MACM: begin                                     // MULACC_LD / MULACC_ST
          c.sel_a = opa2(PWxDI[7:6]); c.sel_b = opb_e'({1'b0, PWxDI[5:4]});
          c.en_mul = 1'b1; c.acc_we = 1'b1; c.sel_mul_acc = 1'b1;
          c.mem_en = 1'b1; c.mem_base = base_e'(PWxDI[9:8]); c.mem_rel = PWxDI[3:0];
          if (PWxDI[11]) begin
            c.mem_we = 1'b1; c.mem_din_acc = 1'b1; c.acc_shift = PWxDI[10];
          end
        end
        default: begin                                     // ADD_ST .. SUBC_ST
          c.sel_a = opa2(PWxDI[7:6]); c.sel_b = opb_e'({1'b0, PWxDI[5:4]});
          c.sel_res = RES_ADD; c.flags_zn = 1'b1; c.flags_cv = 1'b1;
          c.use_carry = PWxDI[11]; c.use_old_zero = PWxDI[11];
          c.inv_b = (op == OP_SUBST); c.inc = (op == OP_SUBST) & ~PWxDI[11];
          c.mem_en = 1'b1; c.mem_we = 1'b1;
          c.mem_base = base_e'(PWxDI[9:8]); c.mem_rel = PWxDI[3:0];
          if (PWxDI[10]) begin                             // R: shift the accumulator
            c.acc_we = 1'b1; c.sel_mul_acc = 1'b1; c.acc_shift = 1'b1;
          end
        end
      endcase
    end
    CtrlxSO = c;
  end

  assign LdiDataxSO = ldi_q;

  always_ff @(posedge ClkxCI) begin
    if (!RstxRBI) begin
      ldi_q      <= 1'b0;
      ldi_dest_q <= R_NONE;
    end else begin
      ldi_q      <= ~ldi_q && (PWxDI[15:12] == OP_XORMV) && (PWxDI[3:0] == 4'b1111);
      ldi_dest_q <= reg_e'(PWxDI[11:8]);
    end
  end
endmodule
