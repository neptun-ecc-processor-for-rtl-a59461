// neptun_alu: arithmetic-logic unit of the Neptun CPU.
//
// Every cycle the two operands are added, ANDed, ORed, XORed and shifted in
// parallel; SelRes picks one result for ResultxDO. Operand B passes the
// branch gate (forced to zero for a branch not taken) and an optional
// inverter (subtraction), and feeds both the adder and the logic unit.
// The shifter shifts operand A by the low four bits of operand B.
// Beside this sits the multiply-accumulate unit, which works on the
// accumulator value AccxDPI and returns its next value AccxDNO.
//
// Status flags: N and Z come from the selected result and are updated when
// flags_zn is set; C and V come from the adder and are updated when
// flags_cv is set. For ADDC/SUBC (use_old_zero) Z stays 1 only if it was
// 1 and the new result is zero, so a multi-word compare yields one Z flag.
// StatexDPI/StatexDNO carry the six status bits {~C, N^V, N, V, Z, C};
// bits 4 and 5 are derived from bits 0-3. Purely combinational.
// Structure, flag rules and the result multiplexer follow the design
// description; which instructions update which flags is an own choice.
module neptun_alu
  import neptun_pkg::*;
(
  input  ctrl_t              CtrlxSI,
  input  word_t              OperandAxDI,
  input  word_t              OperandBxDI,
  input  logic [5:0]         StatexDPI,
  input  logic [ACC_W-1:0]   AccxDPI,
  output word_t              ResultxDO,
  output logic [5:0]         StatexDNO,
  output logic [2*W-1:0]     MulResultxDO,
  output logic [ACC_W-1:0]   AccxDNO,
  output logic               BranchTakenxSO
);
  word_t opb_gated, opb, add_res, shift_res;
  logic  carry, ovf;
  logic  c_n, z_n, v_n, n_n;

  neptun_branch #(.WIDTH(W)) u_branch (
    .EnBranchxSI (CtrlxSI.en_branch),
    .BraIfHighxSI(CtrlxSI.bra_if_high),
    .BraStatexSI (CtrlxSI.bra_state),
    .StatexDI    (StatexDPI),
    .OffsetxDI   (OperandBxDI),
    .TakenxSO    (BranchTakenxSO),
    .OpBxDO      (opb_gated)
  );

  assign opb = CtrlxSI.en_branch ? opb_gated
                                 : (CtrlxSI.inv_b ? ~OperandBxDI : OperandBxDI);

  neptun_adder #(.WIDTH(W)) u_adder (
    .OpAxDI     (OperandAxDI),
    .OpBxDI     (opb),
    .CarryInxDI (StatexDPI[ST_C]),
    .UseCarryxSI(CtrlxSI.use_carry),
    .IncxSI     (CtrlxSI.inc),
    .ResultxDO  (add_res),
    .CarryOutxDO(carry),
    .OverflowxDO(ovf)
  );

  neptun_shifter #(.WIDTH(W)) u_shifter (
    .DataxDI      (OperandAxDI),
    .AmountxDI    (opb[$clog2(W)-1:0]),
    .ShiftLeftxSI (CtrlxSI.shift_left),
    .ShiftArithxSI(CtrlxSI.shift_arith),
    .ResultxDO    (shift_res)
  );

  neptun_mac #(.WIDTH(W)) u_mac (
    .OpAxDI      (OperandAxDI),
    .OpBxDI      (OperandBxDI),
    .EnMulxSI    (CtrlxSI.en_mul),
    .SelMulAccxSI(CtrlxSI.sel_mul_acc),
    .SubAccxSI   (CtrlxSI.sub_acc),
    .AccxDPI     (AccxDPI),
    .MulResultxDO(MulResultxDO),
    .AccxDNO     (AccxDNO)
  );

  always_comb begin
    unique case (CtrlxSI.sel_res)
      RES_AND:   ResultxDO = OperandAxDI & opb;
      RES_OR:    ResultxDO = OperandAxDI | opb;
      RES_XOR:   ResultxDO = OperandAxDI ^ opb;
      RES_SHIFT: ResultxDO = shift_res;
      default:   ResultxDO = add_res;
    endcase

    c_n = StatexDPI[ST_C];
    v_n = StatexDPI[ST_V];
    z_n = StatexDPI[ST_Z];
    n_n = StatexDPI[ST_N];
    if (CtrlxSI.flags_cv) begin
      c_n = carry;
      v_n = ovf;
    end
    if (CtrlxSI.flags_zn) begin
      n_n = ResultxDO[W-1];
      z_n = (ResultxDO == '0) & (~CtrlxSI.use_old_zero | StatexDPI[ST_Z]);
    end
    StatexDNO = {~c_n, n_n ^ v_n, n_n, v_n, z_n, c_n};
  end
endmodule
