// neptun_branch: branch decision and offset gating.
//
// The status bit chosen by BraStatexSI is compared with BraIfHighxSI; the
// branch is taken when they are equal and EnBranchxSI is set. The offset
// operand is passed to the adder when taken and forced to zero otherwise,
// so the adder (with Inc = 1) computes PC + offset + 1 or PC + 1: every
// branch takes exactly one cycle. Purely combinational.
// Selectable bits (own numbering): 0..5 the six status bits (C, Z, V, N,
// N xor V, not C), 6 constant 0, 7 constant 1 (unconditional branch).
module neptun_branch #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             EnBranchxSI,
  input  logic             BraIfHighxSI,
  input  logic [2:0]       BraStatexSI,
  input  logic [5:0]       StatexDI,
  input  logic [WIDTH-1:0] OffsetxDI,
  output logic             TakenxSO,
  output logic [WIDTH-1:0] OpBxDO
);
  logic [7:0] bits;
  always_comb begin
    bits     = {1'b1, 1'b0, StatexDI};
    TakenxSO = EnBranchxSI & (bits[BraStatexSI] == BraIfHighxSI);
    OpBxDO   = TakenxSO ? OffsetxDI : '0;
  end
endmodule
