// neptun_adder: the ALU's W-bit adder.
//
// A chain of full adders (written as one W+1-bit sum) whose carry-in comes
// from a multiplexer: UseCarry = 1 takes the old carry flag, UseCarry = 0
// takes the Inc input. Together with an inverted operand B this gives
//   ADD  A+B      (UseCarry 0, Inc 0)    ADDC A+B+C      (UseCarry 1)
//   SUB  A+~B+1   (UseCarry 0, Inc 1)    SUBC A+~B+C     (UseCarry 1)
// so the carry after a subtraction is the inverted borrow. Overflow is the
// XOR of the carries into and out of the top bit. Purely combinational.
// Structure, control table and carry convention follow the design
// description; the operand inversion happens outside this module.
module neptun_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] OpAxDI,
  input  logic [WIDTH-1:0] OpBxDI,
  input  logic             CarryInxDI,
  input  logic             UseCarryxSI,
  input  logic             IncxSI,
  output logic [WIDTH-1:0] ResultxDO,
  output logic             CarryOutxDO,
  output logic             OverflowxDO
);
  logic             cin;
  logic [WIDTH:0]   sum;
  logic [WIDTH-1:0] low;   // sum of the lower WIDTH-1 bits, for the carry into the MSB

  always_comb begin
    cin         = UseCarryxSI ? CarryInxDI : IncxSI;
    sum         = {1'b0, OpAxDI} + {1'b0, OpBxDI} + {{WIDTH{1'b0}}, cin};
    low         = {1'b0, OpAxDI[WIDTH-2:0]} + {1'b0, OpBxDI[WIDTH-2:0]} + {{(WIDTH-1){1'b0}}, cin};
    ResultxDO   = sum[WIDTH-1:0];
    CarryOutxDO = sum[WIDTH];
    OverflowxDO = sum[WIDTH] ^ low[WIDTH-1];
  end
endmodule
