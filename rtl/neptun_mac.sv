// neptun_mac: multiplier and accumulator adder of the ALU.
//
// A W x W unsigned multiplier whose operands are held at zero unless
// EnMulxSI is set (operand isolation: the multiplier is the largest block
// and should not toggle for other instructions). Its 2W-bit product goes
// out on MulResultxDO (for MUL) and, selected by SelMulAccxSI, into a
// 3W-bit adder that adds it to or subtracts it from the accumulator.
// With SelMulAccxSI = 0 the zero-extended operand A is added or subtracted
// instead (ADDACC/SUBACC). Subtraction inverts the addend and sets the
// carry-in. AccxDNO is the combinational next accumulator value; the
// accumulator register and its 16-bit right shift live in the CPU.
// Structure follows the design description; widths follow the 48-bit
// accumulator of the CPU.
module neptun_mac #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0]   OpAxDI,
  input  logic [WIDTH-1:0]   OpBxDI,
  input  logic               EnMulxSI,
  input  logic               SelMulAccxSI,
  input  logic               SubAccxSI,
  input  logic [3*WIDTH-1:0] AccxDPI,
  output logic [2*WIDTH-1:0] MulResultxDO,
  output logic [3*WIDTH-1:0] AccxDNO
);
  logic [WIDTH-1:0]   mul_a, mul_b;
  logic [3*WIDTH-1:0] addend;

  always_comb begin
    mul_a        = EnMulxSI ? OpAxDI : '0;
    mul_b        = EnMulxSI ? OpBxDI : '0;
    MulResultxDO = mul_a * mul_b;
    addend       = SelMulAccxSI ? {{WIDTH{1'b0}}, MulResultxDO}
                                : {{(2*WIDTH){1'b0}}, OpAxDI};
    if (SubAccxSI) addend = ~addend;
    AccxDNO      = AccxDPI + addend + {{(3*WIDTH-1){1'b0}}, SubAccxSI};
  end
endmodule
