// neptun_shifter: W-bit logarithmic barrel shifter.
//
// log2(W) stages of multiplexers; stage k shifts by 2^k when bit k of the
// shift amount is set. Left shifts fill with zeros; right shifts fill with
// zeros, or with the sign bit when ShiftArithxSI is set. Rotation is not
// supported. Purely combinational. The stage structure and the three
// operations follow the design description; only the low log2(W) bits of
// the shift amount are used (own choice).
module neptun_shifter #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0]         DataxDI,
  input  logic [$clog2(WIDTH)-1:0] AmountxDI,
  input  logic                     ShiftLeftxSI,
  input  logic                     ShiftArithxSI,
  output logic [WIDTH-1:0]         ResultxDO
);
  localparam int unsigned STAGES = $clog2(WIDTH);

  logic [WIDTH-1:0] stage [STAGES+1];
  logic             fill;

  always_comb begin
    fill     = ShiftArithxSI & DataxDI[WIDTH-1] & ~ShiftLeftxSI;
    stage[0] = DataxDI;
    for (int unsigned k = 0; k < STAGES; k++) begin
      if (!AmountxDI[k])
        stage[k+1] = stage[k];
      else if (ShiftLeftxSI)
        stage[k+1] = stage[k] << (1 << k);
      else
        stage[k+1] = (stage[k] >> (1 << k)) | ({WIDTH{fill}} << (WIDTH - (1 << k)));
    end
    ResultxDO = stage[STAGES];
  end
endmodule
