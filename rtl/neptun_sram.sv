// neptun_sram: synchronous single-port RAM (model of a RAM macro).
//
// One access per cycle, active-low chip select and write enable as on the
// memory-compiler macros: with CSxSBI = 0 the word at AddrxDI is written
// (WExSBI = 0) or read (WExSBI = 1) on the rising clock edge. A read word
// appears on DataxDO after that edge and is held until the next read, so
// it is "the result of the last memory access" the CPU can consume in the
// following cycle. Addresses at or above DEPTH are ignored. Contents are
// not reset (a macro is not). Written as an array so that synthesis can
// map it to a memory; sizes default to the Neptun program RAM (5120 x 16),
// the data and constant RAMs are 512 x 16.
module neptun_sram #(
  parameter int unsigned DEPTH = 5120,
  parameter int unsigned WIDTH = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             ClkxCI,
  input  logic             CSxSBI,
  input  logic             WExSBI,
  input  logic [AW-1:0]    AddrxDI,
  input  logic [WIDTH-1:0] DataxDI,
  output logic [WIDTH-1:0] DataxDO
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge ClkxCI) begin
    if (!CSxSBI && int'(AddrxDI) < int'(DEPTH)) begin
      if (!WExSBI) mem[AddrxDI] <= DataxDI;
      else         DataxDO      <= mem[AddrxDI];
    end
  end
endmodule
