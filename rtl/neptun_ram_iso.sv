// neptun_ram_iso: RAM macro with block isolation for scan testing.
//
// Wraps neptun_sram. Every RAM input (CS, WE, address, data in) also feeds
// a scan register; the registers form a chain from ScanInxTI through the
// data-in bits, the address bits, WE and CS to ScanOutxTO. With
// TestModexTI = 1 the RAM output is replaced by the data-in scan registers,
// so scan test observes the RAM inputs and controls its output; the RAM
// itself is tested separately (by the bootloader's RAM test).
// Register behaviour per cycle: ScanEnxTI = 1 shifts the chain; otherwise
// the registers load their RAM input ANDed with TestModexTI, so they stay
// at zero and do not toggle in normal operation.
// The structure and the AND gating follow the design description; the
// chain order within the data and address bits (LSB first) is own choice.
module neptun_ram_iso #(
  parameter int unsigned DEPTH = 5120,
  parameter int unsigned WIDTH = 16,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             ClkxCI,
  input  logic             CSxSBI,
  input  logic             WExSBI,
  input  logic [AW-1:0]    AddrxDI,
  input  logic [WIDTH-1:0] DataxDI,
  output logic [WIDTH-1:0] DataxDO,
  input  logic             TestModexTI,
  input  logic             ScanEnxTI,
  input  logic             ScanInxTI,
  output logic             ScanOutxTO
);
  localparam int unsigned N = WIDTH + AW + 2;

  logic [N-1:0]     chain_q;
  logic [WIDTH-1:0] ram_do;

  neptun_sram #(.DEPTH(DEPTH), .WIDTH(WIDTH), .AW(AW)) u_ram (
    .ClkxCI (ClkxCI),
    .CSxSBI (CSxSBI),
    .WExSBI (WExSBI),
    .AddrxDI(AddrxDI),
    .DataxDI(DataxDI),
    .DataxDO(ram_do)
  );

  always_ff @(posedge ClkxCI) begin
    if (ScanEnxTI) chain_q <= {chain_q[N-2:0], ScanInxTI};
    else           chain_q <= {CSxSBI, WExSBI, AddrxDI, DataxDI} & {N{TestModexTI}};
  end

  assign ScanOutxTO = chain_q[N-1];
  assign DataxDO    = TestModexTI ? chain_q[WIDTH-1:0] : ram_do;
endmodule
