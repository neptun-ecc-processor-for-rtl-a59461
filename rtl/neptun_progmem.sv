// neptun_progmem: program memory of Neptun (bootloader port + program RAM).
//
// The 16-bit program address space has two parts. Addresses with bit 15 = 0
// hold the bootloader, a fixed look-up table addressed combinationally by
// the current PC (BootAddrxDO / BootPWxDI). Addresses 8000h and up hold the
// program RAM (5120 x 16). The RAM is synchronous, so it is addressed with
// the next PC (PCxDN): its output then belongs to the current PC.
// The program word for the decoder is the RAM output when PC >= 8000h and
// the bootloader word otherwise.
//
// While the bootloader runs (PC < 8000h) the program RAM is free for data
// accesses from the CPU's memory bus (BusEnxSI etc., addresses 8000h-93FFh),
// which is how a program is loaded. While a program runs from the RAM, bus
// accesses to it are ignored. A bus access takes the RAM port in the cycle
// it is issued; the bootloader must not issue one in the same cycle as the
// jump into the program (the next PC would not be fetched).
// The RAM sits in a block-isolation wrapper (scan ports).
// The partitioning, the PC/next-PC addressing and the access rule follow
// the design description; the collision rule is own choice.
module neptun_progmem
  import neptun_pkg::*;
#(
  parameter int unsigned PROG_DEPTH = 5120,
  parameter int unsigned BOOT_AW    = 10
) (
  input  logic               ClkxCI,
  input  word_t              PCxDP,
  input  word_t              PCxDN,
  output logic [BOOT_AW-1:0] BootAddrxDO,
  input  word_t              BootPWxDI,
  output word_t              PWxDO,
  input  logic               BusEnxSI,
  input  logic               BusWExSI,
  input  word_t              BusAddrxDI,
  input  word_t              BusDataxDI,
  output word_t              BusDataxDO,
  input  logic               TestModexTI,
  input  logic               ScanEnxTI,
  input  logic               ScanInxTI,
  output logic               ScanOutxTO
);
  localparam int unsigned AW = $clog2(PROG_DEPTH);

  logic  bus_ok, fetch, cs, we;
  word_t ofs;
  word_t ram_do;

  always_comb begin
    bus_ok = BusEnxSI & ~PCxDP[15];
    fetch  = PCxDN[15];
    ofs    = bus_ok ? (BusAddrxDI - PROG_BASE) : (PCxDN - PROG_BASE);
    cs     = (bus_ok | fetch) && (ofs < word_t'(PROG_DEPTH));
    we     = bus_ok & BusWExSI;
  end

  neptun_ram_iso #(.DEPTH(PROG_DEPTH), .WIDTH(W), .AW(AW)) u_ram (
    .ClkxCI     (ClkxCI),
    .CSxSBI     (~cs),
    .WExSBI     (~we),
    .AddrxDI    (ofs[AW-1:0]),
    .DataxDI    (BusDataxDI),
    .DataxDO    (ram_do),
    .TestModexTI(TestModexTI),
    .ScanEnxTI  (ScanEnxTI),
    .ScanInxTI  (ScanInxTI),
    .ScanOutxTO (ScanOutxTO)
  );

  assign BootAddrxDO = PCxDP[BOOT_AW-1:0];
  assign PWxDO       = PCxDP[15] ? ram_do : BootPWxDI;
  assign BusDataxDO  = ram_do;
endmodule
