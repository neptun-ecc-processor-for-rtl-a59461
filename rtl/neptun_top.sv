// neptun_top: the Neptun ECC processor chip.
//
// A 16-bit Harvard processor built for elliptic-curve signatures on NIST
// P-192 (word size 16, single-port RAMs, a 16 x 16 multiply-accumulate
// unit with a 48-bit accumulator). The program word of the current PC is
// expanded by the instruction decoder into a control vector that drives the
// non-pipelined CPU for one cycle; almost every instruction takes one
// cycle (LDI, JMP, LDR, PUSH, POP, RET: 2, CALL: 4).
//
// Program memory: bootloader look-up table at 0000h (not included here,
// its address and word are the ports BootAddrxDO / BootPWxDI) and a
// 5120 x 16 program RAM at 8000h. Data memory: 512 x 16 data RAM at 0000h,
// 512 x 16 constant RAM at 4000h, and registers at C000h: EIA-232 UART,
// 16-bit parallel output and input, three timers. The bootloader writes
// the program RAM through the data bus and then jumps or calls to 8000h.
// The three RAMs are block-isolated; their isolation registers form one
// scan chain ScanInxTI -> program RAM -> data RAM -> constant RAM ->
// ScanOutxTO (the scan chain of the remaining logic is tool-inserted).
//
// Clock ClkxCI, synchronous active-low reset RstxRBI; after reset the
// processor executes the bootloader from address 0, parallel output 13
// (SPI chip select) is high.
module neptun_top
  import neptun_pkg::*;
(
  input  logic        ClkxCI,
  input  logic        RstxRBI,
  // bootloader look-up table
  output logic [9:0]  BootAddrxDO,
  input  logic [15:0] BootPWxDI,
  // pins
  input  logic        SerialRXxDI,
  output logic        SerialTXxDO,
  input  logic [15:0] ParallelInxDI,
  output logic [15:0] ParallelOutxDO,
  input  logic        ScanEnxTI,
  input  logic        TestModexTI,
  input  logic        ScanInxTI,
  output logic        ScanOutxTO
);
  word_t pc_p, pc_n, pw, mem_addr, mem_din, mem_dout, prog_do;
  ctrl_t ctrl;
  logic  mem_en, mem_we, prog_en, prog_we, scan_mid;

  neptun_progmem u_progmem (
    .ClkxCI(ClkxCI), .PCxDP(pc_p), .PCxDN(pc_n),
    .BootAddrxDO(BootAddrxDO), .BootPWxDI(BootPWxDI), .PWxDO(pw),
    .BusEnxSI(prog_en), .BusWExSI(prog_we), .BusAddrxDI(mem_addr),
    .BusDataxDI(mem_din), .BusDataxDO(prog_do),
    .TestModexTI(TestModexTI), .ScanEnxTI(ScanEnxTI),
    .ScanInxTI(ScanInxTI), .ScanOutxTO(scan_mid)
  );

  neptun_decoder u_decoder (
    .ClkxCI(ClkxCI), .RstxRBI(RstxRBI), .PWxDI(pw), .CtrlxSO(ctrl),
    .LdiDataxSO()
  );

  neptun_cpu u_cpu (
    .ClkxCI(ClkxCI), .RstxRBI(RstxRBI), .CtrlxSI(ctrl),
    .PCxDP(pc_p), .PCxDN(pc_n),
    .MemAddrxD(mem_addr), .MemDataInxD(mem_din), .MemEnxS(mem_en),
    .MemWExS(mem_we), .MemDataOutxD(mem_dout), .BranchTakenxSO()
  );

  neptun_memory u_memory (
    .ClkxCI(ClkxCI), .RstxRBI(RstxRBI),
    .MemAddrxD(mem_addr), .MemDataInxD(mem_din), .MemEnxS(mem_en),
    .MemWExS(mem_we), .MemDataOutxD(mem_dout),
    .ProgEnxS(prog_en), .ProgWExS(prog_we), .ProgDataxD(prog_do),
    .SerialRXxDI(SerialRXxDI), .SerialTXxDO(SerialTXxDO),
    .ParallelInxDI(ParallelInxDI), .ParallelOutxDO(ParallelOutxDO),
    .TestModexTI(TestModexTI), .ScanEnxTI(ScanEnxTI),
    .ScanInxTI(scan_mid), .ScanOutxTO(ScanOutxTO)
  );
endmodule
