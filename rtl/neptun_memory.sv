// neptun_memory: data-memory system of Neptun (chip-select decode, data
// RAM, constant RAM, memory-mapped peripherals, read-data multiplexer).
//
// The CPU's single memory bus is decoded by address bits [15:14]:
//   00  Data RAM      0000h-01FFh (512 x 16)
//   01  Constant RAM  4000h-41FFh (512 x 16)
//   10  Program RAM   8000h-93FFh (forwarded to the program memory)
//   11  Registers     C000h-FFFFh: EIA-232 at C000h, parallel I/O at C040h,
//                     Timer0/1/2 at C080h/C0C0h/C100h (address bits [8:6]).
// Every source delivers its read data one cycle after the access. The
// region of the last access is registered and selects the read data, so
// MemDataOutxD always shows the result of the last memory access and holds
// it until the next one; after a write it shows the written word.
// Timer outputs replace parallel outputs 9, 10, 11 when the timer's
// OverrideOutput bit is set; parallel inputs 9, 10, 11 are the timer
// triggers. The two RAMs sit in block-isolation wrappers whose scan
// chains are connected in series (ScanInxTI -> data RAM -> constant RAM ->
// ScanOutxTO).
// The memory map and peripheral addresses follow the design description;
// the write-through view of MemDataOutxD and the treatment of unmapped
// addresses (writes ignored, reads return 0) are own choices.
module neptun_memory
  import neptun_pkg::*;
#(
  parameter int unsigned DATA_DEPTH  = 512,
  parameter int unsigned CONST_DEPTH = 512
) (
  input  logic  ClkxCI,
  input  logic  RstxRBI,
  // CPU bus
  input  word_t MemAddrxD,
  input  word_t MemDataInxD,
  input  logic  MemEnxS,
  input  logic  MemWExS,
  output word_t MemDataOutxD,
  // program-memory bus
  output logic  ProgEnxS,
  output logic  ProgWExS,
  input  word_t ProgDataxD,
  // pins
  input  logic  SerialRXxDI,
  output logic  SerialTXxDO,
  input  word_t ParallelInxDI,
  output word_t ParallelOutxDO,
  // block-isolation scan chain
  input  logic  TestModexTI,
  input  logic  ScanEnxTI,
  input  logic  ScanInxTI,
  output logic  ScanOutxTO
);
  localparam int unsigned DAW = $clog2(DATA_DEPTH);
  localparam int unsigned CAW = $clog2(CONST_DEPTH);

  region_e region, region_q;
  logic    wrote_q;
  word_t   wdata_q;
  logic    cs_data, cs_const, cs_uart, cs_pio;
  logic [2:0] cs_tim;
  logic [2:0] per_q;
  logic    rd_ok_q;
  word_t   data_do, const_do, uart_do, pio_do, tim_do [3], pio_out, per_do;
  logic [2:0] tim_out, tim_ovr;
  logic    scan_mid;

  always_comb begin
    region   = region_e'(MemAddrxD[15:14]);
    cs_data  = MemEnxS && region == REG_DATA;
    cs_const = MemEnxS && region == REG_CONST;
    ProgEnxS = MemEnxS && region == REG_PROG;
    ProgWExS = MemWExS;
    cs_uart  = MemEnxS && region == REG_MMIO && MemAddrxD[13:6] == 8'd0;
    cs_pio   = MemEnxS && region == REG_MMIO && MemAddrxD[13:6] == 8'd1;
    for (int i = 0; i < 3; i++)
      cs_tim[i] = MemEnxS && region == REG_MMIO && MemAddrxD[13:6] == 8'(i + 2);
  end

  neptun_ram_iso #(.DEPTH(DATA_DEPTH), .WIDTH(W), .AW(DAW)) u_data_ram (
    .ClkxCI(ClkxCI), .CSxSBI(~cs_data), .WExSBI(~MemWExS),
    .AddrxDI(MemAddrxD[DAW-1:0]), .DataxDI(MemDataInxD), .DataxDO(data_do),
    .TestModexTI(TestModexTI), .ScanEnxTI(ScanEnxTI),
    .ScanInxTI(ScanInxTI), .ScanOutxTO(scan_mid)
  );

  neptun_ram_iso #(.DEPTH(CONST_DEPTH), .WIDTH(W), .AW(CAW)) u_const_ram (
    .ClkxCI(ClkxCI), .CSxSBI(~cs_const), .WExSBI(~MemWExS),
    .AddrxDI(MemAddrxD[CAW-1:0]), .DataxDI(MemDataInxD), .DataxDO(const_do),
    .TestModexTI(TestModexTI), .ScanEnxTI(ScanEnxTI),
    .ScanInxTI(scan_mid), .ScanOutxTO(ScanOutxTO)
  );

  neptun_uart u_uart (
    .ClkxCI(ClkxCI), .RstxRBI(RstxRBI), .SelxSI(cs_uart), .WExSI(MemWExS),
    .AddrxDI(MemAddrxD[3:0]), .WDataxDI(MemDataInxD), .RDataxDO(uart_do),
    .RxxDI(SerialRXxDI), .TxxDO(SerialTXxDO)
  );

  neptun_pio u_pio (
    .ClkxCI(ClkxCI), .RstxRBI(RstxRBI), .SelxSI(cs_pio), .WExSI(MemWExS),
    .AddrxDI(MemAddrxD[0]), .WDataxDI(MemDataInxD), .RDataxDO(pio_do),
    .InxDI(ParallelInxDI), .OutxDO(pio_out)
  );

  for (genvar i = 0; i < 3; i++) begin : g_timer
    neptun_timer u_timer (
      .ClkxCI(ClkxCI), .RstxRBI(RstxRBI), .SelxSI(cs_tim[i]), .WExSI(MemWExS),
      .AddrxDI(MemAddrxD[2:0]), .WDataxDI(MemDataInxD), .RDataxDO(tim_do[i]),
      .TrigxDI(ParallelInxDI[9+i]), .OutxDO(tim_out[i]), .OverridexSO(tim_ovr[i])
    );
  end

  always_comb begin
    ParallelOutxDO = pio_out;
    for (int i = 0; i < 3; i++)
      if (tim_ovr[i]) ParallelOutxDO[9+i] = tim_out[i];
  end

  // remember what the last access was
  always_ff @(posedge ClkxCI) begin
    if (!RstxRBI) begin
      region_q <= REG_DATA;
      wrote_q  <= 1'b1;
      wdata_q  <= '0;
      per_q    <= '0;
      rd_ok_q  <= 1'b0;
    end else if (MemEnxS) begin
      region_q <= region;
      wrote_q  <= MemWExS;
      wdata_q  <= MemDataInxD;
      per_q    <= MemAddrxD[8:6];
      rd_ok_q  <= region != REG_MMIO || MemAddrxD[13:9] == 5'd0;
    end
  end

  always_comb begin
    unique case (per_q)
      3'd0:    per_do = uart_do;
      3'd1:    per_do = pio_do;
      3'd2:    per_do = tim_do[0];
      3'd3:    per_do = tim_do[1];
      3'd4:    per_do = tim_do[2];
      default: per_do = '0;
    endcase
    if (wrote_q)      MemDataOutxD = wdata_q;
    else if (!rd_ok_q) MemDataOutxD = '0;
    else begin
      unique case (region_q)
        REG_DATA:  MemDataOutxD = data_do;
        REG_CONST: MemDataOutxD = const_do;
        REG_PROG:  MemDataOutxD = ProgDataxD;
        default:   MemDataOutxD = per_do;
      endcase
    end
  end
endmodule
