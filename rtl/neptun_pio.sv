// neptun_pio: parallel I/O port, memory mapped.
//
// Register 0 (C040h) is the 16-bit output register driving the output pins;
// it resets to 2000h so that the SPI chip-select pin (bit 13) is high right
// after reset. Register 1 (C041h, read only) is the input pins, sampled
// into a register every cycle. A read returns the addressed register one
// cycle after the access (registered read data, held until the next read).
// Register map and reset value follow the design description.
module neptun_pio
  import neptun_pkg::*;
(
  input  logic  ClkxCI,
  input  logic  RstxRBI,
  input  logic  SelxSI,
  input  logic  WExSI,
  input  logic  AddrxDI,
  input  word_t WDataxDI,
  output word_t RDataxDO,
  input  word_t InxDI,
  output word_t OutxDO
);
  word_t out_q, in_q, rd_q;

  always_ff @(posedge ClkxCI) begin
    if (!RstxRBI) begin
      out_q <= 16'h2000;
      in_q  <= '0;
      rd_q  <= '0;
    end else begin
      in_q <= InxDI;
      if (SelxSI && WExSI && !AddrxDI) out_q <= WDataxDI;
      if (SelxSI && !WExSI)            rd_q  <= AddrxDI ? in_q : out_q;
    end
  end

  assign OutxDO   = out_q;
  assign RDataxDO = rd_q;
endmodule
