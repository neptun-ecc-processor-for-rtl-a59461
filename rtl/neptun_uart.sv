// neptun_uart: EIA-232 asynchronous serial interface, memory mapped.
//
// Full duplex, 8 data bits, no parity, one stop bit, LSB first. Both
// directions are double buffered: a byte written to the transmit buffer is
// moved into the transmit shift register as soon as it is free, and a
// received byte is copied to the receive buffer while the next one is
// already being shifted in. The bit time is (divider + 1) clock cycles:
// a down-counter is loaded with the Clock Divider Register and a bit
// boundary occurs when it reaches zero (the clock itself is not divided).
// The receiver samples each bit in its middle, divider/2 cycles after the
// falling start edge and then every divider+1 cycles.
//
// Registers (offset from C000h): 0 Control (bit0 RX enable, bit1 TX enable),
// 1 Status (bit0 RX data ready, 1 frame error, 2 data overrun, 3 receiving,
// 4 transmitting, 5 TX buffer empty), 2 Transmit Buffer, 3 transmitted bit
// count, 4 TX clock counter, 5 Receive Buffer, 6 RX shift register,
// 7 RX clock counter, 8 Clock Divider. Reading the Receive Buffer clears
// "data ready"; reading Status clears the two error flags. Read data is
// registered (valid the cycle after the access).
// The register map, flags, double buffering and divider behaviour follow
// the design description; frame format, reset values (divider 0, both
// directions disabled) and when the error flags clear are own choices.
module neptun_uart
  import neptun_pkg::*;
(
  input  logic       ClkxCI,
  input  logic       RstxRBI,
  input  logic       SelxSI,
  input  logic       WExSI,
  input  logic [3:0] AddrxDI,
  input  word_t      WDataxDI,
  output word_t      RDataxDO,
  input  logic       RxxDI,
  output logic       TxxDO
);
  logic [1:0] ctrl_q;
  word_t      div_q, rd_q;
  // transmitter
  logic [7:0] txbuf_q;
  logic       txfull_q, txbusy_q;
  logic [9:0] txsh_q;
  logic [3:0] txbits_q;
  word_t      txcnt_q;
  // receiver
  logic [1:0] rxsync_q;
  logic       rxbusy_q, rxready_q, frame_err_q, data_err_q;
  logic [7:0] rxbuf_q, rxsh_q;
  logic [3:0] rxbits_q;
  word_t      rxcnt_q;

  logic rd, wr, tx_done, tx_load, rx_in;

  assign rd      = SelxSI & ~WExSI;
  assign wr      = SelxSI & WExSI;
  assign rx_in   = rxsync_q[1];
  assign tx_done = txbusy_q && txcnt_q == '0 && txbits_q == 4'd9;
  assign tx_load = ctrl_q[1] && txfull_q && (!txbusy_q || tx_done);

  always_ff @(posedge ClkxCI) begin
    if (!RstxRBI) begin
      ctrl_q <= '0; div_q <= '0; rd_q <= '0;
      txbuf_q <= '0; txfull_q <= 1'b0; txbusy_q <= 1'b0; txsh_q <= '1;
      txbits_q <= '0; txcnt_q <= '0;
      rxsync_q <= '1; rxbusy_q <= 1'b0; rxready_q <= 1'b0;
      frame_err_q <= 1'b0; data_err_q <= 1'b0;
      rxbuf_q <= '0; rxsh_q <= '0; rxbits_q <= '0; rxcnt_q <= '0;
    end else begin
      // ---------------- bus ----------------
      if (wr) begin
        unique case (AddrxDI)
          4'd0: ctrl_q <= WDataxDI[1:0];
          4'd2: begin txbuf_q <= WDataxDI[7:0]; txfull_q <= 1'b1; end
          4'd8: div_q <= WDataxDI;
          default: ;
        endcase
      end
      if (rd) begin
        unique case (AddrxDI)
          4'd0: rd_q <= {14'd0, ctrl_q};
          4'd1: rd_q <= {10'd0, ~txfull_q, txbusy_q, rxbusy_q, data_err_q, frame_err_q, rxready_q};
          4'd2: rd_q <= {8'd0, txbuf_q};
          4'd3: rd_q <= {12'd0, txbits_q};
          4'd4: rd_q <= txcnt_q;
          4'd5: rd_q <= {8'd0, rxbuf_q};
          4'd6: rd_q <= {8'd0, rxsh_q};
          4'd7: rd_q <= rxcnt_q;
          4'd8: rd_q <= div_q;
          default: rd_q <= '0;
        endcase
      end

      // ---------------- transmitter ----------------
      if (txbusy_q) begin
        if (txcnt_q == '0) begin
          txsh_q   <= {1'b1, txsh_q[9:1]};
          txbits_q <= txbits_q + 4'd1;
          txcnt_q  <= div_q;
          if (tx_done) txbusy_q <= 1'b0;
        end else begin
          txcnt_q <= txcnt_q - 16'd1;
        end
      end
      if (tx_load) begin
        txsh_q   <= {1'b1, txbuf_q, 1'b0};
        txbusy_q <= 1'b1;
        txbits_q <= '0;
        txcnt_q  <= div_q;
        // a buffer write in this very cycle refills the buffer
        if (!(wr && AddrxDI == 4'd2)) txfull_q <= 1'b0;
      end

      // ---------------- receiver ----------------
      rxsync_q <= {rxsync_q[0], RxxDI};
      if (rd && AddrxDI == 4'd5) rxready_q <= 1'b0;
      if (rd && AddrxDI == 4'd1) begin
        frame_err_q <= 1'b0;
        data_err_q  <= 1'b0;
      end
      if (!rxbusy_q) begin
        if (ctrl_q[0] && !rx_in) begin
          rxbusy_q <= 1'b1;
          rxbits_q <= '0;
          rxcnt_q  <= div_q >> 1;
        end
      end else if (rxcnt_q != '0) begin
        rxcnt_q <= rxcnt_q - 16'd1;
      end else begin
        rxcnt_q  <= div_q;
        rxbits_q <= rxbits_q + 4'd1;
        if (rxbits_q == 4'd0) begin
          if (rx_in) rxbusy_q <= 1'b0;          // glitch, not a start bit
        end else if (rxbits_q <= 4'd8) begin
          rxsh_q <= {rx_in, rxsh_q[7:1]};
        end else begin                          // stop bit
          rxbusy_q    <= 1'b0;
          rxbuf_q     <= rxsh_q;
          rxready_q   <= 1'b1;
          if (!rx_in) frame_err_q <= 1'b1;
          if (rxready_q && !(rd && AddrxDI == 4'd5)) data_err_q <= 1'b1;
        end
      end
    end
  end

  assign TxxDO    = txbusy_q ? txsh_q[0] : 1'b1;
  assign RDataxDO = rd_q;
endmodule
