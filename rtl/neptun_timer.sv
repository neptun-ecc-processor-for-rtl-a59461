// neptun_timer: 16-bit timer/counter with trigger input and output compare.
//
// The counter advances by one per clock cycle while the timer is enabled
// and counting (and, with TriggerCountWhenHigh, only while the trigger is
// high). Whenever it advances from a value equal to Compare Register A or B
// the selected compare action is applied to the output (set, clear,
// toggle); on a match with B it can also stop, or restart from zero
// (restart wins over stop), which gives PWM with period B + 1. A rising
// trigger edge can reset the counter (this wins over compare events).
// Writing the force bits of the control register (start, stop, reset
// counter) overrules everything in that cycle; they are not stored.
//
// Registers: 0 Control (bit0 Enable, 1 InvertExternalTrigger,
// 2 TriggerResetOnPosedge, 3 TriggerCountWhenHigh, 5:4 CompareA action,
// 7:6 CompareB action, 8 stop on B, 9 restart on B, 10 OverrideOutput,
// 12 StartCounting, 13 StopCounting, 14 ResetCounter), 1 Status
// (bit0 counting, bit1 output), 2 Counter, 3 Compare A, 4 Compare B.
// Read data is registered. OverridexSO tells the chip to drive the
// timer output on its parallel output pin.
// The register map and priorities follow the design description. Where the
// description of bit 9 says "Compare Register A" but names it for B, B is
// used; the exact cycle of compare events is own choice.
module neptun_timer
  import neptun_pkg::*;
(
  input  logic       ClkxCI,
  input  logic       RstxRBI,
  input  logic       SelxSI,
  input  logic       WExSI,
  input  logic [2:0] AddrxDI,
  input  word_t      WDataxDI,
  output word_t      RDataxDO,
  input  logic       TrigxDI,
  output logic       OutxDO,
  output logic       OverridexSO
);
  logic [10:0] ctrl_q;
  word_t       cnt_q, cmpa_q, cmpb_q, rd_q;
  logic        counting_q, out_q, trig_q;
  logic        trig, posedge_trig, tick, wr, rd;

  function automatic logic apply(input logic [1:0] act, input logic o);
    unique case (act)
      2'b01:   return 1'b1;
      2'b10:   return 1'b0;
      2'b11:   return ~o;
      default: return o;
    endcase
  endfunction

  always_comb begin
    wr           = SelxSI & WExSI;
    rd           = SelxSI & ~WExSI;
    trig         = TrigxDI ^ ctrl_q[1];
    posedge_trig = trig & ~trig_q;
    tick         = ctrl_q[0] & counting_q & (~ctrl_q[3] | trig);
  end

  always_ff @(posedge ClkxCI) begin
    if (!RstxRBI) begin
      ctrl_q <= '0; cnt_q <= '0; cmpa_q <= '0; cmpb_q <= '0; rd_q <= '0;
      counting_q <= 1'b0; out_q <= 1'b0; trig_q <= 1'b0;
    end else begin
      trig_q <= trig;
      // counting and compare events
      if (tick) begin
        logic o;
        o = out_q;
        if (cnt_q == cmpa_q) o = apply(ctrl_q[5:4], o);
        if (cnt_q == cmpb_q) o = apply(ctrl_q[7:6], o);
        out_q <= o;
        if (cnt_q == cmpb_q && ctrl_q[9])      cnt_q <= '0;
        else if (cnt_q == cmpb_q && ctrl_q[8]) counting_q <= 1'b0;
        else                                   cnt_q <= cnt_q + 16'd1;
      end
      if (ctrl_q[0] && ctrl_q[2] && posedge_trig) cnt_q <= '0;
      // bus
      if (wr) begin
        unique case (AddrxDI)
          3'd0: begin
            ctrl_q <= WDataxDI[10:0];
            if (WDataxDI[12]) counting_q <= 1'b1;
            if (WDataxDI[13]) counting_q <= 1'b0;
            if (WDataxDI[14]) cnt_q      <= '0;
          end
          3'd2: cnt_q  <= WDataxDI;
          3'd3: cmpa_q <= WDataxDI;
          3'd4: cmpb_q <= WDataxDI;
          default: ;
        endcase
      end
      if (rd) begin
        unique case (AddrxDI)
          3'd0: rd_q <= {5'd0, ctrl_q};
          3'd1: rd_q <= {14'd0, out_q, counting_q};
          3'd2: rd_q <= cnt_q;
          3'd3: rd_q <= cmpa_q;
          3'd4: rd_q <= cmpb_q;
          default: rd_q <= '0;
        endcase
      end
    end
  end

  assign OutxDO      = out_q;
  assign OverridexSO = ctrl_q[10];
  assign RDataxDO    = rd_q;
endmodule
