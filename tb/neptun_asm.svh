// neptun_asm.svh: instruction encoders for Neptun test programs.
// Included inside testbench modules that import neptun_pkg. Each function
// returns one 16-bit program word in the layout decoded by neptun_decoder.
// Register codes: reg_e of neptun_pkg; operand B codes: opb_e; base: base_e.
// The 2-bit operands of the parallel instructions: A 0=MemOut 1..3=Work1..3,
// B 0..3 = Work0..3.

function automatic logic [15:0] a_rrr(input logic [3:0] op, input reg_e r, input reg_e x,
                                      input logic s, input opb_e y);
  return {op, 4'(r), 4'(x), s, 3'(y)};
endfunction
function automatic logic [15:0] i_ADD (input reg_e r, input reg_e x, input opb_e y); return a_rrr(4'h0, r, x, 0, y); endfunction
function automatic logic [15:0] i_ADDC(input reg_e r, input reg_e x, input opb_e y); return a_rrr(4'h0, r, x, 1, y); endfunction
function automatic logic [15:0] i_SUB (input reg_e r, input reg_e x, input opb_e y); return a_rrr(4'h1, r, x, 0, y); endfunction
function automatic logic [15:0] i_SUBC(input reg_e r, input reg_e x, input opb_e y); return a_rrr(4'h1, r, x, 1, y); endfunction
function automatic logic [15:0] i_CMP (input reg_e x, input opb_e y); return a_rrr(4'h1, R_NONE, x, 0, y); endfunction
function automatic logic [15:0] i_CMPC(input reg_e x, input opb_e y); return a_rrr(4'h1, R_NONE, x, 1, y); endfunction
function automatic logic [15:0] i_AND (input reg_e r, input reg_e x, input opb_e y); return a_rrr(4'h4, r, x, 0, y); endfunction
function automatic logic [15:0] i_OR  (input reg_e r, input reg_e x, input opb_e y); return a_rrr(4'h4, r, x, 1, y); endfunction
function automatic logic [15:0] i_XOR (input reg_e r, input reg_e x, input opb_e y); return a_rrr(4'h5, r, x, 0, y); endfunction
function automatic logic [15:0] i_RS  (input reg_e r, input reg_e x, input opb_e y); return a_rrr(4'h6, r, x, 0, y); endfunction
function automatic logic [15:0] i_LS  (input reg_e r, input reg_e x, input opb_e y); return a_rrr(4'h6, r, x, 1, y); endfunction
function automatic logic [15:0] i_MOVNF(input reg_e r, input reg_e x); return {4'h5, 4'(r), 4'(x), 4'b1000}; endfunction
function automatic logic [15:0] i_MOV  (input reg_e r, input reg_e x); return i_OR(r, x, B_ZERO); endfunction
function automatic logic [15:0] i_MVN  (input reg_e r, input reg_e x); return {4'h5, 4'(r), 4'(x), 4'b1010}; endfunction
function automatic logic [15:0] i_LDI  (input reg_e r); return {4'h5, 4'(r), 4'b0000, 4'b1111}; endfunction
function automatic logic [15:0] i_ADDI (input reg_e r, input logic [7:0] k); return {4'h2, 4'(r), k}; endfunction
function automatic logic [15:0] i_SUBI (input reg_e r, input logic [7:0] k); return {4'h3, 4'(r), k}; endfunction
function automatic logic [15:0] i_CMPI (input reg_e x, input logic [7:0] k); return {4'h7, 4'(x), k}; endfunction
function automatic logic [15:0] i_RSI  (input reg_e r, input logic [3:0] k); return {4'h8, 4'(r), 4'b0000, k}; endfunction
function automatic logic [15:0] i_ASRI (input reg_e r, input logic [3:0] k); return {4'h8, 4'(r), 4'b0001, k}; endfunction
function automatic logic [15:0] i_LSI  (input reg_e r, input logic [3:0] k); return {4'h8, 4'(r), 4'b0010, k}; endfunction
function automatic logic [15:0] i_LDSI (input reg_e r, input logic [6:0] k); return {4'h8, 4'(r), 1'b1, k}; endfunction
// condition: {BraIfHigh, status bit}; offset relative to PC+1
function automatic logic [15:0] i_BRA  (input logic high, input logic [2:0] bitsel, input logic [7:0] off);
  return {4'h9, high, bitsel, off};
endfunction
function automatic logic [15:0] i_MUL   (input reg_e x, input opb_e y, input logic hi); return {4'hA, 4'b0000, 4'(x), hi, 3'(y)}; endfunction
function automatic logic [15:0] i_MULACC(input reg_e x, input opb_e y); return {4'hA, 4'b0010, 4'(x), 1'b0, 3'(y)}; endfunction
function automatic logic [15:0] i_ADDACC(input reg_e x); return {4'hA, 4'b0100, 4'(x), 4'b0000}; endfunction
function automatic logic [15:0] i_SUBACC(input reg_e x); return {4'hA, 4'b0101, 4'(x), 4'b0000}; endfunction
function automatic logic [15:0] i_RSACC (); return 16'hA800; endfunction
function automatic logic [15:0] i_CUSTOM1(); return 16'hA976; endfunction
function automatic logic [15:0] i_CUSTOM2(); return 16'hAA60; endfunction
function automatic logic [15:0] i_CUSTOM3(); return 16'hAC60; endfunction
function automatic logic [15:0] i_MOV_LD (input base_e b, input reg_e r, input logic [3:0] rel); return {4'hB, 2'b00, 2'(b), 4'(r), rel}; endfunction
function automatic logic [15:0] i_LD     (input base_e b, input logic [3:0] rel); return i_MOV_LD(b, R_NONE, rel); endfunction
function automatic logic [15:0] i_STR    (input base_e b, input reg_e x, input logic [3:0] rel); return {4'hB, 2'b01, 2'(b), 4'(x), rel}; endfunction
function automatic logic [15:0] i_ADDACC_LD(input base_e b, input reg_e x, input logic [3:0] rel); return {4'hB, 2'b10, 2'(b), 4'(x), rel}; endfunction
function automatic logic [15:0] i_SUBACC_LD(input base_e b, input reg_e x, input logic [3:0] rel); return {4'hB, 2'b11, 2'(b), 4'(x), rel}; endfunction
function automatic logic [15:0] i_ADDACC_ST(input logic r, input base_e b, input reg_e x, input logic [3:0] rel); return {4'hC, 1'b0, r, 2'(b), 4'(x), rel}; endfunction
function automatic logic [15:0] i_SUBACC_ST(input logic r, input base_e b, input reg_e x, input logic [3:0] rel); return {4'hC, 1'b1, r, 2'(b), 4'(x), rel}; endfunction
function automatic logic [15:0] i_MULACC_LD(input base_e b, input logic [1:0] x, input logic [1:0] y, input logic [3:0] rel); return {4'hD, 2'b00, 2'(b), x, y, rel}; endfunction
function automatic logic [15:0] i_MULACC_ST(input logic r, input base_e b, input logic [1:0] x, input logic [1:0] y, input logic [3:0] rel); return {4'hD, 1'b1, r, 2'(b), x, y, rel}; endfunction
function automatic logic [15:0] i_ADD_ST (input logic r, input base_e b, input logic [1:0] x, input logic [1:0] y, input logic [3:0] rel); return {4'hE, 1'b0, r, 2'(b), x, y, rel}; endfunction
function automatic logic [15:0] i_ADDC_ST(input logic r, input base_e b, input logic [1:0] x, input logic [1:0] y, input logic [3:0] rel); return {4'hE, 1'b1, r, 2'(b), x, y, rel}; endfunction
function automatic logic [15:0] i_SUB_ST (input logic r, input base_e b, input logic [1:0] x, input logic [1:0] y, input logic [3:0] rel); return {4'hF, 1'b0, r, 2'(b), x, y, rel}; endfunction
function automatic logic [15:0] i_SUBC_ST(input logic r, input base_e b, input logic [1:0] x, input logic [1:0] y, input logic [3:0] rel); return {4'hF, 1'b1, r, 2'(b), x, y, rel}; endfunction
