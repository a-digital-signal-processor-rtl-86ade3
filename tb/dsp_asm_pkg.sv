// dsp_asm_pkg: instruction builders for the DSP testbenches.
//
// Each function returns one 28-bit instruction word in the encoding defined
// in dsp_pkg, so test programs read like assembly: ldi(PAM(0), 16'd4),
// comp(OP_ADD, D0, AM(0), BM(1)), ...
package dsp_asm_pkg;
  import dsp_pkg::*;

  // operand codes
  function automatic logic [5:0] AM(input int i);  return 6'(i);      endfunction  // *Am<i>
  function automatic logic [5:0] BM(input int i);  return 6'(8 + i);  endfunction  // *Bm<i>
  function automatic logic [5:0] PAM(input int i); return 6'(24 + i); endfunction  // Am<i> register
  function automatic logic [5:0] PBM(input int i); return 6'(32 + i); endfunction  // Bm<i> register
  function automatic logic [5:0] IA(input int i);  return 6'(40 + i); endfunction
  function automatic logic [5:0] IB(input int i);  return 6'(48 + i); endfunction
  localparam logic [5:0] D0 = 6'd16, D1 = 6'd17, T = 6'd18, SRA = 6'd19, COUNT = 6'd20,
                         SR0 = 6'd21, SR1 = 6'd22, FLG = 6'd23,
                         SB0 = 6'd56, CB0 = 6'd57, SB1 = 6'd58, CB1 = 6'd59, IMR = 6'd60;

  function automatic instr_t comp(input opcode_e op, input logic [5:0] d, input logic [5:0] x,
                                  input logic [5:0] y, input bit u = 0);
    return {op, d[4:0], x[4:0], y[4:0], 1'b0, 3'd0, u, 1'b0};
  endfunction
  // X,Y,A,B form: high result to *Am<a>, low result to *Bm<b>
  function automatic instr_t comp_ab(input opcode_e op, input logic [5:0] x, input logic [5:0] y,
                                     input int a, input int b, input bit u = 0);
    return {op, 2'b00, 3'(a), x[4:0], y[4:0], 1'b1, 3'(b), u, 1'b0};
  endfunction
  function automatic instr_t sft(input opcode_e op, input logic [5:0] d, input logic [5:0] x,
                                 input int s);
    return {op, d[4:0], x[4:0], 6'(s), 5'd0};
  endfunction
  function automatic instr_t ldi(input logic [5:0] dst, input logic [15:0] imm);
    return {6'b111000, dst, imm};
  endfunction
  function automatic instr_t mv(input logic [5:0] src, input logic [5:0] dst);
    return {OP_MV, src, dst, 9'd0};
  endfunction
  function automatic instr_t dld(input int a, input int b, input logic [5:0] x, input logic [5:0] y);
    return {OP_DLD, 3'(a), 3'(b), x[4:0], y[4:0], 5'd0};
  endfunction
  function automatic instr_t dst(input logic [5:0] x, input logic [5:0] y, input int a, input int b);
    return {OP_DST, x[4:0], y[4:0], 3'(a), 3'(b), 5'd0};
  endfunction
  function automatic instr_t io_in(input logic [5:0] mem, input logic [15:0] addr);
    return {OP_IN, 1'b0, mem[3:0], addr};
  endfunction
  function automatic instr_t io_out(input logic [5:0] mem, input logic [15:0] addr);
    return {OP_OUT, 1'b0, mem[3:0], addr};
  endfunction
  function automatic instr_t jump(input int a);  return {OP_JUMP, 5'd0, 16'(a)};  endfunction
  function automatic instr_t call(input int a);  return {OP_CALL, 5'd0, 16'(a)};  endfunction
  function automatic instr_t do_(input int a);   return {OP_DO, 5'd0, 16'(a)};    endfunction
  function automatic instr_t setct(input int n); return {OP_SETCT, 5'd0, 16'(n)}; endfunction
  function automatic instr_t ret();              return {OP_RET, 21'd0};          endfunction
  function automatic instr_t reti();             return {OP_RETI, 21'd0};         endfunction
  function automatic instr_t nop();              return {OP_NOP, 21'd0};          endfunction
  function automatic instr_t test(input logic [5:0] x, input int n, input bit z = 0);
    return {z ? OP_TESTZ : OP_TEST, x[4:0], 6'(n), 10'd0};
  endfunction
  function automatic instr_t acs(input int a, input int b, input logic [5:0] a1,
                                 input logic [5:0] b1, input bit tsel, input bit bvar = 0);
    return {bvar ? OP_ACSB : OP_ACS, 3'(a), 3'(b), a1[3:0], b1[3:0], tsel, 6'd0};
  endfunction
  function automatic instr_t cfgtrc(input logic [5:0] mem, input int num);
    return {OP_CFGTRC, 1'b0, mem[3:0], 13'd0, 3'(num)};
  endfunction
  function automatic instr_t trcbk(input logic [5:0] mem);
    return {OP_TRCBK, 1'b0, mem[3:0], 16'd0};
  endfunction
endpackage
