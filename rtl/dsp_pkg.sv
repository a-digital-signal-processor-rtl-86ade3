// dsp_pkg: types and constants shared by the symbol-rate DSP.
//
// The DSP is a modified Harvard machine: a 28-bit program word, two 16-bit data
// memories and a 40-bit datapath (ALU, CMP, MAC, SFT), as the architecture
// defines. The binary instruction encoding below is this design's own: the
// architecture fixes the instruction word length (28 bits), the mnemonics and
// their semantics, not the bit layout.
//
// Operand code space ("S-space", 6 bits). Computational instructions use the
// 5-bit subset 0..23 ("C-space").
//   0..7   *Am0..*Am7  data memory 0 at pointer Am<i>, pointer post-modified
//   8..15  *Bm0..*Bm7  data memory 1 at pointer Bm<i>, pointer post-modified
//   16 D0, 17 D1 (40-bit), 18 T, 19 SRA, 20 COUNT, 21 SR0 (ACS transition bits),
//   22 SR1 (decoded bits), 23 FLG (comparator flags)
//   24..31 Am0..Am7 pointer registers, 32..39 Bm0..Bm7 pointer registers,
//   40..47 IA0..IA7, 48..55 IB0..IB7 (post-modify increments),
//   56 SB0, 57 CB0, 58 SB1, 59 CB1 (circular buffer base and length per AG),
//   60 IMR (interrupt mask, bit i enables interrupt i)
//
// Instruction fields (bit 27 is the MSB):
//   op     [27:21]
//   comp   d[20:16] x[15:11] y[10:6] dual[5] b[4:2] u[1]
//          dual=1: results go to memory, high half to *Am<d[2:0]>, low half
//          to *Bm<b>. SFT: signed shift amount s = [10:5] (left if positive).
//   LDI    dst6 = [21:16] (the opcode's LSB is dst6[5]), imm16 = [15:0]
//   MV     src6 [20:15], dst6 [14:9]  (LD/ST/MV/STI all encode as MV)
//   DLD    a[20:18] b[17:15] x[14:10] y[9:5]   X=Mem(Am<a>), Y=Mem(Bm<b>)
//   DST    x[20:16] y[15:11] a[10:8] b[7:5]     Mem(Am<a>)=X, Mem(Bm<b>)=Y
//   IN     mem[19:16] ioaddr[15:0]               Mem(mem)=IO_data
//   OUT    mem[19:16] ioaddr[15:0]               IO_data=Mem(mem)
//   JUMP/CALL/DO/SETCT imm16 [15:0]
//   TEST/TESTZ x[20:16] num[15:10]
//   ACS/ACSB a[20:18] b[17:15] a1[14:11] b1[10:7] tsel[6]
//   CFGTRC mem[19:16] num[2:0]
//   TRCBK  mem[19:16]  (transition table pointer, offset by SRA's upper bits)
package dsp_pkg;

  localparam int unsigned DW   = 40;  // datapath / accumulator width
  localparam int unsigned MW   = 16;  // data memory word
  localparam int unsigned IW   = 28;  // instruction word
  localparam int unsigned AW   = 16;  // address space of every memory
  localparam int unsigned NIRQ = 5;   // interrupt vectors

  typedef logic [DW-1:0] word40_t;
  typedef logic [MW-1:0] word16_t;
  typedef logic [IW-1:0] instr_t;

  typedef enum logic [6:0] {
    // ALU
    OP_NOP      = 7'h00,
    OP_ABD      = 7'h01, OP_ABD16  = 7'h02, OP_ABD8    = 7'h03, OP_ABS     = 7'h04,
    OP_ADD      = 7'h05, OP_ADD16  = 7'h06, OP_ADD8    = 7'h07,
    OP_SUB      = 7'h08, OP_SUB16  = 7'h09, OP_SUB8    = 7'h0A,
    OP_ADDSUB8  = 7'h0B, OP_SUBADD8 = 7'h0C, OP_ADDSUB = 7'h0D, OP_SUBADD = 7'h0E,
    OP_ADDSUB16 = 7'h0F, OP_SUBADD16 = 7'h10,
    OP_AND      = 7'h11, OP_OR     = 7'h12, OP_XOR     = 7'h13, OP_NOT     = 7'h14,
    OP_INV      = 7'h15, OP_INV16  = 7'h16, OP_INV8    = 7'h17,
    OP_PACK     = 7'h18, OP_SAT    = 7'h19, OP_CLR     = 7'h1A,
    // CMP
    OP_CMPL     = 7'h20, OP_CMPS   = 7'h21, OP_CMP16L  = 7'h22, OP_CMP16S  = 7'h23,
    OP_CMP8L    = 7'h24, OP_CMP8S  = 7'h25,
    // MAC, including FIR2/SQS/SQSA; the u bit selects unsigned
    OP_MUL8     = 7'h28, OP_MAC8   = 7'h29, OP_CMUL    = 7'h2A, OP_CMAC    = 7'h2B,
    OP_CMSUB    = 7'h2C, OP_MUL    = 7'h2D, OP_MAC     = 7'h2E, OP_MSUB    = 7'h2F,
    OP_FIR2     = 7'h30, OP_SQS    = 7'h31, OP_SQSA    = 7'h32,
    // SFT
    OP_LSFT     = 7'h38, OP_ASFT   = 7'h39, OP_ROT     = 7'h3A,
    OP_LSFT16   = 7'h3B, OP_ASFT16 = 7'h3C, OP_ROT16   = 7'h3D,
    // data movement
    OP_MV       = 7'h40, OP_DLD    = 7'h41, OP_DST     = 7'h42,
    OP_IN       = 7'h43, OP_OUT    = 7'h44,
    // program flow
    OP_JUMP     = 7'h48, OP_CALL   = 7'h49, OP_RET     = 7'h4A, OP_RETI    = 7'h4B,
    OP_DO       = 7'h4C, OP_SETCT  = 7'h4D, OP_TEST    = 7'h4E, OP_TESTZ   = 7'h4F,
    // Viterbi special instructions
    OP_ACS      = 7'h50, OP_ACSB   = 7'h51, OP_CFGTRC  = 7'h52, OP_TRCBK   = 7'h53,
    // load immediate: two codes, the LSB is bit 5 of the destination code
    OP_LDI0     = 7'h70, OP_LDI1   = 7'h71
  } opcode_e;

  // S-space register codes
  localparam logic [5:0] R_D0 = 6'd16, R_D1 = 6'd17, R_T = 6'd18, R_SRA = 6'd19,
                         R_COUNT = 6'd20, R_SR0 = 6'd21, R_SR1 = 6'd22, R_FLG = 6'd23,
                         R_AM = 6'd24, R_BM = 6'd32, R_IA = 6'd40, R_IB = 6'd48,
                         R_SB0 = 6'd56, R_CB0 = 6'd57, R_SB1 = 6'd58, R_CB1 = 6'd59,
                         R_IMR = 6'd60;

  // ALU operation selector (shared by dsp_alu and the decoder)
  typedef enum logic [4:0] {
    A_ADD, A_SUB, A_ABD, A_ABS, A_AND, A_OR, A_XOR, A_NOT, A_INV,
    A_ADD16, A_SUB16, A_ADDSUB16, A_SUBADD16, A_ABD16, A_INV16,
    A_ADD8, A_SUB8, A_ADDSUB8, A_SUBADD8, A_ABD8, A_INV8,
    A_ADDSUB, A_SUBADD, A_PACK, A_SAT, A_PASSX
  } alu_op_e;

  typedef enum logic [2:0] {
    C_MAX, C_MIN, C_MAX16, C_MIN16, C_MAX8, C_MIN8
  } cmp_op_e;

  typedef enum logic [3:0] {
    M_MUL8, M_MAC8, M_CMUL, M_CMAC, M_CMSUB, M_MUL, M_MAC, M_MSUB,
    M_FIR2, M_SQS, M_SQSA, M_ACS
  } mac_op_e;

  typedef enum logic [2:0] {
    S_LSFT, S_ASFT, S_ROT, S_LSFT16, S_ASFT16, S_ROT16
  } sft_op_e;

  // sign-extend a 16-bit memory word onto the datapath
  function automatic word40_t sext16(input word16_t v);
    return {{(DW-MW){v[MW-1]}}, v};
  endfunction

endpackage
