// dsp_sft: the DSP's barrel shifter.
//
// Purely combinational. Shifts X left by S bits, S a signed 6-bit amount
// (-32..31); a negative S shifts right. LSFT is a logical shift, ASFT an
// arithmetic one (right shifts copy the sign bit), ROT a rotation. The "16"
// forms shift the high part X[39:16] (24 bits) and the low part X[15:0]
// (16 bits) separately, as two lanes. The instruction table gives the
// operations "shift left S bits"; the signed amount that also gives right
// shifts (needed by the Viterbi traceback, which shifts a transition word
// right by a state-dependent amount) is this design's choice.
module dsp_sft
  import dsp_pkg::*;
(
  input  sft_op_e           op,
  input  word40_t           x,
  input  logic signed [5:0] s,
  output word40_t           d
);

  function automatic logic [39:0] sh40(input logic [39:0] v, input logic signed [5:0] n,
                                       input logic arith);
    logic [5:0] m;
    m = n[5] ? 6'(-n) : 6'(n);
    if (!n[5])      return v << m;
    else if (arith) return 40'($signed(v) >>> m);
    else            return v >> m;
  endfunction

  function automatic logic [23:0] sh24(input logic [23:0] v, input logic signed [5:0] n,
                                       input logic arith);
    logic [5:0] m;
    m = n[5] ? 6'(-n) : 6'(n);
    if (!n[5])      return v << m;
    else if (arith) return 24'($signed(v) >>> m);
    else            return v >> m;
  endfunction

  function automatic logic [15:0] sh16(input logic [15:0] v, input logic signed [5:0] n,
                                       input logic arith);
    logic [5:0] m;
    m = n[5] ? 6'(-n) : 6'(n);
    if (!n[5])      return v << m;
    else if (arith) return 16'($signed(v) >>> m);
    else            return v >> m;
  endfunction

  // rotate left by n modulo the width (a negative n rotates right)
  function automatic logic [39:0] rot40(input logic [39:0] v, input logic signed [5:0] n);
    int unsigned k;
    k = (n[5]) ? unsigned'(40 + int'(n)) : unsigned'(int'(n));
    k = k % 40;
    return (v << k) | (v >> ((40 - k) % 40));
  endfunction

  function automatic logic [23:0] rot24(input logic [23:0] v, input logic signed [5:0] n);
    int unsigned k;
    k = unsigned'((int'(n) % 24 + 24) % 24);
    return (v << k) | (v >> ((24 - k) % 24));
  endfunction

  function automatic logic [15:0] rot16(input logic [15:0] v, input logic signed [5:0] n);
    int unsigned k;
    k = unsigned'((int'(n) % 16 + 16) % 16);
    return (v << k) | (v >> ((16 - k) % 16));
  endfunction

  always_comb begin
    unique case (op)
      S_LSFT:   d = sh40(x, s, 1'b0);
      S_ASFT:   d = sh40(x, s, 1'b1);
      S_ROT:    d = rot40(x, s);
      S_LSFT16: d = {sh24(x[39:16], s, 1'b0), sh16(x[15:0], s, 1'b0)};
      S_ASFT16: d = {sh24(x[39:16], s, 1'b1), sh16(x[15:0], s, 1'b1)};
      default:  d = {rot24(x[39:16], s), rot16(x[15:0], s)};  // S_ROT16
    endcase
  end

endmodule
