// dsp_alu: the DSP's 40-bit arithmetic logic unit.
//
// Purely combinational. Three data formats share one unit (subword parallel):
//   40-bit       whole operands.
//   16-bit*2     high part X[39:16] (24 bits) and low part X[15:0] (16 bits),
//                the accumulator split used by the MAC and by the dual ACS.
//   8-bit*2      the packed I/Q word: I in X[15:8], Q in X[7:0]; the two 8-bit
//                results are packed the same way and sign-extended to 40 bits.
// ADDSUB/SUBADD compute on whole operands and keep the 24-bit high result and
// the 16-bit low result in the 24|16 split; this is how the ALU acts as
// "a 24-bit adder and a 16-bit subtractor" in the dual add-compare-select.
// The operation list and formulas follow the ALU instruction table; the 24|16
// split, wrap-around (non-saturating) arithmetic, and SAT saturating to the
// signed 16-bit range are this design's reading.
module dsp_alu
  import dsp_pkg::*;
(
  input  alu_op_e op,
  input  word40_t x,
  input  word40_t y,
  output word40_t d
);

  // 16-bit*2 helpers on the 24|16 split
  function automatic word40_t split(input logic [23:0] h, input logic [15:0] l);
    return {h, l};
  endfunction

  function automatic word40_t pack8(input logic [7:0] h, input logic [7:0] l);
    return {{24{h[7]}}, h, l};
  endfunction

  function automatic logic [23:0] abs24(input logic [23:0] v);
    return v[23] ? -v : v;
  endfunction
  function automatic logic [15:0] abs16(input logic [15:0] v);
    return v[15] ? -v : v;
  endfunction
  function automatic logic [7:0] abs8(input logic [7:0] v);
    return v[7] ? -v : v;
  endfunction

  logic [23:0] xh, yh;
  logic [15:0] xl, yl;
  logic [7:0]  xbh, xbl, ybh, ybl;
  word40_t     sum, dif;

  always_comb begin
    xh  = x[39:16];  yh  = y[39:16];
    xl  = x[15:0];   yl  = y[15:0];
    xbh = x[15:8];   xbl = x[7:0];
    ybh = y[15:8];   ybl = y[7:0];
    sum = x + y;
    dif = x - y;
    unique case (op)
      A_ADD:      d = sum;
      A_SUB:      d = dif;
      A_ABD:      d = dif[39] ? -dif : dif;
      A_ABS:      d = x[39] ? -x : x;
      A_AND:      d = x & y;
      A_OR:       d = x | y;
      A_XOR:      d = x ^ y;
      A_NOT:      d = ~x;
      A_INV:      d = -x;
      A_ADD16:    d = split(xh + yh, xl + yl);
      A_SUB16:    d = split(xh - yh, xl - yl);
      A_ADDSUB16: d = split(xh + yh, xl - yl);
      A_SUBADD16: d = split(xh - yh, xl + yl);
      A_ABD16:    d = split(abs24(xh - yh), abs16(xl - yl));
      A_INV16:    d = split(-xh, -xl);
      A_ADD8:     d = pack8(xbh + ybh, xbl + ybl);
      A_SUB8:     d = pack8(xbh - ybh, xbl - ybl);
      A_ADDSUB8:  d = pack8(xbh + ybh, xbl - ybl);
      A_SUBADD8:  d = pack8(xbh - ybh, xbl + ybl);
      A_ABD8:     d = pack8(abs8(xbh - ybh), abs8(xbl - ybl));
      A_INV8:     d = pack8(-xbh, -xbl);
      A_ADDSUB:   d = split(sum[23:0], dif[15:0]);
      A_SUBADD:   d = split(dif[23:0], yl - xl);
      A_PACK:     d = pack8(xbl, ybl);
      A_SAT: begin
        if ($signed(x) > 40'sd32767)        d = 40'd32767;
        else if ($signed(x) < -40'sd32768)  d = -40'd32768;
        else                                d = x;
      end
      default:    d = x;  // A_PASSX
    endcase
  end

endmodule
