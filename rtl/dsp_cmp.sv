// dsp_cmp: the DSP's comparator (maximum / minimum select).
//
// Purely combinational, kept apart from the ALU so that the ALU, the MAC and
// the comparator can all work in the same cycle of the dual add-compare-select.
// Formats as in the ALU: 40-bit, 16-bit*2 (24-bit high part X[39:16], 16-bit
// low part X[15:0]) and 8-bit*2 (packed I/Q word X[15:8] | X[7:0], result
// sign-extended to 40 bits). All comparisons are signed.
// flag[1] reports the high part, flag[0] the low part (both equal in the
// 40-bit mode): 1 means Y was selected, i.e. Y is strictly larger (MAX) or
// strictly smaller (MIN) than X. In the add-compare-select X is the path
// metric through the upper branch and Y through the lower one, so the flags
// are the survivor decisions.
// The operation set (CMPL/CMPS in three formats) is the published one; in
// the two-lane forms each lane compares X with Y of the same lane (XL with
// YL), which is what the dual add-compare-select needs.
module dsp_cmp
  import dsp_pkg::*;
(
  input  cmp_op_e    op,
  input  word40_t    x,
  input  word40_t    y,
  output word40_t    d,
  output logic [1:0] flag
);

  logic ymax40, ymin40, ymaxh, yminh, ymaxl, yminl, ymaxbh, yminbh, ymaxbl, yminbl;

  always_comb begin
    ymax40 = $signed(y) > $signed(x);
    ymin40 = $signed(y) < $signed(x);
    ymaxh  = $signed(y[39:16]) > $signed(x[39:16]);
    yminh  = $signed(y[39:16]) < $signed(x[39:16]);
    ymaxl  = $signed(y[15:0])  > $signed(x[15:0]);
    yminl  = $signed(y[15:0])  < $signed(x[15:0]);
    ymaxbh = $signed(y[15:8])  > $signed(x[15:8]);
    yminbh = $signed(y[15:8])  < $signed(x[15:8]);
    ymaxbl = $signed(y[7:0])   > $signed(x[7:0]);
    yminbl = $signed(y[7:0])   < $signed(x[7:0]);
    unique case (op)
      C_MAX:   flag = {ymax40, ymax40};
      C_MIN:   flag = {ymin40, ymin40};
      C_MAX16: flag = {ymaxh, ymaxl};
      C_MIN16: flag = {yminh, yminl};
      C_MAX8:  flag = {ymaxbh, ymaxbl};
      default: flag = {yminbh, yminbl};  // C_MIN8
    endcase
    unique case (op)
      C_MAX, C_MIN:     d = flag[0] ? y : x;
      C_MAX16, C_MIN16: d = {flag[1] ? y[39:16] : x[39:16], flag[0] ? y[15:0] : x[15:0]};
      default: begin
        d = {24'd0, flag[1] ? y[15:8] : x[15:8], flag[0] ? y[7:0] : x[7:0]};
        d[39:16] = {24{d[15]}};
      end
    endcase
  end

endmodule
