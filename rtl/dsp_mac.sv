// dsp_mac: subword-parallel multiply-accumulate unit.
//
// Purely combinational. Four 8x8 multipliers take the high (I, X[15:8]) and
// low (Q, X[7:0]) bytes of the two 16-bit operands; a crossbar and two split
// adder stages (24-bit high part, 16-bit low part of the 40-bit accumulator,
// the carry between them cut in the split modes) combine the products:
//   MUL8/MAC8   DH = [DH +] XH*YH,  DL = [DL +] XL*YL
//   CMUL/CMAC   DH = [DH +] XH*YH - XL*YL,  DL = [DL +] XH*YL + XL*YH
//   CMSUB       DH = DH - (XH*YH - XL*YL),  DL = DL - (XH*YL + XL*YH)
//   MUL/MAC/MSUB  D = [D +/-] X*Y, 16x16 built from the four 8x8 products
//   FIR2        D = D + XL*YL + XH*YH      (two FIR taps per cycle)
//   SQS/SQSA    D = [D +] XL*XL + XH*XH    (I^2 + Q^2; the caller feeds Y = X)
//   ACS         multipliers bypassed: DH = X - Y (24 bits), DL = X + Y (16 bits)
// "DH" is D[39:16] and "DL" is D[15:0]. With u=1 the bytes (or 16-bit words)
// are unsigned, otherwise two's complement. The structure (four 8x8
// multipliers, split 24|16 adders, complex and dual FIR data flows) follows
// the published MAC; the multipliers here are written as 9x9 signed products
// so one multiplier handles both signed and unsigned bytes.
module dsp_mac
  import dsp_pkg::*;
(
  input  mac_op_e op,
  input  logic    u,     // unsigned operands
  input  word40_t x,
  input  word40_t y,
  input  word40_t din,   // accumulator input (D before the instruction)
  output word40_t d
);

  // one 8x8 multiplier; sa/sb: treat the byte as signed
  function automatic logic signed [17:0] mul8(input logic [7:0] a, input logic sa,
                                              input logic [7:0] b, input logic sb);
    logic signed [8:0] ea, eb;
    ea = {sa & a[7], a};
    eb = {sb & b[7], b};
    return ea * eb;
  endfunction

  logic               sg;
  logic signed [17:0] p_hh, p_ll, p_hl, p_lh;   // XH*YH, XL*YL, XH*YL, XL*YH
  logic [23:0]        re;
  logic [15:0]        im;
  logic signed [39:0] p16, fir;
  logic [23:0]        dh;
  logic [15:0]        dl;

  always_comb begin
    sg = ~u;
    // in the 16x16 mode the low bytes are magnitude bits, never signed
    if (op inside {M_MUL, M_MAC, M_MSUB}) begin
      p_hh = mul8(x[15:8], sg, y[15:8], sg);
      p_ll = mul8(x[7:0], 1'b0, y[7:0], 1'b0);
      p_hl = mul8(x[15:8], sg, y[7:0], 1'b0);
      p_lh = mul8(x[7:0], 1'b0, y[15:8], sg);
    end else begin
      p_hh = mul8(x[15:8], sg, y[15:8], sg);
      p_ll = mul8(x[7:0], sg, y[7:0], sg);
      p_hl = mul8(x[15:8], sg, y[7:0], sg);
      p_lh = mul8(x[7:0], sg, y[15:8], sg);
    end
    re  = 24'(p_hh) - 24'(p_ll);
    im  = 16'(p_hl) + 16'(p_lh);
    p16 = (40'(p_hh) <<< 16) + ((40'(p_hl) + 40'(p_lh)) <<< 8) + 40'(p_ll);
    fir = 40'(p_ll) + 40'(p_hh);
    dh  = din[39:16];
    dl  = din[15:0];
    unique case (op)
      M_MUL8:  d = {24'(p_hh), 16'(p_ll)};
      M_MAC8:  d = {dh + 24'(p_hh), dl + 16'(p_ll)};
      M_CMUL:  d = {re, im};
      M_CMAC:  d = {dh + re, dl + im};
      M_CMSUB: d = {dh - re, dl - im};
      M_MUL:   d = p16;
      M_MAC:   d = din + p16;
      M_MSUB:  d = din - p16;
      M_FIR2, M_SQS: d = din + fir;
      M_SQSA:  d = fir;
      default: d = {24'(x - y), 16'(x + y)};  // M_ACS
    endcase
  end

endmodule
