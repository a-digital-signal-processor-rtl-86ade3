// dual_code_pre: dual-code preprocessing for a pair of tri-code correlators.
//
// Two binary codes a and b (0 means +1, 1 means -1) that must be correlated
// with the same input are turned into two tri-codes:
//   code1 = {~(a ^ b), a}   active only on chips where a and b agree
//   code2 = { (a ^ b), a}   active only on chips where they differ
// Each chip therefore clocks exactly one of the two accumulators. After
// integration corr_a = out1 + out2 and corr_b = out1 - out2, which the DSP
// computes. The pair split into "agree" and "differ" chips is the published
// scheme; a and b are combined by exclusive-or, the operator for which the
// sum and the difference equal the two correlations.
// Purely combinational.
module dual_code_pre (
  input  logic       a,
  input  logic       b,
  output logic [1:0] code1,
  output logic [1:0] code2
);

  always_comb begin
    code1 = {~(a ^ b), a};
    code2 = { (a ^ b), a};
  end

endmodule
