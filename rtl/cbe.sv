// cbe: correlator bank element, eight tri-code correlators in a row.
//
// All eight correlators see the same input sample. The code enters the first
// one and moves along the row through each correlator's one-chip delay
// register, so correlator k (0-based) correlates with the code delayed by k
// chips: eight code phases (search window positions, matched-filter taps or
// RAKE finger delays) from one code stream. code_out is the code after the
// eighth delay, for chaining into the next element. Each correlator has its
// own output-enable bit. Structure as published (eight correlators, shared
// input data, chained code, OE bus); widths are parameters.
module cbe #(
  parameter int unsigned NTCC  = 8,
  parameter int unsigned DIN_W = 6,
  parameter int unsigned ACC_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [DIN_W-1:0] din,
  input  logic        [1:0]       code_in,
  input  logic        [NTCC-1:0]  oe,
  output logic        [1:0]       code_out,
  output logic signed [ACC_W-1:0] result [NTCC]
);

  logic [1:0] chain [NTCC+1];

  assign chain[0] = code_in;
  assign code_out = chain[NTCC];

  for (genvar k = 0; k < NTCC; k++) begin : g_tcc
    tcc #(.DIN_W(DIN_W), .ACC_W(ACC_W)) u_tcc (
      .clk, .rst_n, .din,
      .code     (chain[k]),
      .oe       (oe[k]),
      .code_out (chain[k+1]),
      .result   (result[k])
    );
  end

endmodule
