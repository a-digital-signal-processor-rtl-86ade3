// correlator_bank: the programmable correlator array, NCBE correlator bank
// elements (CBEs) of NTCC tri-code correlators each.
//
// The 2-bit code bus carries one code pair per CBE. In front of every CBE but
// the first a multiplexer chooses between that CBE's own code and the code
// leaving the previous CBE's delay chain (chain[i-1] = 1 for CBE i, 1-based
// CBE i+1 in the published numbering). This gives the
// configurations of a WCDMA receiver:
//   chain all          the whole array is one NCBE*NTCC-phase correlator on a
//                      single code, standing in for a chip matched filter
//                      (slot synchronization);
//   chain none         NCBE independent codes, e.g. the 17 secondary sync
//                      codes (frame synchronization) or scrambling codes
//                      (scrambling code search, RAKE fingers), NTCC code
//                      phases each.
// oe has one bit per correlator (CBE-major: bit NTCC*i + k is correlator k of
// CBE i). The shared output bus returns the result of the correlator selected
// by rd_cbe/rd_tcc, combinationally. The array size (17 x 8) and structure
// follow the published array; the per-correlator read select standing for the
// shared output bus is this design's choice.
module correlator_bank #(
  parameter int unsigned NCBE  = 17,
  parameter int unsigned NTCC  = 8,
  parameter int unsigned DIN_W = 6,
  parameter int unsigned ACC_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DIN_W-1:0]  din,
  input  logic        [1:0]        code   [NCBE],
  input  logic        [NCBE-2:0]   chain,
  input  logic        [NCBE*NTCC-1:0] oe,
  input  logic        [4:0]        rd_cbe,
  input  logic        [2:0]        rd_tcc,
  output logic signed [ACC_W-1:0]  rd_data
);

  logic [1:0]              code_sel [NCBE];
  logic [1:0]              code_nx  [NCBE];
  logic signed [ACC_W-1:0] res      [NCBE][NTCC];

  for (genvar i = 0; i < NCBE; i++) begin : g_cbe
    if (i == 0) begin : g_first
      assign code_sel[i] = code[i];
    end else begin : g_mux
      assign code_sel[i] = chain[i-1] ? code_nx[i-1] : code[i];
    end
    cbe #(.NTCC(NTCC), .DIN_W(DIN_W), .ACC_W(ACC_W)) u_cbe (
      .clk, .rst_n, .din,
      .code_in  (code_sel[i]),
      .oe       (oe[i*NTCC +: NTCC]),
      .code_out (code_nx[i]),
      .result   (res[i])
    );
  end

  always_comb begin
    rd_data = '0;
    for (int i = 0; i < NCBE; i++)
      for (int k = 0; k < NTCC; k++)
        if (rd_cbe == 5'(i) && rd_tcc == 3'(k)) rd_data = res[i][k];
  end

endmodule
