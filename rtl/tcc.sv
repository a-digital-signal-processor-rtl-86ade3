// tcc: tri-code correlator, one correlator of the programmable correlator array.
//
// Correlates the input sample stream with a code that takes the values +1, -1
// or 0. The 2-bit CODE works as published: the LSB is the code sign (0 means
// +1, 1 means -1) and the MSB enables the accumulator; with MSB = 0 the
// accumulator holds, which is the "0" code and the low-power idle state. The
// published circuit gates the accumulator clock with the MSB; here the MSB is
// a clock enable, the synthesizable equivalent, so a clock-gating cell can be
// inferred by the implementation tools.
// A one-cycle delay register (D) passes the code on to the next correlator of
// a chain, so neighbouring correlators see the code shifted by one chip.
// When oe is high the output register takes the finished correlation,
// including the current sample, and the accumulator restarts from zero
// (integrate and dump). The dump-and-restart behaviour, the sample width and
// the accumulator width are this design's choices.
// Timing: one sample per clock; result is valid from the cycle after oe.
module tcc #(
  parameter int unsigned DIN_W = 6,   // input sample width (two's complement)
  parameter int unsigned ACC_W = 16   // accumulator and result width
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [DIN_W-1:0] din,
  input  logic        [1:0]       code,
  input  logic                    oe,
  output logic        [1:0]       code_out,
  output logic signed [ACC_W-1:0] result
);

  logic signed [ACC_W-1:0] acc, acc_nx;

  always_comb begin
    acc_nx = acc;
    if (code[1]) acc_nx = code[0] ? acc - ACC_W'(din) : acc + ACC_W'(din);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      result   <= '0;
      code_out <= '0;
    end else begin
      code_out <= code;
      if (oe) begin
        result <= acc_nx;
        acc    <= '0;
      end else if (code[1]) begin
        acc    <= acc_nx;
      end
    end
  end

endmodule
