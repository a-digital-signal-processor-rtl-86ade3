// dsp_pmem: program memory of the DSP, DEPTH instruction words of WIDTH bits.
//
// The fetch port reads combinationally: the word at faddr is on fdata in the
// same cycle, so the fetch stage can register it at the end of that cycle.
// A write port (synchronous, one word per cycle) lets a host load the program
// while the DSP is held in reset. 1K x 28 bits is the size of the fabricated
// program memory; the asynchronous fetch read and the load port are this
// design's choices. The fetch address is the DSP's 16-bit program counter; only
// its low log2(DEPTH) bits select a word.
module dsp_pmem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 28
) (
  input  logic             clk,
  input  logic [15:0]      faddr,
  output logic [WIDTH-1:0] fdata,
  input  logic             we,
  input  logic [15:0]      waddr,
  input  logic [WIDTH-1:0] wdata
);

  localparam int unsigned ABITS = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  assign fdata = mem[faddr[ABITS-1:0]];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[ABITS-1:0]] <= wdata;
  end

endmodule
