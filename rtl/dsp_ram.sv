// dsp_ram: one data memory of the DSP, DEPTH words of WIDTH bits.
//
// One read port and one write port (1R1W), both synchronous: the read address
// is taken at a rising edge and the word appears on rdata during the next
// cycle; a write takes effect at the rising edge where we is high. A read of
// the address being written in the same cycle returns the old word. The
// DSP has two of these (data memory 0 and 1, 2K x 16 bits each); two 1R1W
// memories rather than one 2R2W memory is the architecture's choice for the
// dual add-compare-select. The address port is 16 bits wide (the DSP's data
// address space); only the low log2(DEPTH) bits select a word, so the memory
// repeats across the address space. The contents are not reset.
module dsp_ram #(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             re,
  input  logic [15:0]      raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [15:0]      waddr,
  input  logic [WIDTH-1:0] wdata
);

  localparam int unsigned ABITS = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr[ABITS-1:0]];
    if (we) mem[waddr[ABITS-1:0]] <= wdata;
  end

endmodule
