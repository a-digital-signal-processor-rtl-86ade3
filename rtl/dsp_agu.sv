// dsp_agu: address generator of one data memory.
//
// Holds eight index (pointer) registers P0..P7, eight post-modify increments
// I0..I7 and one circular buffer, start base SB and length CB. Two access
// ports each present the current value of a pointer as the memory address and
// post-modify that pointer at the clock edge: P <= P + I, wrapped by CB when
// the step crosses the end (or the start) of the buffer [SB, SB+CB). CB = 0
// turns modulo addressing off. A pointer outside the buffer is never wrapped,
// so plain pointers and a circular one can share the generator. When both
// ports name the same pointer it is modified once.
// Registers are written and read through a 5-bit code: 0..7 pointers,
// 8..15 increments, 16 SB, 17 CB. A register write has priority over a
// post-modify of the same pointer in the same cycle.
// The architecture gives eight index registers and modulo addressing per
// generator; the increment registers, the single circular buffer per
// generator and the wrap rule are this design's reading of the example
// filter program (which loads "CB0", "SB0", "IA0" and "IB0").
module dsp_agu
  import dsp_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // access ports
  input  logic        [1:0]  acc_en,
  input  logic        [2:0]  acc_idx [2],
  output logic [AW-1:0]      acc_addr [2],
  // register write / read
  input  logic               wr_en,
  input  logic        [4:0]  wr_sel,
  input  logic [AW-1:0]      wr_data,
  input  logic        [4:0]  rd_sel,
  output logic [AW-1:0]      rd_data
);

  localparam int unsigned NPTR = 8;  // eight index registers per generator

  logic [AW-1:0] ptr [NPTR];
  logic [AW-1:0] inc [NPTR];
  logic [AW-1:0] sb, cb;

  function automatic logic [AW-1:0] step(input logic [AW-1:0] p, input logic [AW-1:0] i,
                                         input logic [AW-1:0] b, input logic [AW-1:0] l);
    logic [AW:0] nx, top;
    nx  = {1'b0, p} + {i[AW-1], i};
    top = {1'b0, b} + {1'b0, l};
    if (l != '0) begin
      if ({1'b0, p} < top && {1'b0, p} >= {1'b0, b}) begin
        if (!i[AW-1] && nx >= top)                  nx = nx - {1'b0, l};
        else if (i[AW-1] && nx[AW-1:0] < b)         nx = nx + {1'b0, l};
      end
    end
    return nx[AW-1:0];
  endfunction

  always_comb begin
    for (int k = 0; k < 2; k++) acc_addr[k] = ptr[acc_idx[k]];
    unique case (rd_sel[4:3])
      2'b00:   rd_data = ptr[rd_sel[2:0]];
      2'b01:   rd_data = inc[rd_sel[2:0]];
      default: rd_data = rd_sel[0] ? cb : sb;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NPTR; k++) begin
        ptr[k] <= '0;
        inc[k] <= AW'(1);
      end
      sb <= '0;
      cb <= '0;
    end else begin
      if (acc_en[1] && !(acc_en[0] && acc_idx[0] == acc_idx[1]))
        ptr[acc_idx[1]] <= step(ptr[acc_idx[1]], inc[acc_idx[1]], sb, cb);
      if (acc_en[0])
        ptr[acc_idx[0]] <= step(ptr[acc_idx[0]], inc[acc_idx[0]], sb, cb);
      if (wr_en) begin
        unique case (wr_sel[4:3])
          2'b00:   ptr[wr_sel[2:0]] <= wr_data;
          2'b01:   inc[wr_sel[2:0]] <= wr_data;
          default: if (wr_sel[0]) cb <= wr_data; else sb <= wr_data;
        endcase
      end
    end
  end

endmodule
