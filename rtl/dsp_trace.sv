// dsp_trace: Viterbi support registers of the DSP.
//
// SR0, transition register (16 bits): each add-compare-select instruction
// shifts in its two survivor decisions, two bits per cycle. New bits enter at
// the top, {flag_low, flag_high, SR0[15:2]}, so after eight ACS instructions
// on states j0..j0+15 the decision of state j0+k sits in bit k. Software then
// moves SR0 to the transition table in data memory.
//
// SRA, traceback state register, configurable from 4 to 8 bits (constraint
// length K = 5..9) by CFGTRC, which also loads the start state. During a
// traceback step the four low bits of SRA give the shift amount that brings
// the current state's decision bit to the LSB of the barrel shifter, and the
// bits above them give the word offset into the transition table (non-zero
// only when SRA is longer than four bits). The decision bit returned by the
// shifter enters SRA at its top bit while the rest shifts right, which steps
// back to the predecessor state of a trellis where state j is reached from
// j/2 and j/2 + 2^(K-2). The same bit is the decoded bit and is shifted into
// SR1, the 16-bit decoded-bit register.
//
// The 16-bit transition register filled two bits per cycle, the 4..8-bit
// configurable register, the use of its upper bits as address bits and its
// lower bits as shift amount, and the decoded-bit register are the published
// structure. The bit order inside SR0 and the direction of the state shift are
// this design's choices, made so that the two halves of the unit agree.
// SR0, SRA and SR1 can also be written directly (wr_en), for context saving.
module dsp_trace (
  input  logic        clk,
  input  logic        rst_n,
  // ACS decisions: flags[1] for state j (high lane), flags[0] for state j+1
  input  logic        acs_en,
  input  logic [1:0]  acs_flags,
  // CFGTRC
  input  logic        cfg_en,
  input  logic [7:0]  cfg_state,
  input  logic [2:0]  cfg_num,     // register length = cfg_num + 4 bits
  // TRCBK
  input  logic        trc_en,
  input  logic        trc_bit,     // LSB of the shifted transition word
  output logic [3:0]  trc_shamt,   // right-shift amount for the transition word
  output logic [3:0]  trc_offset,  // word offset into the transition table
  // direct register access: sel 0 = SR0, 1 = SRA, 2 = SR1
  input  logic        wr_en,
  input  logic [1:0]  wr_sel,
  input  logic [15:0] wr_data,
  output logic [15:0] sr0,
  output logic [7:0]  sra,
  output logic [15:0] sr1
);

  logic [3:0] len;   // active SRA length, 4..8
  logic [7:0] mask;

  always_comb begin
    mask       = 8'((9'd1 << len) - 9'd1);
    trc_shamt  = sra[3:0];
    trc_offset = sra[7:4];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr0 <= '0;
      sra <= '0;
      sr1 <= '0;
      len <= 4'd8;
    end else begin
      if (acs_en) sr0 <= {acs_flags[0], acs_flags[1], sr0[15:2]};
      if (cfg_en) begin
        len <= (cfg_num > 3'd4) ? 4'd8 : 4'(cfg_num) + 4'd4;
        sra <= cfg_state & 8'((9'd1 << ((cfg_num > 3'd4) ? 4'd8 : 4'(cfg_num) + 4'd4)) - 9'd1);
      end else if (trc_en) begin
        sra <= ((sra >> 1) | (8'(trc_bit) << (len - 4'd1))) & mask;
        sr1 <= {sr1[14:0], trc_bit};
      end
      if (wr_en) begin
        unique case (wr_sel)
          2'd0:    sr0 <= wr_data;
          2'd1:    sra <= wr_data[7:0] & mask;
          default: sr1 <= wr_data;
        endcase
      end
    end
  end

endmodule
