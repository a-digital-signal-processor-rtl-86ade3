// wcdma_rx_top: WCDMA receiver baseband, programmable correlator array plus
// symbol-rate DSP.
//
// Chip-rate work (de-spreading) is done by the 17 x 8 tri-code correlator
// array; symbol-rate work (correlation post-processing, channel estimation,
// RAKE combining, Viterbi decoding, FIR filtering) by the DSP. The code
// generators and the system controller of the receiver are outside this
// module: their codes (code_in), interrupts (irq) and status (status) are
// ports. The DSP configures the array and reads its results through its I/O
// bus; that address map is this design's choice:
//   IN  0x0000 + 8*cbe + tcc   result of correlator tcc of CBE cbe
//                              (sign-extended to 16 bits)
//   OUT 0x0100                 chain mask: bit i-1 = 1 feeds CBE i (i = 1..16,
//                              0-based) with the code leaving CBE i-1
//   OUT 0x0101                 bit 0: dual-code preprocessing of code pairs
//                              (2i, 2i+1), i = 0..7, from their sign bits
//   OUT 0x0102                 status word to the system controller
//   OUT 0x0110 + i             one-cycle output-enable (dump) of the
//                              correlators of CBE i selected by data[7:0]
// One received sample per clock: the array and the DSP share the clock here.
module wcdma_rx_top
  import dsp_pkg::*;
#(
  parameter int unsigned NCBE     = 17,
  parameter int unsigned NTCC     = 8,
  parameter int unsigned DIN_W    = 6,
  parameter int unsigned ACC_W    = 16,
  parameter int unsigned DM_DEPTH = 2048,
  parameter int unsigned PM_DEPTH = 1024
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // received chips and codes from the code generators
  input  logic signed [DIN_W-1:0] din,
  input  logic        [1:0]       code_in [NCBE],
  // system controller
  input  logic [NIRQ-1:0]         irq,
  output logic [15:0]             status,
  // program load port of the DSP
  input  logic                    pm_we,
  input  logic [AW-1:0]           pm_waddr,
  input  instr_t                  pm_wdata
);

  localparam logic [15:0] IO_CHAIN  = 16'h0100;
  localparam logic [15:0] IO_MODE   = 16'h0101;
  localparam logic [15:0] IO_STATUS = 16'h0102;
  localparam logic [15:0] IO_OE     = 16'h0110;

  logic [15:0]             io_addr, io_rdata, io_wdata;
  logic                    io_rd, io_wr;
  logic [NCBE-2:0]         chain;
  logic                    dual_mode;
  logic [NCBE*NTCC-1:0]    oe;
  logic [1:0]              code_pre [NCBE];
  logic [1:0]              code_arr [NCBE];
  logic signed [ACC_W-1:0] corr_data;

  dsp_core #(.DM_DEPTH(DM_DEPTH), .PM_DEPTH(PM_DEPTH)) u_dsp (
    .clk, .rst_n, .pm_we, .pm_waddr, .pm_wdata, .irq,
    .io_addr, .io_rd, .io_rdata, .io_wr, .io_wdata
  );

  // dual-code preprocessing of neighbouring code pairs
  for (genvar i = 0; i < NCBE / 2; i++) begin : g_pre
    dual_code_pre u_pre (
      .a(code_in[2*i][0]), .b(code_in[2*i+1][0]),
      .code1(code_pre[2*i]), .code2(code_pre[2*i+1])
    );
  end
  if (NCBE % 2 == 1) begin : g_odd
    assign code_pre[NCBE-1] = code_in[NCBE-1];
  end

  always_comb
    for (int i = 0; i < NCBE; i++) code_arr[i] = dual_mode ? code_pre[i] : code_in[i];

  correlator_bank #(.NCBE(NCBE), .NTCC(NTCC), .DIN_W(DIN_W), .ACC_W(ACC_W)) u_corr (
    .clk, .rst_n, .din,
    .code(code_arr), .chain, .oe,
    .rd_cbe(io_addr[7:3]), .rd_tcc(io_addr[2:0]), .rd_data(corr_data)
  );

  // I/O read: correlator results
  always_comb io_rdata = (io_rd && io_addr[15:8] == 8'h00) ? 16'(corr_data) : 16'h0000;

  // output-enable pulses, one cycle long
  always_comb begin
    oe = '0;
    for (int i = 0; i < NCBE; i++)
      if (io_wr && io_addr == IO_OE + 16'(i)) oe[i*NTCC +: NTCC] = io_wdata[NTCC-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chain     <= '0;
      dual_mode <= 1'b0;
      status    <= '0;
    end else if (io_wr) begin
      unique case (io_addr)
        IO_CHAIN:  chain     <= (NCBE-1)'(io_wdata);
        IO_MODE:   dual_mode <= io_wdata[0];
        IO_STATUS: status    <= io_wdata;
        default: ;
      endcase
    end
  end

endmodule
