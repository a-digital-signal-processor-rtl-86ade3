// tb_correlator_bank: self-checking test of the 17 x 8 correlator array in its
// two configurations.
//   independent codes (chain off): correlator k of CBE i returns the
//     correlation of the samples with code i at phase k;
//   chained (chain on): the array is one 136-phase correlator on code 0,
//     correlator k of CBE i at phase 8*i + k (chip matched-filter substitute).
// Every result is read through the shared output bus select. Reference
// correlations are computed in the testbench from the sample and code history.
module tb_correlator_bank;
  localparam int NC = 17, NT = 8, NP = NC * NT;
  int checks = 0, failures = 0;
  int mode_runs [2];
  logic clk = 0, rst_n = 0;
  logic signed [5:0] din;
  logic [1:0] code [NC];
  logic [NC-2:0] chain;
  logic [NC*NT-1:0] oe;
  logic [4:0] rd_cbe;
  logic [2:0] rd_tcc;
  logic signed [15:0] rd_data;
  logic [1:0] hist [NC][NP+1];   // hist[i][p]: code i, p chips ago
  int acc [NC][NT];

  correlator_bank dut (.*);

  always #5 clk = ~clk;

  function automatic int tv(input logic [1:0] c, input int x);
    return c[1] ? (c[0] ? -x : x) : 0;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_window(input bit chained, input int len);
    for (int i = 0; i < NC; i++) for (int k = 0; k < NT; k++) acc[i][k] = 0;
    chain = chained ? '1 : '0;
    for (int n = 0; n < len; n++) begin
      @(negedge clk);
      din = 6'($urandom);
      for (int i = 0; i < NC; i++) begin
        code[i] = 2'($urandom);
        for (int p = NP; p > 0; p--) hist[i][p] = hist[i][p-1];
        hist[i][0] = code[i];
      end
      for (int i = 0; i < NC; i++)
        for (int k = 0; k < NT; k++) begin
          logic [1:0] c;
          c = chained ? hist[0][8 * i + k] : hist[i][k];
          acc[i][k] += tv(c, int'(din));
        end
      oe = (n == len - 1) ? '1 : '0;
    end
    // one idle chip between windows: no sample, all codes off
    @(negedge clk);
    oe  = '0;
    din = '0;
    for (int i = 0; i < NC; i++) begin
      code[i] = 2'b00;
      for (int p = NP; p > 0; p--) hist[i][p] = hist[i][p-1];
      hist[i][0] = 2'b00;
    end
    for (int i = 0; i < NC; i++)
      for (int k = 0; k < NT; k++) begin
        rd_cbe = 5'(i); rd_tcc = 3'(k);
        #1;
        checks++;
        if (rd_data !== 16'(acc[i][k])) begin
          failures++;
          if (failures < 40) $display("FAIL chained=%0b cbe %0d tcc %0d: %0d expected %0d", chained, i, k, rd_data, acc[i][k]);
        end
      end
    mode_runs[chained]++;
    // reading takes several clocks while the zero codes keep shifting: flush
    // the whole delay chain with zero codes so DUT and model agree again
    repeat (NP + 1) @(negedge clk);
    for (int i = 0; i < NC; i++) for (int p = 0; p <= NP; p++) hist[i][p] = 2'b00;
  endtask

  initial begin
    din = 0; chain = '0; oe = '0; rd_cbe = 0; rd_tcc = 0;
    for (int i = 0; i < NC; i++) code[i] = 2'b00;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // the history starts with the all-zero codes held in the chain at reset
    for (int i = 0; i < NC; i++) for (int p = 0; p <= NP; p++) hist[i][p] = 2'b00;
    run_window(1'b0, 64);
    run_window(1'b0, 200);
    run_window(1'b1, 300);
    run_window(1'b1, 256);
    run_window(1'b0, 100);
    if (mode_runs[0] == 0 || mode_runs[1] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
