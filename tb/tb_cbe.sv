// tb_cbe: self-checking test of a correlator bank element. A random tri-code
// stream and random samples run for several integration windows; correlator k
// must return sum(din[n] * code[n-k]) over the window, i.e. the correlation at
// code phase k; the code must leave the element eight chips later.
module tb_cbe;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic signed [5:0] din;
  logic [1:0] code_in, code_out;
  logic [7:0] oe;
  logic signed [15:0] result [8];
  logic [1:0] hist_c [$];
  int acc [8];

  cbe dut (.*);

  always #5 clk = ~clk;

  function automatic int tv(input logic [1:0] c, input int x);
    return c[1] ? (c[0] ? -x : x) : 0;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 0; code_in = 0; oe = 0;
    for (int k = 0; k < 8; k++) acc[k] = 0;
    for (int k = 0; k < 8; k++) hist_c.push_front(2'b00);   // reset state of the chain
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int w = 0; w < 6; w++) begin
      for (int n = 0; n < 100; n++) begin
        @(negedge clk);
        din     = 6'($urandom);
        code_in = 2'($urandom);
        hist_c.push_front(code_in);          // hist_c[k] = code k chips ago
        for (int k = 0; k < 8; k++) acc[k] += tv(hist_c[k], int'(din));
        oe = (n == 99) ? 8'hFF : 8'h00;
        @(posedge clk); #1;
        checks++;
        if (code_out !== hist_c[7]) begin failures++; $display("FAIL code_out"); end
        void'(hist_c.pop_back());
      end
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (result[k] !== 16'(acc[k])) begin
          failures++;
          $display("FAIL window %0d phase %0d: %0d expected %0d", w, k, result[k], acc[k]);
        end
        acc[k] = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
