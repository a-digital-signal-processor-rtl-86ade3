// tb_tcc: self-checking test of the tri-code correlator: random samples and
// random tri-codes (+1, -1, 0), dumps at random intervals; a reference
// accumulator in the testbench gives the expected result; the code must come
// out of the delay register one cycle later.
module tb_tcc;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic signed [5:0] din;
  logic [1:0] code, code_out, code_q;
  logic oe;
  logic signed [15:0] result;
  int acc, exp_res;

  tcc dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 0; code = 0; oe = 0; acc = 0; exp_res = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      din  = 6'($urandom);
      code = 2'($urandom);
      oe   = ($urandom % 20) == 0;
      code_q = code;
      if (code[1]) acc += code[0] ? -int'(din) : int'(din);
      if (oe) begin exp_res = acc; acc = 0; end
      @(posedge clk); #1;
      checks++;
      if (result !== 16'(exp_res) || code_out !== code_q) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d result=%0d exp=%0d code_out=%b exp=%b", n, result, exp_res, code_out, code_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
