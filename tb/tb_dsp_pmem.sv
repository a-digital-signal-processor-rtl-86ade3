// tb_dsp_pmem: self-checking test of the 1K x 28 program memory: loads every
// word through the write port and reads it back on the asynchronous fetch
// port.
module tb_dsp_pmem;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic we;
  logic [15:0] faddr, waddr;
  logic [27:0] fdata, wdata;

  dsp_pmem dut (.*);

  always #5 clk = ~clk;

  function automatic logic [27:0] pat(input int a);
    return 28'(a * 2654435 + 12345) ^ 28'(a << 14);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; faddr = 0; waddr = 0; wdata = 0;
    for (int a = 0; a < 1024; a++) begin
      @(negedge clk); we = 1; waddr = 16'(a); wdata = pat(a);
    end
    @(negedge clk); we = 0;
    for (int a = 1023; a >= 0; a--) begin
      faddr = 16'(a); #1;
      checks++;
      if (fdata !== pat(a)) begin failures++; $display("FAIL fetch %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
