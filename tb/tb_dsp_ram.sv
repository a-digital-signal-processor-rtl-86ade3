// tb_dsp_ram: self-checking test of the 2K x 16 data memory: fills every word
// with a pseudo-random pattern while reading back, checks the one-cycle read
// latency, read-during-write returning the old word, and that the address
// repeats above DEPTH.
module tb_dsp_ram;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic re, we;
  logic [15:0] raddr, waddr, wdata, rdata;
  logic [15:0] ref_mem [2048];

  dsp_ram dut (.*);

  always #5 clk = ~clk;

  function automatic logic [15:0] pat(input int a, input int k);
    return 16'((a * 40503 + k * 977) ^ (a >> 3));
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    re = 0; we = 0; raddr = 0; waddr = 0; wdata = 0;
    for (int a = 0; a < 2048; a++) begin
      @(negedge clk); we = 1; waddr = 16'(a); wdata = pat(a, 0); ref_mem[a] = pat(a, 0);
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 2048; a++) begin
      @(negedge clk); re = 1; raddr = 16'(a + ((a % 3 == 0) ? 2048 : 0));
      @(negedge clk); re = 0;
      checks++;
      if (rdata !== ref_mem[a]) begin failures++; $display("FAIL read %0d", a); end
    end
    // read during write of the same address returns the old word
    @(negedge clk); re = 1; raddr = 16'd77; we = 1; waddr = 16'd77; wdata = 16'hBEEF;
    @(negedge clk); re = 0; we = 0;
    checks++; if (rdata !== ref_mem[77]) begin failures++; $display("FAIL read-during-write"); end
    @(negedge clk); re = 1; raddr = 16'd77;
    @(negedge clk); re = 0;
    checks++; if (rdata !== 16'hBEEF) begin failures++; $display("FAIL write"); end
    // rdata holds while re is low
    @(negedge clk);
    checks++; if (rdata !== 16'hBEEF) begin failures++; $display("FAIL hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
