// tb_dual_code_pre: self-checking test of the dual-code preprocessing. Two
// reference accumulators driven by the produced tri-codes integrate random
// samples; their sum and difference must equal the direct correlations with
// codes a and b, and exactly one of the two tri-codes is active per chip.
module tb_dual_code_pre;
  int checks = 0, failures = 0;
  logic a, b;
  logic [1:0] code1, code2;

  dual_code_pre dut (.*);

  function automatic int tri_val(input logic [1:0] c, input int x);
    return c[1] ? (c[0] ? -x : x) : 0;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int blk = 0; blk < 50; blk++) begin
      int o1, o2, ca, cb;
      o1 = 0; o2 = 0; ca = 0; cb = 0;
      for (int n = 0; n < 256; n++) begin
        int x;
        x = int'($urandom % 64) - 32;
        a = 1'($urandom); b = 1'($urandom);
        #1;
        checks++;
        if ((code1[1] ^ code2[1]) !== 1'b1) begin failures++; $display("FAIL both/neither active"); end
        o1 += tri_val(code1, x);
        o2 += tri_val(code2, x);
        ca += a ? -x : x;
        cb += b ? -x : x;
      end
      checks++;
      if (o1 + o2 != ca || o1 - o2 != cb) begin
        failures++;
        $display("FAIL block %0d: sum %0d/%0d diff %0d/%0d", blk, o1 + o2, ca, o1 - o2, cb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
