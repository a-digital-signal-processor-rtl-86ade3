// tb_dsp_sft: self-checking test of the barrel shifter. Every shift amount
// -32..31 with random data in all six modes; the expected value is built bit
// by bit (bit i of the result comes from bit i-S of the lane, or fill).
module tb_dsp_sft;
  import dsp_pkg::*;
  int checks = 0, failures = 0;
  sft_op_e op;
  word40_t x, d, e;
  logic signed [5:0] s;

  dsp_sft dut (.op, .x, .s, .d);

  function automatic word40_t lanes(input sft_op_e o, input word40_t v, input int sh);
    word40_t r;
    int lo [2], w [2], nl;
    bit rot, ari;
    r   = '0;
    rot = o inside {S_ROT, S_ROT16};
    ari = o inside {S_ASFT, S_ASFT16};
    if (o inside {S_LSFT, S_ASFT, S_ROT}) begin nl = 1; lo[0] = 0; w[0] = 40; end
    else begin nl = 2; lo[0] = 0; w[0] = 16; lo[1] = 16; w[1] = 24; end
    for (int l = 0; l < nl; l++)
      for (int i = 0; i < w[l]; i++) begin
        int src;
        bit b;
        src = i - sh;
        if (rot) b = v[lo[l] + ((src % w[l]) + w[l]) % w[l]];
        else if (src < 0) b = 1'b0;
        else if (src >= w[l]) b = ari ? v[lo[l] + w[l] - 1] : 1'b0;
        else b = v[lo[l] + src];
        r[lo[l] + i] = b;
      end
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 6; k++)
      for (int sh = -32; sh < 32; sh++)
        for (int n = 0; n < 6; n++) begin
          op = sft_op_e'(k);
          s  = 6'(sh);
          x  = {$urandom, $urandom};
          #1;
          e = lanes(op, x, sh);
          checks++;
          if (d !== e) begin
            failures++;
            if (failures < 10) $display("FAIL op=%s s=%0d x=%h d=%h exp=%h", op.name(), sh, x, d, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
