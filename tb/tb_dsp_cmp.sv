// tb_dsp_cmp: self-checking test of the comparator: random operands in all
// six modes, expected maximum/minimum and flags computed per lane.
module tb_dsp_cmp;
  import dsp_pkg::*;
  int checks = 0, failures = 0;
  cmp_op_e op;
  word40_t x, y, d, e;
  logic [1:0] flag, ef;

  dsp_cmp dut (.op, .x, .y, .d, .flag);

  function automatic word40_t msk(input int w);
    return (w >= 40) ? '1 : ((40'd1 << w) - 1);
  endfunction
  function automatic longint lane(input word40_t v, input int lo, input int w);
    longint t;
    t = longint'((v >> lo) & msk(w));
    return (t << (64 - w)) >>> (64 - w);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 6; k++) begin
      for (int n = 0; n < 300; n++) begin
        bit mx;
        int lo [2], w [2];
        op = cmp_op_e'(k);
        x  = {$urandom, $urandom};
        y  = (n % 5 == 0) ? x : {$urandom, $urandom};
        #1;
        mx = (k % 2 == 0);
        // lanes: {high, low}
        case (k / 2)
          0: begin lo = '{0, 0};  w = '{40, 40}; end
          1: begin lo = '{16, 0}; w = '{24, 16}; end
          default: begin lo = '{8, 0}; w = '{8, 8}; end
        endcase
        e = '0;
        for (int l = 0; l < 2; l++) begin
          longint a, b;
          bit pick;
          a = lane(x, lo[l], w[l]);
          b = lane(y, lo[l], w[l]);
          pick = mx ? (b > a) : (b < a);
          ef[1-l] = pick;
          if (k / 2 != 0 || l == 0)
            e |= (word40_t'(pick ? b : a) & msk(w[l])) << lo[l];
        end
        if (k / 2 == 2) e = sext16(e[15:0]);
        checks++;
        if (d !== e || flag !== ef) begin
          failures++;
          if (failures < 10) $display("FAIL op=%s x=%h y=%h d=%h/%b exp=%h/%b", op.name(), x, y, d, flag, e, ef);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
