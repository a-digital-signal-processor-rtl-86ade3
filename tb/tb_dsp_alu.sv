// tb_dsp_alu: self-checking test of the ALU. Random operands for every
// operation; expected values are computed lane by lane with integer
// arithmetic in the testbench.
module tb_dsp_alu;
  import dsp_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e op;
  word40_t x, y, d, e;

  dsp_alu dut (.op, .x, .y, .d);

  function automatic longint sx(input longint v, input int w);  // sign-extend w bits
    return (v << (64 - w)) >>> (64 - w);
  endfunction
  function automatic longint lane(input word40_t v, input int lo, input int w);
    return sx(longint'((v >> lo) & ((40'd1 << w) - 1)), w);
  endfunction
  function automatic longint iabs(input longint v); return v < 0 ? -v : v; endfunction
  function automatic word40_t two(input longint h, input int hw, input longint l, input int lw);
    word40_t r;
    r = word40_t'(l) & ((40'd1 << lw) - 1);
    r |= (word40_t'(h) & ((40'd1 << hw) - 1)) << lw;
    if (hw + lw < 40 && r[hw+lw-1]) r |= ~((40'd1 << (hw + lw)) - 1);
    return r;
  endfunction

  function automatic word40_t model(input alu_op_e o, input word40_t a, input word40_t b);
    longint ah, al, bh, bl, ab, aa, bb, ba;
    ah = lane(a, 16, 24); al = lane(a, 0, 16); bh = lane(b, 16, 24); bl = lane(b, 0, 16);
    ab = lane(a, 8, 8);   aa = lane(a, 0, 8);  bb = lane(b, 8, 8);   ba = lane(b, 0, 8);
    case (o)
      A_ADD: return a + b;
      A_SUB: return a - b;
      A_ABD: return word40_t'(iabs(lane(a - b, 0, 40)));  // wrap-around difference
      A_ABS: return word40_t'(iabs(lane(a, 0, 40)));
      A_AND: return a & b;
      A_OR:  return a | b;
      A_XOR: return a ^ b;
      A_NOT: return ~a;
      A_INV: return -a;
      A_ADD16:    return two(ah + bh, 24, al + bl, 16);
      A_SUB16:    return two(ah - bh, 24, al - bl, 16);
      A_ADDSUB16: return two(ah + bh, 24, al - bl, 16);
      A_SUBADD16: return two(ah - bh, 24, al + bl, 16);
      A_ABD16:    return two(iabs(sx(ah - bh, 24)), 24, iabs(sx(al - bl, 16)), 16);
      A_INV16:    return two(-ah, 24, -al, 16);
      A_ADD8:     return two(ab + bb, 8, aa + ba, 8);
      A_SUB8:     return two(ab - bb, 8, aa - ba, 8);
      A_ADDSUB8:  return two(ab + bb, 8, aa - ba, 8);
      A_SUBADD8:  return two(ab - bb, 8, aa + ba, 8);
      A_ABD8:     return two(iabs(sx(ab - bb, 8)), 8, iabs(sx(aa - ba, 8)), 8);
      A_INV8:     return two(-ab, 8, -aa, 8);
      A_ADDSUB:   return two(lane(a,0,40) + lane(b,0,40), 24, lane(a,0,40) - lane(b,0,40), 16);
      A_SUBADD:   return two(lane(a,0,40) - lane(b,0,40), 24, lane(b,0,40) - lane(a,0,40), 16);
      A_PACK:     return two(aa, 8, ba, 8);
      A_SAT: begin
        longint v;
        v = lane(a, 0, 40);
        return word40_t'(v > 32767 ? 32767 : (v < -32768 ? -32768 : v));
      end
      default: return a;
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= int'(A_PASSX); k++) begin
      for (int n = 0; n < 200; n++) begin
        op = alu_op_e'(k);
        x  = {$urandom, $urandom};
        y  = {$urandom, $urandom};
        if (n % 4 == 1) begin x = sext16(16'($urandom)); y = sext16(16'($urandom)); end
        if (n == 0) begin x = 40'h80_0000_0000; y = 40'h7F_FFFF_FFFF; end
        #1;
        e = model(op, x, y);
        checks++;
        if (d !== e) begin
          failures++;
          if (failures < 10) $display("FAIL op=%s x=%h y=%h d=%h exp=%h", op.name(), x, y, d, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
