// tb_dsp_mac: self-checking test of the subword-parallel MAC. Random operands
// for every operation, signed and unsigned; expected results are computed
// from the byte lanes with integer arithmetic (a 16x16 product is checked
// against a direct 16-bit multiplication, not against the four byte products).
module tb_dsp_mac;
  import dsp_pkg::*;
  int checks = 0, failures = 0;
  mac_op_e op;
  logic    u;
  word40_t x, y, din, d, e;

  dsp_mac dut (.op, .u, .x, .y, .din, .d);

  function automatic longint b8(input word40_t v, input int hi, input bit uns);
    longint t;
    t = longint'(hi ? v[15:8] : v[7:0]);
    if (!uns && t > 127) t -= 256;
    return t;
  endfunction
  function automatic word40_t two(input longint h, input longint l);
    return {24'(h), 16'(l)};
  endfunction

  function automatic word40_t model(input mac_op_e o, input bit uns, input word40_t a,
                                    input word40_t b, input word40_t acc);
    longint xh, xl, yh, yl, x16, y16, dh, dl;
    xh = b8(a, 1, uns); xl = b8(a, 0, uns); yh = b8(b, 1, uns); yl = b8(b, 0, uns);
    x16 = uns ? longint'(a[15:0]) : longint'($signed(a[15:0]));
    y16 = uns ? longint'(b[15:0]) : longint'($signed(b[15:0]));
    dh = longint'($signed(acc[39:16]));
    dl = longint'(acc[15:0]);
    case (o)
      M_MUL8:  return two(xh * yh, xl * yl);
      M_MAC8:  return two(dh + xh * yh, dl + xl * yl);
      M_CMUL:  return two(xh * yh - xl * yl, xh * yl + xl * yh);
      M_CMAC:  return two(dh + xh * yh - xl * yl, dl + xh * yl + xl * yh);
      M_CMSUB: return two(dh - (xh * yh - xl * yl), dl - (xh * yl + xl * yh));
      M_MUL:   return word40_t'(x16 * y16);
      M_MAC:   return acc + word40_t'(x16 * y16);
      M_MSUB:  return acc - word40_t'(x16 * y16);
      M_FIR2:  return acc + word40_t'(xl * yl + xh * yh);
      M_SQS:   return acc + word40_t'(xl * yl + xh * yh);
      M_SQSA:  return word40_t'(xl * yl + xh * yh);
      default: return two(longint'(a) - longint'(b), longint'(a) + longint'(b));
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k <= int'(M_ACS); k++) begin
      for (int n = 0; n < 400; n++) begin
        op  = mac_op_e'(k);
        u   = n[0];
        x   = {$urandom, $urandom};
        y   = (op inside {M_SQS, M_SQSA}) ? x : {$urandom, $urandom};
        din = {$urandom, $urandom};
        if (op == M_ACS) begin u = 0; x = sext16(16'($urandom)); y = sext16(16'($urandom % 256)); end
        if (n == 2) begin x = 40'h8080; y = 40'h8080; end
        #1;
        e = model(op, u, x, y, din);
        checks++;
        if (d !== e) begin
          failures++;
          if (failures < 10) $display("FAIL op=%s u=%b x=%h y=%h din=%h d=%h exp=%h", op.name(), u, x, y, din, d, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
