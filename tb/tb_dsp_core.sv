// tb_dsp_core: program-level test of the symbol-rate DSP.
//
// The testbench assembles one program with the instruction builders, loads it
// through the program-load port and runs it. Every result leaves the DSP
// through its I/O bus (OUT to 0x0200 + n), and is compared with a value the
// testbench works out itself from the random operands it put into the
// program. The program covers:
//   loads, ALU/MAC/SFT arithmetic, 16x16 MUL, complex MUL and MAC,
//   a 33-tap FIR filter as a zero-overhead DO loop of FIR2 instructions,
//   a DO loop interrupted by an interrupt, CALL/RET, JUMP, TEST/TESTZ,
//   DLD/DST, circular (modulo) addressing, IN, dual ACS with transition bits,
//   CFGTRC/TRCBK traceback with a 4-bit and an 8-bit state register.
// Timing checks (markers OUT to 0x0300 + m record the cycle):
//   ten complex MACs take ten cycles (one per cycle);
//   the 33-tap FIR takes 17 loop cycles plus SETCT and DO.
// It also counts every pipeline mechanism (memory read-after-write stall,
// address-generator stall, TEST wait, traceback wait, zero-overhead loop
// back-jump, taken branch, skipped word, interrupt) and counts a failure for
// one that never happened.
module tb_dsp_core;
  import dsp_pkg::*;
  import dsp_asm_pkg::*;

  localparam int MAXCYC = 20000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic pm_we = 0;
  logic [15:0] pm_waddr = '0;
  instr_t pm_wdata = '0;
  logic [4:0] irq;
  logic irq_early = 1'b0, irq_loop = 1'b0;   // two sources of interrupt 0
  assign irq = {4'd0, irq_early | irq_loop};
  logic [15:0] io_addr, io_rdata, io_wdata;
  logic io_rd, io_wr;

  dsp_core dut (.*);

  always #5 clk = ~clk;

  // IN returns a value derived from the address
  assign io_rdata = io_rd ? (io_addr ^ 16'h5A5A) : 16'h0000;

  instr_t      p [$];
  logic [15:0] exp_v [$];
  int          got = 0, cyc = 0;
  int          mark_t [16];
  bit          done = 0;
  int          n_isr = 0, n_irq = 0, n_raw = 0, n_agh = 0, n_testw = 0, n_trcw = 0;
  int          n_loop = 0, n_redir = 0, n_skip = 0, n_in = 0;

  function automatic void put(input instr_t w);
    p.push_back(w);
  endfunction
  // send a register's low 16 bits out through the scratch buffer at 0x100
  function automatic void emit_reg(input logic [5:0] r, input logic [15:0] v);
    put(mv(r, AM(7)));
    put(io_out(AM(6), 16'h0200 + 16'(exp_v.size())));
    exp_v.push_back(v);
  endfunction
  function automatic void emit_mem(input logic [5:0] m, input logic [15:0] v);
    put(io_out(m, 16'h0200 + 16'(exp_v.size())));
    exp_v.push_back(v);
  endfunction
  function automatic void marker(input int m);
    put(io_out(AM(5), 16'h0300 + 16'(m)));
  endfunction
  function automatic int sx8(input logic [7:0] v);
    return int'($signed(v));
  endfunction
  function automatic int sx16(input logic [15:0] v);
    return int'($signed(v));
  endfunction
  function automatic int min(input int a, input int b);
    return (b < a) ? b : a;
  endfunction

  // ---------------------------------------------------------------- monitor
  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (dut.stall && dut.raw) n_raw++;
      if (dut.stall && dut.uses_ag && ((dut.c_or.v && dut.c_or.writes_ag) ||
                                       (dut.c_ex.v && dut.c_ex.writes_ag))) n_agh++;
      if (dut.stall && dut.is_test) n_testw++;
      if (dut.stall && dut.c_id.trc) n_trcw++;
      if (!dut.stall && !dut.take_irq && !dut.redirect && dut.loop_hit && dut.count_eff != 0)
        n_loop++;
      if (dut.redirect) n_redir++;
      if (dut.id_go && dut.test_skip) n_skip++;
      if (dut.take_irq) n_irq++;
      if (io_rd) n_in++;
      if (io_wr) begin
        if (io_addr == 16'h8000) n_isr++;
        else if (io_addr == 16'hFFFF) done = 1;
        else if (io_addr[15:8] == 8'h03) begin
          mark_t[io_addr[3:0]] = cyc;
          // raise interrupt 0 for one cycle when the DO loop test begins
          if (io_addr[3:0] == 4'd4) irq_loop <= 1'b1;
        end else if (io_addr[15:8] == 8'h02) begin
          checks++;
          if (int'(io_addr[7:0]) != got || got >= exp_v.size()) begin
            failures++;
            $display("FAIL result %0d arrived out of order (expected %0d)", io_addr[7:0], got);
          end else if (io_wdata !== exp_v[got]) begin
            failures++;
            $display("FAIL result %0d: %h expected %h", got, io_wdata, exp_v[got]);
          end
          got++;
        end
      end
      if (irq_loop && !(io_wr && io_addr == 16'h0304)) irq_loop <= 1'b0;
    end
  end

  initial begin
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("watchdog: program did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- program
  initial begin
    logic [15:0] a, b, c, v, x16, y16, w;
    logic [7:0]  i1, q1, i2, q2;
    logic [15:0] xw [17], hw [17], cv [6];
    int          re, im, acc, r, d0v, t1, t2;
    int          ma [3], mb [3], hi2, lo2, hi3, lo3;
    logic [1:0]  f2, f3;
    logic [15:0] tab4 [4], tab8 [2][16];
    logic [7:0]  s;
    logic [15:0] sr1;
    int          isr_at, sub_at, call_at, bit_v;

    // vectors: 0 reset, 1..5 interrupts 0..4
    put(jump(8));
    put(jump(0));          // patched: interrupt 0 service routine
    repeat (4) put(reti());
    repeat (2) put(nop());

    // scratch pointers: A7 writes and A6 reads the output buffer, A5 a fixed word
    put(ldi(PAM(7), 16'h0100));
    put(ldi(PAM(6), 16'h0100));
    put(ldi(PAM(5), 16'h01F0));
    put(ldi(IA(5), 16'h0000));
    put(ldi(AM(5), 16'hABCD));

    // ---- loads and arithmetic through memory (read-after-write stalls)
    a = 16'($urandom_range(0, 4000)) - 16'd2000;
    b = 16'($urandom_range(0, 4000)) - 16'd2000;
    c = 16'($urandom);
    put(ldi(PAM(0), 16'h0010));
    put(ldi(PBM(0), 16'h0010));
    put(ldi(AM(0), a));
    put(ldi(BM(0), b));
    put(ldi(PAM(1), 16'h0010));
    put(ldi(PBM(1), 16'h0010));
    put(comp(OP_ADD, D0, AM(1), BM(1)));
    emit_reg(D0, 16'(sx16(a) + sx16(b)));
    put(ldi(T, c));
    put(comp(OP_SUB, D1, D0, T));
    emit_reg(D1, 16'(sx16(a) + sx16(b) - sx16(c)));

    // ---- MV into a pointer register, used at once (address-generator stall)
    v = 16'($urandom);
    put(ldi(D1, 16'h0050));
    put(mv(D1, PAM(2)));
    put(ldi(AM(2), v));
    put(ldi(PAM(3), 16'h0050));
    emit_mem(AM(3), v);

    // ---- 16x16 multiply, 40-bit result read as two halves
    x16 = 16'($urandom);
    y16 = 16'($urandom);
    r   = sx16(x16) * sx16(y16);
    put(ldi(D0, x16));
    put(ldi(T, y16));
    put(comp(OP_MUL, D1, D0, T));
    emit_reg(D1, 16'(r));
    put(sft(OP_ASFT, D1, D1, -16));
    emit_reg(D1, 16'(r >>> 16));

    // ---- complex multiply, then ten complex MACs at one per cycle
    i1 = 8'($urandom); q1 = 8'($urandom); i2 = 8'($urandom); q2 = 8'($urandom);
    re = sx8(i1) * sx8(i2) - sx8(q1) * sx8(q2);
    im = sx8(i1) * sx8(q2) + sx8(q1) * sx8(i2);
    put(ldi(D0, {i1, q1}));
    put(ldi(T, {i2, q2}));
    put(comp(OP_CMUL, D1, D0, T));
    marker(0);
    repeat (10) put(comp(OP_CMAC, D1, D0, T));
    marker(1);
    emit_reg(D1, 16'(11 * im));
    put(sft(OP_ASFT, D1, D1, -16));
    emit_reg(D1, 16'(11 * re));

    // ---- enable interrupt 0: the request raised before is still pending
    put(ldi(IMR, 16'h0001));
    put(nop());

    // ---- 33-tap FIR: 17 FIR2 steps (two taps each) in a zero-overhead loop
    acc = 0;
    for (int j = 0; j < 17; j++) begin
      xw[j] = 16'($urandom);
      hw[j] = 16'($urandom);
      if (j == 16) hw[j][15:8] = 8'd0;   // the 34th tap is zero
      acc += sx8(xw[j][7:0]) * sx8(hw[j][7:0]) + sx8(xw[j][15:8]) * sx8(hw[j][15:8]);
    end
    put(ldi(PAM(2), 16'h0060));
    put(ldi(PBM(2), 16'h0060));
    for (int j = 0; j < 17; j++) put(ldi(AM(2), xw[j]));
    for (int j = 0; j < 17; j++) put(ldi(BM(2), hw[j]));
    put(ldi(PAM(2), 16'h0060));
    put(ldi(PBM(2), 16'h0060));
    put(comp(OP_CLR, D0, D0, D0));
    marker(2);
    put(setct(16));
    put(do_(p.size() + 1));
    put(comp(OP_FIR2, D0, AM(2), BM(2)));
    marker(3);
    emit_reg(D0, 16'(acc));
    put(sft(OP_ASFT, D0, D0, -16));
    emit_reg(D0, 16'(acc >>> 16));

    // ---- DO loop with a three-word body, interrupted once (10 passes)
    put(ldi(D0, 16'h0000));
    put(ldi(T, 16'h0003));
    marker(4);
    put(setct(9));
    put(do_(p.size() + 3));
    put(comp(OP_ADD, D0, D0, T));
    put(nop());
    put(comp(OP_ADD, D0, D0, T));
    emit_reg(D0, 16'd60);

    // ---- CALL / RET and JUMP over a word
    call_at = p.size();
    put(call(0));          // patched below
    emit_reg(D0, 16'd77);
    put(jump(p.size() + 2));
    put(ldi(D0, 16'hDEAD));
    emit_reg(D0, 16'd77);

    // ---- TEST (skip the next word if the bit is 0) and TESTZ (if it is 1)
    put(ldi(D1, 16'h0005));
    put(ldi(D0, 16'h0000));
    put(ldi(T, 16'h0001));
    put(test(D1, 0));     put(comp(OP_ADD, D0, D0, T)); put(sft(OP_LSFT, T, T, 1));
    put(test(D1, 1));     put(comp(OP_ADD, D0, D0, T)); put(sft(OP_LSFT, T, T, 1));
    put(test(D1, 2, 1));  put(comp(OP_ADD, D0, D0, T)); put(sft(OP_LSFT, T, T, 1));
    put(test(D1, 3, 1));  put(comp(OP_ADD, D0, D0, T));
    emit_reg(D0, 16'd9);

    // ---- DST / DLD: two registers to two memories and back
    a = 16'($urandom);
    b = 16'($urandom);
    put(ldi(D0, a));
    put(ldi(T, b));
    put(ldi(PAM(2), 16'h0080));
    put(ldi(PBM(2), 16'h0080));
    put(dst(D0, T, 2, 2));
    put(ldi(PAM(2), 16'h0080));
    put(ldi(PBM(2), 16'h0080));
    put(ldi(T, 16'h0000));
    put(dld(2, 2, D1, T));
    emit_reg(D1, a);
    emit_reg(T, b);

    // ---- circular buffer of four words at 0x20
    for (int j = 0; j < 6; j++) cv[j] = 16'($urandom);
    put(ldi(SB0, 16'h0020));
    put(ldi(CB0, 16'h0004));
    put(ldi(PAM(4), 16'h0020));
    for (int j = 0; j < 6; j++) put(ldi(AM(4), cv[j]));
    put(ldi(PAM(4), 16'h0022));
    emit_mem(AM(4), cv[2]);
    emit_mem(AM(4), cv[3]);
    emit_mem(AM(4), cv[4]);
    emit_mem(AM(4), cv[5]);
    put(ldi(CB0, 16'h0000));

    // ---- IN from the I/O bus into memory
    put(io_in(AM(7), 16'h0033));
    emit_mem(AM(6), 16'h0033 ^ 16'h5A5A);

    // ---- dual add-compare-select
    for (int j = 0; j < 3; j++) begin
      ma[j] = $urandom_range(0, 2000);
      mb[j] = $urandom_range(0, 2000);
    end
    w  = 16'($urandom);
    t1 = sx8(w[15:8]);      // ACS, tsel = 0
    t2 = -sx8(w[7:0]);      // ACSB, tsel = 1
    hi2 = min(ma[0] + t1, mb[0] - t1);
    lo2 = min(ma[0] - t1, mb[0] + t1);
    f2  = {(mb[0] - t1) < (ma[0] + t1), (mb[0] + t1) < (ma[0] - t1)};
    hi3 = min(ma[1] + t2, mb[1] - t2);
    lo3 = min(ma[1] - t2, mb[1] + t2);
    f3  = {(mb[1] - t2) < (ma[1] + t2), (mb[1] + t2) < (ma[1] - t2)};
    put(comp(OP_CLR, D0, D0, D0));
    put(comp(OP_CLR, D1, D1, D1));
    put(ldi(PAM(2), 16'h0030));
    put(ldi(PBM(2), 16'h0030));
    for (int j = 0; j < 3; j++) put(ldi(AM(2), 16'(ma[j])));
    for (int j = 0; j < 3; j++) put(ldi(BM(2), 16'(mb[j])));
    put(ldi(PAM(2), 16'h0030));
    put(ldi(PBM(2), 16'h0030));
    put(ldi(PAM(3), 16'h0040));
    put(ldi(PBM(3), 16'h0040));
    put(ldi(T, w));
    put(acs(2, 2, AM(3), BM(3), 1'b0, 1'b0));
    put(acs(2, 2, AM(3), BM(3), 1'b1, 1'b1));
    put(acs(2, 2, AM(3), BM(3), 1'b0, 1'b0));
    // SR0 = {f3L, f3H, f2L, f2H, f1L, f1H, 0...}; the first ACS compares 0 with 0
    emit_reg(SR0, {f3[0], f3[1], f2[0], f2[1], 12'd0});
    put(ldi(PAM(3), 16'h0041));
    put(ldi(PBM(3), 16'h0041));
    emit_mem(AM(3), 16'(hi2));
    emit_mem(AM(3), 16'(hi3));
    emit_mem(BM(3), 16'(lo2));
    emit_mem(BM(3), 16'(lo3));

    // ---- traceback, 4-bit state (K = 5): one table word per stage
    sr1 = '0;
    for (int j = 0; j < 4; j++) tab4[j] = 16'($urandom);
    s = 8'($urandom_range(0, 15));
    put(ldi(PAM(2), 16'h0090));
    for (int j = 0; j < 4; j++) put(ldi(AM(2), tab4[j]));
    put(ldi(AM(2), 16'(s)));
    put(ldi(PAM(3), 16'h0094));
    put(cfgtrc(AM(3), 0));
    put(ldi(PAM(3), 16'h0093));
    put(ldi(IA(3), 16'hFFFF));
    for (int j = 3; j >= 0; j--) begin
      put(trcbk(AM(3)));
      bit_v = int'(tab4[j][s[3:0]]);
      s     = {4'd0, 1'(bit_v), s[3:1]};
      sr1   = {sr1[14:0], 1'(bit_v)};
    end
    emit_reg(SR1, sr1);
    emit_reg(SRA, {8'd0, s});

    // ---- traceback, 8-bit state (K = 9): sixteen table words per stage,
    //      the state's upper four bits select the word
    for (int g = 0; g < 2; g++) for (int j = 0; j < 16; j++) tab8[g][j] = 16'($urandom);
    s = 8'($urandom);
    put(ldi(PAM(2), 16'h00A0));
    for (int g = 0; g < 2; g++) for (int j = 0; j < 16; j++) put(ldi(AM(2), tab8[g][j]));
    put(ldi(AM(2), 16'(s)));
    put(ldi(PAM(3), 16'h00C0));
    put(cfgtrc(AM(3), 4));
    put(ldi(PAM(3), 16'h00B0));
    put(ldi(IA(3), 16'hFFF0));
    for (int g = 1; g >= 0; g--) begin
      put(trcbk(AM(3)));
      bit_v = int'(tab8[g][s[7:4]][s[3:0]]);
      s     = {1'(bit_v), s[7:1]};
      sr1   = {sr1[14:0], 1'(bit_v)};
    end
    put(ldi(IA(3), 16'h0001));
    emit_reg(SR1, sr1);
    emit_reg(SRA, {8'd0, s});

    // ---- end of program
    put(io_out(AM(5), 16'hFFFF));
    put(jump(p.size()));

    // subroutine and interrupt service routine
    sub_at = p.size();
    put(ldi(D0, 16'd77));
    put(ret());
    isr_at = p.size();
    put(io_out(AM(5), 16'h8000));
    put(reti());
    p[1]       = jump(isr_at);
    p[call_at] = call(sub_at);

    // ---- load and run
    repeat (2) @(negedge clk);
    for (int k = 0; k < p.size(); k++) begin
      pm_we = 1'b1; pm_waddr = 16'(k); pm_wdata = p[k];
      @(negedge clk);
    end
    pm_we = 1'b0;
    rst_n = 1'b1;
    // interrupt 0 requested while it is still masked
    repeat (3) @(negedge clk);
    irq_early = 1'b1;
    @(negedge clk);
    irq_early = 1'b0;
    wait (done);
    repeat (5) @(negedge clk);

    // ---- final checks
    checks++;
    if (got != exp_v.size()) begin
      failures++;
      $display("FAIL %0d of %0d results arrived", got, exp_v.size());
    end
    checks++;
    if (mark_t[1] - mark_t[0] != 11) begin
      failures++;
      $display("FAIL ten complex MACs took %0d cycles", mark_t[1] - mark_t[0] - 1);
    end
    checks++;
    if (mark_t[3] - mark_t[2] != 20) begin
      failures++;
      $display("FAIL 33-tap FIR took %0d cycles, expected 19", mark_t[3] - mark_t[2] - 1);
    end
    checks++;
    if (n_isr != 2 || n_irq != 2) begin
      failures++;
      $display("FAIL %0d interrupts taken, %0d services, expected 2", n_irq, n_isr);
    end
    $display("mechanisms: raw_stall=%0d ag_stall=%0d test_wait=%0d trc_wait=%0d loop_back=%0d branch=%0d skip=%0d irq=%0d in=%0d",
             n_raw, n_agh, n_testw, n_trcw, n_loop, n_redir, n_skip, n_irq, n_in);
    checks += 9;
    if (n_raw == 0)   failures++;
    if (n_agh == 0)   failures++;
    if (n_testw == 0) failures++;
    if (n_trcw == 0)  failures++;
    if (n_loop == 0)  failures++;
    if (n_redir == 0) failures++;
    if (n_skip == 0)  failures++;
    if (n_irq == 0)   failures++;
    if (n_in == 0)    failures++;
    $display("cycles=%0d program words=%0d", cyc, p.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
