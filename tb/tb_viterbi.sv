// tb_viterbi: complete Viterbi decoders run as DSP programs, for two rate-1/2
// convolutional codes: constraint length K = 5 (16 states, generators
// 1 + D^3 + D^4 and 1 + D + D^3 + D^4) and K = 9 (256 states, generators 753
// and 561 octal, bit i of the octal number being the tap on D^i).
//
// For each code the testbench encodes 48 - (K-1) random bits plus K-1 zero
// tail bits, and maps them to soft symbols of amplitude +-40 with noise of at
// most +-20. It hands the DSP one branch-metric word per trellis stage through
// the I/O bus. The high byte is r0 + r1, the distance to the code pair 00.
// The low byte is r0 - r1, the distance to 01. Pairs 11 and 10 are the
// negatives of these.
// Per stage the program does:
//   IN and MV into T, then set the six metric pointers;
//   2^(K-2) + 1 dual ACS instructions, one butterfly each. The last one only
//     drains the pipeline: the compare of one ACS is done by the next;
//   after every eighth butterfly, an XOR of SR0 with a fixed mask, written
//     to the transition table.
// Then CFGTRC and 48 TRCBK steps recover the bits. SR1 is sent out every 16
// steps.
//
// Metric layout: state s is kept in bank A when s[K-2] ^ s[0] = 0, otherwise
// in bank B, at word s >> 1. With that rule the two old states j and
// j + 2^(K-2) of a butterfly are always in different banks. So are the two new
// states 2j and 2j+1. Each ACS therefore reads one metric from each bank and
// writes one result to each bank. For odd j the bank-A metric is that of state
// j + 2^(K-2): the program negates the local distance (ACSB) and those
// decision bits come out inverted. The XOR mask 0xCCCC puts them right.
//
// Checks, for each code:
//   every transition word, against a reference model of the same arithmetic
//     kept here (including tie handling);
//   the decoded bits in SR1, against the message;
//   the ACS instructions of a stage issue back to back (one per cycle);
//   a watchdog.
module tb_viterbi;
  import dsp_pkg::*;
  import dsp_asm_pkg::*;

  localparam int NS = 48;              // trellis stages, tail included
  localparam int MAXCYC = 60000;
  localparam logic [15:0] R1 = 16'h0010, R2 = 16'h0100;   // metric regions
  localparam logic [15:0] TB = 16'h0200;                  // transition table

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic pm_we = 0;
  logic [15:0] pm_waddr = '0;
  instr_t pm_wdata = '0;
  logic [4:0] irq = '0;
  logic [15:0] io_addr, io_rdata, io_wdata;
  logic io_rd, io_wr;

  dsp_core dut (.*);

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- reference
  int          kk, nbf, wps;               // K, butterflies and table words per stage
  logic [8:0]  g0, g1;
  logic        msg [NS];
  logic [15:0] tword [NS];                 // branch-metric word of each stage
  logic [15:0] dec_ref [NS * 16];          // expected transition words

  function automatic int sx8(input logic [7:0] v);
    return int'($signed(v));
  endfunction

  // code pair on the branch from state j (top bit 0) with input 0
  function automatic logic [1:0] pair0(input int j);
    logic [8:0] r;
    r = 9'(j << 1);
    return {^(g0 & r), ^(g1 & r)};
  endfunction

  task automatic make_reference();
    logic [7:0] st;
    logic [8:0] r;
    logic [1:0] c;
    int         r0, r1, d0, ca, cb;
    int         m [256], mn [256];
    for (int t = 0; t < NS; t++) msg[t] = (t < NS - (kk - 1)) ? 1'($urandom) : 1'b0;
    st = '0;
    for (int t = 0; t < NS; t++) begin
      r  = {st, msg[t]};
      r0 = (^(g0 & r) ? 40 : -40) + $urandom_range(0, 40) - 20;
      r1 = (^(g1 & r) ? 40 : -40) + $urandom_range(0, 40) - 20;
      // distance to pair c: -(sum of (2c-1)*r)
      tword[t] = {8'(r0 + r1), 8'(r0 - r1)};
      st = 8'({st, msg[t]} & ((1 << (kk - 1)) - 1));
    end
    for (int s = 0; s < 2 * nbf; s++) m[s] = (s == 0) ? 8000 : 9000;
    for (int t = 0; t < NS; t++) begin
      for (int w = 0; w < wps; w++) dec_ref[t * wps + w] = '0;
      for (int j = 0; j < nbf; j++) begin
        c  = pair0(j);
        d0 = (c[1] == c[0]) ? sx8(tword[t][15:8]) : sx8(tword[t][7:0]);
        if (c[1]) d0 = -d0;
        // new state 2j: from j with d0, from j+nbf with -d0
        ca = m[j] + d0;
        cb = m[j + nbf] - d0;
        dec_ref[t * wps + j / 8][(2 * j) % 16] = (j % 2 == 0) ? (cb < ca) : (cb <= ca);
        mn[2 * j] = (cb < ca) ? cb : ca;
        // new state 2j+1: from j with -d0, from j+nbf with d0
        ca = m[j] - d0;
        cb = m[j + nbf] + d0;
        dec_ref[t * wps + j / 8][(2 * j + 1) % 16] = (j % 2 == 0) ? (cb < ca) : (cb <= ca);
        mn[2 * j + 1] = (cb < ca) ? cb : ca;
      end
      m = mn;
    end
  endtask

  // ---------------------------------------------------------------- I/O
  int tin = 0;
  assign io_rdata = (io_rd && tin < NS) ? tword[tin] : 16'h0000;

  int   cyc = 0, n_dec = 0, n_sr1 = 0, n_trc = 0, n_acs = 0;
  int   acs_in_stage = 0, t_acs0 = 0, acs_span_bad = 0;
  int   t_in0 = 0, t_in1 = 0, t_trc0 = 0, t_trc1 = 0;
  bit   done = 0;
  logic [15:0] exp_sr1 [3];

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (io_rd) begin
        if (tin == 0) t_in0 = cyc;
        t_in1 = cyc;
        tin++;
      end
      // the ACS of one stage: nbf + 1 of them, with one table write after
      // every eight from the ninth on, and nothing else in between
      if (dut.c_ex.v && dut.c_ex.acs) begin
        if (acs_in_stage == 0) t_acs0 = cyc;
        n_acs++;
        acs_in_stage++;
        if (acs_in_stage == nbf + 1) begin
          if (cyc - t_acs0 + 1 != nbf + 1 + wps - 1) acs_span_bad++;
          acs_in_stage = 0;
        end
      end
      if (dut.c_ex.v && dut.c_ex.trc) begin
        if (n_trc == 0) t_trc0 = cyc;
        t_trc1 = cyc;
        n_trc++;
      end
      if (io_wr) begin
        if (io_addr == 16'hFFFF) done = 1;
        else if (io_addr == 16'h0300) begin
          checks++;
          if (n_dec >= NS * wps || io_wdata !== dec_ref[n_dec]) begin
            failures++;
            if (failures < 10)
              $display("FAIL K=%0d transition word %0d: %h expected %h", kk, n_dec, io_wdata,
                       n_dec < NS * wps ? dec_ref[n_dec] : 16'h0);
          end
          n_dec++;
        end else if (io_addr[15:4] == 12'h020) begin
          checks++;
          if (n_sr1 >= 3 || io_wdata !== exp_sr1[n_sr1]) begin
            failures++;
            $display("FAIL K=%0d decoded bits, word %0d: %h expected %h", kk, n_sr1, io_wdata,
                     n_sr1 < 3 ? exp_sr1[n_sr1] : 16'h0);
          end
          n_sr1++;
        end
      end
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
  instr_t p [$];
  function automatic void put(input instr_t w);
    p.push_back(w);
  endfunction

  // one trellis stage: metrics read from region rd, written to region wr
  function automatic void stage(input logic [15:0] rd, input logic [15:0] wr);
    logic [1:0] c;
    bit         neg, hi_b;
    int         jr, k;
    put(io_in(AM(0), 16'h0400));
    put(mv(AM(0), T));
    put(ldi(PAM(2), rd));                    // even j: state j in A
    put(ldi(PBM(2), rd + 16'(nbf / 2)));     //         state j+nbf in B
    put(ldi(PAM(3), rd + 16'(nbf / 2)));     // odd j:  state j+nbf in A
    put(ldi(PBM(3), rd));                    //         state j in B
    put(ldi(PAM(4), wr - 16'd1));            // the first ACS writes nothing useful
    put(ldi(PBM(4), wr - 16'd1));
    for (int j = 0; j <= nbf; j++) begin
      jr  = (j < nbf) ? j : 0;
      c   = pair0(jr);
      neg = c[1] ^ 1'(jr);
      // this ACS writes butterfly k = j-1: state 2k goes to bank k[K-3]
      k    = (j == 0) ? 0 : j - 1;
      hi_b = (k >= nbf / 2);
      put(acs(jr % 2 == 0 ? 2 : 3, jr % 2 == 0 ? 2 : 3,
              hi_b ? BM(4) : AM(4), hi_b ? AM(4) : BM(4), c[1] != c[0], neg));
      if (j >= 8 && j % 8 == 0) put(comp(OP_XOR, AM(1), SR0, AM(5)));
    end
  endfunction

  task automatic run(input int k_len, input logic [8:0] gen0, input logic [8:0] gen1);
    int          lp, bitv;
    logic [15:0] sr;

    kk  = k_len;
    g0  = gen0;
    g1  = gen1;
    nbf = 1 << (kk - 2);
    wps = (nbf + 7) / 8;
    make_reference();
    sr = '0;
    for (int step = 0; step < NS; step++) begin
      // step i traces stage NS-1-i, whose decision is the input K-1 stages earlier
      bitv = (NS - kk - step >= 0) ? int'(msg[NS - kk - step]) : 0;
      sr   = {sr[14:0], 1'(bitv)};
      if (step % 16 == 15) exp_sr1[step / 16] = sr;
    end

    p.delete();
    put(jump(8));
    repeat (5) put(reti());
    repeat (2) put(nop());
    for (int i = 0; i < 8; i++) begin
      put(ldi(IA(i), 16'h0001));
      put(ldi(IB(i), 16'h0001));
    end
    put(ldi(IA(0), 16'h0000));
    put(ldi(IA(5), 16'h0000));
    put(ldi(PAM(0), 16'h01F1));
    put(ldi(PAM(5), 16'h01F0));
    put(ldi(AM(5), 16'hCCCC));
    put(ldi(PAM(1), TB));
    put(ldi(PAM(6), 16'h01F8));
    // initial metrics in region R1: state 0 favoured
    put(ldi(PAM(7), R1));
    put(ldi(PBM(7), R1));
    put(setct(nbf - 1));
    put(do_(p.size() + 2));
    put(ldi(AM(7), 16'd9000));
    put(ldi(BM(7), 16'd9000));
    put(ldi(PAM(7), R1));
    put(ldi(AM(7), 16'd8000));
    put(ldi(PAM(7), 16'h01F8));
    // two stages per loop pass, ping-ponging between the two regions
    put(setct(NS / 2 - 1));
    lp = p.size();
    put(do_(0));
    stage(R1, R2);
    stage(R2, R1);
    p[lp] = do_(p.size() - 1);
    // send the transition table out
    put(ldi(PAM(1), TB));
    put(setct(NS * wps - 1));
    put(do_(p.size() + 1));
    put(io_out(AM(1), 16'h0300));
    // traceback from the zero end state
    put(ldi(AM(0), 16'h0000));
    put(cfgtrc(AM(0), kk - 5));
    put(ldi(PAM(1), TB + 16'((NS - 1) * wps)));
    put(ldi(IA(1), 16'(-wps)));
    for (int w = 0; w < 3; w++) begin
      put(setct(15));
      put(do_(p.size() + 1));
      put(trcbk(AM(1)));
      put(mv(SR1, AM(7)));
      put(io_out(AM(6), 16'h0200 + 16'(w)));
    end
    put(io_out(AM(5), 16'hFFFF));
    put(jump(p.size()));
    if (p.size() > 1024) $fatal(1, "program does not fit the program memory");

    rst_n = 1'b0;
    done  = 0;
    tin   = 0;
    cyc   = 0; n_dec = 0; n_sr1 = 0; n_trc = 0; n_acs = 0;
    acs_in_stage = 0; acs_span_bad = 0;
    repeat (2) @(negedge clk);
    for (int a = 0; a < p.size(); a++) begin
      pm_we = 1'b1; pm_waddr = 16'(a); pm_wdata = p[a];
      @(negedge clk);
    end
    pm_we = 1'b0;
    rst_n = 1'b1;
    wait (done);
    repeat (3) @(negedge clk);

    checks += 5;
    if (n_dec != NS * wps) failures++;
    if (n_sr1 != 3) failures++;
    if (n_trc != NS) failures++;
    if (n_acs != (nbf + 1) * NS) failures++;
    if (acs_span_bad != 0) begin
      failures++;
      $display("FAIL K=%0d: %0d stages with gaps in the ACS sequence", kk, acs_span_bad);
    end
    $display("K=%0d: stages=%0d acs=%0d trcbk=%0d cycles=%0d program words=%0d", kk, NS, n_acs,
             n_trc, cyc, p.size());
    $display("K=%0d: cycles per trellis stage %0d.%02d, per traceback step %0d.%02d", kk,
             (t_in1 - t_in0) / (NS - 1), (t_in1 - t_in0) * 100 / (NS - 1) % 100,
             (t_trc1 - t_trc0) / (NS - 1), (t_trc1 - t_trc0) * 100 / (NS - 1) % 100);
  endtask

  initial begin
    run(5, 9'o031, 9'o033);
    run(9, 9'o753, 9'o561);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
