// tb_wcdma_rx_top: end-to-end test of the receiver baseband at its full size
// (17 x 8 correlator array, DSP with 2K-word data memories), no parameter
// overrides.
//
// The testbench plays the RF front end and the code generators: every clock it
// drives a random received sample and a random 2-bit code per CBE. A DSP
// program, loaded through the program port, runs the correlator array the way
// receiver software would:
//   A  independent codes: dump all correlators, integrate 100 chips, dump,
//      read three results of every CBE through the I/O bus;
//   B  all CBEs chained into one 136-phase correlator: same, 300 chips;
//   C  dual-code preprocessing on, dumps with random per-CBE enable masks.
// Each result the DSP reads (IN) is checked against a model of the array kept
// here from the same samples and codes; each result the DSP then writes to
// the status port (OUT, through its data memory) is checked against what it
// read. An interrupt is raised during phase A and serviced.
// Mechanisms counted, each must occur: DSP stall, zero-overhead loop jump,
// taken branch, interrupt, I/O read, dump (output enable) in each of the three
// array modes, mode switch of the chain mask and of the dual-code mode.
module tb_wcdma_rx_top;
  import dsp_pkg::*;
  import dsp_asm_pkg::*;

  localparam int NC = 17, NT = 8;
  localparam int MAXCYC = 30000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic signed [5:0] din = '0;
  logic [1:0] code_in [NC] = '{default: 2'b00};
  logic [NIRQ-1:0] irq = '0;
  logic [15:0] status;
  logic pm_we = 0;
  logic [15:0] pm_waddr = '0;
  instr_t pm_wdata = '0;

  wcdma_rx_top dut (.*);

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- array model
  logic [1:0]  mreg [NC][NT+1];   // mreg[i][k]: code held for correlator k (k >= 1)
  int          macc [NC][NT];
  int          mres [NC][NT];

  function automatic logic [1:0] pre_code(input logic [1:0] c [NC], input int i);
    logic a, b;
    if (i == NC - 1) return c[i];
    a = c[i & ~1][0];
    b = c[i | 1][0];
    // first code of a pair: sign a, on when a = b; second: sign a, on when a != b
    return (i % 2 == 0) ? {~(a ^ b), a} : {a ^ b, a};
  endfunction

  always @(posedge clk) begin
    logic [1:0] arr [NC];
    logic [1:0] sel [NC];
    logic [1:0] c;
    int         v;
    if (!rst_n) begin
      for (int i = 0; i < NC; i++) for (int k = 0; k <= NT; k++) mreg[i][k] <= 2'b00;
      for (int i = 0; i < NC; i++) for (int k = 0; k < NT; k++) begin
        macc[i][k] <= 0;
        mres[i][k] <= 0;
      end
    end else begin
      for (int i = 0; i < NC; i++) arr[i] = dut.dual_mode ? pre_code(code_in, i) : code_in[i];
      for (int i = 0; i < NC; i++)
        sel[i] = (i > 0 && dut.chain[i-1]) ? mreg[i-1][NT] : arr[i];
      for (int i = 0; i < NC; i++) begin
        for (int k = 0; k < NT; k++) begin
          c = (k == 0) ? sel[i] : mreg[i][k];
          v = c[1] ? (c[0] ? -int'(din) : int'(din)) : 0;
          if (dut.oe[i * NT + k]) begin
            mres[i][k] <= macc[i][k] + v;
            macc[i][k] <= 0;
          end else begin
            macc[i][k] <= macc[i][k] + v;
          end
          mreg[i][k+1] <= c;
        end
      end
    end
  end

  // ---------------------------------------------------------------- stimulus
  always @(negedge clk) begin
    din <= 6'($urandom);
    for (int i = 0; i < NC; i++) code_in[i] <= 2'($urandom);
  end

  // ---------------------------------------------------------------- monitor
  int          cyc = 0;
  bit          done = 0;
  logic [15:0] last_in = '0;
  int          n_stall = 0, n_loop = 0, n_redir = 0, n_irq = 0, n_in = 0;
  int          n_dump_ind = 0, n_dump_chain = 0, n_dump_dual = 0;
  int          n_chain_sw = 0, n_dual_sw = 0, n_status = 0;
  logic [NC-2:0] chain_q = '0;
  logic        dual_q = 1'b0;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (dut.u_dsp.stall) n_stall++;
      if (!dut.u_dsp.stall && !dut.u_dsp.take_irq && !dut.u_dsp.redirect &&
          dut.u_dsp.loop_hit && dut.u_dsp.count_eff != 0) n_loop++;
      if (dut.u_dsp.redirect) n_redir++;
      if (dut.u_dsp.take_irq) n_irq++;
      if (|dut.oe) begin
        if (dut.dual_mode)        n_dump_dual++;
        else if (|dut.chain)      n_dump_chain++;
        else                      n_dump_ind++;
      end
      if (dut.chain != chain_q)    n_chain_sw++;
      if (dut.dual_mode != dual_q) n_dual_sw++;
      chain_q <= dut.chain;
      dual_q  <= dut.dual_mode;
      if (dut.io_rd) begin
        n_in++;
        checks++;
        last_in <= dut.io_rdata;
        if (dut.io_rdata !== 16'(mres[dut.io_addr[7:3]][dut.io_addr[2:0]])) begin
          failures++;
          if (failures < 20)
            $display("FAIL cbe %0d tcc %0d: %0d expected %0d", dut.io_addr[7:3], dut.io_addr[2:0],
                     $signed(dut.io_rdata), mres[dut.io_addr[7:3]][dut.io_addr[2:0]]);
        end
      end
      if (dut.io_wr && dut.io_addr == 16'h0102) begin
        n_status++;
        checks++;
        if (dut.io_wdata !== last_in) begin
          failures++;
          $display("FAIL status write %h, last result read %h", dut.io_wdata, last_in);
        end
      end
      if (dut.io_wr && dut.io_addr == 16'h0FFF) done = 1;
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
  // write an immediate to an I/O address through the data memory
  function automatic void out_imm(input logic [15:0] addr, input logic [15:0] val);
    put(ldi(AM(7), val));
    put(io_out(AM(6), addr));
  endfunction
  function automatic void wait_chips(input int n);
    put(setct(n - 1));
    put(do_(p.size() + 1));
    put(nop());
  endfunction
  function automatic void dump_all(input bit random_mask);
    for (int i = 0; i < NC; i++)
      out_imm(16'h0110 + 16'(i), random_mask ? 16'($urandom_range(1, 255)) : 16'h00FF);
  endfunction
  // read correlators 0, NT-1 and one other of every CBE (program memory
  // holds three such passes)
  localparam int NRD = 3;
  function automatic void read_all();
    int ks [NRD];
    for (int i = 0; i < NC; i++) begin
      ks = '{0, $urandom_range(1, NT - 2), NT - 1};
      for (int j = 0; j < NRD; j++) begin
        put(io_in(AM(7), 16'(NT * i + ks[j])));
        put(io_out(AM(6), 16'h0102));
      end
    end
  endfunction

  int isr_at;
  initial begin
    put(jump(8));
    put(jump(0));              // patched: interrupt 0 service routine
    repeat (4) put(reti());
    repeat (2) put(nop());
    put(ldi(PAM(7), 16'h0100));
    put(ldi(PAM(6), 16'h0100));
    put(ldi(PAM(5), 16'h01F0));
    put(ldi(IA(5), 16'h0000));
    put(ldi(AM(5), 16'h0000));
    put(ldi(IMR, 16'h0001));
    // A: independent codes
    out_imm(16'h0100, 16'h0000);
    out_imm(16'h0101, 16'h0000);
    dump_all(1'b0);
    wait_chips(100);
    dump_all(1'b0);
    read_all();
    // B: one long chained correlator
    out_imm(16'h0100, 16'hFFFF);
    dump_all(1'b0);
    wait_chips(300);
    dump_all(1'b0);
    read_all();
    // C: dual-code preprocessing, partial dumps
    out_imm(16'h0100, 16'h0000);
    out_imm(16'h0101, 16'h0001);
    dump_all(1'b0);
    wait_chips(100);
    dump_all(1'b1);
    read_all();
    put(io_out(AM(5), 16'h0FFF));
    put(jump(p.size()));
    isr_at = p.size();
    put(io_out(AM(5), 16'h0103));
    put(reti());
    p[1] = jump(isr_at);
    if (p.size() > 1024) $fatal(1, "program does not fit the program memory");

    repeat (2) @(negedge clk);
    for (int k = 0; k < p.size(); k++) begin
      pm_we = 1'b1; pm_waddr = 16'(k); pm_wdata = p[k];
      @(negedge clk);
    end
    pm_we = 1'b0;
    rst_n = 1'b1;
    repeat (300) @(negedge clk);
    irq[0] = 1'b1;
    @(negedge clk);
    irq[0] = 1'b0;
    wait (done);
    repeat (3) @(negedge clk);

    $display("mechanisms: stall=%0d loop=%0d branch=%0d irq=%0d in=%0d status=%0d dump_ind=%0d dump_chain=%0d dump_dual=%0d chain_switch=%0d dual_switch=%0d",
             n_stall, n_loop, n_redir, n_irq, n_in, n_status, n_dump_ind, n_dump_chain,
             n_dump_dual, n_chain_sw, n_dual_sw);
    checks += 12;
    if (n_stall == 0)      failures++;
    if (n_loop == 0)       failures++;
    if (n_redir == 0)      failures++;
    if (n_irq != 1)        failures++;
    if (n_in != 3 * NC * NRD) failures++;
    if (n_status != 3 * NC * NRD) failures++;
    if (n_dump_ind == 0)   failures++;
    if (n_dump_chain == 0) failures++;
    if (n_dump_dual == 0)  failures++;
    if (n_chain_sw < 2)    failures++;
    if (n_dual_sw == 0)    failures++;
    if (status !== last_in) failures++;
    $display("cycles=%0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
