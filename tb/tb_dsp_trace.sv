// tb_dsp_trace: self-checking test of the Viterbi support registers.
// 1) Eight ACS steps with random decisions: SR0 must hold the decision of
//    state j0+k in bit k.
// 2) CFGTRC for every length 4..8, then traceback steps: the state must step
//    to its predecessor, prev = (decision << (L-1)) | (state >> 1), the
//    shift amount and table offset must be the state's low and high bits,
//    and SR1 must collect the decisions.
// 3) Direct register writes.
module tb_dsp_trace;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic acs_en, cfg_en, trc_en, trc_bit, wr_en;
  logic [1:0] acs_flags, wr_sel;
  logic [7:0] cfg_state, sra;
  logic [2:0] cfg_num;
  logic [3:0] trc_shamt, trc_offset;
  logic [15:0] wr_data, sr0, sr1;

  dsp_trace dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] dec, sr1_ref;
    int st, len;
    acs_en = 0; cfg_en = 0; trc_en = 0; trc_bit = 0; wr_en = 0;
    acs_flags = 0; wr_sel = 0; cfg_state = 0; cfg_num = 0; wr_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      dec = 16'($urandom);
      for (int k = 0; k < 8; k++) begin
        @(negedge clk);
        acs_en = 1;
        acs_flags = {dec[2*k], dec[2*k+1]};   // {state j, state j+1}
      end
      @(negedge clk); acs_en = 0;
      chk(sr0, dec, "SR0 after eight ACS");
    end
    sr1_ref = '0;
    for (int n = 0; n < 5; n++) begin
      len = n + 4;
      st  = $urandom % 256;
      @(negedge clk); cfg_en = 1; cfg_num = 3'(n); cfg_state = 8'(st);
      @(negedge clk); cfg_en = 0;
      st = st % (1 << len);
      chk(sra, st, "CFGTRC state");
      for (int k = 0; k < 24; k++) begin
        chk(trc_shamt, st % 16, "shift amount");
        chk(trc_offset, st / 16, "table offset");
        trc_bit = 1'($urandom);
        trc_en  = 1;
        @(negedge clk);
        trc_en = 0;
        st = (int'(trc_bit) << (len - 1)) | (st >> 1);
        sr1_ref = {sr1_ref[14:0], trc_bit};
        chk(sra, st, "traceback predecessor");
        chk(sr1, sr1_ref, "decoded bits");
      end
    end
    @(negedge clk); wr_en = 1; wr_sel = 2'd0; wr_data = 16'h1234;
    @(negedge clk); wr_sel = 2'd2; wr_data = 16'hABCD;
    @(negedge clk); wr_en = 0;
    chk(sr0, 16'h1234, "SR0 write");
    chk(sr1, 16'hABCD, "SR1 write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
