// tb_dsp_agu: self-checking test of an address generator: register writes
// and reads, post-increment by a programmed step, circular-buffer wrap in
// both directions, pointers outside the buffer left unwrapped, and two ports
// naming the same pointer. Expected addresses come from a reference pointer
// model kept in the testbench.
module tb_dsp_agu;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0]  acc_en;
  logic [2:0]  acc_idx [2];
  logic [15:0] acc_addr [2];
  logic        wr_en;
  logic [4:0]  wr_sel, rd_sel;
  logic [15:0] wr_data, rd_data;

  dsp_agu dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic wr(input logic [4:0] sel, input logic [15:0] v);
    @(negedge clk);
    wr_en = 1; wr_sel = sel; wr_data = v;
    @(negedge clk);
    wr_en = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p0, p2;
    acc_en = 0; acc_idx = '{0, 0}; wr_en = 0; wr_sel = 0; wr_data = 0; rd_sel = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // circular buffer [10, 10+7), pointer 0 steps +3, pointer 2 at 100 steps -1
    wr(5'd16, 16'd10);          // SB
    wr(5'd17, 16'd7);           // CB
    wr(5'd0, 16'd10);           // P0
    wr(5'd8, 16'd3);            // I0
    wr(5'd2, 16'd100);          // P2
    wr(5'd10, 16'hFFFF);        // I2 = -1
    rd_sel = 5'd8; #1 chk(rd_data, 16'd3, "read I0");
    rd_sel = 5'd17; #1 chk(rd_data, 16'd7, "read CB");
    p0 = 10; p2 = 100;
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      acc_en = 2'b11; acc_idx[0] = 3'd0; acc_idx[1] = 3'd2;
      #1;
      chk(acc_addr[0], 16'(p0), "P0 address");
      chk(acc_addr[1], 16'(p2), "P2 address (outside buffer, no wrap)");
      p0 = p0 + 3; if (p0 >= 17) p0 -= 7;
      p2 = p2 - 1;
    end
    // negative step inside the buffer wraps upwards
    @(negedge clk); acc_en = 0;
    wr(5'd8, 16'hFFFE);         // I0 = -2
    wr(5'd0, 16'd11);
    p0 = 11;
    for (int n = 0; n < 10; n++) begin
      @(negedge clk);
      acc_en = 2'b01; acc_idx[0] = 3'd0;
      #1 chk(acc_addr[0], 16'(p0), "P0 address, negative step");
      p0 = p0 - 2; if (p0 < 10) p0 += 7;
    end
    // both ports on the same pointer modify it once
    @(negedge clk); acc_en = 0;
    wr(5'd17, 16'd0);           // modulo off
    wr(5'd1, 16'd50);           // P1 = 50, I1 = 1 after reset
    @(negedge clk); acc_en = 2'b11; acc_idx[0] = 3'd1; acc_idx[1] = 3'd1;
    @(negedge clk); acc_en = 0;
    rd_sel = 5'd1; #1 chk(rd_data, 16'd51, "shared pointer stepped once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
