// dsp_core: five-stage pipelined symbol-rate DSP with subword-parallel datapath.
//
// Architecture (as published): modified Harvard machine, one 28-bit program
// memory and two 16-bit data memories (DM0, DM1), each data memory with its
// own address generator of eight index registers with modulo addressing; a
// datapath of ALU, comparator (CMP), multiply-accumulate unit (MAC) and barrel
// shifter (SFT), 40 bits wide (16-bit multiplier inputs); results go to the
// 40-bit registers D0/D1 or to the data memories; five pipeline stages
// (fetch, decode, operand read, execute, write back) and one instruction per
// clock; zero-overhead DO loops counted by COUNT; five interrupt vectors and
// an I/O bus. Special instructions: dual add-compare-select (ACS/ACSB: ALU,
// MAC and CMP in the same cycle), traceback (CFGTRC/TRCBK), FIR2, SQS/SQSA,
// complex MUL/MAC, PACK, SAT, CLR.
//
// Pipeline as built here (the stage split of the work is this design's):
//   IF  program memory read at PC; the zero-overhead loop check is made here,
//       so jumping back to the loop start costs no cycle.
//   ID  decode; address generators give addresses and post-modify pointers;
//       data memory read issued; JUMP/CALL/RET/RETI/DO/SETCT, TEST and
//       interrupts act here (a taken branch discards the one fetched word).
//   OR  data memory words arrive (synchronous 1R1W memories).
//   EX  register operands read, datapath, register writes (D0, D1, T, ...),
//       I/O bus access.
//   WB  data memory writes.
// Because registers are read and written in EX, a register result is seen by
// the very next instruction. The decode stage stalls (holds, inserting a
// bubble) when: it reads a data memory word still being written by an older
// instruction; it uses an address generator that an older MV is still
// writing; a TRCBK follows a TRCBK/CFGTRC/SRA write still in flight (the
// traceback loop runs through the memory read); a TEST waits for older
// instructions to finish.
//
// Interface: pm_* loads the program memory (hold rst_n low meanwhile).
// irq[i] is sampled every cycle and latched as pending; an enabled pending
// interrupt (IMR bit i, global enable) calls vector address i+1, program
// address 0 being the reset vector. The I/O bus is single-cycle: IN drives
// io_rd/io_addr and takes io_rdata in the same cycle, OUT drives
// io_wr/io_addr/io_wdata.
// Instruction encoding and operand codes: see dsp_pkg (this design's own).
module dsp_core
  import dsp_pkg::*;
#(
  parameter int unsigned DM_DEPTH    = 2048,  // words per data memory
  parameter int unsigned PM_DEPTH    = 1024,  // program memory words
  parameter int unsigned STACK_DEPTH = 8      // CALL / interrupt return stack
) (
  input  logic            clk,
  input  logic            rst_n,
  // program load port
  input  logic            pm_we,
  input  logic [AW-1:0]   pm_waddr,
  input  instr_t          pm_wdata,
  // interrupts
  input  logic [NIRQ-1:0] irq,
  // I/O bus
  output logic [15:0]     io_addr,
  output logic            io_rd,
  input  logic [15:0]     io_rdata,
  output logic            io_wr,
  output logic [15:0]     io_wdata
);

  // ---------------------------------------------------------------- types
  typedef enum logic [2:0] {U_NONE, U_ALU, U_CMP, U_MAC, U_SFT, U_MOVE, U_CLR} unit_e;
  typedef enum logic [2:0] {K_NONE, K_M0, K_M1, K_REG, K_IMM} src_e;
  typedef enum logic [2:0] {W_RESL, W_RESH, W_X, W_Y, W_IO, W_CMPH, W_CMPL} wsel_e;

  typedef struct packed {
    logic               v;
    unit_e              unit;
    alu_op_e            alu;
    cmp_op_e            cmp;
    mac_op_e            mac;
    sft_op_e            sft;
    logic               u;
    logic signed [5:0]  s;
    src_e               xk;
    logic [5:0]         xr;
    src_e               yk;
    logic [5:0]         yr;
    logic               y_eq_x;
    logic [5:0]         accr;     // accumulator register (MAC accumulate forms)
    logic [15:0]        imm;      // immediate, I/O address or AG register value
    logic               rwa_en;
    logic [5:0]         rwa;
    logic               rwb_en;
    logic [5:0]         rwb;
    logic [1:0]         wen;      // data memory write, per bank
    logic [15:0]        waddr0;
    logic [15:0]        waddr1;
    wsel_e              wsel0;
    wsel_e              wsel1;
    logic               acs;
    logic               acsb;
    logic               tsel;
    logic               cfg;
    logic [2:0]         cfg_num;
    logic               trc;
    logic               in_op;
    logic               out_op;
    logic               setflg;
    logic               writes_ag;
    logic               writes_sra;
  } ctl_t;

  // ---------------------------------------------------------------- state
  logic [AW-1:0] pc_f, pc_d;
  instr_t        ir_d;
  logic          v_d;
  ctl_t          c_id, c_or, c_ex;
  logic [15:0]   ex_m0, ex_m1;
  logic [1:0]    wb_en;
  logic [15:0]   wb_addr [2];
  logic [15:0]   wb_data [2];

  word40_t       d0, d1;
  logic [15:0]   t_reg, count, flg, imr;
  logic          ie;
  logic [NIRQ-1:0] pend;
  logic [AW-1:0] loop_start, loop_end;
  logic          loop_act;
  logic [AW-1:0] stk [STACK_DEPTH];
  localparam int unsigned SPW = $clog2(STACK_DEPTH);
  logic [SPW:0] sp;

  // ---------------------------------------------------------------- memories
  instr_t        fetch;
  logic [1:0]    rd_en, ram_re;
  logic [2:0]    rd_idx [2];
  logic [1:0]    wr_en;
  logic [2:0]    wr_idx [2];
  logic [15:0]   rd_addr [2];
  logic [15:0]   ram_rdata [2];

  dsp_pmem #(.DEPTH(PM_DEPTH), .WIDTH(IW)) u_pmem (
    .clk, .faddr(pc_f), .fdata(fetch), .we(pm_we), .waddr(pm_waddr), .wdata(pm_wdata)
  );

  for (genvar b = 0; b < 2; b++) begin : g_dm
    dsp_ram #(.DEPTH(DM_DEPTH), .WIDTH(MW)) u_ram (
      .clk, .re(ram_re[b]), .raddr(rd_addr[b]), .rdata(ram_rdata[b]),
      .we(wb_en[b]), .waddr(wb_addr[b]), .wdata(wb_data[b])
    );
  end

  // ---------------------------------------------------------------- AGUs
  logic [1:0]    agu_en [2];
  logic [2:0]    agu_idx [2][2];
  logic [15:0]   agu_addr [2][2];
  logic [1:0]    agu_wen;
  logic [4:0]    agu_wsel [2];
  logic [15:0]   agu_wdata;
  logic [4:0]    agu_rsel [2];
  logic [15:0]   agu_rdata [2];

  for (genvar b = 0; b < 2; b++) begin : g_ag
    dsp_agu u_agu (
      .clk, .rst_n,
      .acc_en(agu_en[b]), .acc_idx(agu_idx[b]), .acc_addr(agu_addr[b]),
      .wr_en(agu_wen[b]), .wr_sel(agu_wsel[b]), .wr_data(agu_wdata),
      .rd_sel(agu_rsel[b]), .rd_data(agu_rdata[b])
    );
  end

  // map an S-space address-generator register code (24..59) to bank / select
  function automatic logic [5:0] ag_map(input logic [5:0] code);
    // returns {bank, sel[4:0]}
    if (code < 6'd32)      return {1'b0, 2'b00, code[2:0]};
    else if (code < 6'd40) return {1'b1, 2'b00, code[2:0]};
    else if (code < 6'd48) return {1'b0, 2'b01, code[2:0]};
    else if (code < 6'd56) return {1'b1, 2'b01, code[2:0]};
    else                   return {code[1], 4'b1000, code[0]};
  endfunction

  function automatic logic is_ag(input logic [5:0] code);
    return code >= 6'd24 && code <= 6'd59;
  endfunction

  // ---------------------------------------------------------------- trace unit
  logic        tr_acs_en, tr_cfg_en, tr_trc_en, tr_wr_en, tr_bit;
  logic [1:0]  tr_flags, tr_wsel;
  logic [15:0] tr_wdata;
  logic [3:0]  tr_shamt, tr_offset;
  logic [15:0] sr0, sr1;
  logic [7:0]  sra;
  logic [7:0]  tr_cfg_state;

  dsp_trace u_trace (
    .clk, .rst_n,
    .acs_en(tr_acs_en), .acs_flags(tr_flags),
    .cfg_en(tr_cfg_en), .cfg_state(tr_cfg_state), .cfg_num(c_ex.cfg_num),
    .trc_en(tr_trc_en), .trc_bit(tr_bit), .trc_shamt(tr_shamt), .trc_offset(tr_offset),
    .wr_en(tr_wr_en), .wr_sel(tr_wsel), .wr_data(tr_wdata),
    .sr0, .sra, .sr1
  );

  // register values by C-space code 16..23
  word40_t rfv [8];
  always_comb begin
    rfv[0] = d0;
    rfv[1] = d1;
    rfv[2] = sext16(t_reg);
    rfv[3] = {32'd0, sra};
    rfv[4] = {24'd0, count};
    rfv[5] = {24'd0, sr0};
    rfv[6] = {24'd0, sr1};
    rfv[7] = {24'd0, flg};
  end

  function automatic word40_t regval(input word40_t r [8], input logic [5:0] code,
                                     input logic [15:0] imr_v);
    if (code >= 6'd16 && code <= 6'd23) return r[code[2:0]];
    else if (code == R_IMR)             return {24'd0, imr_v};
    else                                return '0;
  endfunction

  // ---------------------------------------------------------------- decode (ID)
  opcode_e     op_d;
  logic [5:0]  ag_rd_code;
  logic        ag_rd;
  logic        ldi_ag;
  logic        is_jump, is_call, is_ret, is_reti, is_do, is_setct, is_test;
  logic        uses_ag;
  logic [15:0] imm_d;

  // register a data memory access of mem code m (bank m[3], pointer m[2:0])
  always_comb begin
    logic [4:0] dc, xc, yc;
    logic       dual;
    logic [5:0] src6, dst6;
    logic [5:0] dl;
    logic       unary, shift;

    op_d       = opcode_e'(ir_d[27:21]);
    dl         = ir_d[21:16];
    unary      = 1'b0;
    shift      = 1'b0;
    imm_d      = ir_d[15:0];
    dc         = ir_d[20:16];
    xc         = ir_d[15:11];
    yc         = ir_d[10:6];
    dual       = ir_d[5];
    src6       = ir_d[20:15];
    dst6       = ir_d[14:9];
    c_id       = '0;
    c_id.v     = v_d;
    c_id.u     = ir_d[1];
    c_id.s     = ir_d[10:5];
    c_id.unit  = U_NONE;
    rd_en      = '0;
    wr_en      = '0;
    rd_idx     = '{default: '0};
    wr_idx     = '{default: '0};
    ag_rd      = 1'b0;
    ag_rd_code = '0;
    ldi_ag     = 1'b0;
    is_jump    = 1'b0; is_call = 1'b0; is_ret = 1'b0; is_reti = 1'b0;
    is_do      = 1'b0; is_setct = 1'b0; is_test = 1'b0;

    unique case (op_d)
      // ---------------- computational (ALU / CMP / MAC / SFT / special)
      OP_ABD, OP_ABD16, OP_ABD8, OP_ABS, OP_ADD, OP_ADD16, OP_ADD8, OP_SUB, OP_SUB16,
      OP_SUB8, OP_ADDSUB8, OP_SUBADD8, OP_ADDSUB, OP_SUBADD, OP_ADDSUB16, OP_SUBADD16,
      OP_AND, OP_OR, OP_XOR, OP_NOT, OP_INV, OP_INV16, OP_INV8, OP_PACK, OP_SAT, OP_CLR,
      OP_CMPL, OP_CMPS, OP_CMP16L, OP_CMP16S, OP_CMP8L, OP_CMP8S,
      OP_MUL8, OP_MAC8, OP_CMUL, OP_CMAC, OP_CMSUB, OP_MUL, OP_MAC, OP_MSUB,
      OP_FIR2, OP_SQS, OP_SQSA,
      OP_LSFT, OP_ASFT, OP_ROT, OP_LSFT16, OP_ASFT16, OP_ROT16: begin
        unary = op_d inside {OP_ABS, OP_NOT, OP_INV, OP_INV16, OP_INV8, OP_SQS, OP_SQSA,
                             OP_SAT, OP_CLR, OP_LSFT, OP_ASFT, OP_ROT, OP_LSFT16,
                             OP_ASFT16, OP_ROT16};
        shift = op_d inside {OP_LSFT, OP_ASFT, OP_ROT, OP_LSFT16, OP_ASFT16, OP_ROT16};
        if (op_d == OP_SAT) xc = dc;
        // X operand
        if (op_d != OP_CLR) begin
          if (!xc[4]) begin
            rd_en[xc[3]]  = 1'b1;
            rd_idx[xc[3]] = xc[2:0];
            c_id.xk       = xc[3] ? K_M1 : K_M0;
          end else begin
            c_id.xk = K_REG;
            c_id.xr = {1'b0, xc};
          end
        end
        // Y operand
        if (!unary) begin
          if (!yc[4]) begin
            rd_en[yc[3]]  = 1'b1;
            rd_idx[yc[3]] = yc[2:0];
            c_id.yk       = yc[3] ? K_M1 : K_M0;
          end else begin
            c_id.yk = K_REG;
            c_id.yr = {1'b0, yc};
          end
        end
        c_id.y_eq_x = op_d inside {OP_SQS, OP_SQSA};
        c_id.accr   = {1'b0, dc};
        // destination
        if (dual && !shift) begin
          wr_en  = 2'b11;
          wr_idx[0] = dc[2:0];
          wr_idx[1] = ir_d[4:2];
          c_id.wsel0 = W_RESH;
          c_id.wsel1 = W_RESL;
        end else if (!dc[4]) begin
          wr_en[dc[3]]  = 1'b1;
          wr_idx[dc[3]] = dc[2:0];
          c_id.wsel0    = W_RESL;
          c_id.wsel1    = W_RESL;
        end else begin
          c_id.rwa_en = 1'b1;
          c_id.rwa    = {1'b0, dc};
        end
        // unit and operation
        unique case (op_d)
          OP_ABD:      begin c_id.unit = U_ALU; c_id.alu = A_ABD;      end
          OP_ABD16:    begin c_id.unit = U_ALU; c_id.alu = A_ABD16;    end
          OP_ABD8:     begin c_id.unit = U_ALU; c_id.alu = A_ABD8;     end
          OP_ABS:      begin c_id.unit = U_ALU; c_id.alu = A_ABS;      end
          OP_ADD:      begin c_id.unit = U_ALU; c_id.alu = A_ADD;      end
          OP_ADD16:    begin c_id.unit = U_ALU; c_id.alu = A_ADD16;    end
          OP_ADD8:     begin c_id.unit = U_ALU; c_id.alu = A_ADD8;     end
          OP_SUB:      begin c_id.unit = U_ALU; c_id.alu = A_SUB;      end
          OP_SUB16:    begin c_id.unit = U_ALU; c_id.alu = A_SUB16;    end
          OP_SUB8:     begin c_id.unit = U_ALU; c_id.alu = A_SUB8;     end
          OP_ADDSUB8:  begin c_id.unit = U_ALU; c_id.alu = A_ADDSUB8;  end
          OP_SUBADD8:  begin c_id.unit = U_ALU; c_id.alu = A_SUBADD8;  end
          OP_ADDSUB:   begin c_id.unit = U_ALU; c_id.alu = A_ADDSUB;   end
          OP_SUBADD:   begin c_id.unit = U_ALU; c_id.alu = A_SUBADD;   end
          OP_ADDSUB16: begin c_id.unit = U_ALU; c_id.alu = A_ADDSUB16; end
          OP_SUBADD16: begin c_id.unit = U_ALU; c_id.alu = A_SUBADD16; end
          OP_AND:      begin c_id.unit = U_ALU; c_id.alu = A_AND;      end
          OP_OR:       begin c_id.unit = U_ALU; c_id.alu = A_OR;       end
          OP_XOR:      begin c_id.unit = U_ALU; c_id.alu = A_XOR;      end
          OP_NOT:      begin c_id.unit = U_ALU; c_id.alu = A_NOT;      end
          OP_INV:      begin c_id.unit = U_ALU; c_id.alu = A_INV;      end
          OP_INV16:    begin c_id.unit = U_ALU; c_id.alu = A_INV16;    end
          OP_INV8:     begin c_id.unit = U_ALU; c_id.alu = A_INV8;     end
          OP_PACK:     begin c_id.unit = U_ALU; c_id.alu = A_PACK;     end
          OP_SAT:      begin c_id.unit = U_ALU; c_id.alu = A_SAT;      end
          OP_CLR:      begin c_id.unit = U_CLR;                        end
          OP_CMPL:     begin c_id.unit = U_CMP; c_id.cmp = C_MAX;   c_id.setflg = 1'b1; end
          OP_CMPS:     begin c_id.unit = U_CMP; c_id.cmp = C_MIN;   c_id.setflg = 1'b1; end
          OP_CMP16L:   begin c_id.unit = U_CMP; c_id.cmp = C_MAX16; c_id.setflg = 1'b1; end
          OP_CMP16S:   begin c_id.unit = U_CMP; c_id.cmp = C_MIN16; c_id.setflg = 1'b1; end
          OP_CMP8L:    begin c_id.unit = U_CMP; c_id.cmp = C_MAX8;  c_id.setflg = 1'b1; end
          OP_CMP8S:    begin c_id.unit = U_CMP; c_id.cmp = C_MIN8;  c_id.setflg = 1'b1; end
          OP_MUL8:     begin c_id.unit = U_MAC; c_id.mac = M_MUL8;  end
          OP_MAC8:     begin c_id.unit = U_MAC; c_id.mac = M_MAC8;  end
          OP_CMUL:     begin c_id.unit = U_MAC; c_id.mac = M_CMUL;  end
          OP_CMAC:     begin c_id.unit = U_MAC; c_id.mac = M_CMAC;  end
          OP_CMSUB:    begin c_id.unit = U_MAC; c_id.mac = M_CMSUB; end
          OP_MUL:      begin c_id.unit = U_MAC; c_id.mac = M_MUL;   end
          OP_MAC:      begin c_id.unit = U_MAC; c_id.mac = M_MAC;   end
          OP_MSUB:     begin c_id.unit = U_MAC; c_id.mac = M_MSUB;  end
          OP_FIR2:     begin c_id.unit = U_MAC; c_id.mac = M_FIR2;  end
          OP_SQS:      begin c_id.unit = U_MAC; c_id.mac = M_SQS;   end
          OP_SQSA:     begin c_id.unit = U_MAC; c_id.mac = M_SQSA;  end
          OP_LSFT:     begin c_id.unit = U_SFT; c_id.sft = S_LSFT;   end
          OP_ASFT:     begin c_id.unit = U_SFT; c_id.sft = S_ASFT;   end
          OP_ROT:      begin c_id.unit = U_SFT; c_id.sft = S_ROT;    end
          OP_LSFT16:   begin c_id.unit = U_SFT; c_id.sft = S_LSFT16; end
          OP_ASFT16:   begin c_id.unit = U_SFT; c_id.sft = S_ASFT16; end
          default:     begin c_id.unit = U_SFT; c_id.sft = S_ROT16;  end
        endcase
      end
      // ---------------- data movement
      OP_LDI0, OP_LDI1: begin
        c_id.unit = U_MOVE;
        c_id.xk   = K_IMM;
        c_id.imm  = imm_d;
        if (is_ag(dl)) begin
          ldi_ag     = 1'b1;
          ag_rd_code = dl;            // reuse the mapping for the write select
          c_id.unit  = U_NONE;
        end else if (!dl[5] && !dl[4]) begin
          wr_en[dl[3]]  = 1'b1;
          wr_idx[dl[3]] = dl[2:0];
          c_id.wsel0    = W_X;
          c_id.wsel1    = W_X;
        end else begin
          c_id.rwa_en = 1'b1;
          c_id.rwa    = dl;
        end
      end
      OP_MV: begin
        c_id.unit = U_MOVE;
        if (!src6[5] && !src6[4]) begin
          rd_en[src6[3]]  = 1'b1;
          rd_idx[src6[3]] = src6[2:0];
          c_id.xk         = src6[3] ? K_M1 : K_M0;
        end else if (is_ag(src6)) begin
          ag_rd      = 1'b1;
          ag_rd_code = src6;
          c_id.xk    = K_IMM;       // value captured in ID
        end else begin
          c_id.xk = K_REG;
          c_id.xr = src6;
        end
        if (!dst6[5] && !dst6[4]) begin
          wr_en[dst6[3]]  = 1'b1;
          wr_idx[dst6[3]] = dst6[2:0];
          c_id.wsel0      = W_X;
          c_id.wsel1      = W_X;
        end else begin
          c_id.rwa_en    = 1'b1;
          c_id.rwa       = dst6;
          c_id.writes_ag = is_ag(dst6);
        end
      end
      OP_DLD: begin
        c_id.unit   = U_MOVE;
        rd_en       = 2'b11;
        rd_idx[0]   = ir_d[20:18];
        rd_idx[1]   = ir_d[17:15];
        c_id.xk     = K_M0;
        c_id.yk     = K_M1;
        c_id.rwa_en = 1'b1;
        c_id.rwa    = {1'b0, ir_d[14:10]};
        c_id.rwb_en = 1'b1;
        c_id.rwb    = {1'b0, ir_d[9:5]};
      end
      OP_DST: begin
        c_id.unit  = U_MOVE;
        c_id.xk    = K_REG;
        c_id.xr    = {1'b0, ir_d[20:16]};
        c_id.yk    = K_REG;
        c_id.yr    = {1'b0, ir_d[15:11]};
        wr_en      = 2'b11;
        wr_idx[0]  = ir_d[10:8];
        wr_idx[1]  = ir_d[7:5];
        c_id.wsel0 = W_X;
        c_id.wsel1 = W_Y;
      end
      OP_IN: begin
        c_id.in_op         = 1'b1;
        c_id.imm           = imm_d;
        wr_en[ir_d[19]]    = 1'b1;
        wr_idx[ir_d[19]]   = ir_d[18:16];
        c_id.wsel0         = W_IO;
        c_id.wsel1         = W_IO;
      end
      OP_OUT: begin
        c_id.out_op        = 1'b1;
        c_id.imm           = imm_d;
        rd_en[ir_d[19]]    = 1'b1;
        rd_idx[ir_d[19]]   = ir_d[18:16];
        c_id.xk            = ir_d[19] ? K_M1 : K_M0;
      end
      // ---------------- program flow
      OP_JUMP:  is_jump  = 1'b1;
      OP_CALL:  is_call  = 1'b1;
      OP_RET:   is_ret   = 1'b1;
      OP_RETI:  is_reti  = 1'b1;
      OP_DO:    is_do    = 1'b1;
      OP_SETCT: is_setct = 1'b1;
      OP_TEST, OP_TESTZ: is_test = 1'b1;
      // ---------------- Viterbi
      OP_ACS, OP_ACSB: begin
        c_id.acs    = 1'b1;
        c_id.acsb   = (op_d == OP_ACSB);
        c_id.tsel   = ir_d[6];
        rd_en       = 2'b11;
        rd_idx[0]   = ir_d[20:18];
        rd_idx[1]   = ir_d[17:15];
        c_id.xk     = K_M0;
        c_id.yk     = K_M1;
        c_id.rwa_en = 1'b1;
        c_id.rwa    = R_D0;
        c_id.rwb_en = 1'b1;
        c_id.rwb    = R_D1;
        // new metrics: high lane to a1, low lane to b1 (different banks)
        wr_en[ir_d[14]]  = 1'b1;
        wr_idx[ir_d[14]] = ir_d[13:11];
        wr_en[ir_d[10]]  = 1'b1;
        wr_idx[ir_d[10]] = ir_d[9:7];
        c_id.wsel0  = ir_d[14] ? W_CMPL : W_CMPH;
        c_id.wsel1  = ir_d[14] ? W_CMPH : W_CMPL;
      end
      OP_CFGTRC: begin
        c_id.cfg        = 1'b1;
        c_id.cfg_num    = ir_d[2:0];
        c_id.writes_sra = 1'b1;
        rd_en[ir_d[19]] = 1'b1;
        rd_idx[ir_d[19]] = ir_d[18:16];
        c_id.xk         = ir_d[19] ? K_M1 : K_M0;
      end
      OP_TRCBK: begin
        c_id.trc        = 1'b1;
        c_id.writes_sra = 1'b1;
        rd_en[ir_d[19]] = 1'b1;
        rd_idx[ir_d[19]] = ir_d[18:16];
        c_id.xk         = ir_d[19] ? K_M1 : K_M0;
      end
      default: ;  // NOP and unused codes
    endcase

    if (c_id.rwa_en && (c_id.rwa == R_SRA)) c_id.writes_sra = 1'b1;
    uses_ag = (|rd_en) || (|wr_en) || ag_rd || ldi_ag;
  end

  // address generator hookup: port 0 = read access, port 1 = write access
  logic        id_go, stall, take_irq;
  always_comb begin
    for (int b = 0; b < 2; b++) begin
      agu_en[b]     = {id_go & wr_en[b], id_go & rd_en[b]};
      agu_idx[b][0] = rd_idx[b];
      agu_idx[b][1] = wr_idx[b];
      rd_addr[b]    = agu_addr[b][0] + ((c_id.trc && rd_en[b]) ? {12'd0, tr_offset} : 16'd0);
      ram_re[b]     = id_go & rd_en[b];
    end
  end

  ctl_t c_idf;  // decoded control with memory write addresses and AG read value
  logic [5:0] ag_rm;
  always_comb begin
    ag_rm = ag_map(ag_rd_code);
    for (int b = 0; b < 2; b++) agu_rsel[b] = ag_rm[4:0];
  end

  always_comb begin
    c_idf     = c_id;
    c_idf.waddr0 = agu_addr[0][1];
    c_idf.waddr1 = agu_addr[1][1];
    c_idf.wen    = wr_en;
    if (ag_rd) c_idf.imm = agu_rdata[ag_rm[5]];
  end

  // ---------------------------------------------------------------- hazards
  logic raw;
  always_comb begin
    raw = 1'b0;
    for (int b = 0; b < 2; b++) begin
      if (rd_en[b]) begin
        if (c_or.v && c_or.wen[b] && ((b == 0 ? c_or.waddr0 : c_or.waddr1) == rd_addr[b])) raw = 1'b1;
        if (c_ex.v && c_ex.wen[b] && ((b == 0 ? c_ex.waddr0 : c_ex.waddr1) == rd_addr[b])) raw = 1'b1;
        if (wb_en[b] && wb_addr[b] == rd_addr[b]) raw = 1'b1;
      end
    end
    stall = v_d && (raw
          || (uses_ag && ((c_or.v && c_or.writes_ag) || (c_ex.v && c_ex.writes_ag)))
          || (c_id.trc && ((c_or.v && c_or.writes_sra) || (c_ex.v && c_ex.writes_sra)))
          || (is_test && (c_or.v || c_ex.v)));
  end

  // ---------------------------------------------------------------- sequencer
  logic            test_skip, redirect;
  logic [AW-1:0]   target, pc_n;
  logic [NIRQ-1:0] irq_take_vec;
  logic [2:0]      irq_num;
  logic            loop_eff, loop_hit;
  logic [AW-1:0]   loop_end_eff, loop_start_eff;
  logic [15:0]     count_eff;
  logic            flow_op;

  always_comb begin
    word40_t tv;
    tv        = regval(rfv, {1'b0, ir_d[20:16]}, imr);
    test_skip = is_test && ((op_d == OP_TEST) ? !tv[ir_d[15:10]] : tv[ir_d[15:10]]);

    // interrupts: lowest pending enabled number wins; not taken on a control
    // instruction, nor when the words in ID or IF sit at the loop end
    irq_take_vec = pend & imr[NIRQ-1:0];
    irq_num = '0;
    for (int i = NIRQ - 1; i >= 0; i--) if (irq_take_vec[i]) irq_num = 3'(i);
    flow_op  = is_jump | is_call | is_ret | is_reti | is_do | is_test | is_setct;
    take_irq = ie && (|irq_take_vec) && v_d && !stall && !flow_op
               && !(loop_act && (pc_d == loop_end || pc_f == loop_end));
    id_go    = v_d && !stall && !take_irq;

    redirect = id_go && (is_jump || is_call || is_ret || is_reti);
    unique case (1'b1)
      is_ret, is_reti: target = stk[SPW'(sp - 1'b1)];
      default:         target = imm_d;
    endcase

    loop_eff       = (id_go && is_do) ? 1'b1 : loop_act;
    loop_end_eff   = (id_go && is_do) ? imm_d : loop_end;
    loop_start_eff = (id_go && is_do) ? pc_d + 1'b1 : loop_start;
    count_eff      = (id_go && is_setct) ? imm_d : count;
    loop_hit       = loop_eff && (pc_f == loop_end_eff);

    if (take_irq)        pc_n = AW'(irq_num) + 1'b1;
    else if (redirect)   pc_n = target;
    else if (stall)      pc_n = pc_f;
    else if (loop_hit && count_eff != 16'd0) begin
      pc_n      = loop_start_eff;
    end else             pc_n = pc_f + 1'b1;
  end

  // ---------------------------------------------------------------- execute (EX)
  word40_t xval, yval, accv, tval, res, alu_o, mac_o, cmp_o, sft_o;
  word40_t alu_x, alu_y, mac_x, mac_y, cmp_x, cmp_y, sft_x;
  logic signed [5:0] sft_s;
  alu_op_e alu_op;
  mac_op_e mac_op;
  cmp_op_e cmp_op;
  sft_op_e sft_op;
  logic [1:0] cmp_f;
  logic [15:0] wdat [2];

  function automatic word40_t opnd(input src_e k, input logic [5:0] r, input logic [15:0] m0,
                                   input logic [15:0] m1, input logic [15:0] imm,
                                   input word40_t rv [8], input logic [15:0] imr_v);
    unique case (k)
      K_M0:    return sext16(m0);
      K_M1:    return sext16(m1);
      K_REG:   return regval(rv, r, imr_v);
      K_IMM:   return sext16(imm);
      default: return '0;
    endcase
  endfunction

  always_comb begin
    logic [7:0] th;
    xval = opnd(c_ex.xk, c_ex.xr, ex_m0, ex_m1, c_ex.imm, rfv, imr);
    yval = c_ex.y_eq_x ? xval : opnd(c_ex.yk, c_ex.yr, ex_m0, ex_m1, c_ex.imm, rfv, imr);
    accv = regval(rfv, c_ex.accr, imr);
    // local distance for ACS: T high byte (tsel=0) or low byte (tsel=1)
    th   = c_ex.tsel ? t_reg[7:0] : t_reg[15:8];
    tval = {{32{th[7]}}, th};
    if (c_ex.acsb) tval = -tval;

    alu_x  = xval;  alu_y = yval;  alu_op = c_ex.alu;
    mac_x  = xval;  mac_y = yval;  mac_op = c_ex.mac;
    cmp_x  = xval;  cmp_y = yval;  cmp_op = c_ex.cmp;
    sft_x  = xval;  sft_s = c_ex.s; sft_op = c_ex.sft;
    if (c_ex.acs) begin
      // dual ACS: ALU and MAC add/subtract, CMP selects the previous sums
      alu_op = A_ADDSUB; alu_y = tval;
      mac_op = M_ACS;    mac_x = yval;  mac_y = tval;
      cmp_op = C_MIN16;  cmp_x = d0; cmp_y = d1;
    end
    if (c_ex.trc) begin
      sft_op = S_LSFT;
      sft_x  = {24'd0, xval[15:0]};
      sft_s  = -$signed({2'b00, tr_shamt});
    end
  end

  dsp_alu u_alu (.op(alu_op), .x(alu_x), .y(alu_y), .d(alu_o));
  dsp_cmp u_cmp (.op(cmp_op), .x(cmp_x), .y(cmp_y), .d(cmp_o), .flag(cmp_f));
  dsp_mac u_mac (.op(mac_op), .u(c_ex.u), .x(mac_x), .y(mac_y), .din(accv), .d(mac_o));
  dsp_sft u_sft (.op(sft_op), .x(sft_x), .s(sft_s), .d(sft_o));

  always_comb begin
    unique case (c_ex.unit)
      U_ALU:   res = alu_o;
      U_CMP:   res = cmp_o;
      U_MAC:   res = mac_o;
      U_SFT:   res = sft_o;
      U_MOVE:  res = xval;
      default: res = c_ex.acs ? alu_o : '0;  // U_CLR, ACS
    endcase
    for (int b = 0; b < 2; b++) begin
      unique case (b == 0 ? c_ex.wsel0 : c_ex.wsel1)
        W_RESL:  wdat[b] = res[15:0];
        W_RESH:  wdat[b] = res[31:16];
        W_X:     wdat[b] = xval[15:0];
        W_Y:     wdat[b] = yval[15:0];
        W_IO:    wdat[b] = io_rdata;
        W_CMPH:  wdat[b] = cmp_o[31:16];
        default: wdat[b] = cmp_o[15:0];   // W_CMPL
      endcase
    end
    io_rd    = c_ex.v && c_ex.in_op;
    io_wr    = c_ex.v && c_ex.out_op;
    io_addr  = c_ex.imm;
    io_wdata = xval[15:0];

    tr_acs_en    = c_ex.v && c_ex.acs;
    tr_flags     = cmp_f;
    tr_cfg_en    = c_ex.v && c_ex.cfg;
    tr_cfg_state = xval[7:0];
    tr_trc_en    = c_ex.v && c_ex.trc;
    tr_bit       = sft_o[0];
  end

  // register writes from EX: port A (any code), port B (D0..FLG)
  word40_t rwa_val, rwb_val;
  logic    wa, wb;
  logic [5:0] ag_wm;
  always_comb begin
    ag_wm    = '0;
    rwa_val  = res;
    rwb_val  = c_ex.acs ? mac_o : yval;
    wa       = c_ex.v && c_ex.rwa_en;
    wb       = c_ex.v && c_ex.rwb_en;
    tr_wr_en = 1'b0;
    tr_wsel  = '0;
    tr_wdata = '0;
    if (wa && c_ex.rwa inside {R_SRA, R_SR0, R_SR1}) begin
      tr_wr_en = 1'b1;
      tr_wsel  = (c_ex.rwa == R_SR0) ? 2'd0 : (c_ex.rwa == R_SRA) ? 2'd1 : 2'd2;
      tr_wdata = rwa_val[15:0];
    end else if (wb && c_ex.rwb inside {R_SRA, R_SR0, R_SR1}) begin
      tr_wr_en = 1'b1;
      tr_wsel  = (c_ex.rwb == R_SR0) ? 2'd0 : (c_ex.rwb == R_SRA) ? 2'd1 : 2'd2;
      tr_wdata = rwb_val[15:0];
    end
    // address generator register writes: MV in EX, LDI in ID
    agu_wen   = '0;
    agu_wsel  = '{default: '0};
    agu_wdata = '0;
    if (wa && is_ag(c_ex.rwa)) begin
      ag_wm = ag_map(c_ex.rwa);
      agu_wen[ag_wm[5]]  = 1'b1;
      agu_wsel[ag_wm[5]] = ag_wm[4:0];
      agu_wdata      = rwa_val[15:0];
    end else if (id_go && ldi_ag) begin
      ag_wm = ag_map(ag_rd_code);
      agu_wen[ag_wm[5]]  = 1'b1;
      agu_wsel[ag_wm[5]] = ag_wm[4:0];
      agu_wdata      = imm_d;
    end
  end

  // ---------------------------------------------------------------- sequential
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_f       <= '0;
      pc_d       <= '0;
      ir_d       <= '0;
      v_d        <= 1'b0;
      c_or       <= '0;
      c_ex       <= '0;
      ex_m0      <= '0;
      ex_m1      <= '0;
      wb_en      <= '0;
      wb_addr    <= '{default: '0};
      wb_data    <= '{default: '0};
      d0         <= '0;
      d1         <= '0;
      t_reg      <= '0;
      count      <= '0;
      flg        <= '0;
      imr        <= '0;
      ie         <= 1'b1;
      pend       <= '0;
      loop_start <= '0;
      loop_end   <= '0;
      loop_act   <= 1'b0;
      sp         <= '0;
      for (int i = 0; i < STACK_DEPTH; i++) stk[i] <= '0;
    end else begin
      // ---- fetch / decode registers
      pc_f <= pc_n;
      if (take_irq) begin
        v_d <= 1'b0;
      end else if (!stall) begin
        ir_d <= fetch;
        pc_d <= pc_f;
        v_d  <= !(id_go && (redirect || test_skip));
      end

      // ---- loop hardware
      if (!stall && !take_irq && !redirect && loop_hit) begin
        if (count_eff == 16'd0) loop_act <= 1'b0;
        else                    loop_act <= 1'b1;
      end else if (id_go && is_do) begin
        loop_act <= 1'b1;
      end
      if (id_go && is_do) begin
        loop_start <= pc_d + 1'b1;
        loop_end   <= imm_d;
      end

      // ---- interrupts and stack
      pend <= (pend | irq) & ~(take_irq ? (NIRQ'(1) << irq_num) : '0);
      if (take_irq) begin
        stk[sp[SPW-1:0]] <= pc_d;
        sp <= sp + 1'b1;
        ie <= 1'b0;
      end else if (id_go && is_call) begin
        stk[sp[SPW-1:0]] <= pc_d + 1'b1;
        sp <= sp + 1'b1;
      end else if (id_go && (is_ret || is_reti)) begin
        sp <= sp - 1'b1;
        if (is_reti) ie <= 1'b1;
      end

      // ---- pipeline
      c_or  <= id_go ? c_idf : '0;
      c_ex  <= c_or;
      ex_m0 <= ram_rdata[0];
      ex_m1 <= ram_rdata[1];
      wb_en <= c_ex.v ? c_ex.wen : 2'b00;
      wb_addr[0] <= c_ex.waddr0;
      wb_addr[1] <= c_ex.waddr1;
      wb_data[0] <= wdat[0];
      wb_data[1] <= wdat[1];

      // ---- register file (EX); COUNT: EX write > SETCT > loop decrement
      if (wa) begin
        unique case (c_ex.rwa)
          R_D0:    d0    <= rwa_val;
          R_D1:    d1    <= rwa_val;
          R_T:     t_reg <= rwa_val[15:0];
          R_FLG:   flg   <= rwa_val[15:0];
          R_IMR:   imr   <= rwa_val[15:0];
          default: ;
        endcase
      end
      if (wb) begin
        unique case (c_ex.rwb)
          R_D0:    d0    <= rwb_val;
          R_D1:    d1    <= rwb_val;
          R_T:     t_reg <= rwb_val[15:0];
          R_FLG:   flg   <= rwb_val[15:0];
          default: ;
        endcase
      end
      if (c_ex.v && c_ex.setflg) flg <= {14'd0, cmp_f};
      if (wa && c_ex.rwa == R_COUNT)      count <= rwa_val[15:0];
      else if (wb && c_ex.rwb == R_COUNT) count <= rwb_val[15:0];
      else if (!stall && !take_irq && !redirect && loop_hit && count_eff != 16'd0)
        count <= count_eff - 1'b1;
      else if (id_go && is_setct)         count <= imm_d;
    end
  end

  // the two memory writes of one instruction must go to different banks, and
  // an instruction reads each bank at most once (1R1W memories)
  always_comb begin
    if (rst_n && c_ex.v && c_ex.acs)
      a_acs_banks: assert (c_ex.wen == 2'b11)
        else $error("ACS results must go to different data memories");
  end

endmodule
