// tb_mute_top: end-to-end test of the MUTE processor at its default sizes.
//
// CORE1 runs a short task of its own and then two balanced cipher sessions,
// each bracketed by startBal/endBal:
//   1. a DES-style Feistel kernel (16 rounds: t = R ^ K_i, four SBOX byte
//      look-ups form f, a_i = L ^ f is stored, L = R, R = a_i). CORE2's data
//      memory holds the complemented round keys and the complemented L0/R0
//      and the same SBOX, as in MUTE-DES.
//   2. an AES-style kernel (10 rounds over a 16-byte state: s = SBOX[s ^ k]).
//      CORE2's data memory holds the original state, the complemented
//      first round key, the later round keys as they are (the state is then
//      already complemented) and the inverted-transposed table
//      SBOX'[j] = ~SBOX[~j], as in MUTE-AES with complete inversion.
// CORE2 runs a long multiply/xor task that keeps values live in the registers
// and in HI/LO; it is interrupted by each session, saves its context in a
// routine at SAVE_VEC, runs the complementary kernel (the same code) and is
// returned to its task by the restore routine at RESTORE_VEC.
// During session 1 an interrupt for CORE1 arrives, during session 2 one for
// CORE2, and one for CORE2 arrives before any balancing.
//
// Checked: the kernels' results against a model computed here; CORE2's
// results are the exact complement; during balancing every store of one core
// is matched in the same cycle by a store of the other to the same address
// with complemented data (the property that balances the bit flips); CORE2's
// own task ends with the same results as if it had never been interrupted;
// each interrupt routine ran as often as requested. Every mechanism (switch
// set/cleared, save interrupt, same-cycle dual PC load, interrupt during
// balancing with the other core on hold, restore, ordinary interrupt) is
// counted and must have happened.
`timescale 1ns/1ps
module tb_mute_top;
  import mute_pkg::*;
  import pisa_asm_pkg::*;

  localparam int IMW = 4096;
  localparam int SAVE_W = 32'h7000 / 8, RESTORE_W = 32'h7400 / 8, INTR_W = 32'h7800 / 8;
  // data layout (byte addresses, same in both data memories)
  localparam int C2RES = 'h100, C1RES = 'h200, KEYS = 'h400, DIN = 'h480, AOUT = 'h500,
                 DOUT = 'h540, AKEYS = 'h600, ASTATE = 'h700, SBD = 'h800, SBA = 'hC00,
                 STK = 'h3000, ISTK = 'h3800, ICNT = 'h3900;
  localparam int NTASK = 200, NR = 10;
  // controller states that must only see paired stores
  localparam int ST_BAL = 3, ST_INT_DRAIN = 4, ST_END_DRAIN = 7;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] irq_req;
  logic       im1_we, im2_we;
  word_t      im1_a, im2_a;
  instr_t     im1_d, im2_d;
  logic       h1_en, h1_we, h2_en, h2_we;
  word_t      h1_a, h1_wd, h1_rd, h2_a, h2_wd, h2_rd;
  logic       sw_flag;
  logic [1:0] dm_we_obs;
  word_t      dm1_a, dm1_wd, dm2_a, dm2_wd;

  mute_top dut (
    .clk, .rst_n, .irq_req,
    .im1_prog_we(im1_we), .im1_prog_addr(im1_a), .im1_prog_data(im1_d),
    .im2_prog_we(im2_we), .im2_prog_addr(im2_a), .im2_prog_data(im2_d),
    .dm1_h_en(h1_en), .dm1_h_we(h1_we), .dm1_h_addr(h1_a), .dm1_h_wdata(h1_wd), .dm1_h_rdata(h1_rd),
    .dm2_h_en(h2_en), .dm2_h_we(h2_we), .dm2_h_addr(h2_a), .dm2_h_wdata(h2_wd), .dm2_h_rdata(h2_rd),
    .switch_flag(sw_flag), .dm_we_obs,
    .dm1_addr_obs(dm1_a), .dm1_wdata_obs(dm1_wd), .dm2_addr_obs(dm2_a), .dm2_wdata_obs(dm2_wd)
  );

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------------------
  // programs
  instr_t p1 [IMW];
  instr_t p2 [IMW];
  int n1, n2;

  task automatic emit(int core, instr_t i);
    if (core == 1) begin p1[n1] = i; n1++; end
    else           begin p2[n2] = i; n2++; end
  endtask
  function automatic int here(int core);
    return (core == 1) ? n1 : n2;
  endfunction

  // DES-style Feistel kernel, ends with endBal
  task automatic emit_des(int c);
    int rl;
    emit(c, a_i(OP_ADDIU, 20, 0, KEYS));
    emit(c, a_i(OP_ADDIU, 21, 0, AOUT));
    emit(c, a_i(OP_ADDIU, 22, 0, SBD));
    emit(c, a_i(OP_ADDIU, 23, 0, 16));
    emit(c, a_m(OP_LW, 1, DIN, 0));
    emit(c, a_m(OP_LW, 2, DIN + 4, 0));
    rl = here(c);
    emit(c, a_m(OP_LW, 3, 0, 20));
    emit(c, a_r(OP_XOR, 4, 2, 3));
    emit(c, a_i(OP_ANDI, 5, 4, 'hff));
    emit(c, a_r(OP_ADDU, 5, 5, 22));
    emit(c, a_m(OP_LBU, 6, 0, 5));
    for (int b = 1; b < 4; b++) begin
      emit(c, a_sh(OP_SRL, 7, 4, 8 * b));
      if (b < 3) emit(c, a_i(OP_ANDI, 7, 7, 'hff));
      emit(c, a_r(OP_ADDU, 7, 7, 22));
      emit(c, a_m(OP_LBU, 8, 0, 7));
      emit(c, a_sh(OP_SLL, 8, 8, 8 * b));
      emit(c, a_r(OP_OR, 6, 6, 8));
    end
    emit(c, a_r(OP_XOR, 9, 1, 6));
    emit(c, a_m(OP_SW, 9, 0, 21));          // store of a_i
    emit(c, a_r(OP_ADDU, 1, 2, 0));
    emit(c, a_r(OP_ADDU, 2, 9, 0));
    emit(c, a_i(OP_ADDIU, 20, 20, 4));
    emit(c, a_i(OP_ADDIU, 21, 21, 4));
    emit(c, a_i(OP_ADDIU, 23, 23, -1));
    emit(c, a_b(OP_BNE, 23, 0, rl - (here(c) + 1)));
    emit(c, a_m(OP_SW, 1, DOUT, 0));
    emit(c, a_m(OP_SW, 2, DOUT + 4, 0));
    emit(c, a_op(OP_ENDBAL));
  endtask

  // AES-style SBOX kernel, ends with endBal
  task automatic emit_aes(int c);
    int rl, bl;
    emit(c, a_i(OP_ADDIU, 20, 0, AKEYS));
    emit(c, a_i(OP_ADDIU, 22, 0, SBA));
    emit(c, a_i(OP_ADDIU, 23, 0, NR));
    rl = here(c);
    emit(c, a_i(OP_ADDIU, 21, 0, ASTATE));
    emit(c, a_i(OP_ADDIU, 24, 0, 16));
    bl = here(c);
    emit(c, a_m(OP_LBU, 1, 0, 21));
    emit(c, a_m(OP_LBU, 2, 0, 20));
    emit(c, a_r(OP_XOR, 1, 1, 2));
    emit(c, a_r(OP_ADDU, 1, 1, 22));
    emit(c, a_m(OP_LBU, 3, 0, 1));          // SBOX load
    emit(c, a_m(OP_SB, 3, 0, 21));          // store of the SBOX output
    emit(c, a_i(OP_ADDIU, 21, 21, 1));
    emit(c, a_i(OP_ADDIU, 20, 20, 1));
    emit(c, a_i(OP_ADDIU, 24, 24, -1));
    emit(c, a_b(OP_BNE, 24, 0, bl - (here(c) + 1)));
    emit(c, a_i(OP_ADDIU, 23, 23, -1));
    emit(c, a_b(OP_BNE, 23, 0, rl - (here(c) + 1)));
    emit(c, a_op(OP_ENDBAL));
  endtask

  // interrupt routine: backupReg, count, restoreReg, endIntr
  task automatic emit_intr(int c);
    emit(c, a_m(OP_SW, 26, ISTK, 0));
    emit(c, a_m(OP_SW, 27, ISTK + 4, 0));
    emit(c, a_r(OP_MFPCB, 27, 0, 0));
    emit(c, a_m(OP_SW, 27, ISTK + 8, 0));
    emit(c, a_m(OP_LW, 26, ICNT, 0));
    emit(c, a_i(OP_ADDIU, 26, 26, 1));
    emit(c, a_m(OP_SW, 26, ICNT, 0));
    emit(c, a_m(OP_LW, 27, ISTK + 8, 0));
    emit(c, a_r(OP_MTPCB, 0, 27, 0));
    emit(c, a_m(OP_LW, 27, ISTK + 4, 0));
    emit(c, a_m(OP_LW, 26, ISTK, 0));
    emit(c, a_op(OP_ENDINTR));
  endtask

  int des_entry, aes_entry;

  task automatic build_programs();
    int l, h;
    for (int i = 0; i < IMW; i++) begin p1[i] = '0; p2[i] = '0; end
    n1 = 0; n2 = 0;
    // ---- CORE2: own task
    emit(2, a_i(OP_ADDIU, 5, 0, 1));
    emit(2, a_i(OP_ORI, 6, 0, 'h1234));
    emit(2, a_i(OP_ADDIU, 10, 0, 0));
    emit(2, a_i(OP_ADDIU, 8, 0, NTASK));
    emit(2, a_r(OP_MULT, 0, 5, 6));
    l = n2;
    emit(2, a_r(OP_MFLO, 7, 0, 0));
    emit(2, a_r(OP_MFHI, 9, 0, 0));
    emit(2, a_r(OP_ADDU, 10, 10, 7));
    emit(2, a_r(OP_XOR, 10, 10, 9));
    emit(2, a_i(OP_ADDIU, 5, 5, 3));
    emit(2, a_sh(OP_SLL, 11, 5, 1));
    emit(2, a_r(OP_XOR, 6, 6, 11));
    emit(2, a_r(OP_MULT, 0, 5, 6));
    emit(2, a_i(OP_ADDIU, 8, 8, -1));
    emit(2, a_b(OP_BNE, 8, 0, l - (n2 + 1)));
    emit(2, a_m(OP_SW, 5, C2RES, 0));
    emit(2, a_m(OP_SW, 6, C2RES + 4, 0));
    emit(2, a_m(OP_SW, 10, C2RES + 8, 0));
    emit(2, a_r(OP_MFHI, 12, 0, 0));
    emit(2, a_m(OP_SW, 12, C2RES + 12, 0));
    emit(2, a_r(OP_MFLO, 13, 0, 0));
    emit(2, a_m(OP_SW, 13, C2RES + 16, 0));
    emit(2, a_i(OP_ADDIU, 14, 0, 1));
    emit(2, a_m(OP_SW, 14, C2RES + 20, 0));
    h = n2;
    emit(2, a_j(OP_J, h));
    // complementary programs: the same code, in CORE2's memory
    n2 = 512;  des_entry = n2; emit_des(2);
    n2 = 1024; aes_entry = n2; emit_aes(2);
    // save routine: push r1..r31, HI, LO, PC_backup; endIntr
    n2 = SAVE_W;
    for (int r = 1; r < 32; r++) emit(2, a_m(OP_SW, r, STK + 4 * r, 0));
    emit(2, a_r(OP_MFHI, 1, 0, 0));
    emit(2, a_m(OP_SW, 1, STK + 128, 0));
    emit(2, a_r(OP_MFLO, 1, 0, 0));
    emit(2, a_m(OP_SW, 1, STK + 132, 0));
    emit(2, a_r(OP_MFPCB, 1, 0, 0));
    emit(2, a_m(OP_SW, 1, STK + 136, 0));
    emit(2, a_op(OP_ENDINTR));
    // restore routine: pop HI, LO, PC_backup, r1..r31; endIntr
    n2 = RESTORE_W;
    emit(2, a_m(OP_LW, 1, STK + 128, 0));
    emit(2, a_r(OP_MTHI, 0, 1, 0));
    emit(2, a_m(OP_LW, 1, STK + 132, 0));
    emit(2, a_r(OP_MTLO, 0, 1, 0));
    emit(2, a_m(OP_LW, 1, STK + 136, 0));
    emit(2, a_r(OP_MTPCB, 0, 1, 0));
    for (int r = 1; r < 32; r++) emit(2, a_m(OP_LW, r, STK + 4 * r, 0));
    emit(2, a_op(OP_ENDINTR));
    n2 = INTR_W; emit_intr(2);

    // ---- CORE1
    emit(1, a_i(OP_ADDIU, 1, 0, 0));
    emit(1, a_i(OP_ADDIU, 2, 0, 20));
    l = n1;
    emit(1, a_i(OP_ADDIU, 1, 1, 7));
    emit(1, a_i(OP_ADDIU, 2, 2, -1));
    emit(1, a_b(OP_BNE, 2, 0, l - (n1 + 1)));
    emit(1, a_m(OP_SW, 1, C1RES, 0));
    emit(1, a_op(OP_STARTBAL, des_entry));
    emit_des(1);
    emit(1, a_i(OP_ADDIU, 3, 0, 123));
    emit(1, a_m(OP_SW, 3, C1RES + 4, 0));
    emit(1, a_op(OP_STARTBAL, aes_entry));
    emit_aes(1);
    emit(1, a_i(OP_ADDIU, 3, 0, 'h5a));
    emit(1, a_m(OP_SW, 3, C1RES + 8, 0));
    h = n1;
    emit(1, a_j(OP_J, h));
    n1 = INTR_W; emit_intr(1);
  endtask

  // ---------------------------------------------------------------------------
  // data and reference model
  function automatic logic [7:0] sbd(int i);
    return 8'((i * 29 + 101) ^ (i >> 3));
  endfunction
  function automatic logic [7:0] sba(int i);
    return 8'((i * 113 + 7) ^ (i >> 2) ^ 8'h5c);
  endfunction

  word_t        keys [16];
  word_t        l0, r0;
  word_t        a_ref [16];
  word_t        lf, rf;
  logic [7:0]   st0 [16];
  logic [7:0]   rk [NR][16];
  logic [7:0]   st_ref [16];
  word_t        t5, t6, t10, thi, tlo;

  task automatic make_reference();
    word_t l, r, t, f, a;
    logic [63:0] p;
    l = l0; r = r0;
    for (int i = 0; i < 16; i++) begin
      t = r ^ keys[i];
      f = {sbd(int'(t[31:24])), sbd(int'(t[23:16])), sbd(int'(t[15:8])), sbd(int'(t[7:0]))};
      a = l ^ f;
      a_ref[i] = a;
      l = r; r = a;
    end
    lf = l; rf = r;
    for (int j = 0; j < 16; j++) st_ref[j] = st0[j];
    for (int q = 0; q < NR; q++)
      for (int j = 0; j < 16; j++) st_ref[j] = sba(int'(st_ref[j] ^ rk[q][j]));
    // CORE2 task
    t5 = 1; t6 = 32'h1234; t10 = 0;
    p = 64'($signed(t5) * $signed(t6));
    for (int i = 0; i < NTASK; i++) begin
      t10 = (t10 + p[31:0]) ^ p[63:32];
      t5 = t5 + 3;
      t6 = t6 ^ (t5 << 1);
      p = 64'($signed(t5) * $signed(t6));
    end
    thi = p[63:32]; tlo = p[31:0];
  endtask

  // host-port accesses, driven at the falling edge
  task automatic dm_wr(int c, int addr, word_t d);
    @(negedge clk);
    h1_en = (c == 1); h1_we = (c == 1); h1_a = addr; h1_wd = d;
    h2_en = (c == 2); h2_we = (c == 2); h2_a = addr; h2_wd = d;
    @(negedge clk);
    h1_en = 0; h1_we = 0; h2_en = 0; h2_we = 0;
  endtask

  task automatic dm_rd(int c, int addr, output word_t d);
    @(negedge clk);
    h1_en = (c == 1); h1_we = 0; h1_a = addr;
    h2_en = (c == 2); h2_we = 0; h2_a = addr;
    @(negedge clk);
    h1_en = 0; h2_en = 0;
    d = (c == 1) ? h1_rd : h2_rd;
  endtask

  task automatic load_data();
    for (int i = 0; i < 16; i++) begin
      dm_wr(1, KEYS + 4 * i, keys[i]);
      dm_wr(2, KEYS + 4 * i, ~keys[i]);
    end
    dm_wr(1, DIN, l0);      dm_wr(2, DIN, ~l0);
    dm_wr(1, DIN + 4, r0);  dm_wr(2, DIN + 4, ~r0);
    for (int w = 0; w < 64; w++) begin
      word_t d1, d2;
      for (int b = 0; b < 4; b++) begin
        d1[8*b +: 8] = sbd(4 * w + b);
        d2[8*b +: 8] = sba(4 * w + b);
      end
      dm_wr(1, SBD + 4 * w, d1); dm_wr(2, SBD + 4 * w, d1);
      dm_wr(1, SBA + 4 * w, d2);
      for (int b = 0; b < 4; b++) d2[8*b +: 8] = ~sba(255 - (4 * w + b));
      dm_wr(2, SBA + 4 * w, d2);
    end
    for (int w = 0; w < 4; w++) begin
      word_t d;
      d = {st0[4*w+3], st0[4*w+2], st0[4*w+1], st0[4*w]};
      dm_wr(1, ASTATE + 4 * w, d); dm_wr(2, ASTATE + 4 * w, d);
    end
    for (int q = 0; q < NR; q++)
      for (int w = 0; w < 4; w++) begin
        word_t d;
        d = {rk[q][4*w+3], rk[q][4*w+2], rk[q][4*w+1], rk[q][4*w]};
        dm_wr(1, AKEYS + 16 * q + 4 * w, d);
        dm_wr(2, AKEYS + 16 * q + 4 * w, (q == 0) ? ~d : d);
      end
    dm_wr(1, ICNT, 0); dm_wr(2, ICNT, 0);
  endtask

  // ---------------------------------------------------------------------------
  // monitors
  int n_switch_set = 0, n_switch_clr = 0, n_save_irq = 0, n_dual_load = 0,
      n_bal_irq = 0, n_restore = 0, n_plain_irq = 0, n_pairs = 0, n_unpaired = 0,
      n_not_compl = 0;
  logic sw_d = 1'b0;
  int   cyc = 0, t_start = 0, t_run = 0, t_end = 0;
  bit   c1_done = 0, c2_done = 0;
  int   ctl_state, prev_state = 0;
  // balancing overhead: switch set -> both PCs loaded on the cipher (entry),
  // endBal seen -> both PCs loaded back (exit), summed over the sessions
  int   ovh_entry = 0, ovh_exit = 0, t_endbal = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    ctl_state = int'(dut.u_ctrl.state_q);
    sw_d <= sw_flag;
    if (sw_flag && !sw_d) begin n_switch_set++; t_start = cyc; end
    if (!sw_flag && sw_d) n_switch_clr++;
    if (dut.st2.irq_ack && dut.cmd2.irq_vec == 32'h7000) n_save_irq++;
    if (dut.cmd1.pc_load && dut.cmd2.pc_load) begin
      n_dual_load++;
      if (ctl_state == 2) begin t_run = cyc; ovh_entry += t_run - t_start; end
      if (ctl_state == 8) ovh_exit += cyc - t_endbal;
    end
    if (ctl_state == ST_END_DRAIN && prev_state != ST_END_DRAIN) t_endbal = cyc;
    prev_state = ctl_state;
    if (dut.cmd2.pc_load && dut.cmd2.pc_value == 32'h7400) n_restore++;
    if ((dut.st1.irq_ack && dut.cmd2.hold) || (dut.st2.irq_ack && dut.cmd1.hold)) n_bal_irq++;
    if (!sw_flag && (dut.st1.irq_ack || dut.st2.irq_ack)) n_plain_irq++;
    if (sw_flag && (ctl_state == ST_BAL || ctl_state == ST_INT_DRAIN || ctl_state == ST_END_DRAIN)
        && (dm_we_obs != 2'b00)) begin
      if (dm_we_obs != 2'b11 || dm1_a != dm2_a) n_unpaired++;
      else begin
        n_pairs++;
        if (dm2_wd != ~dm1_wd) n_not_compl++;
      end
    end
    if (dm_we_obs[0] && dm1_a == C1RES + 8) c1_done = 1;
    if (dm_we_obs[1] && dm2_a == C2RES + 20) c2_done = 1;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // interrupt stimulus
  initial begin
    irq_req = 2'b00;
    wait (rst_n);
    repeat (60) @(posedge clk);
    irq_req <= 2'b10;                       // CORE2, no balancing yet
    @(posedge clk);
    irq_req <= 2'b00;
    wait (n_switch_set == 1 && int'(dut.u_ctrl.state_q) == ST_BAL);
    repeat (300) @(posedge clk);
    irq_req <= 2'b01;                       // CORE1 during session 1
    @(posedge clk);
    irq_req <= 2'b00;
    wait (n_switch_set == 2 && int'(dut.u_ctrl.state_q) == ST_BAL);
    repeat (500) @(posedge clk);
    irq_req <= 2'b10;                       // CORE2 during session 2
    @(posedge clk);
    irq_req <= 2'b00;
  end

  initial begin
    word_t d, d2;
    h1_en = 0; h1_we = 0; h1_a = 0; h1_wd = 0;
    h2_en = 0; h2_we = 0; h2_a = 0; h2_wd = 0;
    im1_we = 0; im2_we = 0; im1_a = 0; im2_a = 0; im1_d = 0; im2_d = 0;
    for (int i = 0; i < 16; i++) keys[i] = $urandom;
    l0 = $urandom; r0 = $urandom;
    for (int j = 0; j < 16; j++) st0[j] = 8'($urandom);
    for (int q = 0; q < NR; q++) for (int j = 0; j < 16; j++) rk[q][j] = 8'($urandom);
    build_programs();
    make_reference();
    @(posedge clk);
    for (int i = 0; i < IMW; i++) begin
      im1_we <= 1; im1_a <= i; im1_d <= p1[i];
      im2_we <= 1; im2_a <= i; im2_d <= p2[i];
      @(posedge clk);
    end
    im1_we <= 0; im2_we <= 0;
    load_data();
    @(posedge clk);
    rst_n <= 1;

    wait (c1_done && c2_done);
    repeat (20) @(posedge clk);

    // ---- CORE1 own work
    dm_rd(1, C1RES, d);     check("core1 prework", d, 140);
    dm_rd(1, C1RES + 4, d); check("core1 between sessions", d, 123);
    // ---- DES-style session
    for (int i = 0; i < 16; i++) begin
      dm_rd(1, AOUT + 4 * i, d);
      dm_rd(2, AOUT + 4 * i, d2);
      check($sformatf("a_%0d core1", i + 1), d, a_ref[i]);
      check($sformatf("a_%0d core2 complement", i + 1), d2, ~a_ref[i]);
    end
    dm_rd(1, DOUT, d);     check("des L", d, lf);
    dm_rd(2, DOUT, d);     check("des ~L", d, ~lf);
    dm_rd(1, DOUT + 4, d); check("des R", d, rf);
    dm_rd(2, DOUT + 4, d); check("des ~R", d, ~rf);
    // ---- AES-style session
    for (int w = 0; w < 4; w++) begin
      word_t e;
      e = {st_ref[4*w+3], st_ref[4*w+2], st_ref[4*w+1], st_ref[4*w]};
      dm_rd(1, ASTATE + 4 * w, d);  check($sformatf("aes state %0d", w), d, e);
      dm_rd(2, ASTATE + 4 * w, d2); check($sformatf("aes state %0d complement", w), d2, ~e);
    end
    // ---- CORE2 task survives both sessions and two interrupts
    dm_rd(2, C2RES, d);      check("core2 r5", d, t5);
    dm_rd(2, C2RES + 4, d);  check("core2 r6", d, t6);
    dm_rd(2, C2RES + 8, d);  check("core2 r10", d, t10);
    dm_rd(2, C2RES + 12, d); check("core2 HI", d, thi);
    dm_rd(2, C2RES + 16, d); check("core2 LO", d, tlo);
    dm_rd(1, ICNT, d);       check("core1 interrupt count", d, 1);
    dm_rd(2, ICNT, d);       check("core2 interrupt count", d, 2);

    // ---- mechanisms
    check("balancing sessions started", n_switch_set, 2);
    check("balancing sessions ended", n_switch_clr, 2);
    check("save interrupts", n_save_irq, 2);
    check("restores", n_restore, 2);
    check("interrupts during balancing (other core held)", n_bal_irq, 2);
    check("interrupts outside balancing", n_plain_irq, 1);
    checks++;
    // start, resume after each balancing interrupt, end: 2 + 2 + 2
    if (n_dual_load != 6) begin failures++; $display("FAIL dual loads %0d", n_dual_load); end
    checks++;
    if (n_pairs < 50) begin failures++; $display("FAIL only %0d paired stores", n_pairs); end
    check("unpaired stores while balancing", n_unpaired, 0);
    check("paired stores not complementary", n_not_compl, 0);

    $display("mechanisms: sessions=%0d save_irq=%0d dual_pc_loads=%0d bal_irq=%0d restores=%0d plain_irq=%0d paired_stores=%0d",
             n_switch_set, n_save_irq, n_dual_load, n_bal_irq, n_restore, n_plain_irq, n_pairs);
    $display("balancing overhead per session: entry %0d, exit %0d cycles",
             ovh_entry / 2, ovh_exit / 2);
    // the source reports 728 cycles for save plus restore of the context;
    // each direction here must stay below that
    checks++;
    if (ovh_entry <= 0 || ovh_exit <= 0 || ovh_entry / 2 > 728 || ovh_exit / 2 > 728) begin
      failures++; $display("FAIL overhead out of range");
    end
    $display("total cycles %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
