// tb_mute_aes: a complete AES-128 encryption run balanced on the MUTE
// processor (the MUTE-AES configuration), at the top's default sizes.
//
// CORE1 encrypts the FIPS-197 example block (key 000102..0f, plaintext
// 00112233..ff) between startBal and endBal. CORE2 is busy with a
// multiply/xor task of its own; the session interrupts it, its context is
// saved, it runs the same AES code on its own data memory and is returned to
// its task afterwards. CORE2's data memory follows the complete-inversion
// scheme: the same plaintext, the first round key complemented, the later
// round keys as they are, and the table SBOX'[j] = ~SBOX[~j]. After the
// first AddRoundKey CORE2's state is the complement of CORE1's; SubBytes
// through SBOX' keeps it so, and ShiftRows, MixColumns and AddRoundKey
// preserve a complement because they are linear (the all-ones column maps to
// itself under MixColumns). The code is branch-free apart from loop
// counters, with xtime done by masking, so both cores run the same
// instruction stream in the same cycles.
//
// The SBOX is computed here from its definition (inverse in GF(2^8) modulo
// x^8+x^4+x^3+x+1 followed by the affine map with constant 0x63); the round
// keys are expanded here by the standard key schedule and placed in memory.
// An interrupt for CORE1 arrives in the middle of the session.
//
// Checked: CORE1's ciphertext equals the published one
// (69c4e0d86a7b0430d8cdb78070b4c55a); CORE2 holds its exact complement; every
// store during the session is paired, same cycle and same address, with
// complemented data; CORE2's own task ends with the values of an
// uninterrupted run; the interrupt routine ran once; the switch flag was set
// and cleared once. Only the top's ports are used. The session's length in
// cycles is printed.
`timescale 1ns/1ps
module tb_mute_aes;
  import mute_pkg::*;
  import pisa_asm_pkg::*;

  localparam int IMW = 4096;
  localparam int SAVE_W = 32'h7000 / 8, RESTORE_W = 32'h7400 / 8, INTR_W = 32'h7800 / 8;
  // data layout (byte addresses, the same in both data memories)
  localparam int C2RES = 'h080, C1RES = 'h0c0, STATE = 'h100, TMP = 'h140, RKEYS = 'h200,
                 SBOX = 'h400, STK = 'h3000, ISTK = 'h3800, ICNT = 'h3900;
  localparam int NTASK = 300;

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
  // AES tables and key schedule
  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 8'h00;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
      b = b >> 1;
    end
    return p;
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] x, int n);
    return 8'((x << n) | (x >> (8 - n)));
  endfunction

  logic [7:0] sbox [256];
  task automatic make_sbox();
    for (int x = 0; x < 256; x++) begin
      logic [7:0] inv = 8'h00;
      for (int y = 1; y < 256; y++) if (gmul(8'(x), 8'(y)) == 8'h01) inv = 8'(y);
      sbox[x] = inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
    end
  endtask

  logic [7:0] key [16];
  logic [7:0] pt  [16];
  logic [7:0] rk  [11][16];
  task automatic expand_key();
    logic [7:0] w [44][4];
    logic [7:0] t [4];
    logic [7:0] rcon = 8'h01;
    for (int i = 0; i < 4; i++) for (int b = 0; b < 4; b++) w[i][b] = key[4 * i + b];
    for (int i = 4; i < 44; i++) begin
      for (int b = 0; b < 4; b++) t[b] = w[i-1][b];
      if (i % 4 == 0) begin
        logic [7:0] t0;
        t0 = t[0];
        t[0] = sbox[t[1]] ^ rcon; t[1] = sbox[t[2]]; t[2] = sbox[t[3]]; t[3] = sbox[t0];
        rcon = gmul(rcon, 8'h02);
      end
      for (int b = 0; b < 4; b++) w[i][b] = w[i-4][b] ^ t[b];
    end
    for (int r = 0; r < 11; r++)
      for (int c = 0; c < 4; c++) for (int b = 0; b < 4; b++) rk[r][4 * c + b] = w[4 * r + c][b];
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

  // rd = xtime(rs) for a byte in rs, branch-free; uses r19 as scratch
  task automatic emit_xtime(int c, int rd, int rs);
    emit(c, a_sh(OP_SRL, 19, rs, 7));
    emit(c, a_r(OP_SUBU, 19, 0, 19));
    emit(c, a_i(OP_ANDI, 19, 19, 'h1b));
    emit(c, a_sh(OP_SLL, rd, rs, 1));
    emit(c, a_r(OP_XOR, rd, rd, 19));
    emit(c, a_i(OP_ANDI, rd, rd, 'hff));
  endtask

  // SubBytes and ShiftRows: TMP[r+4c] = SBOX[STATE[r + 4((c+r)%4)]]
  task automatic emit_sub_shift(int c);
    for (int j = 0; j < 16; j++) begin
      int r, col;
      r = j % 4; col = j / 4;
      emit(c, a_m(OP_LBU, 1, STATE + r + 4 * ((col + r) % 4), 0));
      emit(c, a_r(OP_ADDU, 1, 1, 22));
      emit(c, a_m(OP_LBU, 2, 0, 1));          // SBOX access
      emit(c, a_m(OP_SB, 2, TMP + j, 0));
    end
  endtask

  // AES-128 encryption of STATE in place, round keys at RKEYS; ends with endBal
  task automatic emit_aes(int c);
    int rl;
    emit(c, a_i(OP_ADDIU, 22, 0, SBOX));
    emit(c, a_i(OP_ADDIU, 20, 0, RKEYS + 16));   // round key pointer
    emit(c, a_i(OP_ADDIU, 23, 0, 9));            // rounds 1..9
    // round 0: AddRoundKey
    for (int j = 0; j < 16; j++) begin
      emit(c, a_m(OP_LBU, 1, STATE + j, 0));
      emit(c, a_m(OP_LBU, 2, RKEYS + j, 0));
      emit(c, a_r(OP_XOR, 1, 1, 2));
      emit(c, a_m(OP_SB, 1, STATE + j, 0));
    end
    rl = here(c);
    emit_sub_shift(c);
    // MixColumns and AddRoundKey, TMP -> STATE
    for (int col = 0; col < 4; col++) begin
      for (int r = 0; r < 4; r++) emit(c, a_m(OP_LBU, 1 + r, TMP + 4 * col + r, 0));
      emit(c, a_r(OP_XOR, 5, 1, 2));
      emit(c, a_r(OP_XOR, 5, 5, 3));
      emit(c, a_r(OP_XOR, 5, 5, 4));             // t = a0^a1^a2^a3
      for (int r = 0; r < 4; r++) begin
        emit(c, a_r(OP_XOR, 6, 1 + r, 1 + (r + 1) % 4));
        emit_xtime(c, 7, 6);
        emit(c, a_r(OP_XOR, 7, 7, 5));
        emit(c, a_r(OP_XOR, 7, 7, 1 + r));       // b_r = a_r ^ t ^ xtime(a_r ^ a_r+1)
        emit(c, a_m(OP_LBU, 8, 4 * col + r, 20));
        emit(c, a_r(OP_XOR, 7, 7, 8));
        emit(c, a_m(OP_SB, 7, STATE + 4 * col + r, 0));
      end
    end
    emit(c, a_i(OP_ADDIU, 20, 20, 16));
    emit(c, a_i(OP_ADDIU, 23, 23, -1));
    emit(c, a_b(OP_BNE, 23, 0, rl - (here(c) + 1)));
    // round 10: SubBytes, ShiftRows, AddRoundKey
    emit_sub_shift(c);
    for (int j = 0; j < 16; j++) begin
      emit(c, a_m(OP_LBU, 1, TMP + j, 0));
      emit(c, a_m(OP_LBU, 2, j, 20));
      emit(c, a_r(OP_XOR, 1, 1, 2));
      emit(c, a_m(OP_SB, 1, STATE + j, 0));
    end
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

  int aes_entry;

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
    // complementary AES: the same code, in CORE2's memory
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

    // ---- CORE1: a little work, the balanced encryption, a done marker
    emit(1, a_i(OP_ADDIU, 1, 0, 0));
    emit(1, a_i(OP_ADDIU, 2, 0, 20));
    l = n1;
    emit(1, a_i(OP_ADDIU, 1, 1, 7));
    emit(1, a_i(OP_ADDIU, 2, 2, -1));
    emit(1, a_b(OP_BNE, 2, 0, l - (n1 + 1)));
    emit(1, a_m(OP_SW, 1, C1RES, 0));
    emit(1, a_op(OP_STARTBAL, aes_entry));
    emit_aes(1);
    emit(1, a_i(OP_ADDIU, 3, 0, 'h5a));
    emit(1, a_m(OP_SW, 3, C1RES + 4, 0));
    h = n1;
    emit(1, a_j(OP_J, h));
    n1 = INTR_W; emit_intr(1);
  endtask

  // ---------------------------------------------------------------------------
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

  function automatic word_t pack4(logic [7:0] b0, logic [7:0] b1, logic [7:0] b2, logic [7:0] b3);
    return {b3, b2, b1, b0};
  endfunction

  task automatic load_data();
    for (int w = 0; w < 4; w++) begin
      word_t d;
      d = pack4(pt[4*w], pt[4*w+1], pt[4*w+2], pt[4*w+3]);
      dm_wr(1, STATE + 4 * w, d); dm_wr(2, STATE + 4 * w, d);
    end
    for (int r = 0; r < 11; r++)
      for (int w = 0; w < 4; w++) begin
        word_t d;
        d = pack4(rk[r][4*w], rk[r][4*w+1], rk[r][4*w+2], rk[r][4*w+3]);
        dm_wr(1, RKEYS + 16 * r + 4 * w, d);
        dm_wr(2, RKEYS + 16 * r + 4 * w, (r == 0) ? ~d : d);
      end
    for (int w = 0; w < 64; w++) begin
      dm_wr(1, SBOX + 4 * w, pack4(sbox[4*w], sbox[4*w+1], sbox[4*w+2], sbox[4*w+3]));
      dm_wr(2, SBOX + 4 * w, pack4(~sbox[255 - 4*w], ~sbox[254 - 4*w],
                                   ~sbox[253 - 4*w], ~sbox[252 - 4*w]));
    end
    dm_wr(1, ICNT, 0); dm_wr(2, ICNT, 0);
  endtask

  // ---------------------------------------------------------------------------
  // monitors (top-level ports only)
  int   n_switch_set = 0, n_switch_clr = 0, n_pairs = 0, n_unpaired = 0, n_not_compl = 0;
  int   cyc = 0, t_set = 0, t_clr = 0;
  logic sw_d = 1'b0;
  bit   c1_done = 0, c2_done = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    sw_d <= sw_flag;
    if (sw_flag && !sw_d) begin n_switch_set++; t_set = cyc; end
    if (!sw_flag && sw_d) begin n_switch_clr++; t_clr = cyc; end
    // during the session only paired stores (the save and restore routines
    // run on CORE2 while CORE1 is parked, so they are not counted here)
    if (sw_flag && dm_we_obs == 2'b11) begin
      if (dm1_a != dm2_a) n_unpaired++;
      else begin
        n_pairs++;
        if (dm2_wd != ~dm1_wd) n_not_compl++;
      end
    end
    // (CORE1's interrupt routine, which uses its own stack area, excepted)
    if (sw_flag && dm_we_obs == 2'b01 && dm1_a < STK) n_unpaired++;
    if (dm_we_obs[0] && dm1_a == C1RES + 4) c1_done = 1;
    if (dm_we_obs[1] && dm2_a == C2RES + 20) c2_done = 1;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // an interrupt for CORE1 in the middle of the session
  initial begin
    irq_req = 2'b00;
    wait (rst_n);
    wait (sw_flag);
    repeat (1500) @(posedge clk);
    irq_req <= 2'b01;
    @(posedge clk);
    irq_req <= 2'b00;
  end

  word_t t5, t6, t10, thi, tlo;
  task automatic task_reference();
    logic [63:0] p;
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

  initial begin
    logic [127:0] ct;
    word_t d, d2;
    h1_en = 0; h1_we = 0; h1_a = 0; h1_wd = 0;
    h2_en = 0; h2_we = 0; h2_a = 0; h2_wd = 0;
    im1_we = 0; im2_we = 0; im1_a = 0; im2_a = 0; im1_d = 0; im2_d = 0;
    for (int i = 0; i < 16; i++) begin key[i] = 8'(i); pt[i] = 8'(i * 17); end
    ct = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    make_sbox();
    check("sbox[00]", {24'h0, sbox[8'h00]}, 32'h63);
    check("sbox[53]", {24'h0, sbox[8'h53]}, 32'hed);
    expand_key();
    check("last round key word", pack4(rk[10][12], rk[10][13], rk[10][14], rk[10][15]),
          32'hc530_2b4d);                // round 10 key ends 4d 2b 30 c5
    build_programs();
    task_reference();
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

    dm_rd(1, C1RES, d); check("core1 prework", d, 140);
    for (int w = 0; w < 4; w++) begin
      word_t e;
      e = {ct[127 - 32*w - 24 -: 8], ct[127 - 32*w - 16 -: 8],
           ct[127 - 32*w - 8 -: 8], ct[127 - 32*w -: 8]};
      dm_rd(1, STATE + 4 * w, d);  check($sformatf("ciphertext word %0d", w), d, e);
      dm_rd(2, STATE + 4 * w, d2); check($sformatf("ciphertext word %0d complement", w), d2, ~e);
    end
    dm_rd(2, C2RES, d);      check("core2 r5", d, t5);
    dm_rd(2, C2RES + 4, d);  check("core2 r6", d, t6);
    dm_rd(2, C2RES + 8, d);  check("core2 r10", d, t10);
    dm_rd(2, C2RES + 12, d); check("core2 HI", d, thi);
    dm_rd(2, C2RES + 16, d); check("core2 LO", d, tlo);
    dm_rd(1, ICNT, d);       check("core1 interrupt routine ran", d, 1);
    check("session started", n_switch_set, 1);
    check("session ended", n_switch_clr, 1);
    checks++;
    if (n_pairs < 300) begin failures++; $display("FAIL only %0d paired stores", n_pairs); end
    check("unpaired stores of CORE1 during the session", n_unpaired, 0);
    check("paired stores not complementary", n_not_compl, 0);
    $display("AES-128 session: %0d cycles from switch set to switch clear, %0d paired stores",
             t_clr - t_set, n_pairs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
