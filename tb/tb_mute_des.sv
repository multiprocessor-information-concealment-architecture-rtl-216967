// tb_mute_des: a complete DES encryption run balanced on the MUTE processor
// (the MUTE-DES configuration), at the top's default sizes.
//
// CORE1 encrypts the block 0123456789abcdef under the key 133457799bbcdff1
// between startBal and endBal; the published result is 85e813540f0ab405.
// CORE2 is busy with a multiply/xor task of its own; the session interrupts
// it, saves its context, runs the same DES code on its own data memory and
// returns it to its task. CORE2's data memory holds the complemented block
// and the subkeys of the complemented key (which are the complemented
// subkeys), with the same S/P tables.
//
// The program on the cores does the whole cipher: the initial permutation,
// 16 rounds and the final permutation. The permutations are unrolled
// bit-by-bit (shift, mask, shift, or), so a complemented input gives the
// complemented output. In each round the eight 6-bit expansion groups of R
// are cut out with a rotate and a shift, XORed with the subkey's 6-bit
// groups and used to index eight combined S-box/P-permutation tables (SP
// tables, 64 words each); f is the XOR of the eight entries. On CORE2 both
// the group and the subkey group are complemented, so the index and f are
// the same as on CORE1, and a_i = L ^ f, which is stored every round, is the
// exact complement. The subkeys (key schedule) and the SP tables are
// computed here, by the host, from the standard DES tables; the code has no
// data-dependent branch.
//
// Checked: CORE1's ciphertext equals the published one, CORE2 holds its
// complement; every a_i stored by CORE1 matches a DES model here, and every
// store during the session is paired, same cycle and same address, with
// complemented data; CORE2's own task ends with the values of an
// uninterrupted run; an interrupt for CORE2 in mid-session was serviced
// once; the switch was set and cleared once. Only the top's ports are used.
`timescale 1ns/1ps
module tb_mute_des;
  import mute_pkg::*;
  import pisa_asm_pkg::*;

  localparam int IMW = 4096;
  localparam int SAVE_W = 32'h7000 / 8, RESTORE_W = 32'h7400 / 8, INTR_W = 32'h7800 / 8;
  // data layout (byte addresses, the same in both data memories)
  localparam int C2RES = 'h080, C1RES = 'h0c0, DIN = 'h100, DOUT = 'h108, AOUT = 'h140,
                 KS = 'h200, SP = 'h400, STK = 'h3000, ISTK = 'h3800, ICNT = 'h3900;
  localparam int NTASK = 400;

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
  // DES tables (bit 1 is the most significant bit, as in the standard)
  int ip_t [64], fp_t [64];
  const int P_T [32] = '{16, 7, 20, 21, 29, 12, 28, 17, 1, 15, 23, 26, 5, 18, 31, 10,
                         2, 8, 24, 14, 32, 27, 3, 9, 19, 13, 30, 6, 22, 11, 4, 25};
  const int PC1_T [56] = '{57, 49, 41, 33, 25, 17, 9, 1, 58, 50, 42, 34, 26, 18,
                           10, 2, 59, 51, 43, 35, 27, 19, 11, 3, 60, 52, 44, 36,
                           63, 55, 47, 39, 31, 23, 15, 7, 62, 54, 46, 38, 30, 22,
                           14, 6, 61, 53, 45, 37, 29, 21, 13, 5, 28, 20, 12, 4};
  const int PC2_T [48] = '{14, 17, 11, 24, 1, 5, 3, 28, 15, 6, 21, 10,
                           23, 19, 12, 4, 26, 8, 16, 7, 27, 20, 13, 2,
                           41, 52, 31, 37, 47, 55, 30, 40, 51, 45, 33, 48,
                           44, 49, 39, 56, 34, 53, 46, 42, 50, 36, 29, 32};
  const int SHIFTS [16] = '{1, 1, 2, 2, 2, 2, 2, 2, 1, 2, 2, 2, 2, 2, 2, 1};
  const logic [3:0] S_T [8][64] = '{
    '{14, 4, 13, 1, 2, 15, 11, 8, 3, 10, 6, 12, 5, 9, 0, 7,
      0, 15, 7, 4, 14, 2, 13, 1, 10, 6, 12, 11, 9, 5, 3, 8,
      4, 1, 14, 8, 13, 6, 2, 11, 15, 12, 9, 7, 3, 10, 5, 0,
      15, 12, 8, 2, 4, 9, 1, 7, 5, 11, 3, 14, 10, 0, 6, 13},
    '{15, 1, 8, 14, 6, 11, 3, 4, 9, 7, 2, 13, 12, 0, 5, 10,
      3, 13, 4, 7, 15, 2, 8, 14, 12, 0, 1, 10, 6, 9, 11, 5,
      0, 14, 7, 11, 10, 4, 13, 1, 5, 8, 12, 6, 9, 3, 2, 15,
      13, 8, 10, 1, 3, 15, 4, 2, 11, 6, 7, 12, 0, 5, 14, 9},
    '{10, 0, 9, 14, 6, 3, 15, 5, 1, 13, 12, 7, 11, 4, 2, 8,
      13, 7, 0, 9, 3, 4, 6, 10, 2, 8, 5, 14, 12, 11, 15, 1,
      13, 6, 4, 9, 8, 15, 3, 0, 11, 1, 2, 12, 5, 10, 14, 7,
      1, 10, 13, 0, 6, 9, 8, 7, 4, 15, 14, 3, 11, 5, 2, 12},
    '{7, 13, 14, 3, 0, 6, 9, 10, 1, 2, 8, 5, 11, 12, 4, 15,
      13, 8, 11, 5, 6, 15, 0, 3, 4, 7, 2, 12, 1, 10, 14, 9,
      10, 6, 9, 0, 12, 11, 7, 13, 15, 1, 3, 14, 5, 2, 8, 4,
      3, 15, 0, 6, 10, 1, 13, 8, 9, 4, 5, 11, 12, 7, 2, 14},
    '{2, 12, 4, 1, 7, 10, 11, 6, 8, 5, 3, 15, 13, 0, 14, 9,
      14, 11, 2, 12, 4, 7, 13, 1, 5, 0, 15, 10, 3, 9, 8, 6,
      4, 2, 1, 11, 10, 13, 7, 8, 15, 9, 12, 5, 6, 3, 0, 14,
      11, 8, 12, 7, 1, 14, 2, 13, 6, 15, 0, 9, 10, 4, 5, 3},
    '{12, 1, 10, 15, 9, 2, 6, 8, 0, 13, 3, 4, 14, 7, 5, 11,
      10, 15, 4, 2, 7, 12, 9, 5, 6, 1, 13, 14, 0, 11, 3, 8,
      9, 14, 15, 5, 2, 8, 12, 3, 7, 0, 4, 10, 1, 13, 11, 6,
      4, 3, 2, 12, 9, 5, 15, 10, 11, 14, 1, 7, 6, 0, 8, 13},
    '{4, 11, 2, 14, 15, 0, 8, 13, 3, 12, 9, 7, 5, 10, 6, 1,
      13, 0, 11, 7, 4, 9, 1, 10, 14, 3, 5, 12, 2, 15, 8, 6,
      1, 4, 11, 13, 12, 3, 7, 14, 10, 15, 6, 8, 0, 5, 9, 2,
      6, 11, 13, 8, 1, 4, 10, 7, 9, 5, 0, 15, 14, 2, 3, 12},
    '{13, 2, 8, 4, 6, 15, 11, 1, 10, 9, 3, 14, 5, 0, 12, 7,
      1, 15, 13, 8, 10, 3, 7, 4, 12, 5, 6, 11, 0, 14, 9, 2,
      7, 11, 4, 1, 9, 12, 14, 2, 0, 6, 10, 13, 15, 3, 5, 8,
      2, 1, 14, 7, 4, 10, 8, 13, 15, 12, 9, 0, 3, 5, 6, 11}};

  // IP: rows of eight, starting at 58, 60, 62, 64, 57, 59, 61, 63, step -8
  task automatic make_perms();
    for (int q = 0; q < 8; q++)
      for (int c = 0; c < 8; c++)
        ip_t[8 * q + c] = ((q < 4) ? 58 + 2 * q : 57 + 2 * (q - 4)) - 8 * c;
    for (int j = 0; j < 64; j++) fp_t[ip_t[j] - 1] = j + 1;
  endtask

  // bit k (1 = msb) of an n-bit value
  function automatic logic bitk(logic [63:0] v, int n, int k);
    return v[n - k];
  endfunction

  // S-box i for a 6-bit input b1..b6: row b1b6, column b2..b5
  function automatic logic [3:0] sbox(int i, logic [5:0] b);
    return S_T[i][{b[5], b[0]} * 16 + b[4:1]];
  endfunction

  // SP table entry: P applied to S_i(b) placed in nibble i (nibble 0 = msb)
  function automatic word_t sp(int i, logic [5:0] b);
    word_t s, p;
    s = word_t'(sbox(i, b)) << (28 - 4 * i);
    for (int j = 0; j < 32; j++) p[31 - j] = s[32 - P_T[j]];
    return p;
  endfunction

  function automatic logic [47:0] subkey(logic [63:0] key, int r);
    logic [27:0] c, d;
    logic [55:0] cd;
    logic [47:0] k;
    for (int j = 0; j < 28; j++) begin
      c[27 - j] = bitk(key, 64, PC1_T[j]);
      d[27 - j] = bitk(key, 64, PC1_T[28 + j]);
    end
    for (int q = 0; q <= r; q++)
      for (int s = 0; s < SHIFTS[q]; s++) begin
        c = {c[26:0], c[27]};
        d = {d[26:0], d[27]};
      end
    cd = {c, d};
    for (int j = 0; j < 48; j++) k[47 - j] = cd[56 - PC2_T[j]];
    return k;
  endfunction

  // DES model: returns the ciphertext and every a_i
  function automatic logic [63:0] des_model(logic [63:0] pt, logic [63:0] key,
                                            output word_t a [16]);
    logic [63:0] x, y;
    word_t l, r, f, t;
    logic [47:0] k;
    for (int j = 0; j < 64; j++) x[63 - j] = pt[64 - ip_t[j]];
    l = x[63:32]; r = x[31:0];
    for (int q = 0; q < 16; q++) begin
      k = subkey(key, q);
      f = 0;
      for (int i = 0; i < 8; i++) begin
        logic [5:0] e;
        for (int b = 0; b < 6; b++) begin
          int bit_no;
          bit_no = (4 * i + b + 31) % 32 + 1;        // E: 32 1 2 3 4 5, 4 5 6 ...
          e[5 - b] = r[32 - bit_no];
        end
        f ^= sp(i, e ^ k[47 - 6 * i -: 6]);
      end
      t = l ^ f;
      a[q] = t;
      l = r; r = t;
    end
    x = {r, l};
    for (int j = 0; j < 64; j++) y[63 - j] = x[64 - fp_t[j]];
    return y;
  endfunction

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

  // 64-bit permutation {dh,dl} = perm({sh,sl}), unrolled; r5 is scratch
  task automatic emit_perm(int c, const ref int t [64], input int sh, sl, dh, dl);
    emit(c, a_r(OP_ADDU, dh, 0, 0));
    emit(c, a_r(OP_ADDU, dl, 0, 0));
    for (int j = 0; j < 64; j++) begin
      int p, src, dst;
      p   = t[j];
      src = (p <= 32) ? sh : sl;
      dst = (j < 32) ? dh : dl;
      emit(c, a_sh(OP_SRL, 5, src, 32 - ((p - 1) % 32 + 1)));
      emit(c, a_i(OP_ANDI, 5, 5, 1));
      emit(c, a_sh(OP_SLL, 5, 5, 31 - (j % 32)));
      emit(c, a_r(OP_OR, dst, dst, 5));
    end
  endtask

  // DES encryption of DIN into DOUT, a_i stored at AOUT; ends with endBal
  task automatic emit_des(int c);
    int rl;
    emit(c, a_m(OP_LW, 1, DIN, 0));
    emit(c, a_m(OP_LW, 2, DIN + 4, 0));
    emit_perm(c, ip_t, 1, 2, 3, 4);              // L = r3, R = r4
    emit(c, a_i(OP_ADDIU, 20, 0, KS));
    emit(c, a_i(OP_ADDIU, 21, 0, AOUT));
    emit(c, a_i(OP_ADDIU, 23, 0, 16));
    rl = here(c);
    emit(c, a_r(OP_ADDU, 6, 0, 0));              // f = 0
    for (int i = 0; i < 8; i++) begin
      int s;
      s = (4 * i + 31) % 32;                     // rotate group i to the top
      emit(c, a_sh(OP_SLL, 7, 4, s));
      emit(c, a_sh(OP_SRL, 8, 4, 32 - s));
      emit(c, a_r(OP_OR, 7, 7, 8));
      emit(c, a_sh(OP_SRL, 7, 7, 26));
      emit(c, a_m(OP_LBU, 8, i, 20));
      emit(c, a_r(OP_XOR, 7, 7, 8));
      emit(c, a_sh(OP_SLL, 7, 7, 2));
      emit(c, a_m(OP_LW, 8, SP + 256 * i, 7));   // SP table access
      emit(c, a_r(OP_XOR, 6, 6, 8));
    end
    emit(c, a_r(OP_XOR, 9, 3, 6));
    emit(c, a_m(OP_SW, 9, 0, 21));               // store of a_i
    emit(c, a_r(OP_ADDU, 3, 4, 0));
    emit(c, a_r(OP_ADDU, 4, 9, 0));
    emit(c, a_i(OP_ADDIU, 20, 20, 8));
    emit(c, a_i(OP_ADDIU, 21, 21, 4));
    emit(c, a_i(OP_ADDIU, 23, 23, -1));
    emit(c, a_b(OP_BNE, 23, 0, rl - (here(c) + 1)));
    emit_perm(c, fp_t, 4, 3, 1, 2);              // FP(R16 L16)
    emit(c, a_m(OP_SW, 1, DOUT, 0));
    emit(c, a_m(OP_SW, 2, DOUT + 4, 0));
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

  int des_entry, des_len;

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
    // complementary DES: the same code, in CORE2's memory
    n2 = 1024; des_entry = n2; emit_des(2); des_len = n2 - des_entry;
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
    emit(1, a_op(OP_STARTBAL, des_entry));
    emit_des(1);
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

  // subkey groups stored one 6-bit group per byte, eight bytes per round
  task automatic load_key(int c, logic [63:0] key);
    for (int q = 0; q < 16; q++) begin
      logic [47:0] k;
      word_t w0, w1;
      k = subkey(key, q);
      for (int b = 0; b < 4; b++) begin
        w0[8*b +: 8] = {2'b00, k[47 - 6 * b -: 6]};
        w1[8*b +: 8] = {2'b00, k[47 - 6 * (b + 4) -: 6]};
      end
      dm_wr(c, KS + 8 * q, w0);
      dm_wr(c, KS + 8 * q + 4, w1);
    end
  endtask

  task automatic load_data(logic [63:0] pt, logic [63:0] key);
    dm_wr(1, DIN, pt[63:32]);  dm_wr(1, DIN + 4, pt[31:0]);
    dm_wr(2, DIN, ~pt[63:32]); dm_wr(2, DIN + 4, ~pt[31:0]);
    load_key(1, key);
    load_key(2, ~key);
    for (int i = 0; i < 8; i++)
      for (int b = 0; b < 64; b++) begin
        dm_wr(1, SP + 256 * i + 4 * b, sp(i, 6'(b)));
        dm_wr(2, SP + 256 * i + 4 * b, sp(i, 6'(b)));
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
    // run on CORE2 while CORE1 is parked, and the interrupt routine uses its
    // own stack area, so those are not counted)
    if (sw_flag && dm_we_obs == 2'b11) begin
      if (dm1_a != dm2_a) n_unpaired++;
      else begin
        n_pairs++;
        if (dm2_wd != ~dm1_wd) n_not_compl++;
      end
    end
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

  // an interrupt for CORE2 in the middle of the session
  initial begin
    irq_req = 2'b00;
    wait (rst_n);
    wait (sw_flag);
    repeat (1500) @(posedge clk);
    irq_req <= 2'b10;
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
    logic [63:0] pt, key, ct, ct_model;
    word_t a_ref [16];
    word_t d, d2;
    h1_en = 0; h1_we = 0; h1_a = 0; h1_wd = 0;
    h2_en = 0; h2_we = 0; h2_a = 0; h2_wd = 0;
    im1_we = 0; im2_we = 0; im1_a = 0; im2_a = 0; im1_d = 0; im2_d = 0;
    pt  = 64'h0123456789abcdef;
    key = 64'h133457799bbcdff1;
    ct  = 64'h85e813540f0ab405;
    make_perms();
    ct_model = des_model(pt, key, a_ref);
    check("model ciphertext hi", ct_model[63:32], ct[63:32]);
    check("model ciphertext lo", ct_model[31:0], ct[31:0]);
    build_programs();
    task_reference();
    @(posedge clk);
    for (int i = 0; i < IMW; i++) begin
      im1_we <= 1; im1_a <= i; im1_d <= p1[i];
      im2_we <= 1; im2_a <= i; im2_d <= p2[i];
      @(posedge clk);
    end
    im1_we <= 0; im2_we <= 0;
    load_data(pt, key);
    @(posedge clk);
    rst_n <= 1;

    wait (c1_done && c2_done);
    repeat (20) @(posedge clk);

    dm_rd(1, C1RES, d); check("core1 prework", d, 140);
    dm_rd(1, DOUT, d);      check("ciphertext hi", d, ct[63:32]);
    dm_rd(1, DOUT + 4, d);  check("ciphertext lo", d, ct[31:0]);
    dm_rd(2, DOUT, d);      check("ciphertext hi complement", d, ~ct[63:32]);
    dm_rd(2, DOUT + 4, d);  check("ciphertext lo complement", d, ~ct[31:0]);
    for (int q = 0; q < 16; q++) begin
      dm_rd(1, AOUT + 4 * q, d);
      dm_rd(2, AOUT + 4 * q, d2);
      check($sformatf("a_%0d", q + 1), d, a_ref[q]);
      check($sformatf("a_%0d complement", q + 1), d2, ~a_ref[q]);
    end
    dm_rd(2, C2RES, d);      check("core2 r5", d, t5);
    dm_rd(2, C2RES + 4, d);  check("core2 r6", d, t6);
    dm_rd(2, C2RES + 8, d);  check("core2 r10", d, t10);
    dm_rd(2, C2RES + 12, d); check("core2 HI", d, thi);
    dm_rd(2, C2RES + 16, d); check("core2 LO", d, tlo);
    dm_rd(2, ICNT, d);       check("core2 interrupt routine ran", d, 1);
    check("session started", n_switch_set, 1);
    check("session ended", n_switch_clr, 1);
    check("paired stores (16 a_i + 2 outputs)", n_pairs, 18);
    check("unpaired stores of CORE1 during the session", n_unpaired, 0);
    check("paired stores not complementary", n_not_compl, 0);
    $display("DES session: %0d instructions, %0d cycles from switch set to switch clear",
             des_len, t_clr - t_set);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
