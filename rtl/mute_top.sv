// mute_top: MUTE dual-core processor with algorithmic balancing.
//
// Two identical PISA cores, each with its own instruction memory and data
// memory, and the balancing CONTROLLER between them. Normally the cores run
// unrelated programs. When CORE1 reaches a startBal instruction the
// controller parks CORE1, has CORE2 save its context, and then starts CORE1
// on the cipher and CORE2 on its complementary version in the same clock
// cycle. Because both cores run the same instruction stream in lockstep on
// complemented data (complemented key and data for DES; complemented key and
// inverted-transposed SBOX tables for AES), every data-dependent bit flip in
// CORE1 is matched by the opposite flip in CORE2, and the sum of the two power
// traces no longer depends on the key. endBal returns CORE2 to its own task.
//
// Ports: the instruction memories are loaded through im*_prog_* (word index),
// the data memories are reachable through host ports dm*_h_*. irq_req raises
// an interrupt for CORE1 [0] or CORE2 [1]. The data-memory buses of both cores
// and the switch flag are brought out for observation. Memory sizes and the
// routine vectors are parameters; their defaults are this design's choices.
module mute_top
  import mute_pkg::*;
#(
  parameter int unsigned IM_WORDS    = 4096,
  parameter int unsigned DM_WORDS    = 4096,
  parameter word_t       RESET_PC1   = 32'h0000_0000,
  parameter word_t       RESET_PC2   = 32'h0000_0000,
  parameter word_t       SAVE_VEC    = 32'h0000_7000,
  parameter word_t       RESTORE_VEC = 32'h0000_7400,
  parameter word_t       INTR_VEC1   = 32'h0000_7800,
  parameter word_t       INTR_VEC2   = 32'h0000_7800
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [1:0]  irq_req,
  // instruction memory programming ports
  input  logic        im1_prog_we,
  input  word_t       im1_prog_addr,
  input  instr_t      im1_prog_data,
  input  logic        im2_prog_we,
  input  word_t       im2_prog_addr,
  input  instr_t      im2_prog_data,
  // data memory host ports
  input  logic        dm1_h_en,
  input  logic        dm1_h_we,
  input  word_t       dm1_h_addr,
  input  word_t       dm1_h_wdata,
  output word_t       dm1_h_rdata,
  input  logic        dm2_h_en,
  input  logic        dm2_h_we,
  input  word_t       dm2_h_addr,
  input  word_t       dm2_h_wdata,
  output word_t       dm2_h_rdata,
  // observation
  output logic        switch_flag,
  output logic [1:0]  dm_we_obs,
  output word_t       dm1_addr_obs,
  output word_t       dm1_wdata_obs,
  output word_t       dm2_addr_obs,
  output word_t       dm2_wdata_obs
);

  core_cmd_t    cmd1, cmd2;
  core_status_t st1, st2;

  logic   im1_en, im2_en;
  word_t  im1_addr, im2_addr;
  instr_t im1_rdata, im2_rdata;

  logic        dm1_en, dm1_we, dm2_en, dm2_we;
  logic [3:0]  dm1_be, dm2_be;
  word_t       dm1_addr, dm1_wdata, dm1_rdata;
  word_t       dm2_addr, dm2_wdata, dm2_rdata;

  bal_controller #(
    .SAVE_VEC(SAVE_VEC), .RESTORE_VEC(RESTORE_VEC),
    .INTR_VEC1(INTR_VEC1), .INTR_VEC2(INTR_VEC2)
  ) u_ctrl (
    .clk, .rst_n, .irq_req,
    .st1, .st2, .cmd1, .cmd2,
    .switch_q(switch_flag)
  );

  pisa_core #(.RESET_PC(RESET_PC1)) u_core1 (
    .clk, .rst_n,
    .im_en(im1_en), .im_addr(im1_addr), .im_rdata(im1_rdata),
    .dm_en(dm1_en), .dm_we(dm1_we), .dm_be(dm1_be), .dm_addr(dm1_addr),
    .dm_wdata(dm1_wdata), .dm_rdata(dm1_rdata),
    .cmd(cmd1), .status(st1)
  );

  pisa_core #(.RESET_PC(RESET_PC2)) u_core2 (
    .clk, .rst_n,
    .im_en(im2_en), .im_addr(im2_addr), .im_rdata(im2_rdata),
    .dm_en(dm2_en), .dm_we(dm2_we), .dm_be(dm2_be), .dm_addr(dm2_addr),
    .dm_wdata(dm2_wdata), .dm_rdata(dm2_rdata),
    .cmd(cmd2), .status(st2)
  );

  imem #(.WORDS(IM_WORDS)) u_im1 (
    .clk, .en(im1_en), .addr(im1_addr), .rdata(im1_rdata),
    .prog_we(im1_prog_we), .prog_addr(im1_prog_addr), .prog_data(im1_prog_data)
  );

  imem #(.WORDS(IM_WORDS)) u_im2 (
    .clk, .en(im2_en), .addr(im2_addr), .rdata(im2_rdata),
    .prog_we(im2_prog_we), .prog_addr(im2_prog_addr), .prog_data(im2_prog_data)
  );

  dmem #(.WORDS(DM_WORDS)) u_dm1 (
    .clk,
    .a_en(dm1_en), .a_we(dm1_we), .a_be(dm1_be), .a_addr(dm1_addr),
    .a_wdata(dm1_wdata), .a_rdata(dm1_rdata),
    .b_en(dm1_h_en), .b_we(dm1_h_we), .b_addr(dm1_h_addr),
    .b_wdata(dm1_h_wdata), .b_rdata(dm1_h_rdata)
  );

  dmem #(.WORDS(DM_WORDS)) u_dm2 (
    .clk,
    .a_en(dm2_en), .a_we(dm2_we), .a_be(dm2_be), .a_addr(dm2_addr),
    .a_wdata(dm2_wdata), .a_rdata(dm2_rdata),
    .b_en(dm2_h_en), .b_we(dm2_h_we), .b_addr(dm2_h_addr),
    .b_wdata(dm2_h_wdata), .b_rdata(dm2_h_rdata)
  );

  assign dm_we_obs     = {dm2_en && dm2_we, dm1_en && dm1_we};
  assign dm1_addr_obs  = dm1_addr;
  assign dm1_wdata_obs = dm1_wdata;
  assign dm2_addr_obs  = dm2_addr;
  assign dm2_wdata_obs = dm2_wdata;

endmodule
