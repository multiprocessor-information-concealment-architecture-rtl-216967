// tb_pisa_core: self-checking test of one pisa_core with its instruction and
// data memories.
//
// The program exercises ALU operations, immediate forms, load-use and ALU
// hazards, a counted loop with a backward branch, JAL/JR, signed and unsigned
// multiply through HI/LO, byte loads and stores, then the balancing
// instructions and the external interrupt:
//   * startBal must park the core and be reported once with its immediate;
//     a pc_load must resume it after the instruction;
//   * a hold must drain the pipeline within 6 cycles and resume at the right
//     instruction;
//   * an external interrupt must save the next PC in PC_backup, jump to the
//     vector and run a routine that stores PC_backup; endIntr must be
//     reported, and resuming at PC_backup must finish the program.
// Every result is written to data memory and compared, through the host
// port, with values computed here.
`timescale 1ns/1ps
module tb_pisa_core;
  import mute_pkg::*;
  import pisa_asm_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        im_en, prog_we;
  word_t       im_addr;
  instr_t      im_rdata, prog_data;
  word_t       prog_addr;
  logic        dm_en, dm_we;
  logic [3:0]  dm_be;
  word_t       dm_addr, dm_wdata, dm_rdata;
  logic        h_en;
  word_t       h_addr, h_rdata;
  core_cmd_t   cmd;
  core_status_t st;

  pisa_core #(.RESET_PC(32'h0)) dut (
    .clk, .rst_n, .im_en, .im_addr, .im_rdata,
    .dm_en, .dm_we, .dm_be, .dm_addr, .dm_wdata, .dm_rdata,
    .cmd, .status(st)
  );
  imem #(.WORDS(256)) u_im (.clk, .en(im_en), .addr(im_addr), .rdata(im_rdata),
    .prog_we, .prog_addr, .prog_data);
  dmem #(.WORDS(256)) u_dm (.clk, .a_en(dm_en), .a_we(dm_we), .a_be(dm_be),
    .a_addr(dm_addr), .a_wdata(dm_wdata), .a_rdata(dm_rdata),
    .b_en(h_en), .b_we(1'b0), .b_addr(h_addr), .b_wdata(32'h0), .b_rdata(h_rdata));

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---- program
  instr_t prog [256];
  int n = 0;
  function automatic void emit(instr_t i);
    prog[n] = i;
    n++;
  endfunction

  localparam int IRQ_IDX = 200;      // interrupt routine at word 200
  int idx_startbal, idx_loop2, idx_func, idx_halt, idx_jal;
  int sync_count = 0, sync_start = 0, sync_intr = 0;
  word_t sync_arg_seen;

  initial begin
    // watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && st.sync_valid) begin
    sync_count++;
    if (st.sync == SYNC_STARTBAL) begin sync_start++; sync_arg_seen = st.sync_arg; end
    if (st.sync == SYNC_ENDINTR) sync_intr++;
  end

  int hold_cycles;
  word_t pcb_seen;

  initial begin
    for (int i = 0; i < 256; i++) prog[i] = '0;
    emit(a_i(OP_ADDIU, 1, 0, 5));          // r1 = 5
    emit(a_i(OP_ADDIU, 2, 0, 7));          // r2 = 7
    emit(a_r(OP_ADDU, 3, 1, 2));           // r3 = 12
    emit(a_m(OP_SW, 3, 0, 0));             // [0] = 12
    emit(a_i(OP_LUI, 4, 0, 16'h1234));
    emit(a_i(OP_ORI, 4, 4, 16'h5678));     // r4 = 0x12345678
    emit(a_m(OP_SW, 4, 4, 0));             // [4]
    emit(a_m(OP_LW, 5, 4, 0));             // r5 = [4]
    emit(a_r(OP_XOR, 6, 5, 3));            // load-use
    emit(a_m(OP_SW, 6, 8, 0));             // [8]
    emit(a_i(OP_ADDIU, 7, 0, 0));
    emit(a_i(OP_ADDIU, 8, 0, 10));
    idx_loop2 = n;
    emit(a_r(OP_ADDU, 7, 7, 8));
    emit(a_i(OP_ADDIU, 8, 8, -1));
    emit(a_b(OP_BNE, 8, 0, idx_loop2 - (n + 1)));
    emit(a_m(OP_SW, 7, 12, 0));            // [12] = 55
    emit(a_r(OP_MULT, 0, 1, 2));
    emit(a_r(OP_MFLO, 9, 0, 0));
    emit(a_m(OP_SW, 9, 16, 0));            // [16] = 35
    emit(a_i(OP_ADDIU, 10, 0, -3));
    emit(a_r(OP_MULT, 0, 10, 2));
    emit(a_r(OP_MFHI, 11, 0, 0));
    emit(a_m(OP_SW, 11, 20, 0));           // [20] = ffffffff
    emit(a_r(OP_MULTU, 0, 10, 2));
    emit(a_r(OP_MFHI, 11, 0, 0));
    emit(a_m(OP_SW, 11, 24, 0));           // [24] = 6 (0xfffffffd*7 >> 32)
    emit(a_m(OP_SB, 1, 29, 0));            // byte 29 = 5
    emit(a_m(OP_LBU, 12, 29, 0));
    emit(a_m(OP_SW, 12, 32, 0));           // [32] = 5
    emit(a_i(OP_ADDIU, 13, 0, 16'h80));
    emit(a_m(OP_SB, 13, 36, 0));
    emit(a_m(OP_LB, 14, 36, 0));
    emit(a_m(OP_SW, 14, 40, 0));           // [40] = ffffff80
    idx_jal = n;
    emit(a_j(OP_JAL, 0));                  // patched below
    emit(a_m(OP_SW, 15, 44, 0));           // [44] = 99
    emit(a_sh(OP_SLL, 16, 1, 4));
    emit(a_m(OP_SW, 16, 48, 0));           // [48] = 80
    emit(a_sh(OP_SRA, 17, 10, 1));
    emit(a_m(OP_SW, 17, 52, 0));           // [52] = fffffffe
    emit(a_r(OP_SLT, 18, 10, 1));
    emit(a_m(OP_SW, 18, 56, 0));           // [56] = 1
    emit(a_r(OP_SLTU, 18, 10, 1));
    emit(a_m(OP_SW, 18, 60, 0));           // [60] = 0
    emit(a_r(OP_NOR, 19, 1, 2));
    emit(a_m(OP_SW, 19, 64, 0));           // [64] = ~7
    idx_startbal = n;
    emit(a_op(OP_STARTBAL, 16'h0055));
    emit(a_i(OP_ADDIU, 20, 0, 0));         // r20 = 0
    emit(a_i(OP_ADDIU, 21, 0, 40));        // r21 = 40
    idx_loop2 = n;                         // busy loop to be held / interrupted
    emit(a_i(OP_ADDIU, 20, 20, 1));
    emit(a_b(OP_BNE, 20, 21, idx_loop2 - (n + 1)));
    emit(a_m(OP_SW, 20, 68, 0));           // [68] = 40
    idx_halt = n;
    emit(a_j(OP_J, idx_halt));
    idx_func = n;
    emit(a_i(OP_ADDIU, 15, 0, 99));
    emit(a_r(OP_JR, 0, 31, 0));
    prog[idx_jal] = a_j(OP_JAL, idx_func);
    // interrupt routine
    n = IRQ_IDX;
    emit(a_r(OP_MFPCB, 22, 0, 0));
    emit(a_m(OP_SW, 22, 72, 0));           // [72] = PC_backup
    emit(a_i(OP_ADDIU, 23, 0, 16'h77));
    emit(a_m(OP_SW, 23, 76, 0));           // [76] = 0x77
    emit(a_r(OP_MTPCB, 0, 22, 0));         // write it back unchanged
    emit(a_op(OP_ENDINTR));

    // load program
    prog_we = 1'b0; prog_addr = '0; prog_data = '0;
    h_en = 1'b0; h_addr = '0;
    cmd = '0;
    @(posedge clk);
    for (int i = 0; i < 256; i++) begin
      prog_we <= 1'b1; prog_addr <= i; prog_data <= prog[i];
      @(posedge clk);
    end
    prog_we <= 1'b0;
    @(posedge clk);
    rst_n <= 1'b1;

    // ---- startBal: park, report, resume
    wait (sync_start == 1);
    @(posedge clk);
    check("startBal immediate", sync_arg_seen, 32'h55);
    wait (st.idle);
    @(posedge clk);
    check("parked: no fetch", {31'b0, im_en}, 32'h0);
    check("resume pc after startBal", st.resume_pc, 32'((idx_startbal + 1) * 8));
    cmd.pc_load <= 1'b1; cmd.pc_value <= st.resume_pc;
    @(posedge clk);
    cmd.pc_load <= 1'b0;

    // ---- hold inside the busy loop; must drain within 6 cycles
    repeat (20) @(posedge clk);
    cmd.hold <= 1'b1;
    hold_cycles = 0;
    @(posedge clk);
    while (!st.idle) begin hold_cycles++; @(posedge clk); end
    checks++;
    if (hold_cycles > 6) begin failures++; $display("FAIL flush took %0d cycles", hold_cycles); end
    repeat (5) @(posedge clk);
    check("held core stays idle", {31'b0, st.idle}, 32'h1);

    // ---- external interrupt while held: release hold and raise irq together
    cmd.hold <= 1'b0;
    cmd.ext_irq <= 1'b1;
    cmd.irq_vec <= 32'(IRQ_IDX * 8);
    wait (st.irq_ack);
    pcb_seen = st.resume_pc;
    @(posedge clk);
    #1;
    cmd.ext_irq <= 1'b0;
    check("ie masked in routine", {31'b0, st.ie}, 32'h0);
    check("pc_backup saved", st.pc_backup, pcb_seen);
    wait (sync_intr == 1);
    wait (st.idle);
    @(posedge clk);
    cmd.pc_load <= 1'b1; cmd.pc_value <= st.pc_backup;
    @(posedge clk);
    cmd.pc_load <= 1'b0;
    @(posedge clk);
    #1;
    check("ie re-enabled", {31'b0, st.ie}, 32'h1);

    // ---- wait for the halt loop
    wait (dm_en && dm_we && dm_addr == 32'd68);   // last store of the program
    repeat (20) @(posedge clk);

    begin
      logic [31:0] exp [20];
      exp[0]  = 12;
      exp[1]  = 32'h12345678;
      exp[2]  = 32'h12345678 ^ 12;
      exp[3]  = 55;
      exp[4]  = 35;
      exp[5]  = 32'hffffffff;
      exp[6]  = 6;
      exp[7]  = 32'h0;         // word 28: byte 29 = 5 checked separately
      exp[8]  = 5;
      exp[9]  = 32'h0;         // word 36: byte 36 = 0x80 checked separately
      exp[10] = 32'hffffff80;
      exp[11] = 99;
      exp[12] = 80;
      exp[13] = 32'hfffffffe;
      exp[14] = 1;
      exp[15] = 0;
      exp[16] = ~32'd7;
      exp[17] = 40;
      exp[18] = pcb_seen;
      exp[19] = 32'h77;
      for (int i = 0; i < 20; i++) begin
        h_en <= 1'b1; h_addr <= 32'(i * 4);
        @(posedge clk);
        h_en <= 1'b0;
        @(posedge clk);
        if (i == 7)      check("sb byte 29", h_rdata & 32'h0000ff00, 32'h00000500);
        else if (i == 9) check("sb byte 36", h_rdata & 32'h000000ff, 32'h00000080);
        else             check($sformatf("word %0d", i * 4), h_rdata, exp[i]);
      end
    end
    check("sync events", sync_count, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
