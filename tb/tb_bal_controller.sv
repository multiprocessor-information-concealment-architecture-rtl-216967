// tb_bal_controller: scripted test of the balancing controller.
//
// The two cores are replaced by status signals driven from here, so each step
// of the balancing sequence can be provoked and the controller's commands
// compared with what the sequence requires:
//   startBal -> switch set, save interrupt to CORE2 at SAVE_VEC;
//   save routine's endIntr -> both PCs loaded in one and the same cycle
//     (CORE1 after startBal, CORE2 at the complementary program);
//   interrupt request during balancing -> both cores held in the same cycle,
//     interrupt delivered to the requesting core only, both PCs reloaded in
//     one cycle on its endIntr;
//   endBal -> CORE2 held then sent to RESTORE_VEC; on endIntr both PCs loaded
//     in one cycle (CORE2 at its PC_backup) and the switch cleared;
//   an interrupt outside balancing goes straight to its core and endIntr
//     resumes it at PC_backup.
// The same-cycle restarts are the 1-cycle "switch" steps of the overhead
// tables; the test counts how many cycles each pc_load pair spans.
`timescale 1ns/1ps
module tb_bal_controller;
  import mute_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam word_t SAVE_VEC = 32'h700, RESTORE_VEC = 32'h740,
                    IV1 = 32'h780, IV2 = 32'h7c0;

  logic [1:0]   irq_req;
  core_status_t st1, st2;
  core_cmd_t    cmd1, cmd2;
  logic         sw;

  bal_controller #(.SAVE_VEC(SAVE_VEC), .RESTORE_VEC(RESTORE_VEC),
                   .INTR_VEC1(IV1), .INTR_VEC2(IV2)) dut (
    .clk, .rst_n, .irq_req, .st1, .st2, .cmd1, .cmd2, .switch_q(sw));

  int checks = 0, failures = 0;
  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one-cycle pulse of a sync event
  task automatic sync1(sync_e s, word_t arg = '0);
    st1.sync = s; st1.sync_valid = 1'b1; st1.sync_arg = arg;
    @(negedge clk);
    st1.sync = SYNC_NONE; st1.sync_valid = 1'b0;
  endtask
  task automatic sync2(sync_e s);
    st2.sync = s; st2.sync_valid = 1'b1;
    @(negedge clk);
    st2.sync = SYNC_NONE; st2.sync_valid = 1'b0;
  endtask

  // wait (at negedge) for a pc_load on either core; both must come together
  task automatic expect_dual_load(string what, word_t pc1, word_t pc2);
    int t = 0;
    #1;
    while (!(cmd1.pc_load || cmd2.pc_load) && t < 20) begin @(negedge clk); t++; end
    check({what, ": core1 load"}, {31'b0, cmd1.pc_load}, 1);
    check({what, ": core2 load same cycle"}, {31'b0, cmd2.pc_load}, 1);
    check({what, ": core1 pc"}, cmd1.pc_value, pc1);
    check({what, ": core2 pc"}, cmd2.pc_value, pc2);
    @(negedge clk);
    check({what, ": load lasts one cycle"}, {30'b0, cmd1.pc_load, cmd2.pc_load}, 0);
  endtask

  initial begin
    st1 = '0; st2 = '0; irq_req = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("idle: no hold", {30'b0, cmd1.hold, cmd2.hold}, 0);
    check("idle: switch clear", {31'b0, sw}, 0);

    // ---- startBal
    st1.resume_pc = 32'h108;
    sync1(SYNC_STARTBAL, 32'h40);
    st1.idle = 1'b1;                 // CORE1 parked
    check("switch set", {31'b0, sw}, 1);
    check("save irq to core2", {31'b0, cmd2.ext_irq}, 1);
    check("save vector", cmd2.irq_vec, SAVE_VEC);
    check("no irq to core1", {31'b0, cmd1.ext_irq}, 0);
    repeat (3) @(negedge clk);
    st2.irq_ack = 1'b1;
    @(negedge clk);
    st2.irq_ack = 1'b0;
    check("save irq dropped", {31'b0, cmd2.ext_irq}, 0);
    repeat (10) @(negedge clk);      // save routine runs
    check("no load before endIntr", {30'b0, cmd1.pc_load, cmd2.pc_load}, 0);
    sync2(SYNC_ENDINTR);
    st2.idle = 1'b1;
    expect_dual_load("start", 32'h108, 32'h200);
    st1.idle = 1'b0; st2.idle = 1'b0;

    // ---- interrupt for CORE2 during balancing
    repeat (5) @(negedge clk);
    irq_req = 2'b10;
    @(negedge clk);
    irq_req = 2'b00;
    check("both held together", {30'b0, cmd1.hold, cmd2.hold}, 2'b11);
    repeat (3) @(negedge clk);
    st1.idle = 1'b1; st2.idle = 1'b1;
    st1.resume_pc = 32'h128; st2.resume_pc = 32'h228;
    @(negedge clk);
    check("irq to core2", {31'b0, cmd2.ext_irq}, 1);
    check("irq vector 2", cmd2.irq_vec, IV2);
    check("core1 on hold", {31'b0, cmd1.hold}, 1);
    check("core2 released", {31'b0, cmd2.hold}, 0);
    st2.irq_ack = 1'b1; st2.pc_backup = 32'h228;
    @(negedge clk);
    st2.irq_ack = 1'b0; st2.idle = 1'b0;
    repeat (6) @(negedge clk);
    check("core1 still held", {31'b0, cmd1.hold}, 1);
    sync2(SYNC_ENDINTR);
    st2.idle = 1'b1;
    expect_dual_load("resume after irq", 32'h128, 32'h228);
    st1.idle = 1'b0; st2.idle = 1'b0;

    // ---- endBal
    repeat (5) @(negedge clk);
    st1.resume_pc = 32'h150;
    sync1(SYNC_ENDBAL);
    st1.idle = 1'b1;
    check("core2 held at endBal", {31'b0, cmd2.hold}, 1);
    repeat (2) @(negedge clk);
    st2.idle = 1'b1;
    #1;
    while (!cmd2.pc_load) begin @(negedge clk); #1; end
    check("restore vector", cmd2.pc_value, RESTORE_VEC);
    check("core1 waits", {31'b0, cmd1.pc_load}, 0);
    @(negedge clk);
    st2.idle = 1'b0;
    repeat (8) @(negedge clk);
    st2.pc_backup = 32'h0aa8;
    sync2(SYNC_ENDINTR);
    st2.idle = 1'b1;
    check("switch still set", {31'b0, sw}, 1);
    expect_dual_load("end", 32'h150, 32'h0aa8);
    check("switch cleared", {31'b0, sw}, 0);
    st1.idle = 1'b0; st2.idle = 1'b0;

    // ---- ordinary interrupt of CORE1
    irq_req = 2'b01;
    @(negedge clk);
    irq_req = 2'b00;
    check("direct irq core1", {31'b0, cmd1.ext_irq}, 1);
    check("irq vector 1", cmd1.irq_vec, IV1);
    check("no hold outside balancing", {30'b0, cmd1.hold, cmd2.hold}, 0);
    st1.irq_ack = 1'b1;
    @(negedge clk);
    st1.irq_ack = 1'b0;
    @(negedge clk);
    check("irq1 cleared", {31'b0, cmd1.ext_irq}, 0);
    st1.pc_backup = 32'h3330;
    sync1(SYNC_ENDINTR);
    st1.idle = 1'b1;
    #1;
    check("core1 resumes at pc_backup", {31'b0, cmd1.pc_load}, 1);
    check("core1 pc_backup value", cmd1.pc_value, 32'h3330);
    check("core2 untouched", {31'b0, cmd2.pc_load}, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
