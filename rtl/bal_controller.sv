// bal_controller: the CONTROLLER of the MUTE dual-core balancing processor.
//
// It owns the switch register (set while balancing) and steers both cores
// through the balancing sequence:
//   1. CORE1 retires startBal. The switch is set and the address of the
//      complementary program is taken from the instruction's immediate
//      (word index into CORE2's instruction memory).
//   2. A maskable external interrupt with vector SAVE_VEC is raised in CORE2.
//      The core flushes its pipeline, saves its PC in PC_backup and runs the
//      save routine, which pushes its register file, HI, LO and PC_backup on
//      its stack and ends with endIntr (the NMI to the controller).
//   3. When both cores are idle, both PCs are loaded in the same clock cycle:
//      CORE1 continues after startBal, CORE2 starts the complementary program.
//      Both now execute the same instruction stream on complementary data.
//   4. An interrupt request for either core during balancing holds both cores
//      in the same cycle, delivers the interrupt to that core (vector
//      INTR_VEC1/INTR_VEC2) while the other stays on hold, and on the routine's
//      endIntr reloads both PCs in the same cycle to resume balancing.
//   5. CORE1 retires endBal. CORE2 is held; when both are idle CORE2 is sent to
//      the restore routine at RESTORE_VEC, which reloads its registers from
//      the stack, puts the saved PC into PC_backup and ends with endIntr. Both
//      PCs are then loaded in the same cycle: CORE2 resumes its own task at
//      PC_backup and CORE1 continues after endBal. The switch is cleared.
// Outside balancing, interrupt requests go straight to their core and an
// endIntr resumes that core at its PC_backup.
//
// The sequence, the interrupt and NMI roles and the same-cycle PC loads follow
// the source. That the save and restore are software routines reached through
// fixed vectors, the immediate of startBal, the hold/idle handshake with the
// cores and the deferral of interrupts that arrive during the switch are
// this design's choices. Interrupt requests (irq_req) are latched; each is
// delivered once. All outputs are registered-state decodes; pc loads are
// issued combinationally from the state and the cores' idle flags.
// rst_n is an asynchronous reset for the flops and also the disable
// condition of the assertions below; a linter may report that second use
// as a synchronous one, which has no effect on the logic.
module bal_controller
  import mute_pkg::*;
#(
  parameter word_t SAVE_VEC    = 32'h0000_7000,
  parameter word_t RESTORE_VEC = 32'h0000_7400,
  parameter word_t INTR_VEC1   = 32'h0000_7800,
  parameter word_t INTR_VEC2   = 32'h0000_7800
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [1:0]    irq_req,     // interrupt requests for CORE1 [0] and CORE2 [1]
  input  core_status_t  st1,
  input  core_status_t  st2,
  output core_cmd_t     cmd1,
  output core_cmd_t     cmd2,
  output logic          switch_q     // balancing in progress
);

  typedef enum logic [3:0] {
    S_IDLE, S_SAVE_REQ, S_SAVE_RUN, S_BAL, S_INT_DRAIN, S_INT_REQ, S_INT_RUN,
    S_END_DRAIN, S_RESTORE
  } state_e;

  state_e     state_q, state_d;
  word_t      bal_entry_q;
  logic [1:0] pend_q;     // latched interrupt requests
  logic [1:0] nmi_q;      // endIntr seen, not yet acted upon
  logic       endbal_q;   // endBal seen, not yet acted upon
  logic       icore_q;    // core being interrupted during balancing (0: CORE1)

  logic       both_idle;
  assign both_idle = st1.idle && st2.idle;

  wire ev_start = st1.sync_valid && st1.sync == SYNC_STARTBAL;
  wire ev_end   = st1.sync_valid && st1.sync == SYNC_ENDBAL;
  wire ev_nmi1  = st1.sync_valid && st1.sync == SYNC_ENDINTR;
  wire ev_nmi2  = st2.sync_valid && st2.sync == SYNC_ENDINTR;

  // ---------------------------------------------------------------------------
  always_comb begin
    state_d = state_q;
    cmd1 = '0;
    cmd2 = '0;
    cmd1.irq_vec = INTR_VEC1;
    cmd2.irq_vec = INTR_VEC2;

    unique case (state_q)
      S_IDLE: begin
        cmd1.ext_irq = pend_q[0];
        cmd2.ext_irq = pend_q[1];
        if (nmi_q[0] && st1.idle) begin
          cmd1.pc_load  = 1'b1;
          cmd1.pc_value = st1.pc_backup;
        end
        if (nmi_q[1] && st2.idle) begin
          cmd2.pc_load  = 1'b1;
          cmd2.pc_value = st2.pc_backup;
        end
        if (ev_start) begin
          cmd1.ext_irq = 1'b0;
          state_d = S_SAVE_REQ;
        end
      end

      S_SAVE_REQ: begin
        // CORE1 waits parked at startBal; CORE2 is asked to save its context.
        cmd2.ext_irq = 1'b1;
        cmd2.irq_vec = SAVE_VEC;
        if (nmi_q[1] && st2.idle) begin
          // CORE2 was inside an ordinary interrupt routine: let it return first
          cmd2.ext_irq  = 1'b0;
          cmd2.pc_load  = 1'b1;
          cmd2.pc_value = st2.pc_backup;
        end else if (st2.irq_ack) begin
          state_d = S_SAVE_RUN;
        end
      end

      S_SAVE_RUN: begin
        if (nmi_q[1] && both_idle) begin
          cmd1.pc_load  = 1'b1;
          cmd1.pc_value = st1.resume_pc;
          cmd2.pc_load  = 1'b1;
          cmd2.pc_value = bal_entry_q;
          state_d = S_BAL;
        end
      end

      S_BAL: begin
        if (endbal_q || ev_end) begin
          cmd2.hold = 1'b1;
          state_d = S_END_DRAIN;
        end else if (pend_q != 2'b00) begin
          cmd1.hold = 1'b1;
          cmd2.hold = 1'b1;
          state_d = S_INT_DRAIN;
        end
      end

      S_INT_DRAIN: begin
        cmd1.hold = 1'b1;
        cmd2.hold = 1'b1;
        if (both_idle) state_d = (endbal_q || ev_end) ? S_END_DRAIN : S_INT_REQ;
      end

      S_INT_REQ: begin
        if (!icore_q) begin
          cmd2.hold    = 1'b1;
          cmd1.ext_irq = 1'b1;
          if (st1.irq_ack) state_d = S_INT_RUN;
        end else begin
          cmd1.hold    = 1'b1;
          cmd2.ext_irq = 1'b1;
          if (st2.irq_ack) state_d = S_INT_RUN;
        end
      end

      S_INT_RUN: begin
        if (!icore_q) cmd2.hold = 1'b1;
        else          cmd1.hold = 1'b1;
        if (nmi_q[icore_q] && both_idle) begin
          cmd1.pc_load  = 1'b1;
          cmd2.pc_load  = 1'b1;
          cmd1.pc_value = icore_q ? st1.resume_pc : st1.pc_backup;
          cmd2.pc_value = icore_q ? st2.pc_backup : st2.resume_pc;
          state_d = S_BAL;
        end
      end

      S_END_DRAIN: begin
        cmd2.hold = 1'b1;
        if (both_idle) begin
          cmd2.pc_load  = 1'b1;
          cmd2.pc_value = RESTORE_VEC;
          state_d = S_RESTORE;
        end
      end

      S_RESTORE: begin
        if (nmi_q[1] && both_idle) begin
          cmd1.pc_load  = 1'b1;
          cmd1.pc_value = st1.resume_pc;
          cmd2.pc_load  = 1'b1;
          cmd2.pc_value = st2.pc_backup;
          state_d = S_IDLE;
        end
      end

      default: state_d = S_IDLE;
    endcase
  end

  // ---------------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      switch_q    <= 1'b0;
      bal_entry_q <= '0;
      pend_q      <= '0;
      nmi_q       <= '0;
      endbal_q    <= 1'b0;
      icore_q     <= 1'b0;
    end else begin
      state_q <= state_d;

      // interrupt requests: latch, clear when the core takes the interrupt
      // (the save interrupt of CORE2 is not a request and clears nothing)
      for (int i = 0; i < 2; i++)
        if (irq_req[i]) pend_q[i] <= 1'b1;
      if (st1.irq_ack) pend_q[0] <= irq_req[0];
      if (st2.irq_ack && state_q != S_SAVE_REQ) pend_q[1] <= irq_req[1];

      // NMI bookkeeping
      if (ev_nmi1) nmi_q[0] <= 1'b1;
      if (ev_nmi2) nmi_q[1] <= 1'b1;
      if (cmd1.pc_load) nmi_q[0] <= 1'b0;
      if (cmd2.pc_load) nmi_q[1] <= 1'b0;

      // endBal bookkeeping
      if (ev_end && state_q != S_BAL) endbal_q <= 1'b1;
      if (state_d == S_END_DRAIN)     endbal_q <= 1'b0;

      if (state_q == S_IDLE && ev_start) begin
        switch_q    <= 1'b1;
        bal_entry_q <= {st1.sync_arg[28:0], 3'b000};
      end
      if (state_q == S_RESTORE && state_d == S_IDLE) switch_q <= 1'b0;

      if (state_q == S_BAL && state_d == S_INT_DRAIN) icore_q <= !pend_q[0];
    end
  end

  // Both cores are always restarted together while balancing.
  a_sync_load: assert property (@(posedge clk) disable iff (!rst_n)
    (switch_q && state_q != S_END_DRAIN && cmd1.pc_load) |-> cmd2.pc_load)
    else $error("cores restarted on different cycles while balancing");

endmodule
