// pisa_core: one processor core of the MUTE dual-core balancing processor.
//
// A six-stage in-order pipeline without cache running a subset of the PISA
// instruction set (64-bit instructions, see mute_pkg):
//   F1  PC is sent to the instruction memory (synchronous read)
//   F2  instruction word arrives from the instruction memory
//   D   decode, register/HI/LO/PC_backup read, hazard check
//   E   ALU, multiplier, branch and jump resolution, address generation
//   M   data memory request (synchronous read, byte enables for stores)
//   W   load data alignment, write-back of GPR, HI, LO and PC_backup
// Read-after-write hazards stall D until the producer reaches W (the register
// file forwards the W write). Taken branches and jumps resolve in E and squash
// F2 and D; there are no delay slots, as in PISA.
//
// Balancing support, after the source's list of additional resources
// (instructions startBal, endBal, endIntr; a maskable external interrupt; the
// PC_backup register):
//   * startBal/endBal/endIntr issue from D, squash the younger instructions
//     and park the core: it fetches nothing more until the controller loads a
//     new PC. When the instruction retires in W the core reports it on
//     status.sync for one cycle; status.resume_pc is the address after it.
//   * cmd.hold stops fetching, squashes F2 and D (rewinding the PC to the
//     oldest squashed instruction) and lets E, M and W drain; status.idle
//     rises once the pipeline is empty. Two cores running the same code in
//     lockstep stop at the same instruction when held in the same cycle.
//   * cmd.ext_irq (taken only while interrupts are enabled and the core is
//     not parked) flushes the pipeline the same way; once it is empty the PC
//     of the next instruction is saved in PC_backup, interrupts are masked
//     and fetching restarts at cmd.irq_vec. MFPCB/MTPCB move PC_backup to and
//     from a GPR so an interrupt routine can keep it on its stack.
//   * cmd.pc_load (given while idle) loads cmd.pc_value into the PC, unparks
//     the core and re-enables the interrupt. The controller uses it to start
//     both cores on the same clock cycle.
// The pipeline organisation, encodings, hazard handling and the exact
// hold/flush protocol are this design's choices; the source gives only the
// six-stage depth, the register set (register file, HI, LO, PC) and the
// interrupt behaviour described above.
//
// Supported: J JAL JR JALR BEQ BNE BLEZ BGTZ BLTZ BGEZ LB LBU LW SB SW ADD(I)
// ADDU ADDIU SUB SUBU MULT MULTU MFHI MTHI MFLO MTLO AND(I) OR(I) XOR(I) NOR
// SLL(V) SRL(V) SRA(V) SLT(I) SLTU SLTIU LUI, plus the balancing instructions.
// ADD/ADDI/SUB do not trap on overflow. Unknown opcodes execute as NOP.
// rst_n is an asynchronous reset for the flops and also the disable
// condition of the assertions below; a linter may report that second use
// as a synchronous one, which has no effect on the logic.
module pisa_core
  import mute_pkg::*;
#(
  parameter word_t RESET_PC = 32'h0000_0000
) (
  input  logic          clk,
  input  logic          rst_n,
  // instruction memory (imab/imdb)
  output logic          im_en,
  output word_t         im_addr,
  input  instr_t        im_rdata,
  // data memory (dmab/dmdb)
  output logic          dm_en,
  output logic          dm_we,
  output logic [3:0]    dm_be,
  output word_t         dm_addr,
  output word_t         dm_wdata,
  input  word_t         dm_rdata,
  // balancing controller
  input  core_cmd_t     cmd,
  output core_status_t  status
);

  typedef enum logic [3:0] {
    BR_NONE, BR_BEQ, BR_BNE, BR_BLEZ, BR_BGTZ, BR_BLTZ, BR_BGEZ, BR_J, BR_JR
  } br_e;

  typedef struct packed {
    word_t      pc;
    alu_e       alu;
    logic       use_imm;
    word_t      imm;
    logic [4:0] shamt;
    logic       shamt_var;
    word_t      a;          // rs value (or HI/LO/PC_backup for the moves)
    word_t      b;          // rt value
    logic       wr_gpr;
    logic [4:0] dest;
    logic       link;
    br_e        br;
    logic [25:0] target;
    logic       load;
    logic       store;
    logic       byte_acc;
    logic       lsigned;
    logic       mult;
    logic       msigned;
    logic       wr_hi;      // MTHI
    logic       wr_lo;      // MTLO
    logic       wr_pcb;     // MTPCB
    sync_e      sync;
    logic [15:0] sarg;
  } dec_t;

  typedef struct packed {
    word_t      res;
    logic [63:0] prod;
    logic       wr_gpr;
    logic [4:0] dest;
    logic       load;
    logic       store;
    logic       byte_acc;
    logic       lsigned;
    logic [1:0] boff;
    logic       mult;
    logic       wr_hi;
    logic       wr_lo;
    logic       wr_pcb;
    word_t      sdata;
    sync_e      sync;
    logic [15:0] sarg;
  } mem_t;

  // ---------------------------------------------------------------------------
  // State
  word_t  pc;
  logic   f2_valid;
  word_t  f2_pc;
  logic   d_valid;
  word_t  d_pc;
  instr_t d_ins;
  logic   e_valid;
  dec_t   e_q;
  logic   m_valid;
  mem_t   m_q;
  logic   w_valid;
  mem_t   w_q;
  word_t  hi_q, lo_q, pcb_q;
  logic   ie_q;       // external interrupt enable
  logic   parked_q;   // stopped at a balancing instruction

  // ---------------------------------------------------------------------------
  // Decode (D)
  opcode_e    op;
  logic [4:0] f_rs, f_rt, f_rd;
  logic [15:0] f_imm;
  word_t      simm, zimm;
  dec_t       dec;
  logic       use_rs, use_rt, rd_hilo, rd_pcb;
  word_t      rs_val, rt_val;
  word_t      w_data;
  logic       w_gpr_en;

  assign op    = opcode_e'(d_ins[47:32]);
  assign f_rs  = d_ins[28:24];
  assign f_rt  = d_ins[20:16];
  assign f_rd  = d_ins[12:8];
  assign f_imm = d_ins[15:0];
  assign simm  = {{16{f_imm[15]}}, f_imm};
  assign zimm  = {16'b0, f_imm};

  pisa_regfile u_rf (
    .clk, .rst_n,
    .ra_addr(f_rs), .ra_data(rs_val),
    .rb_addr(f_rt), .rb_data(rt_val),
    .w_en(w_gpr_en), .w_addr(w_q.dest), .w_data(w_data)
  );

  always_comb begin
    dec = '0;
    dec.pc     = d_pc;
    dec.alu    = ALU_ADD;
    dec.a      = rs_val;
    dec.b      = rt_val;
    dec.shamt  = d_ins[4:0];
    dec.target = d_ins[25:0];
    dec.sarg   = f_imm;
    dec.sync   = SYNC_NONE;
    dec.br     = BR_NONE;
    use_rs  = 1'b0;
    use_rt  = 1'b0;
    rd_hilo = 1'b0;
    rd_pcb  = 1'b0;
    unique case (op)
      OP_J:     dec.br = BR_J;
      OP_JAL:   begin dec.br = BR_J; dec.link = 1'b1; dec.wr_gpr = 1'b1; dec.dest = 5'd31; end
      OP_JR:    begin dec.br = BR_JR; use_rs = 1'b1; end
      OP_JALR:  begin dec.br = BR_JR; use_rs = 1'b1; dec.link = 1'b1; dec.wr_gpr = 1'b1; dec.dest = f_rd; end
      OP_BEQ:   begin dec.br = BR_BEQ;  use_rs = 1'b1; use_rt = 1'b1; dec.imm = simm; end
      OP_BNE:   begin dec.br = BR_BNE;  use_rs = 1'b1; use_rt = 1'b1; dec.imm = simm; end
      OP_BLEZ:  begin dec.br = BR_BLEZ; use_rs = 1'b1; dec.imm = simm; end
      OP_BGTZ:  begin dec.br = BR_BGTZ; use_rs = 1'b1; dec.imm = simm; end
      OP_BLTZ:  begin dec.br = BR_BLTZ; use_rs = 1'b1; dec.imm = simm; end
      OP_BGEZ:  begin dec.br = BR_BGEZ; use_rs = 1'b1; dec.imm = simm; end
      OP_LB, OP_LBU, OP_LW: begin
        use_rs = 1'b1; dec.use_imm = 1'b1; dec.imm = simm;
        dec.load = 1'b1; dec.wr_gpr = 1'b1; dec.dest = f_rt;
        dec.byte_acc = (op != OP_LW); dec.lsigned = (op == OP_LB);
      end
      OP_SB, OP_SW: begin
        use_rs = 1'b1; use_rt = 1'b1; dec.use_imm = 1'b1; dec.imm = simm;
        dec.store = 1'b1; dec.byte_acc = (op == OP_SB);
      end
      OP_ADD, OP_ADDU, OP_SUB, OP_SUBU, OP_AND, OP_OR, OP_XOR, OP_NOR,
      OP_SLT, OP_SLTU, OP_SLLV, OP_SRLV, OP_SRAV: begin
        use_rs = 1'b1; use_rt = 1'b1; dec.wr_gpr = 1'b1; dec.dest = f_rd;
        unique case (op)
          OP_SUB, OP_SUBU: dec.alu = ALU_SUB;
          OP_AND:          dec.alu = ALU_AND;
          OP_OR:           dec.alu = ALU_OR;
          OP_XOR:          dec.alu = ALU_XOR;
          OP_NOR:          dec.alu = ALU_NOR;
          OP_SLT:          dec.alu = ALU_SLT;
          OP_SLTU:         dec.alu = ALU_SLTU;
          OP_SLLV:         begin dec.alu = ALU_SLL; dec.shamt_var = 1'b1; end
          OP_SRLV:         begin dec.alu = ALU_SRL; dec.shamt_var = 1'b1; end
          OP_SRAV:         begin dec.alu = ALU_SRA; dec.shamt_var = 1'b1; end
          default:         dec.alu = ALU_ADD;
        endcase
      end
      OP_SLL, OP_SRL, OP_SRA: begin
        use_rt = 1'b1; dec.wr_gpr = 1'b1; dec.dest = f_rd;
        dec.alu = (op == OP_SLL) ? ALU_SLL : (op == OP_SRL) ? ALU_SRL : ALU_SRA;
      end
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU: begin
        use_rs = 1'b1; dec.use_imm = 1'b1; dec.imm = simm; dec.wr_gpr = 1'b1; dec.dest = f_rt;
        dec.alu = (op == OP_SLTI) ? ALU_SLT : (op == OP_SLTIU) ? ALU_SLTU : ALU_ADD;
      end
      OP_ANDI, OP_ORI, OP_XORI: begin
        use_rs = 1'b1; dec.use_imm = 1'b1; dec.imm = zimm; dec.wr_gpr = 1'b1; dec.dest = f_rt;
        dec.alu = (op == OP_ANDI) ? ALU_AND : (op == OP_ORI) ? ALU_OR : ALU_XOR;
      end
      OP_LUI: begin
        dec.use_imm = 1'b1; dec.imm = zimm; dec.wr_gpr = 1'b1; dec.dest = f_rt; dec.alu = ALU_LUI;
      end
      OP_MULT, OP_MULTU: begin
        use_rs = 1'b1; use_rt = 1'b1; dec.mult = 1'b1; dec.msigned = (op == OP_MULT);
      end
      OP_MFHI, OP_MFLO: begin
        rd_hilo = 1'b1; dec.a = (op == OP_MFHI) ? hi_q : lo_q;
        dec.use_imm = 1'b1; dec.wr_gpr = 1'b1; dec.dest = f_rd;
      end
      OP_MTHI:  begin use_rs = 1'b1; dec.wr_hi = 1'b1; dec.use_imm = 1'b1; end
      OP_MTLO:  begin use_rs = 1'b1; dec.wr_lo = 1'b1; dec.use_imm = 1'b1; end
      OP_MFPCB: begin
        rd_pcb = 1'b1; dec.a = pcb_q; dec.use_imm = 1'b1; dec.wr_gpr = 1'b1; dec.dest = f_rd;
      end
      OP_MTPCB: begin use_rs = 1'b1; dec.wr_pcb = 1'b1; dec.use_imm = 1'b1; end
      OP_STARTBAL: dec.sync = SYNC_STARTBAL;
      OP_ENDBAL:   dec.sync = SYNC_ENDBAL;
      OP_ENDINTR:  dec.sync = SYNC_ENDINTR;
      default: ;  // NOP and unsupported opcodes
    endcase
    if (dec.dest == 5'd0) dec.wr_gpr = 1'b0;
  end

  // Hazards: a source produced by an instruction still in E or M. W is
  // forwarded by the register file. HI, LO and PC_backup are read in D from
  // their registers, so a pending write anywhere in E, M or W stalls.
  logic hz;
  always_comb begin
    hz = 1'b0;
    if (use_rs && f_rs != 5'd0) begin
      if (e_valid && e_q.wr_gpr && e_q.dest == f_rs) hz = 1'b1;
      if (m_valid && m_q.wr_gpr && m_q.dest == f_rs) hz = 1'b1;
    end
    if (use_rt && f_rt != 5'd0) begin
      if (e_valid && e_q.wr_gpr && e_q.dest == f_rt) hz = 1'b1;
      if (m_valid && m_q.wr_gpr && m_q.dest == f_rt) hz = 1'b1;
    end
    if (rd_hilo && ((e_valid && (e_q.mult || e_q.wr_hi || e_q.wr_lo)) ||
                    (m_valid && (m_q.mult || m_q.wr_hi || m_q.wr_lo)) ||
                    (w_valid && (w_q.mult || w_q.wr_hi || w_q.wr_lo)))) hz = 1'b1;
    if (rd_pcb && ((e_valid && e_q.wr_pcb) || (m_valid && m_q.wr_pcb) ||
                   (w_valid && w_q.wr_pcb))) hz = 1'b1;
  end

  // ---------------------------------------------------------------------------
  // Execute (E)
  word_t       ea, eb, alu_res;
  logic [4:0]  sh;
  logic        e_taken;
  word_t       e_target;
  logic [63:0] prod;

  always_comb begin
    ea = e_q.a;
    eb = e_q.use_imm ? e_q.imm : e_q.b;
    sh = e_q.shamt_var ? e_q.a[4:0] : e_q.shamt;
    unique case (e_q.alu)
      ALU_ADD:   alu_res = ea + eb;
      ALU_SUB:   alu_res = ea - eb;
      ALU_AND:   alu_res = ea & eb;
      ALU_OR:    alu_res = ea | eb;
      ALU_XOR:   alu_res = ea ^ eb;
      ALU_NOR:   alu_res = ~(ea | eb);
      ALU_SLL:   alu_res = e_q.b << sh;
      ALU_SRL:   alu_res = e_q.b >> sh;
      ALU_SRA:   alu_res = word_t'($signed(e_q.b) >>> sh);
      ALU_SLT:   alu_res = {31'b0, $signed(ea) < $signed(eb)};
      ALU_SLTU:  alu_res = {31'b0, ea < eb};
      ALU_LUI:   alu_res = {eb[15:0], 16'b0};
      default:   alu_res = eb;
    endcase
    if (e_q.link) alu_res = e_q.pc + 32'd8;

    if (e_q.msigned) prod = 64'($signed(e_q.a) * $signed(e_q.b));
    else             prod = {32'b0, e_q.a} * {32'b0, e_q.b};

    unique case (e_q.br)
      BR_BEQ:  e_taken = (e_q.a == e_q.b);
      BR_BNE:  e_taken = (e_q.a != e_q.b);
      BR_BLEZ: e_taken = ($signed(e_q.a) <= 0);
      BR_BGTZ: e_taken = ($signed(e_q.a) > 0);
      BR_BLTZ: e_taken = e_q.a[31];
      BR_BGEZ: e_taken = !e_q.a[31];
      BR_J, BR_JR: e_taken = 1'b1;
      default: e_taken = 1'b0;
    endcase
    e_taken = e_taken && e_valid;
    unique case (e_q.br)
      BR_J:    e_target = {e_q.pc[31:29], e_q.target, 3'b000};
      BR_JR:   e_target = e_q.a;
      default: e_target = e_q.pc + 32'd8 + {e_q.imm[28:0], 3'b000};
    endcase
  end

  // ---------------------------------------------------------------------------
  // Memory (M): synchronous data memory, data returns in W.
  assign dm_en    = m_valid && (m_q.load || m_q.store);
  assign dm_we    = m_valid && m_q.store;
  assign dm_addr  = {m_q.res[31:2], 2'b00};
  assign dm_wdata = m_q.byte_acc ? {4{m_q.sdata[7:0]}} : m_q.sdata;
  always_comb begin
    dm_be = 4'b1111;
    if (m_q.byte_acc) dm_be = 4'b0001 << m_q.res[1:0];
  end

  // ---------------------------------------------------------------------------
  // Write-back (W)
  logic [7:0] lbyte;
  always_comb begin
    lbyte = dm_rdata[8*w_q.boff +: 8];
    if (!w_q.load)          w_data = w_q.res;
    else if (!w_q.byte_acc) w_data = dm_rdata;
    else if (w_q.lsigned)   w_data = {{24{lbyte[7]}}, lbyte};
    else                    w_data = {24'b0, lbyte};
  end
  assign w_gpr_en = w_valid && w_q.wr_gpr;

  // ---------------------------------------------------------------------------
  // Pipeline control
  logic irq_pend, stop, drained, d_issue, park_now, d_can_load, fetch, take_irq;

  assign drained    = !f2_valid && !d_valid && !e_valid && !m_valid && !w_valid;
  assign irq_pend   = cmd.ext_irq && ie_q && !parked_q;
  assign stop       = cmd.hold || irq_pend || parked_q;
  assign d_issue    = d_valid && !hz && !e_taken && !stop && !cmd.pc_load;
  assign park_now   = d_issue && (dec.sync != SYNC_NONE);
  assign d_can_load = !d_valid || d_issue;
  assign fetch      = !stop && !e_taken && !park_now && !cmd.pc_load &&
                      (!f2_valid || d_can_load);
  assign take_irq   = irq_pend && drained && !cmd.pc_load;

  assign im_en   = fetch;
  assign im_addr = pc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= RESET_PC;
      f2_valid <= 1'b0;
      f2_pc    <= '0;
      d_valid  <= 1'b0;
      d_pc     <= '0;
      d_ins    <= '0;
      e_valid  <= 1'b0;
      e_q      <= '0;
      m_valid  <= 1'b0;
      m_q      <= '0;
      w_valid  <= 1'b0;
      w_q      <= '0;
      hi_q     <= '0;
      lo_q     <= '0;
      pcb_q    <= '0;
      ie_q     <= 1'b1;
      parked_q <= 1'b0;
    end else begin
      // ---- front end: F1 / F2 / D
      if (cmd.pc_load) begin
        pc       <= cmd.pc_value;
        f2_valid <= 1'b0;
        d_valid  <= 1'b0;
        parked_q <= 1'b0;
        ie_q     <= 1'b1;
      end else if (e_taken) begin
        pc       <= e_target;
        f2_valid <= 1'b0;
        d_valid  <= 1'b0;
      end else if (park_now) begin
        pc       <= d_pc + 32'd8;
        f2_valid <= 1'b0;
        d_valid  <= 1'b0;
        parked_q <= 1'b1;
      end else if (stop) begin
        // squash F2 and D, rewind to the oldest squashed instruction
        if (d_valid)       pc <= d_pc;
        else if (f2_valid) pc <= f2_pc;
        f2_valid <= 1'b0;
        d_valid  <= 1'b0;
        if (take_irq) begin
          pcb_q <= pc;
          pc    <= cmd.irq_vec;
          ie_q  <= 1'b0;
        end
      end else begin
        if (d_can_load) begin
          d_valid <= f2_valid;
          d_pc    <= f2_pc;
          d_ins   <= im_rdata;
        end
        if (fetch) begin
          f2_valid <= 1'b1;
          f2_pc    <= pc;
          pc       <= pc + 32'd8;
        end else if (d_can_load) begin
          f2_valid <= 1'b0;
        end
      end

      // ---- E
      e_valid <= d_issue;
      if (d_issue) e_q <= dec;

      // ---- M
      m_valid    <= e_valid;
      m_q.res    <= alu_res;
      m_q.prod   <= prod;
      m_q.wr_gpr <= e_q.wr_gpr;
      m_q.dest   <= e_q.dest;
      m_q.load   <= e_q.load;
      m_q.store  <= e_q.store;
      m_q.byte_acc <= e_q.byte_acc;
      m_q.lsigned <= e_q.lsigned;
      m_q.boff   <= alu_res[1:0];
      m_q.mult   <= e_q.mult;
      m_q.wr_hi  <= e_q.wr_hi;
      m_q.wr_lo  <= e_q.wr_lo;
      m_q.wr_pcb <= e_q.wr_pcb;
      m_q.sdata  <= e_q.b;
      m_q.sync   <= e_q.sync;
      m_q.sarg   <= e_q.sarg;

      // ---- W
      w_valid <= m_valid;
      w_q     <= m_q;
      if (w_valid) begin
        if (w_q.mult) begin
          hi_q <= w_q.prod[63:32];
          lo_q <= w_q.prod[31:0];
        end
        if (w_q.wr_hi)  hi_q  <= w_q.res;
        if (w_q.wr_lo)  lo_q  <= w_q.res;
        if (w_q.wr_pcb) pcb_q <= w_q.res;
      end
    end
  end

  // ---------------------------------------------------------------------------
  // Status to the controller
  always_comb begin
    status            = '0;
    status.sync_valid = w_valid && (w_q.sync != SYNC_NONE);
    status.sync       = w_valid ? w_q.sync : SYNC_NONE;
    status.sync_arg   = {16'b0, w_q.sarg};
    status.idle       = drained;
    status.irq_ack    = take_irq;
    status.ie         = ie_q;
    status.resume_pc  = pc;
    status.pc_backup  = pcb_q;
  end

  // A new PC may only be loaded into an empty pipeline.
  a_pc_load_idle: assert property (@(posedge clk) disable iff (!rst_n)
    cmd.pc_load |-> drained)
    else $error("pc_load while the pipeline is not empty");

endmodule
