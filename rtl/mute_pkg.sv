// mute_pkg: types and constants shared by the MUTE dual-core balancing processor.
//
// Instructions are 64 bits wide, laid out like the Portable Instruction Set
// Architecture (PISA) of the SimpleScalar tool set that the cores implement:
//   [63:48] annotation (ignored), [47:32] opcode,
//   [31:24] rs, [23:16] rt, [15:8] rd, [7:0] shamt, [15:0] imm16, [25:0] target.
// The opcode numbers of the ordinary instructions follow the SimpleScalar
// PISA table. The numbers of the balancing instructions (startBal, endBal,
// endIntr) and of the PC_backup moves are this design's own choice, taken
// from the unused top of the opcode space.
package mute_pkg;

  localparam int unsigned XLEN = 32;
  localparam int unsigned ILEN = 64;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [ILEN-1:0] instr_t;

  // Opcodes (instruction bits [47:32]).
  typedef enum logic [15:0] {
    OP_NOP      = 16'h0000,
    OP_J        = 16'h0001,
    OP_JAL      = 16'h0002,
    OP_JR       = 16'h0003,
    OP_JALR     = 16'h0004,
    OP_BEQ      = 16'h0005,
    OP_BNE      = 16'h0006,
    OP_BLEZ     = 16'h0007,
    OP_BGTZ     = 16'h0008,
    OP_BLTZ     = 16'h0009,
    OP_BGEZ     = 16'h000a,
    OP_LB       = 16'h0020,
    OP_LBU      = 16'h0022,
    OP_LW       = 16'h0028,
    OP_SB       = 16'h0030,
    OP_SW       = 16'h0034,
    OP_ADD      = 16'h0040,
    OP_ADDI     = 16'h0041,
    OP_ADDU     = 16'h0042,
    OP_ADDIU    = 16'h0043,
    OP_SUB      = 16'h0044,
    OP_SUBU     = 16'h0045,
    OP_MULT     = 16'h0046,
    OP_MULTU    = 16'h0047,
    OP_MFHI     = 16'h004a,
    OP_MTHI     = 16'h004b,
    OP_MFLO     = 16'h004c,
    OP_MTLO     = 16'h004d,
    OP_AND      = 16'h004e,
    OP_ANDI     = 16'h004f,
    OP_OR       = 16'h0050,
    OP_ORI      = 16'h0051,
    OP_XOR      = 16'h0052,
    OP_XORI     = 16'h0053,
    OP_NOR      = 16'h0054,
    OP_SLL      = 16'h0055,
    OP_SLLV     = 16'h0056,
    OP_SRL      = 16'h0057,
    OP_SRLV     = 16'h0058,
    OP_SRA      = 16'h0059,
    OP_SRAV     = 16'h005a,
    OP_SLT      = 16'h005b,
    OP_SLTI     = 16'h005c,
    OP_SLTU     = 16'h005d,
    OP_SLTIU    = 16'h005e,
    OP_LUI      = 16'h00a2,
    // Balancing support (Table of additional resources: startBal, endBal, endIntr)
    OP_STARTBAL = 16'h00f0,  // imm16 = word index of the complementary program in CORE2's memory
    OP_ENDBAL   = 16'h00f1,
    OP_ENDINTR  = 16'h00f2,  // end of an interrupt routine: raises the NMI to the controller
    OP_MFPCB    = 16'h00f3,  // rd <- PC_backup
    OP_MTPCB    = 16'h00f4   // PC_backup <- rs
  } opcode_e;

  // Synchronisation event reported by a core when a balancing instruction retires.
  typedef enum logic [1:0] {
    SYNC_NONE     = 2'd0,
    SYNC_STARTBAL = 2'd1,
    SYNC_ENDBAL   = 2'd2,
    SYNC_ENDINTR  = 2'd3
  } sync_e;

  // ALU operations used inside the core.
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLL, ALU_SRL, ALU_SRA, ALU_SLT, ALU_SLTU, ALU_LUI, ALU_PASSB
  } alu_e;

  // Control-side view of one core, as seen by the balancing controller.
  typedef struct packed {
    sync_e  sync;        // balancing instruction retired this cycle
    logic   sync_valid;
    logic   idle;        // pipeline empty and not fetching
    logic   irq_ack;     // external interrupt taken this cycle
    logic   ie;          // external interrupt enabled (not masked)
    word_t  resume_pc;   // next instruction to run when idle
    word_t  pc_backup;   // PC_backup register
    word_t  sync_arg;    // imm16 of the retired balancing instruction, zero-extended
  } core_status_t;

  // Commands from the controller to one core.
  typedef struct packed {
    logic   hold;        // stop fetching and drain the pipeline
    logic   pc_load;     // load pc_value into PC (core must be idle)
    word_t  pc_value;
    logic   ext_irq;     // external (maskable) interrupt request
    word_t  irq_vec;     // where the interrupt routine starts
  } core_cmd_t;

endpackage
