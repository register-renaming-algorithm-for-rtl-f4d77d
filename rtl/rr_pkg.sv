// rr_pkg: sizes, encodings and bundles shared by the blocks of the four-wide
// superscalar core with IP/CP register renaming.
//
// Sizes that follow the design description: four-instruction fetch and commit
// groups, 32 logical registers renamed onto 64 Value Buffer (VB) locations
// through 6-bit pseudo-pointers, a 64-entry reorder buffer, reservation
// stations of four entries, two common data buses and a ten-entry store buffer.
// The functional-unit codes (MDU 010, ALU 011, BJU 100, LSU 101) and the ROB
// instruction codes (register write 000, non-register write 001, link 010,
// branch/jump 100, store 111) are the documented ones. The operation encoding
// (exe_e) and the bundle layouts are this design's own.
package rr_pkg;

  localparam int NLREG      = 32;   // logical (MIPS) registers
  localparam int NPREG      = 64;   // Value Buffer locations
  localparam int PW         = 6;    // pseudo-pointer width
  localparam int ROB_DEPTH  = 64;
  localparam int RW         = 6;    // ROB position width
  localparam int FW         = 4;    // fetch / issue / commit group width
  localparam int NUM_CDB    = 2;
  localparam int NUM_RS     = 5;    // ALU0, ALU1, BJU, LSU, MDU
  localparam int RS_ENTRIES = 4;
  localparam int SB_DEPTH   = 10;

  // reservation-station / write-back requester indices
  localparam int RS_ALU0 = 0;
  localparam int RS_ALU1 = 1;
  localparam int RS_BJU  = 2;
  localparam int RS_LSU  = 3;
  localparam int RS_MDU  = 4;

  typedef enum logic [2:0] {
    FU_NONE = 3'b000,
    FU_CP0  = 3'b001,
    FU_MDU  = 3'b010,
    FU_ALU  = 3'b011,
    FU_BJU  = 3'b100,
    FU_LSU  = 3'b101
  } fu_e;

  typedef enum logic [2:0] {
    RC_REGW   = 3'b000,
    RC_NONREG = 3'b001,
    RC_LINK   = 3'b010,
    RC_BRANCH = 3'b100,
    RC_STORE  = 3'b111
  } robcode_e;

  typedef enum logic [5:0] {
    OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_NOR, OP_SLT, OP_SLTU,
    OP_SLL, OP_SRL, OP_SRA, OP_LUI,
    OP_BEQ, OP_BNE, OP_BLEZ, OP_BGTZ, OP_BLTZ, OP_BGEZ,
    OP_J, OP_JAL, OP_JR, OP_JALR,
    OP_MULT, OP_MULTU, OP_DIV, OP_DIVU, OP_MFHI, OP_MFLO,
    OP_LW, OP_SW
  } exe_e;

  // One slot of a fetch group, as handed from fetch to decode/issue.
  typedef struct packed {
    logic        valid;        // slot kept (not cancelled)
    logic [31:0] instr;
    logic [31:0] pc;
  } fslot_t;

  typedef struct packed {
    logic            valid;        // group present
    fslot_t [FW-1:0] slot;
    logic            pred_taken;   // prediction for the first branch of the group
    logic [31:0]     pred_target;
    logic [1:0]      pred_bits;
  } fgroup_t;

  // Decoder output for one instruction.
  typedef struct packed {
    logic        valid;      // a real instruction (not a NOP, not cancelled)
    fu_e         fu;
    exe_e        exe;
    robcode_e    rcode;
    logic        regw;       // writes a logical register
    logic [4:0]  rd;
    logic        use_rs1;
    logic [4:0]  rs1;
    logic        use_rs2;
    logic [4:0]  rs2;
    logic        imm_op2;    // operand 2 is the immediate
    logic [31:0] imm;        // immediate, shift amount, offset or branch target
    logic [31:0] pc;
    logic        is_cti;     // branch or jump
  } dec_t;

  // An instruction as held in dispatch, a reservation station and a unit.
  // While vN is 0, opN[5:0] holds the pseudo-pointer the operand waits for.
  typedef struct packed {
    logic        valid;
    fu_e         fu;
    exe_e        exe;
    logic        regw;
    logic [PW-1:0] dest;
    logic [RW-1:0] reo;
    logic [31:0] op1;
    logic        v1;
    logic [31:0] op2;
    logic        v2;
    logic [31:0] imm;
    logic [31:0] pc;
    logic        pred_taken;
    logic [31:0] pred_target;
    logic [1:0]  pred_bits;
  } uop_t;

  // Renamed instruction waiting in the dispatch group.
  typedef struct packed {
    uop_t          u;
    logic          need1;   // operand 1 comes from VB[p1]
    logic          need2;
    logic [PW-1:0] p1;
    logic [PW-1:0] p2;
    logic          disp;    // already written into a reservation station
  } rr_t;

  typedef struct packed {
    logic          valid;
    logic [PW-1:0] dest;
    logic [31:0]   data;
  } cdb_t;

  // Result of a unit's last stage, competing for a CDB.
  typedef struct packed {
    logic          valid;   // an instruction sits in the last stage
    logic          wb;      // it needs a CDB
    logic [RW-1:0] reo;
    logic [PW-1:0] dest;
    logic [31:0]   data;
  } wbreq_t;

  // Completion write into the ROB (B_Bus, M_Bus, L_Bus).
  typedef struct packed {
    logic          valid;
    logic [RW-1:0] reo;
    logic          mispred;
    logic          taken;
    logic [31:0]   target;   // correct next PC after the delay slot
    logic [1:0]    pred;
  } robupd_t;

  typedef struct packed {
    logic          v;
    robcode_e      code;
    logic [1:0]    pred;
    logic [4:0]    ldest;
    logic [PW-1:0] ptr;
    logic          ds;      // a delay-slot instruction follows in the ROB
    logic [31:0]   ba;
    logic [31:0]   bta;
    logic          m;
    logic          taken;
    logic          c;
  } rob_entry_t;

  // Events the core reports each cycle, for performance counting.
  typedef struct packed {
    logic fetch_btb_stall;   // BTB written, fetch idles
    logic vr_stall;          // too few free VB locations
    logic rob_stall;         // too little ROB space
    logic disp_stall;        // group not fully dispatched
    logic rs_bypass;         // instruction went straight from dispatch to a unit
    logic cdb_stall;         // a result lost CDB arbitration
    logic sb_full_stall;     // store waited for store-buffer space
    logic sb_forward;        // load took its data from the store buffer
    logic restore;
    logic mispredict_commit; // a mispredicted branch committed
    logic branch_commit;
    logic sow;               // source overwrite inside a group
    logic dow;               // destination overwrite inside a group
    logic hilo_full_stall;
  } events_t;

  function automatic logic [RW-1:0] age(input logic [RW-1:0] cc, input logic [RW-1:0] reo);
    // Distance of a ROB position from the Commit Counter: smaller is older.
    // This is the wrap-safe ordering of the description, which subtracts the
    // position from CC; measuring the other way keeps the head itself at 0.
    return reo - cc;
  endfunction

endpackage
