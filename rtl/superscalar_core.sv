// superscalar_core: four-wide out-of-order MIPS-I core whose register
// renaming is built for one-cycle recovery from a branch misprediction.
//
// Pipeline: Fetch | Decode/Issue | Dispatch | Reservation stations | Execute |
// Write back | Commit-1 | Commit-2.
//   * Fetch reads four instructions a cycle from a four-bank memory, predicts
//     the first branch with the BTB and BPB, and keeps each branch with its
//     delay slot in one group.
//   * Decode/Issue renames: sources read IP, destinations take free Value
//     Buffer (VB) locations chosen by the prioritizer from the Allocate bits,
//     SOW/DOW resolve dependences inside the group, ROB positions come from
//     the Issue Counter.
//   * Dispatch reads operands (VB plus Valid bits) and writes each
//     instruction into the reservation station of its unit: two ALUs, one
//     branch/jump unit, one load/store unit, one multiply/divide unit.
//   * Stations snoop the two CDBs and issue the oldest ready instruction;
//     the write-back stage gives the two CDBs to the two oldest results.
//   * Commit-1 finds up to four completed instructions at the ROB head;
//     Commit-2 writes CP and frees the replaced VB locations.
//   * A mispredicted branch, once it and its delay slot have committed,
//     triggers Restore: CP is copied into IP and the Commit bits into the
//     Allocate/Valid bits in one cycle, and everything younger is flushed.
// Interface: the program is written into instruction memory through imem_*
// while the core is held in reset (it starts at RESET_PC). dbg_* read data
// memory and committed register values. commit_n/restore/events report
// activity every cycle for performance counting; rob_count, vb_committed,
// rs_busy and sb_count show how full the buffers are.
module superscalar_core
  import rr_pkg::*;
#(
  parameter logic [31:0] RESET_PC   = 32'h8000_0400,
  parameter int          IMEM_WORDS = 1024,
  parameter int          DMEM_WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        imem_we,
  input  logic [31:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  input  logic [31:0] dbg_daddr,
  output logic [31:0] dbg_ddata,
  input  logic [4:0]  dbg_reg,
  output logic [31:0] dbg_reg_data,
  output logic [2:0]  commit_n,
  output logic        restore,
  output logic [RW-1:0] ic,
  output logic [RW-1:0] cc,
  output events_t     events,
  // occupancy, for observation
  output logic [RW:0]   rob_count,
  output logic [NPREG-1:0] vb_committed,
  output logic [NUM_RS-1:0][$clog2(RS_ENTRIES+1)-1:0] rs_busy,
  output logic [$clog2(SB_DEPTH+1)-1:0] sb_count
);
  // ---------------- fetch ----------------
  fgroup_t     fq;
  logic        fetch_hold, btb_stall;
  logic [31:0] restore_pc;
  logic        btb_we, bpb_we;
  logic [31:0] btb_waddr, btb_wtarget, bpb_waddr;
  logic [1:0]  bpb_wbits;

  fetch #(.RESET_PC(RESET_PC), .IMEM_WORDS(IMEM_WORDS)) u_fetch (
    .clk, .rst_n, .hold(fetch_hold), .restore, .restore_pc,
    .btb_we, .btb_waddr, .btb_wtarget, .bpb_we, .bpb_waddr, .bpb_wbits,
    .imem_we, .imem_waddr, .imem_wdata, .fq, .btb_stall);

  // ---------------- rename state ----------------
  logic [2*FW-1:0][4:0]    ip_raddr;
  logic [2*FW-1:0][PW-1:0] ip_rdata;
  logic [FW-1:0]           ip_we;
  logic [FW-1:0][4:0]      ip_waddr;
  logic [FW-1:0][PW-1:0]   ip_wdata;
  logic [FW-1:0]           cp_we;
  logic [FW-1:0][4:0]      cp_addr;
  logic [FW-1:0][PW-1:0]   cp_wdata, cp_rdata;
  logic [PW-1:0]           dbg_ptr;
  logic [NPREG-1:0]        alloc_bits, valid_bits;
  logic [FW-1:0]           alloc_en, dealloc_en;
  logic [FW-1:0][PW-1:0]   alloc_ptr, dealloc_ptr;
  cdb_t [NUM_CDB-1:0]      cdb;

  mapping_table u_mt (
    .clk, .rst_n, .ip_raddr, .ip_rdata, .ip_we, .ip_waddr, .ip_wdata,
    .cp_we, .cp_waddr(cp_addr), .cp_wdata, .cp_raddr(cp_addr), .cp_rdata,
    .dbg_raddr(dbg_reg), .dbg_cp_rdata(dbg_ptr), .restore);

  status_bits u_sb (
    .clk, .rst_n, .alloc_en, .alloc_ptr, .cdb,
    .commit_en(cp_we), .commit_ptr(cp_wdata), .dealloc_en, .dealloc_ptr, .restore,
    .alloc_bits, .valid_bits, .commit_bits(vb_committed));

  // ---------------- decode / issue ----------------
  logic [2:0]          rob_req_n;
  rob_entry_t [FW-1:0] rob_entry;
  logic                rob_stall, advance, vr_stall, sow_hit, dow_hit, disp_stall;
  rr_t [FW-1:0]        rr;

  issue_stage u_issue (
    .fq, .disp_hold(disp_stall), .restore,
    .ip_raddr, .ip_rdata, .ip_we, .ip_waddr, .ip_wdata,
    .alloc_bits, .alloc_en, .alloc_ptr,
    .ic, .rob_stall, .rob_req_n, .rob_entry,
    .advance, .rr, .fetch_hold, .vr_stall, .sow_hit, .dow_hit);

  // ---------------- ROB and commit ----------------
  robupd_t [2:0]       upd;     // 0: B_Bus, 1: M_Bus, 2: L_Bus
  rob_entry_t [FW-1:0] head;
  logic [FW-1:0]       head_ok;
  logic [2:0]          nc, sb_commit_n, hilo_commit_n;
  logic                branch_commit, mispredict_commit;

  rob u_rob (
    .clk, .rst_n, .restore, .req_n(rob_req_n), .alloc_go(advance), .alloc_entry(rob_entry),
    .ic, .stall(rob_stall), .upd, .head, .head_ok, .commit_n(nc), .cc, .count(rob_count));

  commit_logic u_commit (
    .clk, .rst_n, .head, .head_ok, .valid_bits, .nc,
    .cp_we, .cp_addr, .cp_wdata, .cp_rdata, .dealloc_en, .dealloc_ptr,
    .sb_commit_n, .hilo_commit_n,
    .btb_we, .btb_waddr, .btb_wtarget, .bpb_we, .bpb_waddr, .bpb_wbits,
    .restore, .restore_pc, .branch_commit, .mispredict_commit);

  assign commit_n = nc;

  // ---------------- value buffer and dispatch ----------------
  logic [2*FW-1:0][PW-1:0] vb_raddr;
  logic [2*FW-1:0][31:0]   vb_rdata;
  logic [NUM_RS-1:0]       rs_free, rs_load, rs_accept, rs_bypass;
  uop_t [NUM_RS-1:0]       rs_uop, iss;

  value_buffer u_vb (
    .clk, .rst_n, .raddr(vb_raddr), .rdata(vb_rdata), .cdb,
    .dbg_raddr(dbg_ptr), .dbg_rdata(dbg_reg_data));

  dispatch u_disp (
    .clk, .rst_n, .restore, .load(advance), .rr_in(rr),
    .vb_raddr, .vb_rdata, .valid_bits, .cdb,
    .rs_free, .rs_load, .rs_uop, .stall(disp_stall));

  // ---------------- reservation stations ----------------
  for (genvar r = 0; r < NUM_RS; r++) begin : g_rs
    reservation_station #(.ENTRIES(RS_ENTRIES), .IN_ORDER(r == RS_LSU || r == RS_MDU)) u_rs (
      .clk, .rst_n, .restore, .load(rs_load[r]), .uop_in(rs_uop[r]), .cdb, .cc,
      .accept(rs_accept[r]), .has_free(rs_free[r]), .iss(iss[r]), .bypass(rs_bypass[r]),
      .nbusy(rs_busy[r]));
  end

  // ---------------- execution units ----------------
  wbreq_t [NUM_RS-1:0] wbreq;
  logic   [NUM_RS-1:0] grant;
  logic                cdb_contention, sb_full_stall, sb_forward, hilo_full_stall;

  for (genvar a = 0; a < 2; a++) begin : g_alu
    logic [31:0] res;
    alu u_alu (.u(iss[a]), .result(res));
    always_comb begin
      wbreq[a]       = '0;
      wbreq[a].valid = iss[a].valid;
      wbreq[a].wb    = iss[a].valid && iss[a].regw;
      wbreq[a].reo   = iss[a].reo;
      wbreq[a].dest  = iss[a].dest;
      wbreq[a].data  = res;
    end
    assign rs_accept[a] = !iss[a].valid || grant[a];
  end

  logic        br_taken, br_mis;
  logic [31:0] br_target, br_link;
  logic [1:0]  br_pred;
  bju u_bju (.u(iss[RS_BJU]), .taken(br_taken), .mispred(br_mis), .target(br_target),
             .pred(br_pred), .link(br_link));
  always_comb begin
    wbreq[RS_BJU]       = '0;
    wbreq[RS_BJU].valid = iss[RS_BJU].valid;
    wbreq[RS_BJU].wb    = iss[RS_BJU].valid && iss[RS_BJU].regw;
    wbreq[RS_BJU].reo   = iss[RS_BJU].reo;
    wbreq[RS_BJU].dest  = iss[RS_BJU].dest;
    wbreq[RS_BJU].data  = br_link;
    upd[0]         = '0;
    upd[0].valid   = iss[RS_BJU].valid && grant[RS_BJU];
    upd[0].reo     = iss[RS_BJU].reo;
    upd[0].mispred = br_mis;
    upd[0].taken   = br_taken;
    upd[0].target  = br_target;
    upd[0].pred    = br_pred;
  end
  assign rs_accept[RS_BJU] = !iss[RS_BJU].valid || grant[RS_BJU];

  lsu #(.DMEM_WORDS(DMEM_WORDS)) u_lsu (
    .clk, .rst_n, .restore, .iss(iss[RS_LSU]), .accept(rs_accept[RS_LSU]),
    .wb(wbreq[RS_LSU]), .wb_grant(grant[RS_LSU]), .upd(upd[2]),
    .sb_commit_n, .sb_full_stall, .sb_forward, .sb_count, .dbg_addr(dbg_daddr), .dbg_data(dbg_ddata));

  mdu u_mdu (
    .clk, .rst_n, .restore, .iss(iss[RS_MDU]), .accept(rs_accept[RS_MDU]),
    .wb(wbreq[RS_MDU]), .wb_grant(grant[RS_MDU]), .upd(upd[1]),
    .hilo_commit_n, .hilo_full_stall);

  // ---------------- write back ----------------
  writeback u_wb (.req(wbreq), .cc, .grant, .cdb, .contention(cdb_contention));

  // ---------------- events ----------------
  always_comb begin
    events                   = '0;
    events.fetch_btb_stall   = btb_stall;
    events.vr_stall          = vr_stall;
    events.rob_stall         = fq.valid && rob_stall;
    events.disp_stall        = disp_stall;
    events.rs_bypass         = |rs_bypass;
    events.cdb_stall         = cdb_contention;
    events.sb_full_stall     = sb_full_stall;
    events.sb_forward        = sb_forward;
    events.restore           = restore;
    events.mispredict_commit = mispredict_commit;
    events.branch_commit     = branch_commit;
    events.sow               = advance && sow_hit;
    events.dow               = advance && dow_hit;
    events.hilo_full_stall   = hilo_full_stall;
  end
endmodule
