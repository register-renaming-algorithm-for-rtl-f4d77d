// lsu: two-stage load/store unit with store buffer and data memory.
//
// Stage 1 (address generation) is the reservation station's issue register:
// the address op1 + imm is computed and registered into stage 2. The LSU
// station issues in program order, so loads and stores reach memory in
// program order. Stage 2 (memory access):
//   * a store is written into the store buffer and reports completion on the
//     L_Bus; if the buffer is full the unit holds (`sb_full_stall`);
//   * a load takes its data from the youngest matching store-buffer entry, or
//     else from data memory, and requests a CDB; it holds until granted.
// Committed stores leave the store buffer for memory in cycles when stage 2
// is empty, as described, and also while stage 2 holds a store that waits for
// a full buffer (otherwise that wait could never end; this design's choice). Data memory is a word array of DMEM_WORDS words addressed by the
// low address bits (word accesses only). Restore empties stage 2 and the
// uncommitted part of the store buffer. `dbg_addr`/`dbg_data` read memory.
module lsu
  import rr_pkg::*;
#(
  parameter int DMEM_WORDS = 1024,
  parameter int SB_SIZE    = SB_DEPTH
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        restore,
  input  uop_t        iss,
  output logic        accept,
  output wbreq_t      wb,
  input  logic        wb_grant,
  output robupd_t     upd,
  input  logic [2:0]  sb_commit_n,
  output logic        sb_full_stall,
  output logic        sb_forward,
  output logic [$clog2(SB_SIZE+1)-1:0] sb_count,
  input  logic [31:0] dbg_addr,
  output logic [31:0] dbg_data
);
  localparam int AW = $clog2(DMEM_WORDS);

  typedef struct packed {
    uop_t        u;
    logic [31:0] addr;
  } lst_t;

  lst_t        s2;
  logic        s2_move, is_store, is_load;
  logic        sb_full, sb_hit, drain;
  logic [31:0] sb_data, drain_addr, drain_data, mem_data;
  logic [31:0] dmem [DMEM_WORDS];

  assign is_store = s2.u.valid && s2.u.exe == OP_SW;
  assign is_load  = s2.u.valid && s2.u.exe == OP_LW;
  assign s2_move  = !s2.u.valid || (is_store ? !sb_full : wb_grant);
  assign accept   = s2_move;
  assign sb_full_stall = is_store && sb_full;
  assign sb_forward    = is_load && sb_hit;

  store_buffer #(.DEPTH(SB_SIZE)) u_sb (
    .clk, .rst_n, .restore,
    .push(is_store && !sb_full), .push_addr(s2.addr), .push_data(s2.u.op2),
    .commit_n(sb_commit_n), .drain_ok(!s2.u.valid || sb_full_stall), .drain, .drain_addr, .drain_data,
    .lookup_addr(s2.addr), .lookup_hit(sb_hit), .lookup_data(sb_data),
    .full(sb_full), .count(sb_count));

  assign mem_data = dmem[s2.addr[AW+1:2]];
  assign dbg_data = dmem[dbg_addr[AW+1:2]];

  always_comb begin
    wb       = '0;
    wb.valid = s2.u.valid;
    wb.wb    = is_load;
    wb.reo   = s2.u.reo;
    wb.dest  = s2.u.dest;
    wb.data  = sb_hit ? sb_data : mem_data;
    upd       = '0;
    upd.valid = is_store && !sb_full;
    upd.reo   = s2.u.reo;
  end

  always_ff @(posedge clk) begin
    if (drain) dmem[drain_addr[AW+1:2]] <= drain_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || restore) begin
      s2 <= '0;
    end else if (s2_move) begin
      s2.u    <= iss;
      s2.addr <= iss.op1 + iss.imm;
    end
  end
endmodule
