// rob: the reorder buffer, a 64-entry circular FIFO that keeps every
// instruction (NOPs excepted) in program order until it commits.
//
// Issue side: the Issue Counter (IC) points at the tail. When a renamed group
// leaves decode/issue, its alloc_n instructions are written at IC..IC+n-1 and
// IC advances by n. The four states of the described IC state machine are
// the four branches of the IC update below rather than a separate state
// register: RESET (IC = 0), RESTORE (IC = CC, which cancels everything not
// committed), STALL (the group does not fit; IC holds and `stall` tells
// decode/issue to wait) and INCR (IC += n).
// Completion side: three write buses (B_Bus from the branch unit, M_Bus from
// the multiply/divide unit, L_Bus from the load/store unit) set C, and for
// branches also M (mispredicted), taken, BTA and the new prediction bits, at
// the entry named by `reo`.
// Commit side: the Commit Counter (CC) points at the head; the four entries
// from CC are presented every cycle (with `head_ok` telling which are
// occupied) and CC advances by commit_n. Restore clears every valid bit.
// Writes occur at the clock edge; reads are combinational. An occupancy count
// is kept beside the 6-bit counters to tell a full buffer from an empty one.
module rob
  import rr_pkg::*;
#(
  parameter int DEPTH = ROB_DEPTH
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   restore,
  // issue
  input  logic [2:0]             req_n,        // instructions the waiting group needs
  input  logic                   alloc_go,     // group advances: write it
  input  rob_entry_t [FW-1:0]    alloc_entry,  // compressed: entry k goes to IC+k
  output logic [RW-1:0]          ic,
  output logic                   stall,
  // completion buses
  input  robupd_t [2:0]          upd,
  // commit
  output rob_entry_t [FW-1:0]    head,
  output logic [FW-1:0]          head_ok,
  input  logic [2:0]             commit_n,
  output logic [RW-1:0]          cc,
  output logic [RW:0]            count
);
  rob_entry_t mem [DEPTH];

  assign stall = (RW+1)'(req_n) > (RW+1)'(DEPTH) - count;

  always_comb begin
    for (int k = 0; k < FW; k++) begin
      head[k]    = mem[RW'(cc + RW'(k))];
      head_ok[k] = (RW+1)'(k) < count && head[k].v;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ic    <= '0;
      cc    <= '0;
      count <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i].v <= 1'b0;
    end else if (restore) begin
      ic    <= cc;
      count <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i].v <= 1'b0;
    end else begin
      logic [2:0] n;
      n = (alloc_go && !stall) ? req_n : 3'd0;
      for (int k = 0; k < FW; k++)
        if (3'(k) < n) mem[RW'(ic + RW'(k))] <= alloc_entry[k];
      for (int b = 0; b < 3; b++)
        if (upd[b].valid) begin
          mem[upd[b].reo].c     <= 1'b1;
          mem[upd[b].reo].m     <= upd[b].mispred;
          mem[upd[b].reo].taken <= upd[b].taken;
          mem[upd[b].reo].bta   <= upd[b].target;
          mem[upd[b].reo].pred  <= upd[b].pred;
        end
      for (int k = 0; k < FW; k++)
        if (3'(k) < commit_n) mem[RW'(cc + RW'(k))].v <= 1'b0;
      ic    <= ic + RW'(n);
      cc    <= cc + RW'(commit_n);
      count <= count + (RW+1)'(n) - (RW+1)'(commit_n);
    end
  end
endmodule
