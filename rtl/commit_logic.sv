// commit_logic: the two commit stages and the restore sequence.
//
// Commit-1 (combinational on the four ROB head entries): an entry is complete
// when, for a register-write instruction, the Valid bit of its pseudo-pointer
// is set, and otherwise when its ROB C bit is set. NC is the number of
// consecutive complete entries from the head, with at most one branch or jump
// per group (the BPB has one write port). When a committing branch is marked
// mispredicted, nothing after its delay slot may commit: if the delay slot is
// in the same group and complete it commits with the branch, otherwise the
// next groups wait for it alone. The Commit Counter advances by NC.
//
// Commit-2 (one cycle later, from registers): CP is written with the new
// pointers; the pointers CP held before ("old pseudo-pointers", taking a
// younger writer of the same register inside the group into account) are
// de-allocated and de-committed; the new pointers get their Commit bits;
// committed stores and HILO writers are reported to the store and HILO
// buffers; a committing branch writes its prediction bits to the BPB and, if
// taken, its target to the BTB.
//
// Restore: the cycle after Commit-2 has handled a mispredicted branch (and its
// delay slot), `restore` is high for exactly one cycle with `restore_pc`, the
// correct next fetch address. During it CP is copied into IP, the Commit bits
// into the Allocate and Valid bits, the ROB is emptied and the pipeline is
// flushed. Commit-1 is idle from the moment the restore is decided until the
// restore cycle is over.
module commit_logic
  import rr_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  rob_entry_t [FW-1:0]     head,
  input  logic [FW-1:0]           head_ok,
  input  logic [NPREG-1:0]        valid_bits,
  output logic [2:0]              nc,
  // Commit-2 outputs
  output logic [FW-1:0]           cp_we,
  output logic [FW-1:0][4:0]      cp_addr,      // write and old-pointer read address
  output logic [FW-1:0][PW-1:0]   cp_wdata,
  input  logic [FW-1:0][PW-1:0]   cp_rdata,
  output logic [FW-1:0]           dealloc_en,
  output logic [FW-1:0][PW-1:0]   dealloc_ptr,
  output logic [2:0]              sb_commit_n,
  output logic [2:0]              hilo_commit_n,
  output logic                    btb_we,
  output logic [31:0]             btb_waddr,
  output logic [31:0]             btb_wtarget,
  output logic                    bpb_we,
  output logic [31:0]             bpb_waddr,
  output logic [1:0]              bpb_wbits,
  output logic                    restore,
  output logic [31:0]             restore_pc,
  output logic                    branch_commit,
  output logic                    mispredict_commit
);
  typedef struct packed {
    logic [FW-1:0]         v;
    logic [FW-1:0]         regw;
    logic [FW-1:0][4:0]    ldest;
    logic [FW-1:0][PW-1:0] ptr;
    logic [2:0]            nstore;
    logic [2:0]            nhilo;
    logic                  br;
    logic                  br_taken;
    logic                  br_mis;
    logic [31:0]           br_ba;
    logic [31:0]           br_bta;
    logic [1:0]            br_pred;
    logic                  restore_req;
  } c2_t;

  c2_t         c2, c2_n;
  logic        await_ds, await_ds_n;   // mispredicted branch committed, delay slot pending
  logic [31:0] mis_pc, mis_pc_n;
  logic        blocked;
  logic [FW-1:0] ok;

  assign blocked = c2.restore_req || restore;

  always_comb begin
    logic stop, nbr;
    for (int k = 0; k < FW; k++)
      ok[k] = head_ok[k] && ((head[k].code == RC_REGW) ? valid_bits[head[k].ptr] : head[k].c);
    nc         = '0;
    stop       = blocked;
    nbr        = 1'b0;
    await_ds_n = await_ds;
    mis_pc_n   = mis_pc;
    c2_n       = '0;
    for (int k = 0; k < FW; k++) begin
      if (!stop) begin
        if (!ok[k]) begin
          stop = 1'b1;
        end else if (await_ds) begin
          // the delay slot of a committed mispredicted branch
          nc = nc + 3'd1;
          c2_n.v[k] = 1'b1;
          c2_n.restore_req = 1'b1;
          await_ds_n = 1'b0;
          stop = 1'b1;
        end else if (head[k].code == RC_BRANCH || head[k].code == RC_LINK) begin
          if (nbr) begin
            stop = 1'b1;
          end else begin
            nbr = 1'b1;
            nc = nc + 3'd1;
            c2_n.v[k]     = 1'b1;
            c2_n.br       = 1'b1;
            c2_n.br_taken = head[k].taken;
            c2_n.br_mis   = head[k].m;
            c2_n.br_ba    = head[k].ba;
            c2_n.br_bta   = head[k].bta;
            c2_n.br_pred  = head[k].pred;
            if (head[k].m) begin
              mis_pc_n = head[k].bta;
              stop = 1'b1;
              if (!head[k].ds) begin
                c2_n.restore_req = 1'b1;
              end else if (k < FW - 1 && ok[k+1]) begin
                nc = nc + 3'd1;
                c2_n.v[k+1] = 1'b1;
                c2_n.restore_req = 1'b1;
              end else begin
                await_ds_n = 1'b1;
              end
            end
          end
        end else begin
          nc = nc + 3'd1;
          c2_n.v[k] = 1'b1;
        end
      end
    end
    for (int k = 0; k < FW; k++) begin
      c2_n.regw[k]  = c2_n.v[k] && (head[k].code == RC_REGW || head[k].code == RC_LINK)
                      && head[k].ldest != 5'd0;
      c2_n.ldest[k] = head[k].ldest;
      c2_n.ptr[k]   = head[k].ptr;
      if (c2_n.v[k] && head[k].code == RC_STORE)  c2_n.nstore = c2_n.nstore + 3'd1;
      if (c2_n.v[k] && head[k].code == RC_NONREG) c2_n.nhilo  = c2_n.nhilo + 3'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c2       <= '0;
      await_ds <= 1'b0;
      mis_pc   <= '0;
      restore  <= 1'b0;
      restore_pc <= '0;
    end else begin
      c2       <= restore ? '0 : c2_n;
      await_ds <= restore ? 1'b0 : await_ds_n;
      mis_pc   <= mis_pc_n;
      restore  <= c2.restore_req;
      if (c2.restore_req) restore_pc <= mis_pc;
    end
  end

  // Commit-2
  always_comb begin
    for (int k = 0; k < FW; k++) begin
      logic [PW-1:0] old;
      cp_we[k]    = c2.regw[k];
      cp_addr[k]  = c2.ldest[k];
      cp_wdata[k] = c2.ptr[k];
      old = cp_rdata[k];
      for (int j = 0; j < k; j++)
        if (c2.regw[j] && c2.ldest[j] == c2.ldest[k]) old = c2.ptr[j];
      dealloc_en[k]  = c2.regw[k] && old != '0;
      dealloc_ptr[k] = old;
    end
  end

  assign sb_commit_n       = c2.nstore;
  assign hilo_commit_n     = c2.nhilo;
  assign bpb_we            = c2.br;
  assign bpb_waddr         = c2.br_ba;
  assign bpb_wbits         = c2.br_pred;
  assign btb_we            = c2.br && c2.br_taken;
  assign btb_waddr         = c2.br_ba;
  assign btb_wtarget       = c2.br_bta;
  assign branch_commit     = c2.br;
  assign mispredict_commit = c2.br && c2.br_mis;
endmodule
