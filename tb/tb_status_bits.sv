// tb_status_bits: self-checking test of the Allocate, Valid and Commit bits
// of the Value Buffer.
//
// A small model of the renaming life cycle drives the block: allocate up to
// four free locations (A=1, V=0, C=0), complete allocated ones through the
// two CDBs (V=1), commit completed ones (C=1) while freeing the location each
// commit replaces (A=0, C=0), and now and then restore (A and V take C).
// The expected bit vectors are kept here and compared every cycle; location
// 0 must stay 1 in all three vectors. The three bits and the restore copy
// follow the description; the order of same-cycle updates (free after
// commit) is this design's.
module tb_status_bits;
  import rr_pkg::*;
  logic                  clk = 1'b0, rst_n = 1'b0;
  logic [FW-1:0]         alloc_en, commit_en, dealloc_en;
  logic [FW-1:0][PW-1:0] alloc_ptr, commit_ptr, dealloc_ptr;
  cdb_t [NUM_CDB-1:0]    cdb;
  logic                  restore;
  logic [NPREG-1:0]      alloc_bits, valid_bits, commit_bits;
  logic [NPREG-1:0]      ma, mv, mc;
  int checks = 0, failures = 0, n_restore = 0, n_alloc = 0, n_commit = 0;

  status_bits dut (.clk, .rst_n, .alloc_en, .alloc_ptr, .cdb, .commit_en, .commit_ptr,
    .dealloc_en, .dealloc_ptr, .restore, .alloc_bits, .valid_bits, .commit_bits);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [NPREG-1:0] got, input logic [NPREG-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    alloc_en = '0; commit_en = '0; dealloc_en = '0; alloc_ptr = '0; commit_ptr = '0;
    dealloc_ptr = '0; cdb = '0; restore = 1'b0;
    ma = NPREG'(1); mv = NPREG'(1); mc = NPREG'(1);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      logic [NPREG-1:0] used;
      @(negedge clk);
      check("alloc", alloc_bits, ma);
      check("valid", valid_bits, mv);
      check("commit", commit_bits, mc);
      alloc_en = '0; commit_en = '0; dealloc_en = '0; cdb = '0;
      restore = ($urandom % 60) == 0;
      used = '0;
      // allocate free locations
      for (int i = 0; i < FW; i++) begin
        int p;
        p = int'($urandom % NPREG);
        if (!ma[p] && !used[p] && $urandom % 2) begin
          alloc_en[i] = 1'b1; alloc_ptr[i] = PW'(p); used[p] = 1'b1;
        end
      end
      // complete allocated, not yet valid locations
      for (int k = 0; k < NUM_CDB; k++) begin
        int p;
        p = int'($urandom % NPREG);
        if (ma[p] && !mv[p] && !used[p]) begin
          cdb[k].valid = 1'b1; cdb[k].dest = PW'(p); cdb[k].data = $urandom; used[p] = 1'b1;
        end
      end
      // commit valid locations, freeing another allocated committed location
      for (int i = 0; i < FW; i++) begin
        int p, q;
        p = int'($urandom % NPREG);
        q = int'($urandom % NPREG);
        if (ma[p] && mv[p] && !mc[p] && !used[p] && p != 0) begin
          commit_en[i] = 1'b1; commit_ptr[i] = PW'(p); used[p] = 1'b1;
          if (mc[q] && q != 0 && !used[q]) begin
            dealloc_en[i] = 1'b1; dealloc_ptr[i] = PW'(q); used[q] = 1'b1;
          end
        end
      end
      if (restore) begin
        n_restore++;
        ma = mc; mv = mc;
      end else begin
        for (int i = 0; i < FW; i++) if (alloc_en[i]) begin
          ma[alloc_ptr[i]] = 1'b1; mv[alloc_ptr[i]] = 1'b0; mc[alloc_ptr[i]] = 1'b0; n_alloc++;
        end
        for (int k = 0; k < NUM_CDB; k++) if (cdb[k].valid) mv[cdb[k].dest] = 1'b1;
        for (int i = 0; i < FW; i++) if (commit_en[i]) begin mc[commit_ptr[i]] = 1'b1; n_commit++; end
        for (int i = 0; i < FW; i++) if (dealloc_en[i]) begin ma[dealloc_ptr[i]] = 1'b0; mc[dealloc_ptr[i]] = 1'b0; end
      end
      ma[0] = 1'b1; mv[0] = 1'b1; mc[0] = 1'b1;
    end
    checks++;
    if (n_restore < 10 || n_alloc < 300 || n_commit < 100) begin
      failures++;
      $display("FAIL too little activity: %0d restores %0d allocs %0d commits", n_restore, n_alloc, n_commit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
