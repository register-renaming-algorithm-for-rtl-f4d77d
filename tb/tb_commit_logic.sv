// tb_commit_logic: self-checking test of the two commit stages and of the
// restore request.
//
// The test plays a small reorder buffer: a random program of register
// writes, links, stores, HI/LO writers and branches (each branch followed by
// its delay slot, some mispredicted) is presented at the head, entries
// complete at random times (register writes through their VB Valid bit,
// others through C), and the entries Commit-1 accepts are removed. A
// reference CP table answers the old-pointer reads. The test checks that
// only completed entries commit, in order, with at most one branch per
// group; that CP ends up holding the pointer of the last committed writer
// of every register; that every replaced pointer is freed exactly once
// (also when two writers of one register commit together); that store and
// HI/LO commit counts match; that a mispredicted branch commits together
// with or before its delay slot and is followed, after the delay slot, by
// exactly one restore to the correct target, with nothing younger
// committed; and that predictor updates name the committed branch. The
// commit rules follow the description; the registered hand-over between
// the two stages is this design's timing.
module tb_commit_logic;
  import rr_pkg::*;
  logic                  clk = 1'b0, rst_n = 1'b0;
  rob_entry_t [FW-1:0]   head;
  logic [FW-1:0]         head_ok;
  logic [NPREG-1:0]      valid_bits;
  logic [2:0]            nc, sb_commit_n, hilo_commit_n;
  logic [FW-1:0]         cp_we, dealloc_en;
  logic [FW-1:0][4:0]    cp_addr;
  logic [FW-1:0][PW-1:0] cp_wdata, cp_rdata, dealloc_ptr;
  logic                  btb_we, bpb_we, restore, branch_commit, mispredict_commit;
  logic [31:0]           btb_waddr, btb_wtarget, bpb_waddr, restore_pc;
  logic [1:0]            bpb_wbits;

  rob_entry_t prog [$];            // not yet committed, program order
  int         done_at [$];         // cycle at which the entry completes
  logic [PW-1:0] cp [NLREG];       // reference CP
  int  freed [NPREG];
  int  exp_free [NPREG];
  int  cyc = 0, checks = 0, failures = 0;
  int  n_store = 0, n_hilo = 0, got_store = 0, got_hilo = 0, n_restore_exp = 0, n_restore = 0;
  int  n_mis = 0, n_br = 0, n_multi = 0;
  int  restore_wait = -1;
  logic [31:0] restore_target;
  logic [PW-1:0] next_ptr;

  commit_logic dut (.clk, .rst_n, .head, .head_ok, .valid_bits, .nc, .cp_we, .cp_addr, .cp_wdata,
    .cp_rdata, .dealloc_en, .dealloc_ptr, .sb_commit_n, .hilo_commit_n, .btb_we, .btb_waddr,
    .btb_wtarget, .bpb_we, .bpb_waddr, .bpb_wbits, .restore, .restore_pc, .branch_commit,
    .mispredict_commit);

  always #5 clk = ~clk;

  always_comb for (int k = 0; k < FW; k++) cp_rdata[k] = cp[cp_addr[k]];

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d (cycle %0d)", what, got, exp, cyc);
    end
  endtask

  // append n random instructions
  task automatic gen(input int n);
    for (int i = 0; i < n; i++) begin
      rob_entry_t e;
      int r;
      e = '0;
      e.v = 1'b1;
      r = int'($urandom % 10);
      e.ba = 32'h8000_0000 + 32'(4 * ($urandom % 256));
      if (r < 5) begin
        e.code = RC_REGW; e.ldest = 5'(1 + $urandom % 6); e.ptr = next_ptr;
        next_ptr = (next_ptr == PW'(NPREG - 1)) ? PW'(1) : next_ptr + 1;
      end else if (r == 5) e.code = RC_STORE;
      else if (r == 6) e.code = RC_NONREG;
      else begin
        e.code  = (r == 7) ? RC_LINK : RC_BRANCH;
        if (e.code == RC_LINK) begin
          e.ldest = 5'd31; e.ptr = next_ptr;
          next_ptr = (next_ptr == PW'(NPREG - 1)) ? PW'(1) : next_ptr + 1;
        end
        e.ds    = 1'b1;
        e.m     = ($urandom % 4) == 0;
        e.taken = 1'($urandom);
        e.bta   = 32'h8000_1000 + 32'(4 * ($urandom % 256));
        e.pred  = 2'($urandom);
      end
      prog.push_back(e);
      done_at.push_back(cyc + 1 + int'($urandom % 6));
      if (e.code == RC_BRANCH || e.code == RC_LINK) begin
        // delay slot: an ordinary register write
        e = '0; e.v = 1'b1; e.code = RC_REGW; e.ldest = 5'(1 + $urandom % 6); e.ptr = next_ptr;
        next_ptr = (next_ptr == PW'(NPREG - 1)) ? PW'(1) : next_ptr + 1;
        prog.push_back(e);
        done_at.push_back(cyc + 1 + int'($urandom % 6));
      end
    end
  endtask

  initial begin
    #1000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int r = 0; r < NLREG; r++) cp[r] = '0;
    for (int p = 0; p < NPREG; p++) begin freed[p] = 0; exp_free[p] = 0; end
    next_ptr = PW'(1);
    head = '0; head_ok = '0; valid_bits = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    gen(8);
    for (int n = 0; n < 4000; n++) begin
      int nb;
      @(negedge clk);
      cyc++;
      if (prog.size() < 12) gen(8);
      // present the head
      valid_bits = '0;
      for (int k = 0; k < FW; k++) begin
        head_ok[k] = k < prog.size();
        head[k]    = head_ok[k] ? prog[k] : '0;
        if (head_ok[k] && cyc >= done_at[k]) begin
          if (prog[k].code == RC_REGW) valid_bits[prog[k].ptr] = 1'b1;
          else head[k].c = 1'b1;
        end
      end
      #1;
      // Commit-2 outputs of the previous group
      for (int k = 0; k < FW; k++) begin
        if (cp_we[k]) cp[cp_addr[k]] = cp_wdata[k];
        if (dealloc_en[k]) freed[dealloc_ptr[k]]++;
      end
      got_store += int'(sb_commit_n);
      got_hilo  += int'(hilo_commit_n);
      if (bpb_we) n_br++;
      if (restore) begin
        n_restore++;
        check("restore expected", int'(restore_wait >= 0), 1);
        check("restore_pc", int'(restore_pc == restore_target), 1);
        restore_wait = -1;
        // everything younger is flushed; the front end refetches
        prog.delete(); done_at.delete();
        continue;
      end
      // Commit-1
      nb = 0;
      check("nc range", int'(int'(nc) <= prog.size()), 1);
      for (int k = 0; k < int'(nc); k++) begin
        rob_entry_t e;
        e = prog.pop_front();
        void'(done_at.pop_front());
        check("committed entry was complete", int'((e.code == RC_REGW ? valid_bits[e.ptr] : head[k].c)), 1);
        check("nothing after a restore point", int'(restore_wait < 0), 1);
        if (e.code == RC_REGW || e.code == RC_LINK) begin
          // the pointer this write replaces becomes free
          logic [PW-1:0] old;
          old = '0;
          if (e.ldest != 0) begin
            old = exp_cp[e.ldest];
            exp_cp[e.ldest] = e.ptr;
            if (old != '0) exp_free[old]++;
          end
        end
        if (e.code == RC_STORE)  n_store++;
        if (e.code == RC_NONREG) n_hilo++;
        if (e.code == RC_BRANCH || e.code == RC_LINK) begin
          nb++;
          if (e.m) begin
            n_mis++;
            restore_target = e.bta;
            pending_ds = 1;
          end
        end else if (pending_ds) begin
          // the delay slot of a mispredicted branch: restore follows
          pending_ds = 0;
          n_restore_exp++;
          restore_wait = 0;
        end
      end
      if (nc > 1) n_multi++;
      check("one branch per group", int'(nb <= 1), 1);
    end
    // let the last group pass Commit-2
    @(negedge clk); #1;
    for (int k = 0; k < FW; k++) begin
      if (cp_we[k]) cp[cp_addr[k]] = cp_wdata[k];
      if (dealloc_en[k]) freed[dealloc_ptr[k]]++;
    end
    got_store += int'(sb_commit_n);
    got_hilo  += int'(hilo_commit_n);
    for (int r = 1; r < 7; r++) check($sformatf("CP r%0d", r), int'(cp[r]), int'(exp_cp[r]));
    check("CP r31", int'(cp[31]), int'(exp_cp[31]));
    for (int p = 1; p < NPREG; p++) check($sformatf("freed %0d", p), freed[p], exp_free[p]);
    check("store commits", got_store, n_store);
    check("hilo commits", got_hilo, n_hilo);
    check("restores", n_restore, n_restore_exp);
    check("activity", int'(n_mis > 20 && n_multi > 100 && n_br > 100), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [PW-1:0] exp_cp [NLREG];
  int pending_ds = 0;
  initial for (int r = 0; r < NLREG; r++) exp_cp[r] = '0;
endmodule
