// tb_rob: self-checking test of the 64-entry reorder buffer.
//
// Reference model: a queue of entries in program order, plus the Issue and
// Commit Counters. Random cycles request room for 0-4 instructions and
// write them when the group advances, set the completion fields of random
// live entries through the three completion buses, commit up to four
// entries at the head, and now and then restore. The test checks `stall`
// (the group does not fit), IC, CC and the occupancy, and the four head
// entries with their `head_ok` flags, including the completion fields
// written by the buses. It also checks that the buffer was seen full and
// that IC equals CC after a restore. The circular buffer, the counters and
// the three buses follow the description; the occupancy counter is this
// design's.
module tb_rob;
  import rr_pkg::*;
  logic                    clk = 1'b0, rst_n = 1'b0;
  logic                    restore, alloc_go, stall;
  logic [2:0]              req_n, commit_n;
  rob_entry_t [FW-1:0]     alloc_entry, head;
  logic [FW-1:0]           head_ok;
  robupd_t [2:0]           upd;
  logic [RW-1:0]           ic, cc;
  logic [RW:0]             count;
  rob_entry_t              q [$];
  logic [RW-1:0]           mic, mcc;
  int checks = 0, failures = 0, n_stall = 0, n_full = 0, n_restore = 0;

  rob dut (.clk, .rst_n, .restore, .req_n, .alloc_go, .alloc_entry, .ic, .stall, .upd,
           .head, .head_ok, .commit_n, .cc, .count);

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    restore = 1'b0; alloc_go = 1'b0; req_n = '0; commit_n = '0; alloc_entry = '0; upd = '0;
    mic = '0; mcc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      int phase, live;
      logic exp_stall;
      @(negedge clk);
      // slow commits for a while so that the buffer fills
      phase = (n / 500) % 2;
      check("ic", int'(ic), int'(mic));
      check("cc", int'(cc), int'(mcc));
      check("count", int'(count), q.size());
      for (int k = 0; k < FW; k++) begin
        check($sformatf("head_ok%0d", k), int'(head_ok[k]), int'(k < q.size()));
        if (k < q.size())
          check($sformatf("head%0d", k), int'(head[k] == q[k]), 1);
      end
      n_full += int'(q.size() == ROB_DEPTH);
      restore  = ($urandom % 150) == 0;
      req_n    = 3'($urandom % 5);
      alloc_go = ($urandom % 4) != 0;
      for (int k = 0; k < FW; k++) begin
        alloc_entry[k]      = '0;
        alloc_entry[k].v    = 1'b1;
        alloc_entry[k].code = robcode_e'($urandom % 2 ? RC_REGW : RC_BRANCH);
        alloc_entry[k].ldest = 5'($urandom);
        alloc_entry[k].ptr  = PW'($urandom);
        alloc_entry[k].ba   = $urandom;
        alloc_entry[k].pred = 2'($urandom);
      end
      live = q.size();
      commit_n = 3'($urandom % ((live < 4 ? live : 4) + 1));
      if (phase == 1 && $urandom % 4 != 0) commit_n = '0;
      // completion buses: distinct live entries not committing now
      for (int b = 0; b < 3; b++) begin
        int e;
        upd[b] = '0;
        e = int'(commit_n) + b * 21 + int'($urandom % 21);
        if (e < live && $urandom % 2) begin
          upd[b].valid   = 1'b1;
          upd[b].reo     = RW'(mcc + RW'(e));
          upd[b].mispred = 1'($urandom);
          upd[b].taken   = 1'($urandom);
          upd[b].target  = $urandom;
          upd[b].pred    = 2'($urandom);
        end
      end
      #1;
      exp_stall = int'(req_n) > ROB_DEPTH - q.size();
      check("stall", int'(stall), int'(exp_stall));
      n_stall += int'(exp_stall);
      if (restore) begin
        n_restore++;
        q.delete();
        mic = mcc;
      end else begin
        for (int b = 0; b < 3; b++) if (upd[b].valid) begin
          int e;
          e = int'(RW'(upd[b].reo - mcc));
          q[e].c = 1'b1; q[e].m = upd[b].mispred; q[e].taken = upd[b].taken;
          q[e].bta = upd[b].target; q[e].pred = upd[b].pred;
        end
        for (int k = 0; k < int'(commit_n); k++) void'(q.pop_front());
        mcc += RW'(commit_n);
        if (alloc_go && !exp_stall) begin
          for (int k = 0; k < int'(req_n); k++) q.push_back(alloc_entry[k]);
          mic += RW'(req_n);
        end
      end
    end
    checks++;
    if (n_full < 10 || n_stall < 50 || n_restore < 10) begin
      failures++;
      $display("FAIL little activity full=%0d stall=%0d restore=%0d", n_full, n_stall, n_restore);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
