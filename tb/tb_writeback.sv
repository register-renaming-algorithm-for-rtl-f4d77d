// tb_writeback: self-checking test of CDB arbitration.
//
// Random sets of unit results (some needing a CDB, some not) with random
// ROB positions and a random Commit Counter are applied. The test checks
// that results without a register write are always granted, that the CDBs
// carry the oldest (smallest distance from the Commit Counter) requesters
// in order, that exactly min(requests, 2) of them are granted, and that
// `contention` is raised exactly when a requester lost. Two CDBs and
// oldest-first priority follow the description; granting non-writing
// results without a bus is this design's choice.
module tb_writeback;
  import rr_pkg::*;
  wbreq_t [NUM_RS-1:0] req;
  logic [RW-1:0]       cc;
  logic [NUM_RS-1:0]   grant;
  cdb_t [NUM_CDB-1:0]  cdb;
  logic                contention;
  int checks = 0, failures = 0, n_cont = 0;

  writeback dut (.req, .cc, .grant, .cdb, .contention);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int order [$];
      int nreq;
      logic [RW-1:0] base;
      cc   = RW'($urandom);
      base = RW'($urandom);
      // distinct ROB positions, as in the core
      for (int r = 0; r < NUM_RS; r++) begin
        req[r].valid = ($urandom % 4) != 0;
        req[r].wb    = ($urandom % 4) != 0;
        req[r].reo   = RW'(base + RW'(r * 7 + ($urandom % 7)));
        req[r].dest  = PW'($urandom);
        req[r].data  = $urandom;
      end
      #1;
      nreq = 0;
      order.delete();
      for (int r = 0; r < NUM_RS; r++) if (req[r].valid && req[r].wb) begin order.push_back(r); nreq++; end
      // oldest first: repeatedly take the oldest requester not yet taken
      begin
        int sorted [$];
        logic [NUM_RS-1:0] taken;
        taken = '0;
        sorted.delete();
        for (int k = 0; k < nreq; k++) begin
          int best;
          best = -1;
          foreach (order[i])
            if (!taken[order[i]] && (best < 0 || age(cc, req[order[i]].reo) < age(cc, req[best].reo)))
              best = order[i];
          taken[best] = 1'b1;
          sorted.push_back(best);
        end
        order = sorted;
      end
      for (int b = 0; b < NUM_CDB; b++) begin
        check($sformatf("cdb%0d.valid", b), int'(cdb[b].valid), int'(b < nreq));
        if (b < nreq) begin
          check($sformatf("cdb%0d.dest", b), int'(cdb[b].dest), int'(req[order[b]].dest));
          check($sformatf("cdb%0d.data", b), int'(cdb[b].data == req[order[b]].data), 1);
        end
      end
      for (int r = 0; r < NUM_RS; r++) begin
        logic g;
        g = req[r].valid && (!req[r].wb || (nreq > 0 && r == order[0]) || (nreq > 1 && r == order[1]));
        check($sformatf("grant[%0d]", r), int'(grant[r]), int'(g));
      end
      check("contention", int'(contention), int'(nreq > NUM_CDB));
      n_cont += int'(nreq > NUM_CDB);
    end
    check("contention seen", int'(n_cont > 50), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
