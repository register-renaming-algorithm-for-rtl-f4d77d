// tb_dispatch: self-checking test of the Dispatch stage.
//
// Random renamed groups (a random mix of ALU, branch, load/store and
// multiply/divide instructions, some slots empty, sources that may or may
// not be ready) are offered; the reservation stations report free room at
// random; Valid bits and CDB broadcasts are random, and the VB read data is
// a known function of the location. The test checks that every instruction
// of an accepted group reaches exactly one station of its unit (either ALU
// station for ALU instructions), never a full station, at most one per
// station per cycle and in program order per station; that each operand is
// either the VB value (when Valid or broadcast now) or the waiting
// pointer; that `stall` is high exactly while part of the group is left;
// and that a new group is taken only when the previous one is done. The
// one-write-port-per-station rule and the stall-until-done behaviour follow
// the description; the ALU0-first choice is this design's.
module tb_dispatch;
  import rr_pkg::*;
  logic                    clk = 1'b0, rst_n = 1'b0;
  logic                    restore, load, stall;
  rr_t [FW-1:0]            rr_in;
  logic [2*FW-1:0][PW-1:0] vb_raddr;
  logic [2*FW-1:0][31:0]   vb_rdata;
  logic [NPREG-1:0]        valid_bits;
  cdb_t [NUM_CDB-1:0]      cdb;
  logic [NUM_RS-1:0]       rs_free, rs_load;
  uop_t [NUM_RS-1:0]       rs_uop;
  int  pend [$];                  // ROB positions of the held group still to dispatch
  rr_t held [FW];
  int  last_seq [NUM_RS];
  logic [RW-1:0] held_base;
  int  held_grp = 0;
  logic [RW-1:0] next_reo;
  int checks = 0, failures = 0, n_grp = 0, n_disp = 0, n_stall = 0, n_wait = 0;

  dispatch dut (.clk, .rst_n, .restore, .load, .rr_in, .vb_raddr, .vb_rdata, .valid_bits, .cdb,
                .rs_free, .rs_load, .rs_uop, .stall);

  always #5 clk = ~clk;

  function automatic logic [31:0] vb_val(input logic [PW-1:0] p);
    return 32'hbeef_0000 | 32'(p);
  endfunction
  always_comb for (int i = 0; i < 2*FW; i++) vb_rdata[i] = vb_val(vb_raddr[i]);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic logic avail(input logic [PW-1:0] p);
    logic r;
    r = valid_bits[p];
    for (int k = 0; k < NUM_CDB; k++) if (cdb[k].valid && cdb[k].dest == p) r = 1'b1;
    return r;
  endfunction

  initial begin
    #1000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    fu_e units [4] = '{FU_ALU, FU_BJU, FU_LSU, FU_MDU};
    restore = 1'b0; load = 1'b0; rr_in = '0; valid_bits = '0; cdb = '0; rs_free = '0;
    next_reo = '0;
    for (int r = 0; r < NUM_RS; r++) last_seq[r] = -1;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      // new offered group
      load = ($urandom % 4) != 0;
      for (int i = 0; i < FW; i++) begin
        rr_in[i] = '0;
        if ($urandom % 6 != 0) begin
          rr_in[i].u.valid = 1'b1;
          rr_in[i].u.fu    = ($urandom % 2) ? FU_ALU : units[$urandom % 4];
          rr_in[i].u.reo   = next_reo + RW'(i);
          rr_in[i].need1   = 1'($urandom);
          rr_in[i].need2   = 1'($urandom);
          rr_in[i].p1      = PW'($urandom);
          rr_in[i].p2      = PW'($urandom);
          rr_in[i].u.v1    = !rr_in[i].need1;
          rr_in[i].u.v2    = !rr_in[i].need2;
          rr_in[i].u.op2   = rr_in[i].need2 ? 32'd0 : 32'h77;
        end else rr_in[i].disp = 1'b1;
      end
      valid_bits = {$urandom, $urandom};
      for (int k = 0; k < NUM_CDB; k++) begin
        cdb[k].valid = 1'($urandom); cdb[k].dest = PW'($urandom); cdb[k].data = vb_val(cdb[k].dest);
      end
      rs_free = NUM_RS'($urandom) | NUM_RS'($urandom);
      #1;
      // what goes out this cycle
      for (int r = 0; r < NUM_RS; r++) if (rs_load[r]) begin
        int idx;
        idx = -1;
        check($sformatf("load into full station %0d", r), int'(rs_free[r]), 1);
        foreach (pend[j]) if (pend[j] == int'(rs_uop[r].reo)) idx = j;
        check("dispatched instruction is pending", int'(idx >= 0), 1);
        if (idx < 0) continue;
        begin
          rr_t h;
          int unit_ok;
          h = held[int'(RW'(rs_uop[r].reo - held_base))];
          unit_ok = (h.u.fu == FU_ALU) ? int'(r == RS_ALU0 || r == RS_ALU1) :
                    (h.u.fu == FU_BJU) ? int'(r == RS_BJU) : (h.u.fu == FU_LSU) ? int'(r == RS_LSU) : int'(r == RS_MDU);
          check("right station", unit_ok, 1);
          if (r >= RS_BJU) begin
            int seq;
            seq = held_grp * FW + int'(RW'(rs_uop[r].reo - held_base));
            check("program order per station", int'(seq > last_seq[r]), 1);
            last_seq[r] = seq;
          end
          if (h.need1) begin
            check("v1", int'(rs_uop[r].v1), int'(avail(h.p1)));
            check("op1", int'(rs_uop[r].op1 == (avail(h.p1) ? vb_val(h.p1) : 32'(h.p1))), 1);
          end
          if (h.need2) begin
            check("v2", int'(rs_uop[r].v2), int'(avail(h.p2)));
            check("op2", int'(rs_uop[r].op2 == (avail(h.p2) ? vb_val(h.p2) : 32'(h.p2))), 1);
          end else check("op2 immediate kept", int'(rs_uop[r].op2), 32'h77);
        end
        pend.delete(idx);
        n_disp++;
      end
      check("stall", int'(stall), int'(pend.size() != 0));
      n_stall += int'(stall);
      if (!stall && load) begin
        // the offered group is taken at this edge
        n_grp++;
        held_grp  = n_grp;
        held_base = next_reo;
        for (int i = 0; i < FW; i++) begin
          held[i] = rr_in[i];
          if (rr_in[i].u.valid) pend.push_back(int'(rr_in[i].u.reo));
        end
        next_reo += RW'(FW);
      end
    end
    check("activity", int'(n_grp > 500 && n_disp > 2000 && n_stall > 500), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
