// tb_reservation_station: self-checking test of a four-entry reservation
// station, in both variants: out-of-order issue (ALU and branch stations)
// and in-order issue (load/store and multiply/divide stations).
//
// Random micro-ops, some waiting on pseudo-pointers, are loaded while the
// stations have room; random CDB broadcasts wake them up; the unit accepts
// at random. A reference model of each station's entries predicts, per
// clock edge, which micro-op issues: the oldest ready one (distance of its
// ROB position from the Commit Counter), or for the in-order station the
// oldest one only if it is ready; with an empty station a ready micro-op
// goes straight to the unit (bypass). The issued micro-op, its captured
// operand values and the `has_free`/`nbusy` outputs are compared every
// cycle, and every loaded micro-op must issue exactly once. The oldest-first
// selection and the bypass follow the description; in-order issue for the
// load/store and multiply/divide stations is this design's choice.
module tb_reservation_station;
  import rr_pkg::*;
  localparam int E = RS_ENTRIES;
  logic                clk = 1'b0, rst_n = 1'b0;
  logic                restore, load, accept;
  uop_t                uop_in;
  cdb_t [NUM_CDB-1:0]  cdb;
  logic [RW-1:0]       cc;
  logic [1:0]          has_free, bypass;
  uop_t [1:0]          iss;
  logic [1:0][2:0]     nbusy;
  uop_t                m [2][$];
  uop_t                exp_iss [2];
  int checks = 0, failures = 0, loaded = 0, issued [2], n_byp = 0, n_ooo = 0;
  logic [RW-1:0]       next_reo;

  for (genvar g = 0; g < 2; g++) begin : g_dut
    reservation_station #(.ENTRIES(E), .IN_ORDER(g == 1)) dut (
      .clk, .rst_n, .restore, .load, .uop_in, .cdb, .cc, .accept,
      .has_free(has_free[g]), .iss(iss[g]), .bypass(bypass[g]), .nbusy(nbusy[g]));
  end

  always #5 clk = ~clk;

  function automatic logic [31:0] val_of(input logic [PW-1:0] t);
    return {26'h2a5_5a5, t} ^ 32'h1234_0000;
  endfunction

  function automatic uop_t snoop(input uop_t x);
    uop_t r;
    r = x;
    for (int k = 0; k < NUM_CDB; k++) if (cdb[k].valid) begin
      if (!r.v1 && r.op1[PW-1:0] == cdb[k].dest) begin r.v1 = 1'b1; r.op1 = cdb[k].data; end
      if (!r.v2 && r.op2[PW-1:0] == cdb[k].dest) begin r.v2 = 1'b1; r.op2 = cdb[k].data; end
    end
    return r;
  endfunction

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
    restore = 1'b0; load = 1'b0; accept = 1'b0; uop_in = '0; cdb = '0; cc = '0;
    next_reo = '0; issued[0] = 0; issued[1] = 0;
    exp_iss[0] = '0; exp_iss[1] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      // compare last edge's result
      for (int g = 0; g < 2; g++) begin
        check($sformatf("iss%0d.valid", g), int'(iss[g].valid), int'(exp_iss[g].valid));
        if (exp_iss[g].valid) begin
          check($sformatf("iss%0d.reo", g), int'(iss[g].reo), int'(exp_iss[g].reo));
          check($sformatf("iss%0d.ops", g), int'(iss[g].op1 == exp_iss[g].op1 && iss[g].op2 == exp_iss[g].op2), 1);
        end
        check($sformatf("nbusy%0d", g), int'(nbusy[g]), m[g].size());
        check($sformatf("has_free%0d", g), int'(has_free[g]), int'(m[g].size() < E));
      end
      // Commit Counter: oldest ROB position still in a station or issued
      cc = next_reo;
      for (int g = 0; g < 2; g++) foreach (m[g][i]) if (age(next_reo - 6'd40, m[g][i].reo) < age(next_reo - 6'd40, cc)) cc = m[g][i].reo;
      // stimulus
      restore = ($urandom % 200) == 0;
      accept  = ($urandom % 4) != 0;
      load    = has_free[0] && has_free[1] && ($urandom % 3 != 0);
      uop_in  = '0;
      uop_in.valid = 1'b1;
      uop_in.fu    = FU_ALU;
      uop_in.reo   = next_reo;
      uop_in.v1    = ($urandom % 3) != 0;
      uop_in.v2    = ($urandom % 3) != 0;
      uop_in.op1   = uop_in.v1 ? $urandom : 32'(1 + $urandom % 12);
      uop_in.op2   = uop_in.v2 ? $urandom : 32'(1 + $urandom % 12);
      for (int k = 0; k < NUM_CDB; k++) begin
        cdb[k].valid = 1'($urandom);
        cdb[k].dest  = PW'(1 + k * 6 + $urandom % 6);
        cdb[k].data  = val_of(cdb[k].dest);
      end
      #1;
      for (int g = 0; g < 2; g++) begin
        int sel;
        logic byp;
        if (restore) begin
          m[g].delete();
          exp_iss[g] = '0;
          continue;
        end
        sel = -1;
        foreach (m[g][i]) begin
          logic rdy;
          rdy = m[g][i].v1 && m[g][i].v2;
          if (g == 1) begin
            if (i == 0 || age(cc, m[g][i].reo) < age(cc, m[g][sel].reo)) sel = i;
          end else if (rdy && (sel < 0 || age(cc, m[g][i].reo) < age(cc, m[g][sel].reo))) sel = i;
        end
        if (g == 1 && sel >= 0 && !(m[g][sel].v1 && m[g][sel].v2)) sel = -1;
        byp = load && m[g].size() == 0 && uop_in.v1 && uop_in.v2 && accept;
        check($sformatf("bypass%0d", g), int'(bypass[g]), int'(byp));
        if (accept) begin
          if (sel >= 0) begin
            if (g == 0 && m[g].size() > 1 && sel != 0) n_ooo++;
            exp_iss[g] = m[g][sel];
            m[g].delete(sel);
            issued[g]++;
          end else if (byp) begin
            exp_iss[g] = uop_in;
            issued[g]++;
            if (g == 0) n_byp++;
          end else exp_iss[g] = '0;
        end
        foreach (m[g][i]) m[g][i] = snoop(m[g][i]);
        if (load && !byp) m[g].push_back(snoop(uop_in));
      end
      if (load) begin loaded++; next_reo++; end
    end
    checks++;
    if (n_byp < 50 || n_ooo < 50 || issued[1] < 500) begin
      failures++;
      $display("FAIL little activity bypass=%0d out-of-order=%0d in-order issued=%0d", n_byp, n_ooo, issued[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
