// tb_issue_stage: self-checking test of decode/issue (renaming).
//
// Random four-slot fetch groups are built from register-writing ALU
// instructions, loads, stores, branches and NOPs over a few registers, with
// random cancelled slots, a random IP table and random Allocate bits
// (sometimes with fewer than four free locations). A sequential reference
// renames the group one instruction at a time: each source reads the
// current mapping, each destination takes the next lowest free VB location,
// then the mapping is updated. The test compares the source pointers, the
// destinations, the ROB positions and ROB entries (code, logical
// destination, pointer, delay-slot flag), the number of ROB entries
// requested, the VB-full stall, the advance/hold handshake, and the IP table
// that results from applying the stage's IP writes. Renaming with IP,
// prioritizer, SOW and DOW follows the description; dropping NOPs before
// the ROB is this design's choice.
module tb_issue_stage;
  import rr_pkg::*;
  import mips_asm_pkg::*;
  fgroup_t                 fq;
  logic                    disp_hold, restore, rob_stall;
  logic [2*FW-1:0][4:0]    ip_raddr;
  logic [2*FW-1:0][PW-1:0] ip_rdata;
  logic [FW-1:0]           ip_we, alloc_en;
  logic [FW-1:0][4:0]      ip_waddr;
  logic [FW-1:0][PW-1:0]   ip_wdata, alloc_ptr;
  logic [NPREG-1:0]        alloc_bits;
  logic [RW-1:0]           ic;
  logic [2:0]              rob_req_n;
  rob_entry_t [FW-1:0]     rob_entry;
  logic                    advance, fetch_hold, vr_stall, sow_hit, dow_hit;
  rr_t [FW-1:0]            rr;
  logic [PW-1:0]           ip [NLREG];
  int checks = 0, failures = 0, n_vr = 0, n_adv = 0, n_sow = 0, n_dow = 0;

  issue_stage dut (.fq, .disp_hold, .restore, .ip_raddr, .ip_rdata, .ip_we, .ip_waddr, .ip_wdata,
    .alloc_bits, .alloc_en, .alloc_ptr, .ic, .rob_stall, .rob_req_n, .rob_entry, .advance, .rr,
    .fetch_hold, .vr_stall, .sow_hit, .dow_hit);

  always_comb for (int i = 0; i < 2*FW; i++) ip_rdata[i] = ip[ip_raddr[i]];

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic logic [31:0] rnd_instr(output int kind);
    int a, b, c;
    a = int'($urandom % 6); b = int'($urandom % 6); c = int'($urandom % 6);
    kind = int'($urandom % 8);
    case (kind)
      0, 1, 2: return addu(a, b, c);
      3:       return addiu(a, b, 5);
      4:       return lw(a, 8, b);
      5:       return sw(a, 8, b);
      6:       return bne(a, b, 4);
      default: return 32'd0;
    endcase
  endfunction

  initial begin
    #1000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [PW-1:0] map [NLREG];
      logic [PW-1:0] freel [$];
      int nv, nw, kinds [FW];
      logic exp_vr, exp_adv;
      fq = '0;
      fq.valid = ($urandom % 8) != 0;
      for (int i = 0; i < FW; i++) begin
        fq.slot[i].valid = ($urandom % 6) != 0;
        fq.slot[i].instr = rnd_instr(kinds[i]);
        fq.slot[i].pc    = 32'h8000_0400 + 32'(4 * i);
      end
      ip[0] = '0;
      for (int r = 1; r < NLREG; r++) ip[r] = PW'($urandom);
      alloc_bits = (n % 5 == 0) ? ~(NPREG'(1) << ($urandom % 64) | NPREG'(1) << ($urandom % 64)) : {$urandom, $urandom};
      alloc_bits[0] = 1'b1;
      ic        = RW'($urandom);
      disp_hold = ($urandom % 5) == 0;
      rob_stall = ($urandom % 7) == 0;
      restore   = ($urandom % 20) == 0;
      #1;
      for (int r = 0; r < NLREG; r++) map[r] = ip[r];
      freel.delete();
      for (int p = 0; p < NPREG; p++) if (!alloc_bits[p]) freel.push_back(PW'(p));
      nv = 0; nw = 0;
      for (int i = 0; i < FW; i++) begin
        logic v, w;
        logic [31:0] ins;
        int rs, rt, rdst;
        ins = fq.slot[i].instr;
        rs = int'(ins[25:21]); rt = int'(ins[20:16]);
        v  = fq.valid && fq.slot[i].valid && ins != 0;
        rdst = (kinds[i] <= 2) ? int'(ins[15:11]) : rt;
        w  = v && kinds[i] <= 4 && rdst != 0;
        if (v && kinds[i] <= 4 && rdst == 0) v = 1'b0;   // write to R0: dropped
        check($sformatf("slot %0d valid", i), int'(rr[i].u.valid), int'(v));
        if (!v) continue;
        check($sformatf("slot %0d reo", i), int'(rr[i].u.reo), int'(RW'(ic + RW'(nv))));
        check($sformatf("slot %0d p1", i), int'(rr[i].p1), int'(map[rs]));
        if (kinds[i] <= 2 || kinds[i] >= 5) check($sformatf("slot %0d p2", i), int'(rr[i].p2), int'(map[rt]));
        check($sformatf("rob %0d code", nv), int'(rob_entry[nv].code),
              int'(kinds[i] == 5 ? RC_STORE : kinds[i] == 6 ? RC_BRANCH : RC_REGW));
        if (w && nw < freel.size()) begin
          check($sformatf("slot %0d dest", i), int'(rr[i].u.dest), int'(freel[nw]));
          check($sformatf("rob %0d ptr", nv), int'(rob_entry[nv].ptr), int'(freel[nw]));
          check($sformatf("rob %0d ldest", nv), int'(rob_entry[nv].ldest), rdst);
          map[rdst] = freel[nw];
        end else if (w) map[rdst] = '0;   // no free location: the group stalls anyway
        if (kinds[i] == 6)
          check($sformatf("rob %0d ds", nv), int'(rob_entry[nv].ds),
                int'(i < FW - 1 && fq.slot[i+1].valid && fq.slot[i+1].instr != 0 &&
                     !(kinds[i+1] <= 4 && ((kinds[i+1] <= 2) ? fq.slot[i+1].instr[15:11] : fq.slot[i+1].instr[20:16]) == 0)));
        nv++;
        if (w) nw++;
      end
      exp_vr  = fq.valid && nw > freel.size();
      exp_adv = fq.valid && !disp_hold && !exp_vr && !rob_stall && !restore;
      check("rob_req_n", int'(rob_req_n), nv);
      check("vr_stall", int'(vr_stall), int'(exp_vr));
      check("advance", int'(advance), int'(exp_adv));
      check("fetch_hold", int'(fetch_hold), int'(fq.valid && !exp_adv));
      check("alloc count", $countones(alloc_en), exp_adv ? nw : 0);
      if (exp_adv) begin
        for (int i = 0; i < FW; i++) if (ip_we[i] && ip_waddr[i] != 0) ip[ip_waddr[i]] = ip_wdata[i];
        for (int r = 0; r < NLREG; r++) check($sformatf("IP r%0d", r), int'(ip[r]), int'(map[r]));
      end else check("no IP write", int'(ip_we), 0);
      n_vr += int'(exp_vr); n_adv += int'(exp_adv); n_sow += int'(sow_hit); n_dow += int'(dow_hit);
    end
    check("activity", int'(n_vr > 50 && n_adv > 500 && n_sow > 100 && n_dow > 50), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
