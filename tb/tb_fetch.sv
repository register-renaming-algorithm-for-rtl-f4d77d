// tb_fetch: self-checking test of the fetch stage (PC, instruction memory,
// BTB/BPB prediction and fetch-group formation).
//
// A random program of ALU instructions, conditional branches and jumps is
// loaded through the program-load port. Then the stage runs with random
// holds, random restores to random addresses, and random predictor updates
// (which make some branches predicted taken). A reference model with its
// own copy of the program, BTB and BPB computes each expected group: the
// four words at PC; a branch in the last slot is left for the next group; a
// branch predicted taken keeps only its delay slot after it and sends the PC
// to the BTB target; a branch predicted not taken keeps the following
// instructions up to the next branch. The test compares every produced
// group (slot valid bits, words, PCs, prediction), checks that a hold keeps
// the group, that a predictor-update cycle produces no group, and that a
// restore empties the stage and refetches from the given address. The group
// rules follow the description; the direct-mapped BTB/BPB organisation and
// "taken when BTB hit and counter >= 2" are this design's choices.
module tb_fetch;
  import rr_pkg::*;
  import mips_asm_pkg::*;
  localparam logic [31:0] BASE = 32'h8000_0400;
  localparam int WORDS = 1024;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        hold, restore, btb_we, bpb_we, imem_we, btb_stall;
  logic [31:0] restore_pc, btb_waddr, btb_wtarget, bpb_waddr, imem_waddr, imem_wdata;
  logic [1:0]  bpb_wbits;
  fgroup_t     fq, exp_fq, got_fq;
  logic [31:0] prog [WORDS];
  logic        mbv [64];
  logic [31:0] mba [64], mbt [64];
  logic [1:0]  mbp [64];
  logic [31:0] mpc;
  int checks = 0, failures = 0, n_taken = 0, n_grp = 0, n_cut = 0;

  fetch #(.RESET_PC(BASE), .IMEM_WORDS(WORDS)) dut (.clk, .rst_n, .hold, .restore, .restore_pc,
    .btb_we, .btb_waddr, .btb_wtarget, .bpb_we, .bpb_waddr, .bpb_wbits,
    .imem_we, .imem_waddr, .imem_wdata, .fq, .btb_stall);

  always #5 clk = ~clk;

  function automatic logic [31:0] word_at(input logic [31:0] a);
    return prog[(a >> 2) % WORDS];
  endfunction
  function automatic logic cti(input logic [31:0] w);
    return (w[31:26] inside {6'h01, 6'h02, 6'h03, 6'h04, 6'h05, 6'h06, 6'h07}) ||
           (w[31:26] == 6'h00 && (w[5:0] == 6'h08 || w[5:0] == 6'h09));
  endfunction
  function automatic logic [31:0] rnd_pc();
    return BASE + 32'(4 * ($urandom % 256));
  endfunction

  // expected group at mpc; returns the next PC
  function automatic logic [31:0] expect_group(output fgroup_t g);
    int b, c, nk;
    logic tk;
    logic [31:0] bpc;
    g = '0;
    g.valid = 1'b1;
    b = 4;
    for (int k = 3; k >= 0; k--) if (cti(word_at(mpc + 32'(4 * k)))) b = k;
    bpc = mpc + 32'(4 * (b % 4));
    tk  = 1'b0;
    if (b == 4) nk = 4;
    else if (b == 3) nk = 3;
    else begin
      tk = mbv[bpc[7:2]] && mba[bpc[7:2]] == bpc && mbp[bpc[7:2]][1];
      if (tk) nk = b + 2;
      else begin
        c = 4;
        for (int k = 3; k > b + 1; k--) if (cti(word_at(mpc + 32'(4 * k)))) c = k;
        nk = c;
      end
    end
    for (int k = 0; k < 4; k++) begin
      g.slot[k].valid = k < nk;
      g.slot[k].instr = word_at(mpc + 32'(4 * k));
      g.slot[k].pc    = mpc + 32'(4 * k);
    end
    g.pred_taken  = tk;
    g.pred_target = mbt[bpc[7:2]];
    g.pred_bits   = mbp[bpc[7:2]];
    if (nk < 4 && !tk) n_cut++;
    return tk ? mbt[bpc[7:2]] : mpc + 32'(4 * nk);
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d (pc %h)", what, got, exp, mpc);
    end
  endtask

  initial begin
    #1000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    hold = 1'b0; restore = 1'b0; restore_pc = '0; btb_we = 1'b0; bpb_we = 1'b0;
    btb_waddr = '0; btb_wtarget = '0; bpb_waddr = '0; bpb_wbits = '0;
    imem_we = 1'b0; imem_waddr = '0; imem_wdata = '0;
    for (int i = 0; i < 64; i++) begin mbv[i] = 1'b0; mba[i] = '0; mbt[i] = '0; mbp[i] = '0; end
    for (int w = 0; w < WORDS; w++) begin
      int r;
      r = int'($urandom % 10);
      prog[w] = (r < 6) ? addu(1 + $urandom % 8, $urandom % 8, $urandom % 8) :
                (r < 9) ? bne(1, 2, 8) : j(BASE);
    end
    // load the program while in reset
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk); imem_we = 1'b1; imem_waddr = 32'(4 * w); imem_wdata = prog[w];
    end
    @(negedge clk); imem_we = 1'b0;
    @(negedge clk); rst_n = 1'b1; hold = 1'b1;
    mpc = BASE;
    exp_fq = '0;
    for (int n = 0; n < 5000; n++) begin
      fgroup_t g;
      logic [31:0] npc;
      @(negedge clk);
      check("fq.valid", int'(fq.valid), int'(exp_fq.valid));
      // the BTB target of a branch that is not predicted taken is don't-care
      // (the BTB's target array is not reset), so it is compared only when used
      got_fq = fq;
      if (!exp_fq.pred_taken) got_fq.pred_target = exp_fq.pred_target;
      if (exp_fq.valid) check("fq group", int'(got_fq == exp_fq), 1);
      hold       = ($urandom % 5) == 0;
      restore    = ($urandom % 40) == 0;
      restore_pc = rnd_pc();
      btb_we     = ($urandom % 8) == 0;
      bpb_we     = btb_we || ($urandom % 8) == 0;
      btb_waddr  = rnd_pc();
      bpb_waddr  = btb_waddr;
      btb_wtarget = rnd_pc();
      bpb_wbits  = ($urandom % 3) != 0 ? 2'b11 : 2'b01;
      #1;
      check("btb_stall", int'(btb_stall), int'(btb_we));
      npc = expect_group(g);
      if (restore) begin
        mpc = restore_pc;
        exp_fq.valid = 1'b0;
      end else if (!hold) begin
        if (btb_we) exp_fq.valid = 1'b0;
        else begin
          exp_fq = g;
          mpc = npc;
          n_grp++;
          n_taken += int'(g.pred_taken);
        end
      end
      if (btb_we) begin
        mbv[btb_waddr[7:2]] = 1'b1; mba[btb_waddr[7:2]] = btb_waddr; mbt[btb_waddr[7:2]] = btb_wtarget;
      end
      if (bpb_we) mbp[bpb_waddr[7:2]] = bpb_wbits;
    end
    check("activity", int'(n_grp > 2000 && n_taken > 100 && n_cut > 200), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
