// tb_superscalar_core: end-to-end test of the core at its default sizes.
//
// Builds a MIPS-I program with the encoders of mips_asm_pkg, loads it into
// instruction memory during reset and runs it until a completion marker is
// stored. The program contains: the squared-series-sum loop (sum of i*i for
// i = 0..25, multiply/MFLO, a loop branch with a useful delay slot, which is
// mispredicted until the predictor learns it); a store followed by a load of
// the same address (store-buffer forwarding); a JAL/JR call with delay slots;
// a burst of twelve stores (store buffer full); a long multiply/MFLO
// dependence chain at the ROB head behind which never-taken branches fill the
// ROB and independent ALU instructions use up the free VB locations. Results
// in memory and in the committed registers are compared with values computed
// here, and every pipeline mechanism (restore, each stall kind, RS bypass,
// CDB contention, SOW/DOW, store-buffer forwarding, BTB write) must occur.
module tb_superscalar_core;
  import rr_pkg::*;
  import mips_asm_pkg::*;

  localparam logic [31:0] BASE = 32'h8000_0400;
  localparam logic [31:0] SP   = 32'h8000_0800;
  localparam int ZERO = 0, T0 = 8, T1 = 9, T2 = 10, T3 = 11, T4 = 12, T5 = 13,
                 S0 = 16, S1 = 17, S2 = 18, S5 = 21, S6 = 22, S7 = 23, T6 = 14, SPR = 29, RA = 31;
  localparam int NBR = 40, NALU = 60, NST = 12;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        imem_we;
  logic [31:0] imem_waddr, imem_wdata, dbg_daddr, dbg_ddata, dbg_reg_data;
  logic [4:0]  dbg_reg;
  logic [2:0]  commit_n;
  logic        restore;
  logic [5:0]  ic, cc;
  events_t     ev;
  logic [6:0]  rob_count;
  logic [63:0] vb_committed;
  logic [4:0][2:0] rs_busy;
  logic [3:0]  sb_count;
  int max_rob = 0, max_sb = 0, max_rs = 0;

  superscalar_core dut (.clk, .rst_n, .imem_we, .imem_waddr, .imem_wdata,
    .dbg_daddr, .dbg_ddata, .dbg_reg, .dbg_reg_data, .commit_n, .restore, .ic, .cc,
    .events(ev), .rob_count, .vb_committed, .rs_busy, .sb_count);

  always #5 clk = ~clk;

  logic [31:0] prog [$];
  int checks = 0, failures = 0;
  int cycles = 0, committed = 0;
  int n_restore = 0, n_disp = 0, n_vr = 0, n_rob = 0, n_byp = 0, n_cdb = 0, n_sbf = 0,
      n_fwd = 0, n_mis = 0, n_br = 0, n_sow = 0, n_dow = 0, n_btb = 0, n_hilo = 0;
  int loop_i, func_i, ret_i, end_i;

  function automatic logic [31:0] addr_of(input int idx);
    return BASE + 32'(4 * idx);
  endfunction

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic reg_check(input string what, input int r, input logic [31:0] exp);
    dbg_reg = 5'(r);
    #1;
    check(what, dbg_reg_data, exp);
  endtask

  task automatic mem_check(input string what, input logic [31:0] a, input logic [31:0] exp);
    dbg_daddr = a;
    #1;
    check(what, dbg_ddata, exp);
  endtask

  initial begin
    logic [31:0] sum, chain;
    // ---------------- program ----------------
    prog.push_back(lui(SPR, SP >> 16));
    prog.push_back(ori(SPR, SPR, SP & 'hffff));
    prog.push_back(addiu(T0, ZERO, 0));
    prog.push_back(addiu(T1, ZERO, 0));
    loop_i = prog.size();
    prog.push_back(mult(T0, T0));
    prog.push_back(mflo(T2));
    prog.push_back(slti(T3, T0, 25));
    prog.push_back(addu(T1, T1, T2));
    prog.push_back(bne(T3, ZERO, loop_i - (prog.size() + 1)));
    prog.push_back(addiu(T0, T0, 1));              // delay slot
    prog.push_back(sw(T1, 0, SPR));
    prog.push_back(lw(T4, 0, SPR));                // forwarded from the store buffer
    prog.push_back(sw(T4, 4, SPR));
    // call: target patched below
    prog.push_back(32'd0);                         // jal func
    prog.push_back(addiu(S0, ZERO, 7));            // delay slot
    ret_i = prog.size();
    prog.push_back(sw(S1, 8, SPR));
    for (int k = 0; k < NST; k++) prog.push_back(sw(T0, 16 + 4 * k, SPR));
    // two phases, each behind a slow dependence chain (pointer-chasing loads,
    // then multiply/MFLO, then ALU): phase A fills the ROB with branch/ALU
    // pairs, phase B exhausts the free VB locations with ALU instructions
    prog.push_back(addiu(S5, ZERO, 3));
    prog.push_back(sw(SPR, 200, SPR));             // memory[sp+200] = sp
    for (int ph = 0; ph < 2; ph++) begin
      prog.push_back(lw(S6, 200, SPR));
      for (int k = 0; k < 3; k++) prog.push_back(lw(S6, 200, S6));
      prog.push_back(mult(S6, S5));
      prog.push_back(mflo(S7));
      prog.push_back(mult(S7, S5));
      prog.push_back(mflo(S7));
      for (int k = 0; k < (ph == 0 ? 6 : 3); k++) prog.push_back(addu(S7, S7, S6));
      if (ph == 0)
        for (int k = 0; k < NBR; k++) begin
          prog.push_back(bne(ZERO, ZERO, 1));      // never taken
          prog.push_back(addiu(T5, ZERO, k + 1));
        end
      else
        for (int k = 0; k < NALU; k++) prog.push_back(addiu(T6, ZERO, k + 1));
    end
    prog.push_back(sw(S7, 12, SPR));
    prog.push_back(addiu(S2, S2, 0));
    prog.push_back(addiu(T2, ZERO, 'h600d));
    prog.push_back(sw(T2, 100, SPR));              // completion marker
    end_i = prog.size();
    prog.push_back(j(addr_of(end_i)));
    prog.push_back(NOP);
    func_i = prog.size();
    prog.push_back(addiu(S1, S0, 100));
    prog.push_back(jr(RA));
    prog.push_back(addu(S2, S1, S1));              // delay slot
    prog[ret_i - 2] = jal(addr_of(func_i));

    // ---------------- load and run ----------------
    imem_we = 1'b0; imem_waddr = '0; imem_wdata = '0; dbg_daddr = '0; dbg_reg = '0;
    repeat (2) @(posedge clk);
    foreach (prog[i]) begin
      imem_we = 1'b1; imem_waddr = addr_of(i); imem_wdata = prog[i];
      @(posedge clk);
    end
    imem_we = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    dbg_daddr = SP + 100;
    while (dbg_ddata !== 32'h600d && cycles < 20000) @(negedge clk);
    repeat (5) @(negedge clk);
    $display("cycles=%0d committed=%0d IPC=%0.3f", cycles, committed, real'(committed) / real'(cycles));
    $display("restore=%0d disp_stall=%0d vr_stall=%0d rob_stall=%0d bypass=%0d cdb_stall=%0d sb_full=%0d sb_fwd=%0d",
             n_restore, n_disp, n_vr, n_rob, n_byp, n_cdb, n_sbf, n_fwd);
    $display("mispredict=%0d branches=%0d sow=%0d dow=%0d btb_write=%0d hilo_full=%0d",
             n_mis, n_br, n_sow, n_dow, n_btb, n_hilo);

    sum = 0;
    for (int i = 0; i <= 25; i++) sum += i * i;
    chain = SP * 12;
    mem_check("marker", SP + 100, 32'h600d);
    mem_check("sum in memory", SP, sum);
    mem_check("forwarded load", SP + 4, sum);
    mem_check("call result", SP + 8, 107);
    mem_check("chain result", SP + 12, chain);
    for (int k = 0; k < NST; k++) mem_check($sformatf("store burst %0d", k), SP + 16 + 4 * k, 26);
    reg_check("t0", T0, 26);
    reg_check("t1", T1, sum);
    reg_check("t4", T4, sum);
    reg_check("s0", S0, 7);
    reg_check("s1", S1, 107);
    reg_check("s2", S2, 214);
    reg_check("ra", RA, addr_of(ret_i));
    reg_check("t5", T5, NBR);
    reg_check("t6", T6, NALU);
    reg_check("s6", S6, SP);
    reg_check("s7", S7, chain);
    reg_check("sp", SPR, SP);
    reg_check("zero", ZERO, 0);
    // every mechanism must have happened
    checks += 14;
    if (n_restore == 0) begin failures++; $display("FAIL no restore"); end
    if (n_disp == 0)    begin failures++; $display("FAIL no dispatch stall"); end
    if (n_vr == 0)      begin failures++; $display("FAIL no VB-full stall"); end
    if (n_rob == 0)     begin failures++; $display("FAIL no ROB-full stall"); end
    if (n_byp == 0)     begin failures++; $display("FAIL no RS bypass"); end
    if (n_cdb == 0)     begin failures++; $display("FAIL no CDB contention"); end
    if (n_sbf == 0)     begin failures++; $display("FAIL no store-buffer-full stall"); end
    if (n_fwd == 0)     begin failures++; $display("FAIL no store-buffer forwarding"); end
    if (n_mis == 0)     begin failures++; $display("FAIL no mispredicted branch"); end
    if (n_br == 0)      begin failures++; $display("FAIL no branch commit"); end
    if (n_sow == 0)     begin failures++; $display("FAIL no source overwrite"); end
    if (n_dow == 0)     begin failures++; $display("FAIL no destination overwrite"); end
    if (n_btb == 0)     begin failures++; $display("FAIL no BTB write"); end
    checks++;
    if (max_rob < 60 || max_sb != 10 || max_rs != 4) begin
      failures++;
      $display("FAIL occupancy peaks rob=%0d sb=%0d rs=%0d", max_rob, max_sb, max_rs);
    end
    checks++;
    if (!vb_committed[0]) begin failures++; $display("FAIL VB location 0 not committed"); end
    if (committed == 0) begin failures++; $display("FAIL nothing committed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // restore must leave IC equal to CC (everything uncommitted cancelled)
  always @(negedge clk) if (rst_n) begin
    cycles++;
    committed += int'(commit_n);
    n_restore += int'(ev.restore);
    n_disp    += int'(ev.disp_stall);
    n_vr      += int'(ev.vr_stall);
    if (int'(rob_count) > max_rob) max_rob = int'(rob_count);
    if (int'(sb_count) > max_sb) max_sb = int'(sb_count);
    for (int r = 0; r < 5; r++) if (int'(rs_busy[r]) > max_rs) max_rs = int'(rs_busy[r]);
    n_rob     += int'(ev.rob_stall);
    n_byp     += int'(ev.rs_bypass);
    n_cdb     += int'(ev.cdb_stall);
    n_sbf     += int'(ev.sb_full_stall);
    n_fwd     += int'(ev.sb_forward);
    n_mis     += int'(ev.mispredict_commit);
    n_br      += int'(ev.branch_commit);
    n_sow     += int'(ev.sow);
    n_dow     += int'(ev.dow);
    n_btb     += int'(ev.fetch_btb_stall);
    n_hilo    += int'(ev.hilo_full_stall);
  end

  logic restore_d = 1'b0;
  always @(posedge clk) begin
    restore_d <= restore;
    if (restore_d) begin
      checks++;
      if (ic != cc) begin failures++; $display("FAIL IC != CC after restore"); end
    end
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
