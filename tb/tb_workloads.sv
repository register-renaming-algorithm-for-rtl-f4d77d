// tb_workloads: runs the two benchmark programs of the design's evaluation on
// the full core at its default sizes and reports their performance figures.
//
// Program 1, bubble sort: main() stores the five values 3, 16, 4, 670, 59 in
// a local array on its stack, sorts them into descending order with the
// nested i/j loops (a[i] is swapped with a[j+1] when smaller), then calls
// result(a0..a4), which returns 1 when the array is strictly descending; the
// returned value is stored into the last array position.
// Program 2, squared series sum: main() sums i*i for i = 0..25 in a loop
// (MULT/MFLO) and stores the sum in a local array.
// Both are hand-written MIPS-I in the style of a compiler's output: a small
// start routine sets the stack pointer to 0x80200000, calls main with JAL,
// and when main returns stores a marker word below the stack and spins. The
// array lands around 0x801FFFD0, so the stack sits at the top of the
// 1024-word data memory. Five arguments follow the usual MIPS convention
// (a0-a3 in registers, the fifth at 16(sp)).
//
// Each program is loaded through the instruction-memory write port while the
// core is held in reset, run until the marker appears, and checked: the
// array contents against a model of the C code, the stack pointer and the
// return value. Cycles, commits, IPC, misprediction rate, dispatch stalls and
// CDB contention are printed, to set beside the figures reported for the
// original design (311 cycles for the bubble sort, 126 for the series sum at
// -O3); the cycle count is only bounded, not matched, since the programs
// here are not the original compiler's code.
module tb_workloads;
  import rr_pkg::*;
  import mips_asm_pkg::*;

  localparam logic [31:0] BASE  = 32'h8000_0400;
  localparam logic [31:0] STACK = 32'h8020_0000;
  localparam int ZERO = 0, V0 = 2, A0 = 4, A1 = 5, A2 = 6, A3 = 7, T0 = 8, T1 = 9, T2 = 10,
                 T3 = 11, T4 = 12, T5 = 13, T8 = 24, S0 = 16, S1 = 17, SPR = 29, RA = 31;
  localparam int MAX_CYCLES = 5000;

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

  superscalar_core dut (.clk, .rst_n, .imem_we, .imem_waddr, .imem_wdata,
    .dbg_daddr, .dbg_ddata, .dbg_reg, .dbg_reg_data, .commit_n, .restore, .ic, .cc,
    .events(ev), .rob_count, .vb_committed, .rs_busy, .sb_count);

  always #5 clk = ~clk;

  logic [31:0] prog [$];
  int checks = 0, failures = 0;
  int cycles, committed, n_mis, n_br, n_disp, n_cdb;

  // ---------------- a tiny assembler with labels ----------------
  int label_at [string];
  typedef struct { int idx; string name; bit is_jump; logic [31:0] word; } fix_t;
  fix_t fixes [$];

  function automatic logic [31:0] addr_of(input int idx);
    return BASE + 32'(4 * idx);
  endfunction

  function automatic void emit(input logic [31:0] w);
    prog.push_back(w);
  endfunction

  function automatic void label(input string name);
    label_at[name] = prog.size();
  endfunction

  // conditional branch whose 16-bit offset is patched once the label is known
  function automatic void br(input logic [31:0] w, input string name);
    fixes.push_back('{prog.size(), name, 1'b0, w});
    prog.push_back(w);
  endfunction

  function automatic void jmp(input logic [31:0] w, input string name);
    fixes.push_back('{prog.size(), name, 1'b1, w});
    prog.push_back(w);
  endfunction

  function automatic void link();
    foreach (fixes[k]) begin
      int t = label_at[fixes[k].name];
      if (fixes[k].is_jump) prog[fixes[k].idx] = {fixes[k].word[31:26], addr_of(t)[27:2]};
      else prog[fixes[k].idx] = {fixes[k].word[31:16], 16'(t - (fixes[k].idx + 1))};
    end
    fixes.delete();
    label_at.delete();
  endfunction

  function automatic void start_routine(input logic [31:0] marker);
    emit(lui(SPR, STACK >> 16));
    jmp(jal(0), "main");
    emit(NOP);
    emit(addiu(T8, ZERO, int'(marker)));
    emit(sw(T8, -4, SPR));
    label("spin");
    br(beq(ZERO, ZERO, 0), "spin");
    emit(NOP);
  endfunction

  function automatic void bubble_program();
    prog.delete();
    start_routine(32'h0b0b);
    label("main");                       // frame: 16..19 fifth arg, 20..39 a[], 44 ra
    emit(addiu(SPR, SPR, -48));
    emit(sw(RA, 44, SPR));
    emit(addiu(T0, ZERO, 3));   emit(sw(T0, 20, SPR));
    emit(addiu(T0, ZERO, 16));  emit(sw(T0, 24, SPR));
    emit(addiu(T0, ZERO, 4));   emit(sw(T0, 28, SPR));
    emit(addiu(T0, ZERO, 670)); emit(sw(T0, 32, SPR));
    emit(addiu(T0, ZERO, 59));  emit(sw(T0, 36, SPR));
    emit(addiu(S0, ZERO, 0));                      // i = 0
    label("outer");
    emit(slti(T0, S0, 5));
    br(beq(T0, ZERO, 0), "sorted");
    emit(addu(S1, S0, ZERO));                      // delay slot: j = i
    label("inner");
    emit(slti(T0, S1, 4));
    br(beq(T0, ZERO, 0), "next_i");
    emit(sll(T1, S0, 2));                          // delay slot
    emit(addu(T1, T1, SPR));
    emit(lw(T2, 20, T1));                          // a[i]
    emit(sll(T3, S1, 2));
    emit(addu(T3, T3, SPR));
    emit(lw(T4, 24, T3));                          // a[j+1]
    emit(slt(T5, T2, T4));
    br(beq(T5, ZERO, 0), "next_j");
    emit(NOP);
    emit(sw(T2, 24, T3));                          // a[j+1] = a[i]
    emit(sw(T4, 20, T1));                          // a[i] = k
    label("next_j");
    jmp(j(0), "inner");
    emit(addiu(S1, S1, 1));                        // delay slot: j++
    label("next_i");
    jmp(j(0), "outer");
    emit(addiu(S0, S0, 1));                        // delay slot: i++
    label("sorted");
    emit(lw(A0, 20, SPR));
    emit(lw(A1, 24, SPR));
    emit(lw(A2, 28, SPR));
    emit(lw(A3, 32, SPR));
    emit(lw(T0, 36, SPR));
    jmp(jal(0), "result");
    emit(sw(T0, 16, SPR));                         // delay slot: fifth argument
    emit(sw(V0, 36, SPR));                         // a[4] = correct
    emit(lw(RA, 44, SPR));
    emit(jr(RA));
    emit(addiu(SPR, SPR, 48));                     // delay slot
    label("result");
    emit(lw(T0, 16, SPR));
    emit(slt(T1, A1, A0));
    br(beq(T1, ZERO, 0), "false");
    emit(slt(T1, A2, A1));
    br(beq(T1, ZERO, 0), "false");
    emit(slt(T1, A3, A2));
    br(beq(T1, ZERO, 0), "false");
    emit(slt(T1, T0, A3));
    br(beq(T1, ZERO, 0), "false");
    emit(NOP);
    emit(jr(RA));
    emit(addiu(V0, ZERO, 1));
    label("false");
    emit(jr(RA));
    emit(addiu(V0, ZERO, 0));
    link();
  endfunction

  function automatic void sss_program();
    prog.delete();
    start_routine(32'h0555);
    label("main");                       // frame: a[0..1] at 8..15
    emit(addiu(SPR, SPR, -16));
    emit(addiu(T0, ZERO, 0));                      // i
    emit(addiu(T1, ZERO, 0));                      // sum
    label("loop");
    emit(mult(T0, T0));
    emit(mflo(T2));
    emit(addiu(T0, T0, 1));
    emit(slti(T3, T0, 26));
    br(bne(T3, ZERO, 0), "loop");
    emit(addu(T1, T1, T2));                        // delay slot: sum += i*i
    emit(sw(T1, 8, SPR));                          // a[0] = sum
    emit(jr(RA));
    emit(addiu(SPR, SPR, 16));
    link();
  endfunction

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic mem_check(input string what, input logic [31:0] a, input logic [31:0] exp);
    dbg_daddr = a;
    #1;
    check(what, dbg_ddata, exp);
  endtask

  task automatic run(input string name, input logic [31:0] marker);
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    foreach (prog[i]) begin
      imem_we = 1'b1; imem_waddr = addr_of(i); imem_wdata = prog[i];
      @(posedge clk);
    end
    imem_we = 1'b0;
    cycles = 0; committed = 0; n_mis = 0; n_br = 0; n_disp = 0; n_cdb = 0;
    dbg_daddr = STACK - 4;
    @(negedge clk);
    rst_n = 1'b1;
    while (dbg_ddata !== marker && cycles < MAX_CYCLES) @(negedge clk);
    checks++;
    if (cycles >= MAX_CYCLES) begin
      failures++;
      $display("FAIL %s did not finish in %0d cycles", name, MAX_CYCLES);
    end
    $display("%s: words=%0d cycles=%0d committed=%0d IPC=%0.3f mispredict=%0d/%0d branches disp_stall=%0d cdb_stall=%0d",
             name, prog.size(), cycles, committed, real'(committed) / real'(cycles), n_mis, n_br, n_disp, n_cdb);
    dbg_reg = 5'(SPR);
    #1;
    check({name, " sp restored"}, dbg_reg_data, STACK);
  endtask

  always @(negedge clk) if (rst_n) begin
    cycles++;
    committed += int'(commit_n);
    n_mis  += int'(ev.mispredict_commit);
    n_br   += int'(ev.branch_commit);
    n_disp += int'(ev.disp_stall);
    n_cdb  += int'(ev.cdb_stall);
  end

  initial begin
    int a [5];
    int k, sum;
    bit ok;
    imem_we = 1'b0; imem_waddr = '0; imem_wdata = '0; dbg_daddr = '0; dbg_reg = '0;

    // ---- bubble sort ----
    bubble_program();
    run("bubble", 32'h0b0b);
    a = '{3, 16, 4, 670, 59};
    for (int i = 0; i <= 4; i++)
      for (int jj = i; jj < 4; jj++)
        if (a[i] < a[jj + 1]) begin k = a[jj + 1]; a[jj + 1] = a[i]; a[i] = k; end
    ok = a[0] > a[1] && a[1] > a[2] && a[2] > a[3] && a[3] > a[4];
    a[4] = ok ? 1 : 0;
    for (int i = 0; i < 5; i++)
      mem_check($sformatf("bubble a[%0d]", i), STACK - 48 + 20 + 4 * i, 32'(a[i]));

    // ---- squared series sum ----
    sss_program();
    run("sss", 32'h0555);
    sum = 0;
    for (int i = 0; i <= 25; i++) sum += i * i;
    mem_check("sss a[0]", STACK - 16 + 8, 32'(sum));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * MAX_CYCLES) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
