// tb_lsu: self-checking test of the two-stage load/store unit with its
// store buffer and data memory.
//
// A random in-order stream of LW and SW over a small address range is
// offered whenever the unit accepts, as the in-order station does. Load
// write-back grants are random; stores are committed some cycles after
// their completion appears on the L_Bus, sometimes late enough for the
// store buffer to fill. Every load must return the value of the sequential
// program at its place in the stream, whether it comes from the store
// buffer or from memory; completions must carry the right ROB positions;
// after the stream ends and the buffer drains, the memory (read through the
// debug port) must match the sequential program. Forwarding and the
// store-buffer-full stall must both occur. Address generation in the first
// stage and the memory/store-buffer access in the second follow the
// description; the drain rule (drain only in a cycle the unit does not use
// the memory, or while a store is stalled) is this design's.
module tb_lsu;
  import rr_pkg::*;
  localparam int NADDR = 12;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        restore, accept, wb_grant, sb_full_stall, sb_forward;
  uop_t        iss;
  wbreq_t      wb;
  robupd_t     upd;
  logic [2:0]  sb_commit_n;
  logic [3:0]  sb_count;
  logic [31:0] dbg_addr, dbg_data;
  logic [31:0] mem [NADDR];
  logic [31:0] ld_exp [$];
  logic [RW-1:0] ld_reo [$], st_reo [$];
  logic [RW-1:0] reo;
  int pending = 0, checks = 0, failures = 0, n_ld = 0, n_st = 0, n_fwd = 0, n_full = 0;

  lsu dut (.clk, .rst_n, .restore, .iss, .accept, .wb, .wb_grant, .upd, .sb_commit_n,
           .sb_full_stall, .sb_forward, .sb_count, .dbg_addr, .dbg_data);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
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
    restore = 1'b0; iss = '0; wb_grant = 1'b0; sb_commit_n = '0; dbg_addr = '0; reo = '0;
    // data memory is not reset: the model starts from what it holds
    for (int a = 0; a < NADDR; a++) begin
      dbg_addr = 32'h200 + 32'(4 * a);
      #1 mem[a] = dbg_data;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      logic slow, feed;
      @(negedge clk);
      slow = ((n / 250) % 2) == 1;
      feed = n < 4800;
      wb_grant = ($urandom % 3) != 0;
      sb_commit_n = '0;
      if (pending > 0 && (!slow || $urandom % 10 == 0)) begin
        sb_commit_n = 3'(1 + $urandom % (pending < 4 ? pending : 4));
        pending -= int'(sb_commit_n);
      end
      #1;
      if (wb.valid && wb.wb && wb_grant) begin
        check("load reo", 32'(wb.reo), 32'(ld_reo[0]));
        check("load data", wb.data, ld_exp[0]);
        void'(ld_reo.pop_front()); void'(ld_exp.pop_front());
        n_ld++;
      end
      if (upd.valid) begin
        check("L_Bus reo", 32'(upd.reo), 32'(st_reo[0]));
        void'(st_reo.pop_front());
        pending++;
        n_st++;
      end
      n_fwd  += int'(sb_forward && wb_grant);
      n_full += int'(sb_full_stall);
      if (accept) begin
        iss = '0;
        if (feed && $urandom % 4 != 0) begin
          int a;
          a = int'($urandom % NADDR);
          iss.valid = 1'b1;
          iss.fu    = FU_LSU;
          iss.reo   = reo;
          iss.v1    = 1'b1; iss.v2 = 1'b1;
          iss.imm   = 32'(4 * a) - 32'h40;
          iss.op1   = 32'h0000_0240;            // base + offset = 0x200 + 4a
          if ($urandom % 2 != 0) begin
            iss.exe = OP_SW;
            iss.op2 = $urandom;
            mem[a]  = iss.op2;
            st_reo.push_back(reo);
          end else begin
            iss.exe  = OP_LW;
            iss.regw = 1'b1;
            iss.dest = PW'(1 + $urandom % 63);
            ld_exp.push_back(mem[a]);
            ld_reo.push_back(reo);
          end
          reo++;
        end
      end
    end
    for (int a = 0; a < NADDR; a++) begin
      dbg_addr = 32'h200 + 32'(4 * a);
      #1 check($sformatf("memory word %0d", a), dbg_data, mem[a]);
    end
    checks++;
    if (n_ld < 300 || n_st < 300 || n_fwd < 20 || n_full < 20) begin
      failures++;
      $display("FAIL little activity loads=%0d stores=%0d forwards=%0d full=%0d", n_ld, n_st, n_fwd, n_full);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
