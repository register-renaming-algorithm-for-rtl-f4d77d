// tb_mdu: self-checking test of the three-stage multiply/divide unit and
// its speculative HI/LO buffer.
//
// A random in-order stream of MULT, MULTU, DIV, DIVU (including division by
// zero), MFHI and MFLO is offered whenever the unit accepts, as the
// in-order station does. Write-back grants are random, and HI/LO writers
// are committed some cycles after their completion appears on the M_Bus,
// sometimes late enough for the HI/LO buffer to fill. The test checks that
// every MFHI/MFLO returns the HI/LO value of the sequential program at its
// place in the stream, that completions arrive in program order with the
// right ROB positions, and that the HI/LO-full stall occurred. Division by
// zero giving quotient all-ones and remainder = dividend is this design's
// choice (MIPS leaves it undefined).
module tb_mdu;
  import rr_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        restore, accept, wb_grant, hilo_full_stall;
  uop_t        iss;
  wbreq_t      wb;
  robupd_t     upd;
  logic [2:0]  hilo_commit_n;
  logic [63:0] seq_hilo;
  logic [31:0] mf_exp [$];
  logic [RW-1:0] mf_reo [$], w_reo [$];
  int pending_commit = 0;
  int checks = 0, failures = 0, n_mf = 0, n_w = 0, n_full = 0;
  logic [RW-1:0] reo;

  mdu dut (.clk, .rst_n, .restore, .iss, .accept, .wb, .wb_grant, .upd, .hilo_commit_n, .hilo_full_stall);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic logic [63:0] ref_op(input exe_e e, input logic [31:0] a, input logic [31:0] b);
    case (e)
      OP_MULT:  return 64'($signed(a) * $signed(b));
      OP_MULTU: return {32'd0, a} * {32'd0, b};
      OP_DIV:   return (b == 0) ? {a, 32'hffff_ffff} : {32'($signed(a) % $signed(b)), 32'($signed(a) / $signed(b))};
      default:  return (b == 0) ? {a, 32'hffff_ffff} : {a % b, a / b};
    endcase
  endfunction

  initial begin
    #1000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    exe_e wops [4] = '{OP_MULT, OP_MULTU, OP_DIV, OP_DIVU};
    restore = 1'b0; iss = '0; wb_grant = 1'b0; hilo_commit_n = '0;
    seq_hilo = '0; reo = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      logic slow;
      @(negedge clk);
      slow = ((n / 300) % 2) == 1;
      // drive this cycle's grant and commits, let them settle, then observe
      wb_grant = ($urandom % 3) != 0;
      hilo_commit_n = '0;
      if (pending_commit > 0 && (!slow || $urandom % 8 == 0)) begin
        hilo_commit_n = 3'(1 + $urandom % (pending_commit < 4 ? pending_commit : 4));
        pending_commit -= int'(hilo_commit_n);
      end
      #1;
      if (wb.valid && wb.wb && wb_grant) begin
        check("mf reo", 32'(wb.reo), 32'(mf_reo[0]));
        check("mf data", wb.data, mf_exp[0]);
        void'(mf_reo.pop_front()); void'(mf_exp.pop_front());
        n_mf++;
      end
      if (upd.valid) begin
        check("M_Bus reo", 32'(upd.reo), 32'(w_reo[0]));
        void'(w_reo.pop_front());
        pending_commit++;
        n_w++;
      end
      n_full += int'(hilo_full_stall);
      if (accept) begin
        iss = '0;
        if ($urandom % 4 != 0) begin
          iss.valid = 1'b1;
          iss.fu    = FU_MDU;
          iss.reo   = reo;
          iss.v1    = 1'b1; iss.v2 = 1'b1;
          if ($urandom % 2) begin
            iss.exe = wops[$urandom % 4];
            iss.op1 = ($urandom % 4 == 0) ? 32'($urandom % 100) : $urandom;
            iss.op2 = ($urandom % 8 == 0) ? 32'd0 : ($urandom % 2) ? 32'(1 + $urandom % 50) : $urandom;
            seq_hilo = ref_op(iss.exe, iss.op1, iss.op2);
            w_reo.push_back(reo);
          end else begin
            iss.exe  = ($urandom % 2) ? OP_MFHI : OP_MFLO;
            iss.regw = 1'b1;
            iss.dest = PW'(1 + $urandom % 63);
            mf_exp.push_back(iss.exe == OP_MFHI ? seq_hilo[63:32] : seq_hilo[31:0]);
            mf_reo.push_back(reo);
          end
          reo++;
        end
      end
    end
    checks++;
    if (n_mf < 300 || n_w < 300 || n_full < 20) begin
      failures++;
      $display("FAIL little activity mf=%0d writes=%0d full-stall cycles=%0d", n_mf, n_w, n_full);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
