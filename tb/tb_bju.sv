// tb_bju: self-checking test of the branch/jump unit.
//
// Random conditional branches, jumps and register jumps are applied with
// random predictions. For each one the test computes the outcome, the
// correct next PC after the delay slot (target or PC+8), whether the
// prediction was wrong (direction, or target when taken), the updated 2-bit
// counter and the link value PC+8, and compares them with the unit's
// combinational outputs. A watchdog ends a hung run. Branch semantics are
// MIPS-I; the saturating-counter update is this design's predictor choice.
module tb_bju;
  import rr_pkg::*;
  uop_t        u;
  logic        taken, mispred;
  logic [31:0] target, link;
  logic [1:0]  pred;
  int checks = 0, failures = 0;

  bju dut (.u, .taken, .mispred, .target, .pred, .link);

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s %s: got %h expected %h", u.exe.name(), what, got, exp);
    end
  endtask

  initial begin
    #100000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    exe_e ops [10] = '{OP_BEQ, OP_BNE, OP_BLEZ, OP_BGTZ, OP_BLTZ, OP_BGEZ, OP_J, OP_JAL, OP_JR, OP_JALR};
    logic        t;
    logic [31:0] tgt;
    logic [1:0]  p;
    u = '0;
    for (int n = 0; n < 3000; n++) begin
      u.valid       = 1'b1;
      u.fu          = FU_BJU;
      u.exe         = ops[$urandom % 10];
      u.pc          = {$urandom} & ~32'd3;
      u.op1         = ($urandom % 4 == 0) ? 32'd0 : $urandom;
      u.op2         = ($urandom % 3 == 0) ? u.op1 : $urandom;
      u.imm         = {$urandom} & ~32'd3;
      u.pred_taken  = 1'($urandom);
      u.pred_target = ($urandom % 2) ? u.imm : u.op1;
      u.pred_bits   = 2'($urandom);
      #1;
      case (u.exe)
        OP_BEQ:  t = u.op1 == u.op2;
        OP_BNE:  t = u.op1 != u.op2;
        OP_BLEZ: t = int'(u.op1) <= 0;
        OP_BGTZ: t = int'(u.op1) > 0;
        OP_BLTZ: t = int'(u.op1) < 0;
        OP_BGEZ: t = int'(u.op1) >= 0;
        default: t = 1'b1;
      endcase
      tgt = (u.exe inside {OP_JR, OP_JALR}) ? u.op1 : u.imm;
      if (u.exe inside {OP_J, OP_JAL, OP_JR, OP_JALR}) p = 2'b11;
      else if (t) p = (u.pred_bits == 2'b11) ? 2'b11 : u.pred_bits + 1;
      else        p = (u.pred_bits == 2'b00) ? 2'b00 : u.pred_bits - 1;
      check("taken", 32'(taken), 32'(t));
      check("target", target, t ? tgt : u.pc + 8);
      check("mispred", 32'(mispred), 32'((t != u.pred_taken) || (t && tgt != u.pred_target)));
      check("pred", 32'(pred), 32'(p));
      check("link", link, u.pc + 8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
