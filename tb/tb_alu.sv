// tb_alu: self-checking test of the integer ALU.
//
// Drives random operands through every ALU operation (add, subtract, the
// logic operations, signed/unsigned set-less-than, the three shifts and LUI)
// and compares the combinational result with a reference computed here. A
// watchdog ends the run if it hangs. The operation list follows the MIPS-I
// integer subset the core executes; the operand conventions (shift amount
// and LUI constant in op2) are this design's.
module tb_alu;
  import rr_pkg::*;
  uop_t        u;
  logic [31:0] result, exp;
  int checks = 0, failures = 0;

  alu dut (.u, .result);

  initial begin
    #100000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    exe_e ops [12] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_NOR, OP_SLT, OP_SLTU,
                       OP_SLL, OP_SRL, OP_SRA, OP_LUI};
    u = '0;
    for (int n = 0; n < 3000; n++) begin
      u.valid = 1'b1;
      u.fu    = FU_ALU;
      u.exe   = ops[n % 12];
      u.op1   = (n % 7 == 0) ? 32'h8000_0000 : $urandom;
      u.op2   = (n % 5 == 0) ? u.op1 : $urandom;
      if (u.exe inside {OP_SLL, OP_SRL, OP_SRA}) u.op2 = 32'($urandom % 32);
      #1;
      case (u.exe)
        OP_ADD:  exp = u.op1 + u.op2;
        OP_SUB:  exp = u.op1 - u.op2;
        OP_AND:  exp = u.op1 & u.op2;
        OP_OR:   exp = u.op1 | u.op2;
        OP_XOR:  exp = u.op1 ^ u.op2;
        OP_NOR:  exp = ~(u.op1 | u.op2);
        OP_SLT:  exp = (int'(u.op1) < int'(u.op2)) ? 32'd1 : 32'd0;
        OP_SLTU: exp = (u.op1 < u.op2) ? 32'd1 : 32'd0;
        OP_SLL:  exp = u.op1 << u.op2;
        OP_SRL:  exp = u.op1 >> u.op2;
        OP_SRA:  exp = 32'(int'(u.op1) >>> u.op2);
        default: exp = u.op2;
      endcase
      checks++;
      if (result !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL %s %h %h: got %h expected %h", u.exe.name(), u.op1, u.op2, result, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
