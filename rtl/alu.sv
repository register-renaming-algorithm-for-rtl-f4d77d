// alu: single-stage integer arithmetic and logic unit (combinational).
// Computes the result of an issued ALU instruction from its two operands:
// add, subtract (no overflow trap), and/or/xor/nor, signed and unsigned
// set-less-than, shifts (amount in op2[4:0], value in op1) and LUI (op2
// already holds the shifted immediate). The instruction stays in the
// reservation station's issue register while the result is offered to the
// write-back stage in the same cycle.
module alu
  import rr_pkg::*;
(
  input  uop_t        u,
  output logic [31:0] result
);
  always_comb begin
    unique case (u.exe)
      OP_ADD:  result = u.op1 + u.op2;
      OP_SUB:  result = u.op1 - u.op2;
      OP_AND:  result = u.op1 & u.op2;
      OP_OR:   result = u.op1 | u.op2;
      OP_XOR:  result = u.op1 ^ u.op2;
      OP_NOR:  result = ~(u.op1 | u.op2);
      OP_SLT:  result = {31'd0, $signed(u.op1) < $signed(u.op2)};
      OP_SLTU: result = {31'd0, u.op1 < u.op2};
      OP_SLL:  result = u.op1 << u.op2[4:0];
      OP_SRL:  result = u.op1 >> u.op2[4:0];
      OP_SRA:  result = $unsigned($signed(u.op1) >>> u.op2[4:0]);
      OP_LUI:  result = u.op2;
      default: result = 32'd0;
    endcase
  end
endmodule
