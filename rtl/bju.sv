// bju: branch/jump unit (combinational, single stage).
// Resolves the condition of a conditional branch (BEQ BNE BLEZ BGTZ BLTZ
// BGEZ) or takes a jump (J JAL JR JALR), compares the outcome with the
// prediction made in fetch and produces the B_Bus update for the ROB:
// mispredicted when the direction differs or, for a taken branch, the target
// differs; `target` is the correct address to fetch after the delay slot
// (the branch target if taken, PC+8 otherwise); `pred` is the new 2-bit
// counter (saturating towards the outcome; 11 for jumps). Link instructions
// also return PC+8 for their destination register.
module bju
  import rr_pkg::*;
(
  input  uop_t        u,
  output logic        taken,
  output logic        mispred,
  output logic [31:0] target,
  output logic [1:0]  pred,
  output logic [31:0] link
);
  logic        jump;
  logic [31:0] tgt;
  always_comb begin
    jump = u.exe inside {OP_J, OP_JAL, OP_JR, OP_JALR};
    unique case (u.exe)
      OP_BEQ:  taken = u.op1 == u.op2;
      OP_BNE:  taken = u.op1 != u.op2;
      OP_BLEZ: taken = $signed(u.op1) <= 0;
      OP_BGTZ: taken = $signed(u.op1) > 0;
      OP_BLTZ: taken = $signed(u.op1) < 0;
      OP_BGEZ: taken = $signed(u.op1) >= 0;
      default: taken = 1'b1;
    endcase
    tgt     = (u.exe == OP_JR || u.exe == OP_JALR) ? u.op1 : u.imm;
    target  = taken ? tgt : u.pc + 32'd8;
    mispred = (taken != u.pred_taken) || (taken && tgt != u.pred_target);
    link    = u.pc + 32'd8;
    if (jump)                            pred = 2'b11;
    else if (taken)                      pred = (u.pred_bits == 2'b11) ? 2'b11 : u.pred_bits + 2'b01;
    else                                 pred = (u.pred_bits == 2'b00) ? 2'b00 : u.pred_bits - 2'b01;
  end
endmodule
