// tb_decoder: self-checking test of the MIPS-I decoder.
//
// Encodes each supported instruction class with random registers and
// immediates (using the encoders of mips_asm_pkg) and checks the decoded
// unit code, operation, ROB instruction code, destination, the two source
// fields with their use flags, the immediate (sign/zero extended, shifted
// for LUI, or the computed branch/jump target) and the valid bit. It also
// checks that NOPs, writes to R0 by ordinary instructions, cancelled slots
// and unknown opcodes are dropped, and that JALR with rd = 0 stays a jump.
// Unit and ROB codes follow the description; the field layout is this
// design's.
module tb_decoder;
  import rr_pkg::*;
  import mips_asm_pkg::*;
  logic        valid;
  logic [31:0] instr, pc;
  dec_t        d;
  int checks = 0, failures = 0;

  decoder dut (.valid, .instr, .pc, .d);

  task automatic expect_dec(input string name, input logic v, input fu_e fu, input exe_e exe,
                            input robcode_e rc, input logic regw, input int rd,
                            input logic u1, input int rs1, input logic u2, input int rs2,
                            input logic [31:0] imm, input logic chk_imm);
    #1;
    checks++;
    if (d.valid !== v || (v && (d.fu !== fu || d.exe !== exe || d.rcode !== rc || d.regw !== regw ||
        (regw && d.rd !== 5'(rd)) || d.use_rs1 !== u1 || (u1 && d.rs1 !== 5'(rs1)) ||
        d.use_rs2 !== u2 || (u2 && d.rs2 !== 5'(rs2)) || (chk_imm && d.imm !== imm) ||
        d.is_cti !== (fu == FU_BJU) || d.pc !== pc))) begin
      failures++;
      if (failures < 10) $display("FAIL %s %h: got %p", name, instr, d);
    end
  endtask

  initial begin
    #100000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 300; n++) begin
      int a, b, c, sa;
      logic [15:0] im;
      logic [31:0] se, ze, bt, p4;
      a  = 1 + int'($urandom % 31); b = int'($urandom % 32); c = int'($urandom % 32);
      sa = int'($urandom % 32);
      im = 16'($urandom);
      se = {{16{im[15]}}, im}; ze = {16'd0, im};
      pc = 32'h8000_0000 | ({$urandom} & 32'h0fff_fffc);
      bt = pc + 4 + {se[29:0], 2'b00};
      p4 = pc + 4;
      valid = 1'b1;
      instr = addu(a, b, c);  expect_dec("addu", 1, FU_ALU, OP_ADD, RC_REGW, 1, a, 1, b, 1, c, 0, 0);
      instr = subu(a, b, c);  expect_dec("subu", 1, FU_ALU, OP_SUB, RC_REGW, 1, a, 1, b, 1, c, 0, 0);
      instr = and_(a, b, c);  expect_dec("and",  1, FU_ALU, OP_AND, RC_REGW, 1, a, 1, b, 1, c, 0, 0);
      instr = or_(a, b, c);   expect_dec("or",   1, FU_ALU, OP_OR,  RC_REGW, 1, a, 1, b, 1, c, 0, 0);
      instr = xor_(a, b, c);  expect_dec("xor",  1, FU_ALU, OP_XOR, RC_REGW, 1, a, 1, b, 1, c, 0, 0);
      instr = nor_(a, b, c);  expect_dec("nor",  1, FU_ALU, OP_NOR, RC_REGW, 1, a, 1, b, 1, c, 0, 0);
      instr = slt(a, b, c);   expect_dec("slt",  1, FU_ALU, OP_SLT, RC_REGW, 1, a, 1, b, 1, c, 0, 0);
      instr = sltu(a, b, c);  expect_dec("sltu", 1, FU_ALU, OP_SLTU, RC_REGW, 1, a, 1, b, 1, c, 0, 0);
      instr = sll(a, b, sa);  expect_dec("sll",  sa != 0 || b != 0 || a != 0, FU_ALU, OP_SLL, RC_REGW, 1, a, 1, b, 0, 0, 32'(sa), 1);
      instr = srl(a, b, sa);  expect_dec("srl",  1, FU_ALU, OP_SRL, RC_REGW, 1, a, 1, b, 0, 0, 32'(sa), 1);
      instr = sra(a, b, sa);  expect_dec("sra",  1, FU_ALU, OP_SRA, RC_REGW, 1, a, 1, b, 0, 0, 32'(sa), 1);
      instr = sllv(a, b, c);  expect_dec("sllv", 1, FU_ALU, OP_SLL, RC_REGW, 1, a, 1, b, 1, c, 0, 0);
      instr = addiu(a, b, int'(im)); expect_dec("addiu", 1, FU_ALU, OP_ADD, RC_REGW, 1, a, 1, b, 0, 0, se, 1);
      instr = slti(a, b, int'(im));  expect_dec("slti",  1, FU_ALU, OP_SLT, RC_REGW, 1, a, 1, b, 0, 0, se, 1);
      instr = sltiu(a, b, int'(im)); expect_dec("sltiu", 1, FU_ALU, OP_SLTU, RC_REGW, 1, a, 1, b, 0, 0, se, 1);
      instr = andi(a, b, int'(im));  expect_dec("andi",  1, FU_ALU, OP_AND, RC_REGW, 1, a, 1, b, 0, 0, ze, 1);
      instr = ori(a, b, int'(im));   expect_dec("ori",   1, FU_ALU, OP_OR,  RC_REGW, 1, a, 1, b, 0, 0, ze, 1);
      instr = xori(a, b, int'(im));  expect_dec("xori",  1, FU_ALU, OP_XOR, RC_REGW, 1, a, 1, b, 0, 0, ze, 1);
      instr = lui(a, int'(im));      expect_dec("lui",   1, FU_ALU, OP_LUI, RC_REGW, 1, a, 0, 0, 0, 0, {im, 16'd0}, 1);
      instr = lw(a, int'(im), b);    expect_dec("lw",    1, FU_LSU, OP_LW, RC_REGW, 1, a, 1, b, 0, 0, se, 1);
      instr = sw(c, int'(im), b);    expect_dec("sw",    1, FU_LSU, OP_SW, RC_STORE, 0, 0, 1, b, 1, c, se, 1);
      instr = mult(b, c);     expect_dec("mult",  1, FU_MDU, OP_MULT, RC_NONREG, 0, 0, 1, b, 1, c, 0, 0);
      instr = multu(b, c);    expect_dec("multu", 1, FU_MDU, OP_MULTU, RC_NONREG, 0, 0, 1, b, 1, c, 0, 0);
      instr = div(b, c);      expect_dec("div",   1, FU_MDU, OP_DIV, RC_NONREG, 0, 0, 1, b, 1, c, 0, 0);
      instr = divu(b, c);     expect_dec("divu",  1, FU_MDU, OP_DIVU, RC_NONREG, 0, 0, 1, b, 1, c, 0, 0);
      instr = mfhi(a);        expect_dec("mfhi",  1, FU_MDU, OP_MFHI, RC_REGW, 1, a, 0, 0, 0, 0, 0, 0);
      instr = mflo(a);        expect_dec("mflo",  1, FU_MDU, OP_MFLO, RC_REGW, 1, a, 0, 0, 0, 0, 0, 0);
      instr = beq(b, c, int'(im)); expect_dec("beq", 1, FU_BJU, OP_BEQ, RC_BRANCH, 0, 0, 1, b, 1, c, bt, 1);
      instr = bne(b, c, int'(im)); expect_dec("bne", 1, FU_BJU, OP_BNE, RC_BRANCH, 0, 0, 1, b, 1, c, bt, 1);
      instr = blez(b, int'(im));   expect_dec("blez", 1, FU_BJU, OP_BLEZ, RC_BRANCH, 0, 0, 1, b, 0, 0, bt, 1);
      instr = bgtz(b, int'(im));   expect_dec("bgtz", 1, FU_BJU, OP_BGTZ, RC_BRANCH, 0, 0, 1, b, 0, 0, bt, 1);
      instr = bltz(b, int'(im));   expect_dec("bltz", 1, FU_BJU, OP_BLTZ, RC_BRANCH, 0, 0, 1, b, 0, 0, bt, 1);
      instr = bgez(b, int'(im));   expect_dec("bgez", 1, FU_BJU, OP_BGEZ, RC_BRANCH, 0, 0, 1, b, 0, 0, bt, 1);
      instr = j(pc + 32'(4 * (n + 1)));
      expect_dec("j",   1, FU_BJU, OP_J, RC_BRANCH, 0, 0, 0, 0, 0, 0, {p4[31:28], instr[25:0], 2'b00}, 1);
      instr = jal(pc + 32'(4 * (n + 1)));
      expect_dec("jal", 1, FU_BJU, OP_JAL, RC_LINK, 1, 31, 0, 0, 0, 0, {p4[31:28], instr[25:0], 2'b00}, 1);
      instr = jr(b);          expect_dec("jr",   1, FU_BJU, OP_JR, RC_BRANCH, 0, 0, 1, b, 0, 0, 0, 0);
      instr = jalr(a, b);     expect_dec("jalr", 1, FU_BJU, OP_JALR, RC_LINK, 1, a, 1, b, 0, 0, 0, 0);
      instr = jalr(0, b);     expect_dec("jalr r0", 1, FU_BJU, OP_JALR, RC_BRANCH, 0, 0, 1, b, 0, 0, 0, 0);
      // dropped: writes to R0, NOP, cancelled slot, unknown opcode
      instr = addu(0, b, c);  expect_dec("addu r0", 0, FU_NONE, OP_ADD, RC_REGW, 0, 0, 0, 0, 0, 0, 0, 0);
      instr = lw(0, int'(im), b); expect_dec("lw r0", 0, FU_NONE, OP_ADD, RC_REGW, 0, 0, 0, 0, 0, 0, 0, 0);
      instr = 32'd0;          expect_dec("nop", 0, FU_NONE, OP_ADD, RC_REGW, 0, 0, 0, 0, 0, 0, 0, 0);
      instr = {6'h3f, 26'($urandom)}; expect_dec("bad", 0, FU_NONE, OP_ADD, RC_REGW, 0, 0, 0, 0, 0, 0, 0, 0);
      valid = 1'b0;
      instr = addu(a, b, c);  expect_dec("cancelled", 0, FU_NONE, OP_ADD, RC_REGW, 0, 0, 0, 0, 0, 0, 0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
