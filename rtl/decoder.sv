// decoder: turns one MIPS-I instruction word into the internal format used by
// the rename and execution stages (functional-unit code, operation, logical
// destination and sources, immediate, ROB code).
//
// Purely combinational. The functional-unit codes and ROB codes follow the
// description; the operation encoding is this design's own. Link instructions
// name R31 (JAL) or rd (JALR) as destination. The all-zero word and any
// register write to R0 come out as invalid (NOP): NOPs do not enter the ROB.
// For branches, `imm` already holds the taken target (PC+4+offset*4) and for
// J/JAL the 26-bit index is placed into PC+4's region, so the branch unit needs
// no adder for it. Shifts by a constant carry the amount in `imm`.
// Decoded subset: ADD(U) SUB(U) AND OR XOR NOR SLT(U) SLL SRL SRA SLLV SRLV
// SRAV, ADDI(U) SLTI(U) ANDI ORI XORI LUI, MULT(U) DIV(U) MFHI MFLO, LW SW,
// BEQ BNE BLEZ BGTZ BLTZ BGEZ, J JAL JR JALR. Anything else is a NOP.
module decoder
  import rr_pkg::*;
(
  input  logic        valid,
  input  logic [31:0] instr,
  input  logic [31:0] pc,
  output dec_t        d
);
  logic [5:0]  op, fn;
  logic [4:0]  rs, rt, rd, sa;
  logic [31:0] simm, zimm, btgt, jtgt;
  logic [31:0] pc4;

  assign op   = instr[31:26];
  assign rs   = instr[25:21];
  assign rt   = instr[20:16];
  assign rd   = instr[15:11];
  assign sa   = instr[10:6];
  assign fn   = instr[5:0];
  assign simm = {{16{instr[15]}}, instr[15:0]};
  assign zimm = {16'd0, instr[15:0]};
  assign btgt = pc4 + {simm[29:0], 2'b00};
  assign pc4  = pc + 32'd4;
  assign jtgt = {pc4[31:28], instr[25:0], 2'b00};

  always_comb begin
    logic ok;
    d        = '0;
    d.pc     = pc;
    d.fu     = FU_ALU;
    d.exe    = OP_ADD;
    d.rcode  = RC_REGW;
    ok       = 1'b1;
    unique case (op)
      6'h00: begin
        d.rd = rd; d.regw = 1'b1;
        d.rs1 = rs; d.use_rs1 = 1'b1; d.rs2 = rt; d.use_rs2 = 1'b1;
        unique case (fn)
          6'h00, 6'h02, 6'h03: begin       // SLL SRL SRA: op1 = rt, op2 = sa
            d.exe = (fn == 6'h00) ? OP_SLL : (fn == 6'h02) ? OP_SRL : OP_SRA;
            d.rs1 = rt; d.use_rs2 = 1'b0; d.imm_op2 = 1'b1; d.imm = {27'd0, sa};
          end
          6'h04, 6'h06, 6'h07: begin       // SLLV SRLV SRAV: op1 = rt, op2 = rs
            d.exe = (fn == 6'h04) ? OP_SLL : (fn == 6'h06) ? OP_SRL : OP_SRA;
            d.rs1 = rt; d.rs2 = rs;
          end
          6'h08: begin d.fu = FU_BJU; d.exe = OP_JR; d.regw = 1'b0; d.rd = 5'd0;
                       d.use_rs2 = 1'b0; d.rcode = RC_BRANCH; d.is_cti = 1'b1; end
          6'h09: begin d.fu = FU_BJU; d.exe = OP_JALR; d.use_rs2 = 1'b0;
                       d.rcode = RC_LINK; d.is_cti = 1'b1; end
          6'h10: begin d.fu = FU_MDU; d.exe = OP_MFHI; d.use_rs1 = 1'b0; d.use_rs2 = 1'b0; end
          6'h12: begin d.fu = FU_MDU; d.exe = OP_MFLO; d.use_rs1 = 1'b0; d.use_rs2 = 1'b0; end
          6'h18, 6'h19, 6'h1a, 6'h1b: begin
            d.fu = FU_MDU; d.regw = 1'b0; d.rd = 5'd0; d.rcode = RC_NONREG;
            d.exe = (fn == 6'h18) ? OP_MULT : (fn == 6'h19) ? OP_MULTU :
                    (fn == 6'h1a) ? OP_DIV : OP_DIVU;
          end
          6'h20, 6'h21: d.exe = OP_ADD;
          6'h22, 6'h23: d.exe = OP_SUB;
          6'h24: d.exe = OP_AND;
          6'h25: d.exe = OP_OR;
          6'h26: d.exe = OP_XOR;
          6'h27: d.exe = OP_NOR;
          6'h2a: d.exe = OP_SLT;
          6'h2b: d.exe = OP_SLTU;
          default: ok = 1'b0;
        endcase
      end
      6'h01: begin                          // BLTZ / BGEZ
        d.fu = FU_BJU; d.rcode = RC_BRANCH; d.is_cti = 1'b1;
        d.rs1 = rs; d.use_rs1 = 1'b1; d.imm = btgt;
        d.exe = rt[0] ? OP_BGEZ : OP_BLTZ;
        ok = (rt == 5'd0) || (rt == 5'd1);
      end
      6'h02, 6'h03: begin                   // J / JAL
        d.fu = FU_BJU; d.is_cti = 1'b1; d.imm = jtgt;
        if (op == 6'h03) begin d.exe = OP_JAL; d.rcode = RC_LINK; d.regw = 1'b1; d.rd = 5'd31; end
        else begin d.exe = OP_J; d.rcode = RC_BRANCH; end
      end
      6'h04, 6'h05, 6'h06, 6'h07: begin     // BEQ BNE BLEZ BGTZ
        d.fu = FU_BJU; d.rcode = RC_BRANCH; d.is_cti = 1'b1; d.imm = btgt;
        d.rs1 = rs; d.use_rs1 = 1'b1;
        d.rs2 = rt; d.use_rs2 = (op == 6'h04) || (op == 6'h05);
        d.exe = (op == 6'h04) ? OP_BEQ : (op == 6'h05) ? OP_BNE :
                (op == 6'h06) ? OP_BLEZ : OP_BGTZ;
      end
      6'h08, 6'h09, 6'h0a, 6'h0b, 6'h0c, 6'h0d, 6'h0e, 6'h0f: begin
        d.rd = rt; d.regw = 1'b1; d.rs1 = rs; d.use_rs1 = (op != 6'h0f); d.imm_op2 = 1'b1;
        unique case (op)
          6'h08, 6'h09: begin d.exe = OP_ADD;  d.imm = simm; end
          6'h0a:        begin d.exe = OP_SLT;  d.imm = simm; end
          6'h0b:        begin d.exe = OP_SLTU; d.imm = simm; end
          6'h0c:        begin d.exe = OP_AND;  d.imm = zimm; end
          6'h0d:        begin d.exe = OP_OR;   d.imm = zimm; end
          6'h0e:        begin d.exe = OP_XOR;  d.imm = zimm; end
          default:      begin d.exe = OP_LUI;  d.imm = {instr[15:0], 16'd0}; end
        endcase
      end
      6'h23: begin                          // LW
        d.fu = FU_LSU; d.exe = OP_LW; d.rd = rt; d.regw = 1'b1;
        d.rs1 = rs; d.use_rs1 = 1'b1; d.imm = simm;
      end
      6'h2b: begin                          // SW: op1 = base, op2 = data
        d.fu = FU_LSU; d.exe = OP_SW; d.rcode = RC_STORE;
        d.rs1 = rs; d.use_rs1 = 1'b1; d.rs2 = rt; d.use_rs2 = 1'b1; d.imm = simm;
      end
      default: ok = 1'b0;
    endcase
    // writes to R0 have no effect and are dropped like NOPs (not link jumps:
    // their control transfer still matters)
    if (d.regw && d.rd == 5'd0) begin
      if (d.fu == FU_BJU) begin d.regw = 1'b0; d.rcode = RC_BRANCH; end
      else ok = 1'b0;
    end
    d.valid = valid && ok && (instr != 32'd0);
    if (!d.valid) d.fu = FU_NONE;
  end
endmodule
