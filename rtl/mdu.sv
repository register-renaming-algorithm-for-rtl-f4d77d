// mdu: three-stage multiply/divide unit with its HILO buffer.
//
// Stage 1 is the reservation station's issue register (`iss`); the 64-bit
// product or the quotient/remainder is computed from it (at a behavioural
// level, as in the description) and carried through stages 2 and 3. In
// stage 3 a MULT/MULTU/DIV/DIVU writes a new HILO-buffer entry and reports
// completion on the M_Bus (these instructions write no general register);
// MFHI/MFLO read the newest HILO entry and request a CDB. The station issues
// in program order, so an MFHI/MFLO always reaches stage 3 after the
// instruction that produced its value.
// Stage 3 holds when its MFHI/MFLO is not granted a CDB or when the HILO
// buffer is full; the stall propagates back (`accept` low keeps the issue
// register). Divide by zero gives all-ones quotient and the dividend as
// remainder. Restore empties stages 2 and 3 and rolls the HILO buffer back.
module mdu
  import rr_pkg::*;
#(
  parameter int HILO_DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        restore,
  input  uop_t        iss,
  output logic        accept,
  output wbreq_t      wb,
  input  logic        wb_grant,
  output robupd_t     upd,
  input  logic [2:0]  hilo_commit_n,
  output logic        hilo_full_stall
);
  typedef struct packed {
    uop_t        u;
    logic [31:0] hi;
    logic [31:0] lo;
  } mst_t;

  mst_t s2, s3, s1_res;
  logic s3_move, s2_move, s3_hilo_w, s3_mf;
  logic [31:0] hi, lo;
  logic        full;

  always_comb begin
    logic [63:0] p;
    s1_res    = '0;
    s1_res.u  = iss;
    p = '0;
    unique case (iss.exe)
      OP_MULT:  p = $unsigned($signed({{32{iss.op1[31]}}, iss.op1}) * $signed({{32{iss.op2[31]}}, iss.op2}));
      OP_MULTU: p = {32'd0, iss.op1} * {32'd0, iss.op2};
      OP_DIV:   p = (iss.op2 == 0) ? {iss.op1, 32'hffff_ffff} :
                    {$unsigned($signed(iss.op1) % $signed(iss.op2)),
                     $unsigned($signed(iss.op1) / $signed(iss.op2))};
      OP_DIVU:  p = (iss.op2 == 0) ? {iss.op1, 32'hffff_ffff} :
                    {iss.op1 % iss.op2, iss.op1 / iss.op2};
      default:  p = '0;
    endcase
    s1_res.hi = p[63:32];
    s1_res.lo = p[31:0];
  end

  assign s3_mf     = s3.u.valid && (s3.u.exe == OP_MFHI || s3.u.exe == OP_MFLO);
  assign s3_hilo_w = s3.u.valid && !s3_mf;
  assign s3_move   = !s3.u.valid || (s3_mf ? wb_grant : !full);
  assign s2_move   = !s2.u.valid || s3_move;
  assign accept    = s2_move;
  assign hilo_full_stall = s3_hilo_w && full;

  hilo_buffer #(.DEPTH(HILO_DEPTH)) u_hilo (
    .clk, .rst_n, .restore, .we(s3_hilo_w && s3_move), .whi(s3.hi), .wlo(s3.lo),
    .commit_n(hilo_commit_n), .hi, .lo, .full);

  always_comb begin
    wb       = '0;
    wb.valid = s3.u.valid;
    wb.wb    = s3_mf;
    wb.reo   = s3.u.reo;
    wb.dest  = s3.u.dest;
    wb.data  = (s3.u.exe == OP_MFHI) ? hi : lo;
    upd        = '0;
    upd.valid  = s3_hilo_w && s3_move;
    upd.reo    = s3.u.reo;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || restore) begin
      s2 <= '0;
      s3 <= '0;
    end else begin
      if (s3_move) s3 <= s2;
      if (s2_move) s2 <= s1_res;
    end
  end
endmodule
