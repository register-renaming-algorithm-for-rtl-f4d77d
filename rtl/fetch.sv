// fetch: program counter and fetch-group formation.
//
// Each cycle the four-bank instruction memory returns the four words at PC.
// A pre-decode finds the first branch or jump b of the group and applies the
// group rules of the description: a branch in the fourth slot is dropped and
// refetched next cycle (so it stays with its delay slot); a branch predicted
// taken keeps its delay slot and nothing after it, and the PC loads the BTB
// target; a branch predicted not taken keeps the following instructions up to,
// but not including, the next branch (only one prediction can be looked up per
// cycle). The prediction is "taken" when the BTB hits and the BPB counter's
// upper bit is set. The PC advances by the number of slots kept.
//
// Timing: the group is registered in fq and held while `hold` is high. In a
// cycle that writes the BTB no group is produced (the BTB cannot be read and
// written in one cycle). `restore` loads restore_pc and empties fq; it has
// priority over everything else.
module fetch
  import rr_pkg::*;
#(
  parameter logic [31:0] RESET_PC   = 32'h8000_0400,
  parameter int          IMEM_WORDS = 1024,
  parameter int          BTB_ENTRIES = 64,
  parameter int          BPB_ENTRIES = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hold,
  input  logic        restore,
  input  logic [31:0] restore_pc,
  // commit-time predictor updates
  input  logic        btb_we,
  input  logic [31:0] btb_waddr,
  input  logic [31:0] btb_wtarget,
  input  logic        bpb_we,
  input  logic [31:0] bpb_waddr,
  input  logic [1:0]  bpb_wbits,
  // program load
  input  logic        imem_we,
  input  logic [31:0] imem_waddr,
  input  logic [31:0] imem_wdata,
  output fgroup_t     fq,
  output logic        btb_stall
);
  logic [31:0]      pc;
  logic [3:0][31:0] words;
  logic [3:0]       cti;
  logic [2:0]       b;          // first branch slot, 4 = none
  logic [2:0]       c;          // next branch after the delay slot, 4 = none
  logic [31:0]      br_pc;
  logic             btb_hit;
  logic [31:0]      btb_tgt;
  logic [1:0]       bpb_bits;
  logic             taken;
  logic [2:0]       n;          // slots kept
  logic [31:0]      next_pc;

  function automatic logic is_cti(input logic [31:0] w);
    logic [5:0] op;
    op = w[31:26];
    return (op inside {6'h01, 6'h02, 6'h03, 6'h04, 6'h05, 6'h06, 6'h07}) ||
           (op == 6'h00 && (w[5:0] == 6'h08 || w[5:0] == 6'h09));
  endfunction

  icache #(.WORDS(IMEM_WORDS)) u_icache (
    .clk, .pc, .instr(words), .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata));

  btb #(.ENTRIES(BTB_ENTRIES)) u_btb (
    .clk, .rst_n, .raddr(br_pc), .hit(btb_hit), .target(btb_tgt),
    .we(btb_we), .waddr(btb_waddr), .wtarget(btb_wtarget));

  bpb #(.ENTRIES(BPB_ENTRIES)) u_bpb (
    .clk, .rst_n, .raddr(br_pc), .bits(bpb_bits),
    .we(bpb_we), .waddr(bpb_waddr), .wbits(bpb_wbits));

  always_comb begin
    for (int k = 0; k < 4; k++) cti[k] = is_cti(words[k]);
    b = 3'd4;
    for (int k = 3; k >= 0; k--) if (cti[k]) b = 3'(k);
    br_pc = pc + {27'd0, b[1:0], 2'b00};
    taken = 1'b0;
    c     = 3'd4;
    if (b == 3'd4) begin
      n = 3'd4;
    end else if (b == 3'd3) begin
      n = 3'd3;
    end else begin
      taken = btb_hit && bpb_bits[1];
      if (taken) begin
        n = b + 3'd2;
      end else begin
        for (int k = 3; k >= 0; k--) if (cti[k] && 3'(k) > b + 3'd1) c = 3'(k);
        n = c;
      end
    end
    next_pc = taken ? btb_tgt : pc + {27'd0, n, 2'b00};
  end

  assign btb_stall = btb_we;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc       <= RESET_PC;
      fq       <= '0;
    end else if (restore) begin
      pc       <= restore_pc;
      fq.valid <= 1'b0;
    end else if (!hold) begin
      if (btb_we) begin
        fq.valid <= 1'b0;
      end else begin
        pc             <= next_pc;
        fq.valid       <= 1'b1;
        for (int k = 0; k < 4; k++) begin
          fq.slot[k].valid <= 3'(k) < n;
          fq.slot[k].instr <= words[k];
          fq.slot[k].pc    <= pc + 32'(4 * k);
        end
        fq.pred_taken  <= taken;
        fq.pred_target <= btb_tgt;
        fq.pred_bits   <= bpb_bits;
      end
    end
  end
endmodule
