// bpb: branch prediction buffer of 2-bit saturating counters, one per entry,
// indexed by the branch address. Every entry starts at 00 (not taken); the
// counter a branch computed when it executed is written back when it commits
// (jumps write 11). A branch is predicted taken when bit 1 is set. Reads are
// combinational, writes at the clock edge.
module bpb #(
  parameter int ENTRIES = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] raddr,
  output logic [1:0]  bits,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [1:0]  wbits
);
  localparam int IB = $clog2(ENTRIES);
  logic [1:0] cnt [ENTRIES];

  assign bits = cnt[raddr[IB+1:2]];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) cnt[i] <= 2'b00;
    end else if (we) begin
      cnt[waddr[IB+1:2]] <= wbits;
    end
  end
endmodule
