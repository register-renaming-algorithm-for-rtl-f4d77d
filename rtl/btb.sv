// btb: branch target buffer. Holds the target of branches and jumps that were
// taken, written when such an instruction commits and read in fetch with the
// address of the first branch of the fetch group.
//
// Direct-mapped and tagged; ENTRIES is this design's choice. Reads are
// combinational, writes take effect at the clock edge. The buffer does either
// a read or a write in a cycle, so the fetch stage idles in a cycle that
// writes it. Reset clears every valid bit.
module btb #(
  parameter int ENTRIES = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] raddr,
  output logic        hit,
  output logic [31:0] target,
  input  logic        we,
  input  logic [31:0] waddr,
  input  logic [31:0] wtarget
);
  localparam int IB = $clog2(ENTRIES);
  localparam int TB = 30 - IB;

  logic [ENTRIES-1:0] valid;
  logic [TB-1:0]      tag  [ENTRIES];
  logic [31:0]        tgt  [ENTRIES];

  logic [IB-1:0] ri, wi;
  assign ri = raddr[IB+1:2];
  assign wi = waddr[IB+1:2];

  assign hit    = valid[ri] && (tag[ri] == raddr[31:IB+2]);
  assign target = tgt[ri];

  always_ff @(posedge clk) begin
    if (!rst_n) valid <= '0;
    else if (we) valid[wi] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (we) begin
      tag[wi] <= waddr[31:IB+2];
      tgt[wi] <= wtarget;
    end
  end
endmodule
