// hilo_buffer: wrap-around buffer of HI/LO register values that lets
// multiply/divide results be written speculatively.
//
// Each MULT/MULTU/DIV/DIVU writes a new entry (valid, not complete) after the
// newest one; MFHI/MFLO read the newest entry. When k of these instructions
// commit, the k oldest incomplete entries become complete and the older ones
// are given up, so exactly one complete entry, the architectural HI/LO, is
// kept. A restore discards every incomplete entry and makes the complete one
// the newest again. `full` is raised while DEPTH-1 incomplete entries exist;
// the unit then holds a further write. Reset makes entry 0 the complete entry
// with HI = LO = 0. Writes and commits act at the clock edge, reads are
// combinational.
module hilo_buffer #(
  parameter int DEPTH = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        restore,
  input  logic        we,
  input  logic [31:0] whi,
  input  logic [31:0] wlo,
  input  logic [2:0]  commit_n,
  output logic [31:0] hi,
  output logic [31:0] lo,
  output logic        full
);
  localparam int IW = $clog2(DEPTH);
  logic [31:0]  hi_q [DEPTH];
  logic [31:0]  lo_q [DEPTH];
  logic [IW-1:0] ci;      // the complete entry
  logic [IW-1:0] newest;
  logic [IW:0]   uc;      // incomplete entries

  assign hi   = hi_q[newest];
  assign lo   = lo_q[newest];
  assign full = uc >= (IW+1)'(DEPTH - 1);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ci       <= '0;
      newest   <= '0;
      uc       <= '0;
      hi_q[0]  <= '0;
      lo_q[0]  <= '0;
    end else if (restore) begin
      newest   <= ci;
      uc       <= '0;
    end else begin
      // entries from ci+1 to newest are the incomplete ones, oldest first
      ci <= IW'(ci + IW'(commit_n));
      if (we) begin
        hi_q[IW'(newest + 1)]     <= whi;
        lo_q[IW'(newest + 1)]     <= wlo;
        newest <= IW'(newest + 1);
      end
      uc <= uc + (IW+1)'(we) - (IW+1)'(commit_n);
    end
  end
endmodule
