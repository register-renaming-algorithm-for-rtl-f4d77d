// icache: four-bank instruction memory that returns the four consecutive words
// starting at any word-aligned PC in one cycle.
//
// Word w of the program lives in bank w[1:0], row w>>2. For a read, PC[3:2]
// names the bank of the first instruction; banks below it are read one row
// further on (the "DI" index-increment logic), so a group that crosses a
// four-word boundary still comes out in one cycle. The bank outputs are then
// rotated back into program order (the reordering network). The memory never
// misses, as described; tags are therefore not kept. Addresses wrap inside
// WORDS words. Reads are combinational; the load port writes one word per
// clock and is used to place a program before it runs.
module icache #(
  parameter int WORDS = 1024            // total words, a multiple of 4
) (
  input  logic              clk,
  input  logic [31:0]       pc,
  output logic [3:0][31:0]  instr,      // instr[k] = word at pc + 4k
  input  logic              we,
  input  logic [31:0]       waddr,
  input  logic [31:0]       wdata
);
  localparam int ROWS = WORDS / 4;
  localparam int RB   = $clog2(ROWS);

  logic [31:0] bank [4][ROWS];

  logic [RB-1:0]    idx;
  logic [1:0]       first;
  logic [3:0][31:0] bank_out;

  assign idx   = pc[RB+3:4];
  assign first = pc[3:2];

  always_comb begin
    for (int b = 0; b < 4; b++) begin
      // DI logic: banks before the first one belong to the next row
      logic [RB-1:0] row;
      row = (2'(b) < first) ? idx + RB'(1) : idx;
      bank_out[b] = bank[b][row];
    end
    for (int k = 0; k < 4; k++)
      instr[k] = bank_out[2'(first + 2'(k))];
  end

  always_ff @(posedge clk) begin
    if (we) bank[waddr[3:2]][waddr[RB+3:4]] <= wdata;
  end
endmodule
