// store_buffer: FIFO of stores waiting to reach data memory, so that stores
// on a mispredicted path can be cancelled.
//
// A store executing in the load/store unit is pushed at the tail (address,
// data, committed = 0). When the ROB commits stores, the same number of the
// oldest uncommitted entries are marked committed. The head entry, once
// committed, is handed to memory when the unit allows it (`drain_ok`) and
// popped. A load looks up its address and takes the data of the youngest
// matching entry, committed or not (the unit executes loads and stores in
// program order, so every entry is older than the load). Restore removes the
// uncommitted entries and keeps the committed ones. `full` tells the unit to
// hold a store. Updates at the clock edge; lookup is combinational.
module store_buffer #(
  parameter int DEPTH = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        restore,
  input  logic        push,
  input  logic [31:0] push_addr,
  input  logic [31:0] push_data,
  input  logic [2:0]  commit_n,
  input  logic        drain_ok,
  output logic        drain,
  output logic [31:0] drain_addr,
  output logic [31:0] drain_data,
  input  logic [31:0] lookup_addr,
  output logic        lookup_hit,
  output logic [31:0] lookup_data,
  output logic        full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int IW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH+1);

  logic [31:0] addr_q [DEPTH];
  logic [31:0] data_q [DEPTH];
  logic [IW-1:0] head;
  logic [CW-1:0] ncom;      // committed entries, all at the head side

  function automatic logic [IW-1:0] wrap(input int i);
    return IW'(i % DEPTH);
  endfunction

  assign full       = count == CW'(DEPTH);
  assign drain      = drain_ok && ncom != 0;
  assign drain_addr = addr_q[head];
  assign drain_data = data_q[head];

  always_comb begin
    lookup_hit  = 1'b0;
    lookup_data = '0;
    for (int k = 0; k < DEPTH; k++)
      if (CW'(k) < count && addr_q[wrap(int'(head) + k)][31:2] == lookup_addr[31:2]) begin
        lookup_hit  = 1'b1;
        lookup_data = data_q[wrap(int'(head) + k)];
      end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head  <= '0;
      count <= '0;
      ncom  <= '0;
    end else if (restore) begin
      count <= ncom;
    end else begin
      logic [CW-1:0] c, nc;
      c  = count;
      nc = ncom;
      if (drain) begin
        head <= wrap(int'(head) + 1);
        c  = c - CW'(1);
        nc = nc - CW'(1);
      end
      if (push) begin
        addr_q[wrap(int'(head) + int'(count))] <= push_addr;
        data_q[wrap(int'(head) + int'(count))] <= push_data;
        c = c + CW'(1);
      end
      count <= c;
      ncom  <= nc + CW'(commit_n);
    end
  end
endmodule
