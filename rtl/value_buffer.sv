// value_buffer: the merged physical register file (VB). 64 locations of 32
// bits hold both committed and speculative results, so no data ever moves
// between register files.
//
// Eight combinational read ports serve the dispatch stage (two operands for
// each of four instructions); two write ports take the two common data buses.
// A read of a location that a CDB writes in the same cycle returns the CDB
// value (the description writes VB in the first half of the cycle and reads
// it in the second half). Location 0 always reads zero and stands for R0.
module value_buffer
  import rr_pkg::*;
#(
  parameter int NRD = 2 * FW
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NRD-1:0][PW-1:0]  raddr,
  output logic [NRD-1:0][31:0]    rdata,
  input  cdb_t [NUM_CDB-1:0]      cdb,
  input  logic [PW-1:0]           dbg_raddr,
  output logic [31:0]             dbg_rdata
);
  logic [NPREG-1:0][31:0] mem;

  function automatic logic [31:0] rd_fwd(input logic [PW-1:0] a,
                                         input logic [NPREG-1:0][31:0] m,
                                         input cdb_t [NUM_CDB-1:0] c);
    logic [31:0] r;
    r = m[a];
    for (int k = 0; k < NUM_CDB; k++)
      if (c[k].valid && c[k].dest == a) r = c[k].data;
    return (a == '0) ? 32'd0 : r;
  endfunction

  always_comb begin
    for (int i = 0; i < NRD; i++) rdata[i] = rd_fwd(raddr[i], mem, cdb);
  end
  assign dbg_rdata = (dbg_raddr == '0) ? 32'd0 : mem[dbg_raddr];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mem <= '0;
    end else begin
      for (int k = 0; k < NUM_CDB; k++)
        if (cdb[k].valid && cdb[k].dest != '0) mem[cdb[k].dest] <= cdb[k].data;
    end
  end
endmodule
