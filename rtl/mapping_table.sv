// mapping_table: the Issue Pointer (IP) and Commit Pointer (CP) tables that map
// the 32 logical registers onto 6-bit pseudo-pointers into the Value Buffer.
//
// IP is read by the decode/issue stage for the source registers of a group
// (eight read ports) and written with the group's new destination pointers
// (four write ports, already filtered by the destination overwrite logic). CP
// is written when instructions commit (four write ports; a later port wins on
// the same register) and read to find the pointers being replaced (four read
// ports). The two tables are one unit with an internal port: in a restore cycle
// every IP entry is loaded from CP in one clock, which is what makes branch
// misprediction recovery take a single cycle. Reads are combinational, writes
// at the clock edge; restore overrides the IP writes of that cycle. Reset maps
// every register to pointer 0, the location that always holds zero.
module mapping_table
  import rr_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [2*FW-1:0][4:0]     ip_raddr,
  output logic [2*FW-1:0][PW-1:0]  ip_rdata,
  input  logic [FW-1:0]            ip_we,
  input  logic [FW-1:0][4:0]       ip_waddr,
  input  logic [FW-1:0][PW-1:0]    ip_wdata,
  input  logic [FW-1:0]            cp_we,
  input  logic [FW-1:0][4:0]       cp_waddr,
  input  logic [FW-1:0][PW-1:0]    cp_wdata,
  input  logic [FW-1:0][4:0]       cp_raddr,
  output logic [FW-1:0][PW-1:0]    cp_rdata,
  input  logic [4:0]               dbg_raddr,
  output logic [PW-1:0]            dbg_cp_rdata,
  input  logic                     restore
);
  logic [NLREG-1:0][PW-1:0] ip, cp;

  always_comb begin
    for (int i = 0; i < 2*FW; i++) ip_rdata[i] = ip[ip_raddr[i]];
    for (int i = 0; i < FW; i++)   cp_rdata[i] = cp[cp_raddr[i]];
  end
  assign dbg_cp_rdata = cp[dbg_raddr];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ip <= '0;
    end else if (restore) begin
      ip <= cp;
    end else begin
      for (int i = 0; i < FW; i++)
        if (ip_we[i] && ip_waddr[i] != 5'd0) ip[ip_waddr[i]] <= ip_wdata[i];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cp <= '0;
    end else begin
      for (int i = 0; i < FW; i++)
        if (cp_we[i] && cp_waddr[i] != 5'd0) cp[cp_waddr[i]] <= cp_wdata[i];
    end
  end
endmodule
