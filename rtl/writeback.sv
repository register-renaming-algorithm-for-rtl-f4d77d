// writeback: allocates the two common data buses (CDBs).
//
// Each functional unit's last stage presents a request (M = multiply/divide,
// A1, A2 = the two ALUs, B = branch/jump, L = load/store); those with the
// write-back bit set compete. The two oldest, by ROB position measured from
// the Commit Counter, are granted CDB 0 and CDB 1; the others are not
// granted, their units hold, and they compete again next cycle (`contention`
// is raised). A request whose wb bit is clear (a store, a branch without
// link, a MULT) needs no bus and is always granted. Purely combinational: the
// CDBs drive the Value Buffer, the Valid bits and the reservation stations in
// the same cycle.
module writeback
  import rr_pkg::*;
#(
  parameter int NREQ = NUM_RS
) (
  input  wbreq_t [NREQ-1:0]    req,
  input  logic [RW-1:0]        cc,
  output logic [NREQ-1:0]      grant,
  output cdb_t [NUM_CDB-1:0]   cdb,
  output logic                 contention
);
  always_comb begin
    logic [NREQ-1:0] left;
    grant = '0;
    cdb   = '0;
    for (int r = 0; r < NREQ; r++) begin
      left[r] = req[r].valid && req[r].wb;
      if (req[r].valid && !req[r].wb) grant[r] = 1'b1;
    end
    for (int b = 0; b < NUM_CDB; b++) begin
      logic          found;
      int            pick;
      logic [RW-1:0] best;
      found = 1'b0; pick = 0; best = '1;
      for (int r = 0; r < NREQ; r++)
        if (left[r] && (!found || age(cc, req[r].reo) < best)) begin
          found = 1'b1; pick = r; best = age(cc, req[r].reo);
        end
      if (found) begin
        left[pick]    = 1'b0;
        grant[pick]   = 1'b1;
        cdb[b].valid  = 1'b1;
        cdb[b].dest   = req[pick].dest;
        cdb[b].data   = req[pick].data;
      end
    end
    contention = |left;
  end
endmodule
