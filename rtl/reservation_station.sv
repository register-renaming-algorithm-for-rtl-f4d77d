// reservation_station: one distributed reservation station (one per
// functional unit) that holds instructions until their operands are ready and
// schedules them oldest-first.
//
// Allocate and wait: when dispatch raises `load`, the instruction is written
// into the lowest-numbered entry whose busy bit B is clear, and B is set. Every
// busy entry compares the pointer in op[5:0] of each missing operand with the
// destination on both CDBs and captures the data on a match.
// Issue: among busy entries whose two operands are valid, the oldest is chosen,
// age being the ROB position measured from the Commit Counter, which stays
// correct when the ROB wraps. With IN_ORDER set (load/store and
// multiply/divide stations) only the oldest busy entry may issue, so those
// units see their instructions in program order. Bypass: when no entry is
// busy and the incoming instruction already has both operands, it goes to the
// issue register directly and no entry is allocated.
// Timing: the choice is registered in `iss`, the first pipeline register of
// the unit, so an instruction reaches its unit one clock after it became
// ready. `iss` is replaced only when the unit raises `accept`; otherwise it
// holds and nothing issues. Restore clears every entry and `iss`.
module reservation_station
  import rr_pkg::*;
#(
  parameter int ENTRIES  = RS_ENTRIES,
  parameter bit IN_ORDER = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                restore,
  input  logic                load,
  input  uop_t                uop_in,
  input  cdb_t [NUM_CDB-1:0]  cdb,
  input  logic [RW-1:0]       cc,
  input  logic                accept,
  output logic                has_free,
  output uop_t                iss,
  output logic                bypass,
  output logic [$clog2(ENTRIES+1)-1:0] nbusy
);
  localparam int IW = $clog2(ENTRIES);

  uop_t [ENTRIES-1:0] ent;
  logic [ENTRIES-1:0] busy;
  logic [ENTRIES-1:0] ready;
  logic               sel_v;
  logic [IW-1:0]      sel;
  logic               free_v;
  logic [IW-1:0]      free_i;

  function automatic uop_t snoop(input uop_t x, input cdb_t [NUM_CDB-1:0] c);
    uop_t r;
    r = x;
    for (int k = 0; k < NUM_CDB; k++) begin
      if (c[k].valid && !r.v1 && r.op1[PW-1:0] == c[k].dest) begin r.op1 = c[k].data; r.v1 = 1'b1; end
      if (c[k].valid && !r.v2 && r.op2[PW-1:0] == c[k].dest) begin r.op2 = c[k].data; r.v2 = 1'b1; end
    end
    return r;
  endfunction

  always_comb begin
    logic [RW-1:0] best;
    logic          oldest_v;
    logic [IW-1:0] oldest;
    logic [RW-1:0] oldest_age;
    for (int i = 0; i < ENTRIES; i++) ready[i] = busy[i] && ent[i].v1 && ent[i].v2;
    // oldest ready entry
    sel_v = 1'b0; sel = '0; best = '1;
    for (int i = 0; i < ENTRIES; i++)
      if (ready[i] && (!sel_v || age(cc, ent[i].reo) < best)) begin
        sel_v = 1'b1; sel = IW'(i); best = age(cc, ent[i].reo);
      end
    // oldest busy entry (in-order stations)
    oldest_v = 1'b0; oldest = '0; oldest_age = '1;
    for (int i = 0; i < ENTRIES; i++)
      if (busy[i] && (!oldest_v || age(cc, ent[i].reo) < oldest_age)) begin
        oldest_v = 1'b1; oldest = IW'(i); oldest_age = age(cc, ent[i].reo);
      end
    if (IN_ORDER) begin
      sel_v = oldest_v && ready[oldest];
      sel   = oldest;
    end
    free_v = 1'b0; free_i = '0;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (!busy[i]) begin free_v = 1'b1; free_i = IW'(i); end
    nbusy = '0;
    for (int i = 0; i < ENTRIES; i++) nbusy = nbusy + ($bits(nbusy))'(busy[i]);
  end

  assign has_free = free_v;
  assign bypass   = load && (busy == '0) && uop_in.v1 && uop_in.v2 && accept;

  always_ff @(posedge clk) begin
    if (!rst_n || restore) begin
      busy <= '0;
      iss  <= '0;
    end else begin
      for (int i = 0; i < ENTRIES; i++) if (busy[i]) ent[i] <= snoop(ent[i], cdb);
      if (accept) begin
        if (sel_v) begin
          iss       <= ent[sel];
          busy[sel] <= 1'b0;
        end else if (bypass) begin
          iss <= uop_in;
        end else begin
          iss <= '0;
        end
      end
      if (load && !bypass) begin
        ent[free_i]  <= snoop(uop_in, cdb);
        busy[free_i] <= 1'b1;
      end
    end
  end
endmodule
