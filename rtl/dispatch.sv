// dispatch: the Dispatch stage. Holds one renamed group, reads its source
// operands and writes its instructions into the distributed reservation
// stations.
//
// Every cycle the held instructions read their source pointers from the Value
// Buffer together with the Valid bits (both forwarded from the CDBs of the
// same cycle). A ready operand carries its data; a missing one carries its
// pseudo-pointer in op[5:0] with v = 0, and the reservation station waits for
// it on the CDBs. Each reservation station has one write port, so each takes
// at most one instruction per cycle: the earliest undispatched instruction of
// its unit, provided the station has a free entry. The two ALU stations take
// the first two ALU instructions (the first goes to ALU0 when ALU0 has room).
// The `disp` bit of each instruction written is set (update-pending logic);
// while any instruction of the group is left, `stall` is high, the group is
// processed again next cycle and the decode/issue stage holds. A new group is
// loaded when the current one finishes or the stage is empty. Restore empties
// the stage.
module dispatch
  import rr_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      restore,
  input  logic                      load,
  input  rr_t [FW-1:0]              rr_in,
  // VB and Valid-bit read
  output logic [2*FW-1:0][PW-1:0]   vb_raddr,
  input  logic [2*FW-1:0][31:0]     vb_rdata,
  input  logic [NPREG-1:0]          valid_bits,
  input  cdb_t [NUM_CDB-1:0]        cdb,
  // reservation stations
  input  logic [NUM_RS-1:0]         rs_free,
  output logic [NUM_RS-1:0]         rs_load,
  output uop_t [NUM_RS-1:0]         rs_uop,
  output logic                      stall
);
  rr_t [FW-1:0]  grp;
  logic [FW-1:0] disp_now;
  uop_t [FW-1:0] u;

  function automatic logic vld(input logic [PW-1:0] p, input logic [NPREG-1:0] vb,
                               input cdb_t [NUM_CDB-1:0] c);
    logic r;
    r = vb[p];
    for (int k = 0; k < NUM_CDB; k++) if (c[k].valid && c[k].dest == p) r = 1'b1;
    return r;
  endfunction

  always_comb begin
    for (int i = 0; i < FW; i++) begin
      vb_raddr[2*i]   = grp[i].p1;
      vb_raddr[2*i+1] = grp[i].p2;
      u[i] = grp[i].u;
      if (grp[i].need1) begin
        u[i].v1  = vld(grp[i].p1, valid_bits, cdb);
        u[i].op1 = u[i].v1 ? vb_rdata[2*i] : {26'd0, grp[i].p1};
      end
      if (grp[i].need2) begin
        u[i].v2  = vld(grp[i].p2, valid_bits, cdb);
        u[i].op2 = u[i].v2 ? vb_rdata[2*i+1] : {26'd0, grp[i].p2};
      end
    end
  end

  always_comb begin
    logic [NUM_RS-1:0] used;
    int                r;
    used     = '0;
    r        = 0;
    rs_load  = '0;
    rs_uop   = '0;
    disp_now = '0;
    for (int i = 0; i < FW; i++) begin
      if (!grp[i].disp) begin
        unique case (grp[i].u.fu)
          FU_ALU: begin
            if (!used[RS_ALU0] && !used[RS_ALU1]) begin
              // first pending ALU instruction of the group
              if (rs_free[RS_ALU0]) begin
                used[RS_ALU0] = 1'b1; rs_load[RS_ALU0] = 1'b1; rs_uop[RS_ALU0] = u[i]; disp_now[i] = 1'b1;
              end else if (rs_free[RS_ALU1]) begin
                used[RS_ALU1] = 1'b1; rs_load[RS_ALU1] = 1'b1; rs_uop[RS_ALU1] = u[i]; disp_now[i] = 1'b1;
              end else begin
                used[RS_ALU0] = 1'b1; used[RS_ALU1] = 1'b1;
              end
            end else if (!used[RS_ALU1]) begin
              used[RS_ALU1] = 1'b1;
              if (rs_free[RS_ALU1]) begin
                rs_load[RS_ALU1] = 1'b1; rs_uop[RS_ALU1] = u[i]; disp_now[i] = 1'b1;
              end
            end else if (!used[RS_ALU0]) begin
              used[RS_ALU0] = 1'b1;
              if (rs_free[RS_ALU0]) begin
                rs_load[RS_ALU0] = 1'b1; rs_uop[RS_ALU0] = u[i]; disp_now[i] = 1'b1;
              end
            end
          end
          FU_BJU, FU_LSU, FU_MDU: begin
            r = (grp[i].u.fu == FU_BJU) ? RS_BJU : (grp[i].u.fu == FU_LSU) ? RS_LSU : RS_MDU;
            if (!used[r]) begin
              used[r] = 1'b1;
              if (rs_free[r]) begin
                rs_load[r] = 1'b1; rs_uop[r] = u[i]; disp_now[i] = 1'b1;
              end
            end
          end
          default: ;
        endcase
      end
    end
    stall = 1'b0;
    for (int i = 0; i < FW; i++) if (!grp[i].disp && !disp_now[i]) stall = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || restore) begin
      for (int i = 0; i < FW; i++) begin
        grp[i]      <= '0;
        grp[i].disp <= 1'b1;
      end
    end else if (!stall) begin
      if (load) grp <= rr_in;
      else for (int i = 0; i < FW; i++) grp[i].disp <= 1'b1;
    end else begin
      for (int i = 0; i < FW; i++) if (disp_now[i]) grp[i].disp <= 1'b1;
    end
  end
endmodule
