// overwrite_logic: resolves dependences inside one fetch group during renaming.
//
// Source overwrite (SOW): a source register of instruction i that is written
// by an earlier instruction j of the same group takes j's new destination
// pointer instead of the pointer read from IP (the latest such j wins). This
// needs s*s-s comparisons for a group of s.
// Destination overwrite (DOW): when several instructions of the group write
// the same logical register, only the last one writes IP, so the next group
// reads the youngest mapping.
// Purely combinational. `sow_hit` / `dow_hit` report that an overwrite took
// place, for performance counting.
module overwrite_logic
  import rr_pkg::*;
(
  input  logic [FW-1:0]              regw,
  input  logic [FW-1:0][4:0]         rd,
  input  logic [FW-1:0][PW-1:0]      new_ptr,
  input  logic [2*FW-1:0][4:0]       src,        // 2i: rs1 of i, 2i+1: rs2 of i
  input  logic [2*FW-1:0][PW-1:0]    src_ptr_ip,
  output logic [2*FW-1:0][PW-1:0]    src_ptr,
  output logic [FW-1:0]              ip_we,
  output logic                       sow_hit,
  output logic                       dow_hit
);
  always_comb begin
    sow_hit = 1'b0;
    dow_hit = 1'b0;
    for (int s = 0; s < 2*FW; s++) begin
      src_ptr[s] = src_ptr_ip[s];
      for (int j = 0; j < s / 2; j++) begin
        if (regw[j] && rd[j] == src[s] && src[s] != 5'd0) begin
          src_ptr[s] = new_ptr[j];
          sow_hit    = 1'b1;
        end
      end
    end
    for (int i = 0; i < FW; i++) begin
      ip_we[i] = regw[i];
      for (int j = i + 1; j < FW; j++) begin
        if (regw[i] && regw[j] && rd[j] == rd[i]) begin
          ip_we[i] = 1'b0;
          dow_hit  = 1'b1;
        end
      end
    end
  end
endmodule
