// prioritizer: priority encoder over the Allocate bits. Returns the addresses
// of the first four free Value Buffer locations (Allocate bit 0), lowest
// address first, and which of the four exist. Purely combinational; the
// decode/issue stage hands pointer k to the k-th register-writing instruction
// of the group.
module prioritizer
  import rr_pkg::*;
(
  input  logic [NPREG-1:0]         alloc,
  output logic [FW-1:0][PW-1:0]    ptr,
  output logic [FW-1:0]            found
);
  always_comb begin
    logic [2:0] k;
    ptr   = '0;
    found = '0;
    k     = '0;
    for (int i = 0; i < NPREG; i++) begin
      if (!alloc[i] && k < 3'(FW)) begin
        ptr[k[1:0]]   = PW'(i);
        found[k[1:0]] = 1'b1;
        k             = k + 3'd1;
      end
    end
  end
endmodule
