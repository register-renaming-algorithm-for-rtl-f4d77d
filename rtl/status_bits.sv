// status_bits: the Allocate, Valid and Commit bits, one of each per Value
// Buffer location.
//
// Allocate = location in use as a rename register; Valid = its result has been
// written back; Commit = the instruction owning it has committed and CP points
// to it. In one clock:
//   * alloc_set (up to four, from decode/issue): Allocate 1, Valid 0, Commit 0;
//   * CDB writes (two): Valid 1;
//   * commit_set (up to four, Commit-2): Commit 1;
//   * dealloc (up to four, the pointers CP held before): Allocate 0, Commit 0,
//     taking priority over commit_set for the same bit;
//   * restore: Allocate and Valid load the Commit bits (every other update of
//     that cycle is ignored).
// Allocation and de-allocation never touch the same bit, since only free bits
// are allocated. Location 0 stands for R0: its Allocate, Valid and Commit
// bits are held at 1. Reset clears everything else. Outputs are the registered
// bit vectors.
module status_bits
  import rr_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [FW-1:0]             alloc_en,
  input  logic [FW-1:0][PW-1:0]     alloc_ptr,
  input  cdb_t [NUM_CDB-1:0]        cdb,
  input  logic [FW-1:0]             commit_en,
  input  logic [FW-1:0][PW-1:0]     commit_ptr,
  input  logic [FW-1:0]             dealloc_en,
  input  logic [FW-1:0][PW-1:0]     dealloc_ptr,
  input  logic                      restore,
  output logic [NPREG-1:0]          alloc_bits,
  output logic [NPREG-1:0]          valid_bits,
  output logic [NPREG-1:0]          commit_bits
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      alloc_bits  <= NPREG'(1);
      valid_bits  <= NPREG'(1);
      commit_bits <= NPREG'(1);
    end else if (restore) begin
      alloc_bits  <= commit_bits | NPREG'(1);
      valid_bits  <= commit_bits | NPREG'(1);
    end else begin
      logic [NPREG-1:0] a, v, c;
      a = alloc_bits;
      v = valid_bits;
      c = commit_bits;
      for (int i = 0; i < FW; i++)
        if (alloc_en[i]) begin
          a[alloc_ptr[i]] = 1'b1;
          v[alloc_ptr[i]] = 1'b0;
          c[alloc_ptr[i]] = 1'b0;
        end
      for (int i = 0; i < NUM_CDB; i++)
        if (cdb[i].valid) v[cdb[i].dest] = 1'b1;
      for (int i = 0; i < FW; i++)
        if (commit_en[i]) c[commit_ptr[i]] = 1'b1;
      for (int i = 0; i < FW; i++)
        if (dealloc_en[i]) begin
          a[dealloc_ptr[i]] = 1'b0;
          c[dealloc_ptr[i]] = 1'b0;
        end
      alloc_bits  <= a | NPREG'(1);
      valid_bits  <= v | NPREG'(1);
      commit_bits <= c | NPREG'(1);
    end
  end
endmodule
