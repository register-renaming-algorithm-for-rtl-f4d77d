// issue_stage: the Decode/Issue stage, where a fetch group is decoded and
// renamed.
//
// The four slots of the fetch group are decoded; the source registers read
// their pseudo-pointers from IP; the prioritizer offers the first four free
// Value Buffer locations and the k-th register-writing instruction takes the
// k-th one; the source overwrite logic substitutes pointers produced inside
// the group, and the destination overwrite logic lets only the last writer of
// a register update IP. Non-NOP instructions receive consecutive ROB positions
// from the Issue Counter.
//
// The group advances (IP written, Allocate bits set, ROB written, the renamed
// group loaded into dispatch, all at the clock edge) when dispatch is not
// stalled, enough free VB locations exist (`vr_stall` otherwise) and the ROB
// has room (`rob_stall` otherwise). Combinational; the state it updates lives
// in the mapping table, status bits and ROB.
module issue_stage
  import rr_pkg::*;
(
  input  fgroup_t                    fq,
  input  logic                       disp_hold,
  input  logic                       restore,
  // IP
  output logic [2*FW-1:0][4:0]       ip_raddr,
  input  logic [2*FW-1:0][PW-1:0]    ip_rdata,
  output logic [FW-1:0]              ip_we,
  output logic [FW-1:0][4:0]         ip_waddr,
  output logic [FW-1:0][PW-1:0]      ip_wdata,
  // status bits
  input  logic [NPREG-1:0]           alloc_bits,
  output logic [FW-1:0]              alloc_en,
  output logic [FW-1:0][PW-1:0]      alloc_ptr,
  // ROB
  input  logic [RW-1:0]              ic,
  input  logic                       rob_stall,
  output logic [2:0]                 rob_req_n,
  output rob_entry_t [FW-1:0]        rob_entry,
  // to dispatch
  output logic                       advance,
  output rr_t [FW-1:0]               rr,
  output logic                       fetch_hold,
  output logic                       vr_stall,
  output logic                       sow_hit,
  output logic                       dow_hit
);
  dec_t [FW-1:0]            d;
  logic [FW-1:0][PW-1:0]    free_ptr;
  logic [FW-1:0]            free_ok;
  logic [FW-1:0][PW-1:0]    new_ptr;
  logic [FW-1:0]            regw;
  logic [FW-1:0][4:0]       rd;
  logic [2*FW-1:0][4:0]     src;
  logic [2*FW-1:0][PW-1:0]  src_ptr;
  logic [FW-1:0]            dow_we;
  logic [2:0]               nreg;

  for (genvar i = 0; i < FW; i++) begin : g_dec
    decoder u_dec (.valid(fq.valid && fq.slot[i].valid), .instr(fq.slot[i].instr),
                   .pc(fq.slot[i].pc), .d(d[i]));
  end

  prioritizer u_prio (.alloc(alloc_bits), .ptr(free_ptr), .found(free_ok));

  always_comb begin
    logic [2:0] k;
    k = '0;
    for (int i = 0; i < FW; i++) begin
      regw[i]    = d[i].valid && d[i].regw;
      rd[i]      = d[i].rd;
      src[2*i]   = d[i].use_rs1 ? d[i].rs1 : 5'd0;
      src[2*i+1] = d[i].use_rs2 ? d[i].rs2 : 5'd0;
      new_ptr[i] = free_ptr[k[1:0]];
      if (regw[i]) k = k + 3'd1;
    end
    nreg = k;
  end
  assign ip_raddr = src;

  overwrite_logic u_ow (.regw, .rd, .new_ptr, .src, .src_ptr_ip(ip_rdata),
                        .src_ptr, .ip_we(dow_we), .sow_hit, .dow_hit);

  always_comb begin
    logic [2:0] nfree;
    nfree = '0;
    for (int i = 0; i < FW; i++) if (free_ok[i]) nfree = nfree + 3'd1;
    vr_stall = fq.valid && (nreg > nfree);
  end

  always_comb begin
    logic [2:0] n;
    n = '0;
    rob_entry = '0;
    for (int i = 0; i < FW; i++) begin
      rr[i]             = '0;
      rr[i].u.valid     = d[i].valid;
      rr[i].u.fu        = d[i].fu;
      rr[i].u.exe       = d[i].exe;
      rr[i].u.regw      = regw[i];
      rr[i].u.dest      = regw[i] ? new_ptr[i] : '0;
      rr[i].u.reo       = ic + RW'(n);
      rr[i].need1       = d[i].use_rs1;
      rr[i].p1          = src_ptr[2*i];
      rr[i].u.v1        = !d[i].use_rs1;
      rr[i].need2       = d[i].use_rs2 && !d[i].imm_op2;
      rr[i].p2          = src_ptr[2*i+1];
      rr[i].u.op2       = d[i].imm_op2 ? d[i].imm : 32'd0;
      rr[i].u.v2        = !rr[i].need2;
      rr[i].u.imm       = d[i].imm;
      rr[i].u.pc        = d[i].pc;
      rr[i].u.pred_taken  = d[i].is_cti && fq.pred_taken;
      rr[i].u.pred_target = fq.pred_target;
      rr[i].u.pred_bits   = d[i].is_cti ? fq.pred_bits : 2'b00;
      rr[i].disp        = !d[i].valid;
      if (d[i].valid) begin
        rob_entry[n[1:0]].v     = 1'b1;
        rob_entry[n[1:0]].code  = d[i].rcode;
        rob_entry[n[1:0]].ldest = regw[i] ? d[i].rd : 5'd0;
        rob_entry[n[1:0]].ptr   = rr[i].u.dest;
        rob_entry[n[1:0]].ds    = d[i].is_cti && (i < FW - 1) && d[(i+1) % FW].valid;
        rob_entry[n[1:0]].ba    = d[i].pc;
        n = n + 3'd1;
      end
    end
    rob_req_n = n;
  end

  assign advance    = fq.valid && !disp_hold && !vr_stall && !rob_stall && !restore;
  assign fetch_hold = fq.valid && !advance;

  always_comb begin
    for (int i = 0; i < FW; i++) begin
      ip_we[i]     = advance && dow_we[i];
      ip_waddr[i]  = rd[i];
      ip_wdata[i]  = new_ptr[i];
      alloc_en[i]  = advance && regw[i];
      alloc_ptr[i] = new_ptr[i];
    end
  end
endmodule
