// tb_value_buffer: self-checking test of the Value Buffer (merged register
// file).
//
// Each cycle two random CDB writes (to distinct locations) are driven and
// all eight read ports read random locations. The test checks that reads
// return the stored value, that a location being written in the same cycle
// returns the CDB data (forwarding), that location 0 always reads 0 and is
// never written, and that the debug port reads the stored value. The 64
// locations and the two write ports follow the description; same-cycle
// forwarding is this design's way of merging the described half-cycle
// write-then-read timing into one edge.
module tb_value_buffer;
  import rr_pkg::*;
  localparam int NRD = 2 * FW;
  logic                   clk = 1'b0, rst_n = 1'b0;
  logic [NRD-1:0][PW-1:0] raddr;
  logic [NRD-1:0][31:0]   rdata;
  cdb_t [NUM_CDB-1:0]     cdb;
  logic [PW-1:0]          dbg_raddr;
  logic [31:0]            dbg_rdata;
  logic [31:0]            m [NPREG];
  int checks = 0, failures = 0, n_fwd = 0;

  value_buffer #(.NRD(NRD)) dut (.clk, .rst_n, .raddr, .rdata, .cdb, .dbg_raddr, .dbg_rdata);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    cdb = '0; raddr = '0; dbg_raddr = '0;
    for (int i = 0; i < NPREG; i++) m[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int k = 0; k < NUM_CDB; k++) begin
        cdb[k].valid = 1'($urandom);
        cdb[k].dest  = PW'($urandom % 16 + 16 * k);   // distinct per bus
        if (n % 50 == 0) cdb[k].dest = '0;             // attempted write to location 0
        cdb[k].data  = $urandom;
      end
      for (int i = 0; i < NRD; i++) raddr[i] = PW'($urandom % 32);
      dbg_raddr = PW'($urandom % 32);
      #1;
      for (int i = 0; i < NRD; i++) begin
        logic [31:0] e;
        e = m[raddr[i]];
        for (int k = 0; k < NUM_CDB; k++)
          if (cdb[k].valid && cdb[k].dest == raddr[i]) begin e = cdb[k].data; n_fwd++; end
        if (raddr[i] == '0) e = '0;
        check($sformatf("rdata[%0d] loc %0d", i, raddr[i]), rdata[i], e);
      end
      check("dbg", dbg_rdata, m[dbg_raddr]);
      for (int k = 0; k < NUM_CDB; k++)
        if (cdb[k].valid && cdb[k].dest != '0) m[cdb[k].dest] = cdb[k].data;
    end
    checks++;
    if (n_fwd == 0) begin failures++; $display("FAIL no forwarding case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
