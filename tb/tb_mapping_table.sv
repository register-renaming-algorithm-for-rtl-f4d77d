// tb_mapping_table: self-checking test of the IP and CP mapping tables.
//
// Random cycles of up to four IP writes, up to four CP writes and eight IP
// reads / four CP reads are applied, with occasional restores. A reference
// pair of tables is kept here: later slots win when two slots write one
// register, register 0 stays mapped to location 0, and a restore copies the
// whole CP table into IP in one cycle (IP writes of that cycle are lost).
// Reads are combinational and are checked every cycle, including the debug
// CP read. The IP/CP pair and the one-cycle copy are the described
// mechanism; write-port count and priority are this design's.
module tb_mapping_table;
  import rr_pkg::*;
  logic                    clk = 1'b0, rst_n = 1'b0;
  logic [2*FW-1:0][4:0]    ip_raddr;
  logic [2*FW-1:0][PW-1:0] ip_rdata;
  logic [FW-1:0]           ip_we, cp_we;
  logic [FW-1:0][4:0]      ip_waddr, cp_waddr, cp_raddr;
  logic [FW-1:0][PW-1:0]   ip_wdata, cp_wdata, cp_rdata;
  logic [4:0]              dbg_raddr;
  logic [PW-1:0]           dbg_cp_rdata;
  logic                    restore;
  logic [PW-1:0]           mip [NLREG], mcp [NLREG];
  int checks = 0, failures = 0, n_restore = 0;

  mapping_table dut (.clk, .rst_n, .ip_raddr, .ip_rdata, .ip_we, .ip_waddr, .ip_wdata,
    .cp_we, .cp_waddr, .cp_wdata, .cp_raddr, .cp_rdata, .dbg_raddr, .dbg_cp_rdata, .restore);

  always #5 clk = ~clk;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    ip_raddr = '0; ip_we = '0; ip_waddr = '0; ip_wdata = '0;
    cp_we = '0; cp_waddr = '0; cp_wdata = '0; cp_raddr = '0; dbg_raddr = '0; restore = 1'b0;
    for (int r = 0; r < NLREG; r++) begin mip[r] = '0; mcp[r] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      restore = ($urandom % 40) == 0;
      for (int i = 0; i < FW; i++) begin
        ip_we[i]    = 1'($urandom);
        ip_waddr[i] = 5'($urandom % 12);
        ip_wdata[i] = PW'($urandom);
        cp_we[i]    = ($urandom % 3) == 0;
        cp_waddr[i] = 5'($urandom % 12);
        cp_wdata[i] = PW'($urandom);
        cp_raddr[i] = 5'($urandom);
      end
      for (int i = 0; i < 2*FW; i++) ip_raddr[i] = 5'($urandom % 12);
      dbg_raddr = 5'($urandom);
      #1;
      for (int i = 0; i < 2*FW; i++) check($sformatf("ip[%0d]", ip_raddr[i]), int'(ip_rdata[i]), int'(mip[ip_raddr[i]]));
      for (int i = 0; i < FW; i++)   check($sformatf("cp[%0d]", cp_raddr[i]), int'(cp_rdata[i]), int'(mcp[cp_raddr[i]]));
      check("dbg", int'(dbg_cp_rdata), int'(mcp[dbg_raddr]));
      if (restore) begin
        n_restore++;
        for (int r = 0; r < NLREG; r++) mip[r] = mcp[r];
      end else
        for (int i = 0; i < FW; i++) if (ip_we[i] && ip_waddr[i] != 0) mip[ip_waddr[i]] = ip_wdata[i];
      for (int i = 0; i < FW; i++) if (cp_we[i] && cp_waddr[i] != 0) mcp[cp_waddr[i]] = cp_wdata[i];
    end
    check("restores seen", int'(n_restore > 20), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
