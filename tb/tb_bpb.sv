// tb_bpb: self-checking test of the branch prediction buffer.
//
// Checks that every counter reads 00 (strongly not taken) after reset, then
// writes random 2-bit values at random branch addresses and checks every
// read against a reference table indexed by the low word-address bits. A
// direct-mapped table of 64 two-bit counters without tags is this design's
// choice; the description names the buffer but not its organisation.
module tb_bpb;
  localparam int ENTRIES = 64;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] raddr, waddr;
  logic [1:0]  bits, wbits;
  logic        we;
  logic [1:0]  m [ENTRIES];
  int checks = 0, failures = 0;

  bpb #(.ENTRIES(ENTRIES)) dut (.clk, .rst_n, .raddr, .bits, .we, .waddr, .wbits);

  always #5 clk = ~clk;

  task automatic check(input logic [1:0] exp);
    checks++;
    if (bits !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL read %h: got %b expected %b", raddr, bits, exp);
    end
  endtask

  initial begin
    #1000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    we = 1'b0; raddr = '0; waddr = '0; wbits = '0;
    // leave garbage in the table before reset
    rst_n = 1'b1;
    for (int i = 0; i < ENTRIES; i++) begin
      @(negedge clk); we = 1'b1; waddr = 32'(4 * i); wbits = 2'b11;
    end
    @(negedge clk); we = 1'b0; rst_n = 1'b0;
    @(negedge clk); rst_n = 1'b1;
    for (int i = 0; i < ENTRIES; i++) begin
      m[i] = 2'b00;
      raddr = 32'h8000_0000 + 32'(4 * i); #1; check(2'b00);
    end
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      raddr = 32'h8000_0000 | (32'($urandom % 1024) << 2);
      #1 check(m[raddr[7:2]]);
      we    = 1'($urandom);
      waddr = 32'h8000_0000 | (32'($urandom % 1024) << 2);
      wbits = 2'($urandom);
      if (we) m[waddr[7:2]] = wbits;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
