// tb_btb: self-checking test of the branch target buffer.
//
// After reset no address hits. The test then writes random (branch address,
// target) pairs and reads random addresses, comparing hit and target with a
// reference model of a direct-mapped table indexed by the low word-address
// bits and tagged with the rest, so that aliasing addresses replace each
// other. A BTB that is direct mapped with 64 entries is this design's
// assumption; the description gives no organisation.
module tb_btb;
  localparam int ENTRIES = 64;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] raddr, target, waddr, wtarget;
  logic        hit, we;
  int checks = 0, failures = 0, hits = 0;
  logic        mv [ENTRIES];
  logic [31:0] ma [ENTRIES], mt [ENTRIES];

  btb #(.ENTRIES(ENTRIES)) dut (.clk, .rst_n, .raddr, .hit, .target, .we, .waddr, .wtarget);

  always #5 clk = ~clk;

  function automatic logic [31:0] rnd_addr();
    // a small address range so that hits and aliases are common
    return 32'h8000_0000 | (32'($urandom % 512) << 2);
  endfunction

  initial begin
    #1000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    we = 1'b0; raddr = '0; waddr = '0; wtarget = '0;
    for (int i = 0; i < ENTRIES; i++) begin mv[i] = 1'b0; ma[i] = '0; mt[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      int i;
      @(negedge clk);
      raddr = rnd_addr();
      i = int'(raddr[7:2]);
      #1;
      checks++;
      if (hit !== (mv[i] && ma[i] == raddr) || (hit && target !== mt[i])) begin
        failures++;
        if (failures < 10) $display("FAIL read %h: hit %b target %h", raddr, hit, target);
      end
      hits += int'(hit);
      we      = ($urandom % 3) == 0;
      waddr   = rnd_addr();
      wtarget = $urandom;
      if (we) begin
        i = int'(waddr[7:2]);
        mv[i] = 1'b1; ma[i] = waddr; mt[i] = wtarget;
      end
    end
    checks++;
    if (hits < 100) begin failures++; $display("FAIL too few hits: %0d", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
