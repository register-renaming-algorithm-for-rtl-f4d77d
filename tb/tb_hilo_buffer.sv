// tb_hilo_buffer: self-checking test of the speculative HI/LO buffer.
//
// Reference model: the committed HI/LO pair plus a queue of uncommitted
// writes. Random cycles write a new pair (only while `full` is low, as the
// multiply/divide unit does), commit up to the number of uncommitted
// writes, or restore. Each cycle the test checks that HI/LO read the newest
// value (committed pair when nothing is pending), that `full` is set
// exactly when DEPTH-1 writes are pending, and after a restore that the
// committed pair is read again. The buffer is this design's reading of the
// described HILO rollback; the depth of four is an assumption.
module tb_hilo_buffer;
  localparam int DEPTH = 4;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        restore, we, full;
  logic [31:0] whi, wlo, hi, lo;
  logic [2:0]  commit_n;
  logic [63:0] arch, pend [$];
  int checks = 0, failures = 0, n_full = 0, n_restore = 0;

  hilo_buffer #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .restore, .we, .whi, .wlo, .commit_n, .hi, .lo, .full);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
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
    restore = 1'b0; we = 1'b0; whi = '0; wlo = '0; commit_n = '0;
    arch = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      check("hi:lo", {hi, lo}, pend.size() ? pend[$] : arch);
      check("full", 64'(full), 64'(pend.size() >= DEPTH - 1));
      n_full += int'(full);
      restore  = ($urandom % 30) == 0;
      we       = !full && ($urandom % 3 != 0);
      whi      = $urandom; wlo = $urandom;
      commit_n = 3'($urandom % (pend.size() + 1));
      if ($urandom % 2) commit_n = '0;
      if (restore) begin
        n_restore++;
        pend.delete();
      end else begin
        for (int k = 0; k < int'(commit_n); k++) arch = pend.pop_front();
        if (we) pend.push_back({whi, wlo});
      end
    end
    checks++;
    if (n_full < 50 || n_restore < 50) begin failures++; $display("FAIL little activity full=%0d restore=%0d", n_full, n_restore); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
