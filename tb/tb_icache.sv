// tb_icache: self-checking test of the four-bank instruction memory.
//
// Fills the memory through the write port with a known pattern, then reads
// from random word-aligned PCs (every alignment inside a row, and PCs whose
// group crosses into the next row) and checks that instr[k] is the word at
// PC+4k. This is the index-increment (DI) and reordering behaviour of the
// described cache; the memory size is this design's. A watchdog ends a hung
// run.
module tb_icache;
  localparam int WORDS = 1024;
  logic              clk = 1'b0;
  logic [31:0]       pc, waddr, wdata;
  logic [3:0][31:0]  instr;
  logic              we;
  int checks = 0, failures = 0;

  icache #(.WORDS(WORDS)) dut (.clk, .pc, .instr, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  function automatic logic [31:0] pattern(input int w);
    return 32'h5a00_0000 ^ (32'(w) * 32'h0001_0003);
  endfunction

  initial begin
    #1000000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    we = 1'b0; pc = '0; waddr = '0; wdata = '0;
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk);
      we = 1'b1; waddr = 32'(4 * w); wdata = pattern(w);
    end
    @(negedge clk) we = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      int w;
      w  = (n < 8) ? n : int'($urandom % (WORDS - 4));
      pc = 32'(4 * w);
      #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (instr[k] !== pattern(w + k)) begin
          failures++;
          if (failures < 10) $display("FAIL pc=%h slot %0d: got %h expected %h", pc, k, instr[k], pattern(w + k));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
