// tb_prioritizer: self-checking test of the free-location prioritizer.
//
// Applies random Allocate-bit vectors of varied density (including all-free,
// all-taken and vectors with fewer than four free locations) and checks that
// the four outputs name the four lowest-numbered free VB locations in
// increasing order, with `found` set only for outputs that name one. The
// lowest-first order matches the description's priority encoder; the
// `found` flags are this design's way of signalling too few free locations.
module tb_prioritizer;
  import rr_pkg::*;
  logic [NPREG-1:0]      alloc;
  logic [FW-1:0][PW-1:0] ptr;
  logic [FW-1:0]         found;
  int checks = 0, failures = 0;

  prioritizer dut (.alloc, .ptr, .found);

  initial begin
    #100000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int k;
      case (n % 4)
        0: alloc = {$urandom, $urandom};
        1: alloc = {$urandom, $urandom} | {$urandom, $urandom} | {$urandom, $urandom};
        2: begin alloc = '1; for (int f = 0; f < int'($urandom % 6); f++) alloc[$urandom % NPREG] = 1'b0; end
        default: alloc = (n % 8 == 3) ? '0 : '1;
      endcase
      #1;
      k = 0;
      for (int i = 0; i < NPREG && k < FW; i++)
        if (!alloc[i]) begin
          checks++;
          if (!found[k] || ptr[k] !== PW'(i)) begin
            failures++;
            if (failures < 10) $display("FAIL %h slot %0d: got %0d/%b expected %0d", alloc, k, ptr[k], found[k], i);
          end
          k++;
        end
      for (; k < FW; k++) begin
        checks++;
        if (found[k]) begin failures++; $display("FAIL %h slot %0d found set", alloc, k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
