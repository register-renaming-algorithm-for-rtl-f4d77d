// tb_overwrite_logic: self-checking test of the SOW/DOW logic.
//
// Builds random four-instruction groups over a small register range (so
// that dependences inside the group are frequent) and checks against a
// sequential reference: each source takes the new pointer of the nearest
// earlier writer of its register in the group, or the IP value otherwise
// (R0 never renamed), and only the last writer of a register in the group
// updates IP. It also checks that the sow/dow flags fire exactly when an
// overwrite happened. The rules follow the description's SOW and DOW; the
// flag outputs are this design's, for event counting.
module tb_overwrite_logic;
  import rr_pkg::*;
  logic [FW-1:0]           regw, ip_we;
  logic [FW-1:0][4:0]      rd;
  logic [FW-1:0][PW-1:0]   new_ptr;
  logic [2*FW-1:0][4:0]    src;
  logic [2*FW-1:0][PW-1:0] src_ptr_ip, src_ptr;
  logic                    sow_hit, dow_hit;
  int checks = 0, failures = 0, n_sow = 0, n_dow = 0;

  overwrite_logic dut (.regw, .rd, .new_ptr, .src, .src_ptr_ip, .src_ptr, .ip_we, .sow_hit, .dow_hit);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000 $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic es, ed;
      regw = 4'($urandom);
      for (int i = 0; i < FW; i++) begin
        rd[i]      = 5'($urandom % 5);
        new_ptr[i] = PW'(1 + i + 4 * ($urandom % 15));
      end
      for (int s = 0; s < 2*FW; s++) begin
        src[s]        = 5'($urandom % 5);
        src_ptr_ip[s] = PW'($urandom);
      end
      #1;
      es = 1'b0; ed = 1'b0;
      for (int s = 0; s < 2*FW; s++) begin
        int e;
        e = int'(src_ptr_ip[s]);
        for (int j = s / 2 - 1; j >= 0; j--)
          if (regw[j] && rd[j] == src[s] && src[s] != 0) begin e = int'(new_ptr[j]); es = 1'b1; break; end
        check($sformatf("src_ptr[%0d]", s), int'(src_ptr[s]), e);
      end
      for (int i = 0; i < FW; i++) begin
        logic last;
        last = regw[i];
        for (int j = i + 1; j < FW; j++) if (regw[i] && regw[j] && rd[j] == rd[i]) begin last = 1'b0; ed = 1'b1; end
        check($sformatf("ip_we[%0d]", i), int'(ip_we[i]), int'(last));
      end
      check("sow_hit", int'(sow_hit), int'(es));
      check("dow_hit", int'(dow_hit), int'(ed));
      n_sow += int'(es); n_dow += int'(ed);
    end
    check("sow seen", int'(n_sow > 100), 1);
    check("dow seen", int'(n_dow > 100), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
