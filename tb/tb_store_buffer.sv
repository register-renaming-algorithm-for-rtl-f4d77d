// tb_store_buffer: self-checking test of the ten-entry store buffer.
//
// Reference model: a queue of (address, data, committed) entries in program
// order. Random cycles push a store (only when not full, as the load/store
// unit does), commit up to the number of uncommitted stores, allow or refuse
// a drain, look up a random address, or restore. The test checks `full`,
// `count`, that a drain happens exactly when allowed and the oldest entry is
// committed and that it presents that entry, that a lookup returns the
// youngest matching store, and that a restore keeps exactly the committed
// stores. The ten entries follow the description; the youngest-match
// forwarding and the drain handshake are this design's.
module tb_store_buffer;
  localparam int DEPTH = 10;
  typedef struct { logic [31:0] a; logic [31:0] d; logic c; } ent_t;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        restore, push, drain_ok, drain, lookup_hit, full;
  logic [31:0] push_addr, push_data, drain_addr, drain_data, lookup_addr, lookup_data;
  logic [2:0]  commit_n;
  logic [3:0]  count;
  ent_t        q [$];
  int checks = 0, failures = 0, n_drain = 0, n_hit = 0, n_full = 0;

  store_buffer #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .restore, .push, .push_addr, .push_data,
    .commit_n, .drain_ok, .drain, .drain_addr, .drain_data, .lookup_addr, .lookup_hit,
    .lookup_data, .full, .count);

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
    restore = 1'b0; push = 1'b0; push_addr = '0; push_data = '0; commit_n = '0;
    drain_ok = 1'b0; lookup_addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      int ncom, nunc, hit;
      logic [31:0] hd;
      @(negedge clk);
      ncom = 0;
      foreach (q[i]) ncom += int'(q[i].c);
      nunc = q.size() - ncom;
      restore     = ($urandom % 50) == 0;
      push        = !full && ($urandom % 2);
      push_addr   = 32'h1000 + 32'(4 * ($urandom % 8));
      push_data   = $urandom;
      commit_n    = ($urandom % 3 == 0) ? 3'($urandom % (nunc + 1 > 4 ? 5 : nunc + 1)) : 3'd0;
      drain_ok    = ($urandom % 3) != 0;
      lookup_addr = 32'h1000 + 32'(4 * ($urandom % 8)) + 32'($urandom % 4);
      #1;
      check("full", 32'(full), 32'(q.size() == DEPTH));
      check("count", 32'(count), 32'(q.size()));
      n_full += int'(full);
      hit = 0; hd = '0;
      foreach (q[i]) if (q[i].a[31:2] == lookup_addr[31:2]) begin hit = 1; hd = q[i].d; end
      check("lookup_hit", 32'(lookup_hit), 32'(hit));
      if (hit) check("lookup_data", lookup_data, hd);
      n_hit += hit;
      check("drain", 32'(drain), 32'(drain_ok && q.size() > 0 && q[0].c));
      if (drain) begin
        check("drain_addr", drain_addr, q[0].a);
        check("drain_data", drain_data, q[0].d);
      end
      if (restore) begin
        while (q.size() && !q[$].c) void'(q.pop_back());
      end else begin
        if (drain) begin void'(q.pop_front()); n_drain++; end
        for (int k = 0, i = 0; i < q.size() && k < int'(commit_n); i++)
          if (!q[i].c) begin q[i].c = 1'b1; k++; end
        if (push) q.push_back('{push_addr, push_data, 1'b0});
      end
    end
    checks++;
    if (n_drain < 200 || n_hit < 200 || n_full < 20) begin
      failures++;
      $display("FAIL little activity drain=%0d hit=%0d full=%0d", n_drain, n_hit, n_full);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
