// tb_arbiter_tree: self-checking testbench for the arbitration tree.
//
// Two trees, 60 inputs (the row tree) and 80 inputs (the column tree), are
// driven with random requests. A reference model holds one "served last" bit
// per tree node (heap numbering over the padded power-of-two leaves) and
// walks from the root to the grant. Also checks that with every input
// requesting and each grant served, every input is served within a bounded
// number of grants (no starvation).
module tb_arbiter_tree;
  localparam int unsigned NA = 60;
  localparam int unsigned NB = 80;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;

  logic [NA-1:0] req_a, gnt_a;
  logic [NB-1:0] req_b, gnt_b;
  logic          any_a, any_b, en, done;

  arbiter_tree #(.N(NA)) dut_a (.clk, .rst_n, .req(req_a), .en, .gnt(gnt_a), .any(any_a), .done);
  arbiter_tree #(.N(NB)) dut_b (.clk, .rst_n, .req(req_b), .en, .gnt(gnt_b), .any(any_b), .done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: node k (1..L-1) has children 2k and 2k+1; leaves are L..2L-1.
  class tree_model;
    int unsigned n, l;
    bit last[];
    function new(int unsigned n_in);
      n = n_in;
      l = 1;
      while (l < n) l *= 2;
      last = new[l];
      foreach (last[i]) last[i] = 1'b1;
    endfunction
    function bit sub_any(int unsigned k, logic [127:0] r);
      int unsigned lo = k, hi = k;
      while (lo < l) begin lo = 2 * lo; hi = 2 * hi + 1; end
      for (int unsigned i = lo; i <= hi; i++) if (i - l < n && r[i - l]) return 1'b1;
      return 1'b0;
    endfunction
    // Returns the granted leaf index or -1, and updates when upd is set.
    function int grant(logic [127:0] r, bit g, bit upd);
      int unsigned k = 1;
      if (!g || !sub_any(1, r)) return -1;
      while (k < l) begin
        bit a0 = sub_any(2 * k, r), a1 = sub_any(2 * k + 1, r);
        bit side = (a0 && (!a1 || last[k])) ? 1'b0 : 1'b1;
        if (upd) last[k] = side;
        k = 2 * k + side;
      end
      return int'(k - l);
    endfunction
  endclass

  tree_model ma, mb;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [127:0] onehot(int idx);
    return (idx < 0) ? 128'd0 : (128'd1 << idx);
  endfunction

  int ga, gb;
  int unsigned wait_a [NA];
  int unsigned worst_a;

  initial begin
    ma = new(NA);
    mb = new(NB);
    req_a = '0; req_b = '0; en = 1'b0; done = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Random phase.
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int i = 0; i < NA; i++) req_a[i] = ($urandom % 5) == 0;
      for (int i = 0; i < NB; i++) req_b[i] = ($urandom % 7) == 0;
      if (c % 97 == 0) begin req_a = '0; req_b = '0; end
      en   = ($urandom % 8) != 0;
      done = ($urandom % 2) == 1;
      #1;
      ga = ma.grant(128'(req_a), en, done);
      gb = mb.grant(128'(req_b), en, done);
      check(any_a == |req_a && any_b == |req_b, "any");
      check(128'(gnt_a) == onehot(ga), $sformatf("grant A %h expected %0d", gnt_a, ga));
      check(128'(gnt_b) == onehot(gb), $sformatf("grant B %h expected %0d", gnt_b, gb));
    end
    // Saturation phase: every input of tree A requests, each grant is served.
    worst_a = 0;
    foreach (wait_a[i]) wait_a[i] = 0;
    for (int c = 0; c < 2 * 64 * 4; c++) begin
      @(negedge clk);
      req_a = '1; en = 1'b1; done = 1'b1;
      #1;
      ga = ma.grant(128'(req_a), en, done);
      check(128'(gnt_a) == onehot(ga), "grant A saturated");
      for (int i = 0; i < NA; i++) begin
        if (gnt_a[i]) wait_a[i] = 0;
        else begin
          wait_a[i]++;
          if (wait_a[i] > worst_a) worst_a = wait_a[i];
        end
      end
    end
    check(worst_a < 64, $sformatf("input starved for %0d grants", worst_a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
