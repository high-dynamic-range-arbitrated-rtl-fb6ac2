// tb_arb_cell: self-checking testbench for the two-input arbitration cell.
//
// Drives random requests, parent grants and done pulses, and compares req_up
// and the grants with a reference that keeps its own copy of the side served
// last. Checks that a tie alternates between the two sides.
module tb_arb_cell;
  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic [1:0] req, gnt;
  logic       req_up, gnt_in, done;
  int         checks = 0, failures = 0;
  int         cycle = 0;
  logic       ref_last;
  logic [1:0] ref_gnt;
  int         ties = 0, tie_alternations = 0;
  logic [1:0] prev_tie_gnt;

  arb_cell dut (.clk, .rst_n, .req, .req_up, .gnt_in, .gnt, .done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] model(logic [1:0] r, logic g, logic last);
    if (!g)                  return 2'b00;
    if (r == 2'b11)          return last ? 2'b01 : 2'b10;
    return r;
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cycle %0d: %s (req=%b gnt_in=%b gnt=%b)", cycle, what, req, gnt_in, gnt);
    end
  endtask

  initial begin
    req = '0; gnt_in = 1'b0; done = 1'b0; ref_last = 1'b1; prev_tie_gnt = 2'b00;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (cycle = 0; cycle < 2000; cycle++) begin
      @(negedge clk);
      if (cycle < 200) begin
        req = 2'b11; gnt_in = 1'b1; done = 1'b1;   // permanent tie
      end else begin
        req = 2'($urandom); gnt_in = ($urandom % 4) != 0; done = $urandom % 2 == 1;
      end
      #1;
      ref_gnt = model(req, gnt_in, ref_last);
      check(req_up == |req, "req_up");
      check(gnt == ref_gnt, "grant");
      if (req == 2'b11 && gnt_in && done) begin
        ties++;
        if (prev_tie_gnt != 2'b00 && gnt != prev_tie_gnt) tie_alternations++;
        prev_tie_gnt = gnt;
      end
      @(posedge clk);
      if (done && |ref_gnt) ref_last = ref_gnt[1];
    end
    checks++;
    if (tie_alternations < 150) begin
      failures++;
      $display("FAIL: ties did not alternate (%0d of %0d)", tie_alternations, ties);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
