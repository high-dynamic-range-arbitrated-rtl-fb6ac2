// tb_row_latch: self-checking testbench for the row buffer: load of a whole
// row, clearing of single elements, the empty flag, and load priority.
module tb_row_latch;
  localparam int unsigned N = 80;
  logic         clk = 1'b0, rst_n = 1'b0;
  logic         load;
  logic [N-1:0] li, clr, q, ref_q;
  logic         empty;
  int           checks = 0, failures = 0;

  row_latch #(.N(N)) dut (.clk, .rst_n, .load, .li, .clr, .q, .empty);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 1'b0; li = '0; clr = '0; ref_q = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      load = ($urandom % 10) == 0;
      for (int i = 0; i < N; i++) li[i] = ($urandom % 4) == 0;
      clr = '0;
      if ($urandom % 2 == 1) clr[$urandom % N] = 1'b1;
      @(posedge clk);
      ref_q = load ? li : (ref_q & ~clr);
      #1;
      checks++;
      if (q != ref_q || empty != (ref_q == '0)) begin
        failures++;
        $display("FAIL cycle %0d: q=%h expected %h", c, q, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
