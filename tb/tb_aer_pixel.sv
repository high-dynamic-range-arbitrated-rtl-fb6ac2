// tb_aer_pixel: self-checking testbench for the integrate-and-fire pixel
// model at its default threshold (4096).
//
// For several light levels p the pixel must raise its request (req_n low)
// exactly ceil(VTH/p) clock edges after it was reset, hold it while s is
// low, drive li only while s is high, and clear the request on the edge at
// which s is high. A pixel that is not requesting must ignore s, and a dark
// pixel must never fire.
module tb_aer_pixel;
  localparam int unsigned VTH = 4096;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] photo;
  logic       s, req_n, li;
  int         checks = 0, failures = 0;

  aer_pixel dut (.clk, .rst_n, .photo, .s, .req_n, .li);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  int levels [6] = '{255, 200, 64, 17, 3, 1};
  int edges, expect_edges;

  initial begin
    photo = '0; s = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    foreach (levels[k]) begin
      // Reset the pixel through an acknowledge if it is requesting.
      @(negedge clk);
      photo = 8'(levels[k]);
      expect_edges = (VTH + levels[k] - 1) / levels[k];
      edges = 0;
      while (req_n) begin
        @(posedge clk);
        edges++;
        #1;
      end
      check(edges == expect_edges,
            $sformatf("p=%0d fired after %0d edges, expected %0d", levels[k], edges, expect_edges));
      // Request is held without s; li stays low.
      repeat (5) begin
        @(negedge clk);
        check(!req_n && !li, "request held, li low without s");
      end
      // Acknowledge: li high during s, request cleared at the edge.
      s = 1'b1;
      photo = 8'd0;   // so that nothing integrates before the next level
      #1;
      check(li, "li high while s and request");
      @(posedge clk);
      #1;
      check(req_n, "request cleared by s");
      @(negedge clk);
      s = 1'b0;
      // An acknowledge to a non-requesting pixel has no effect: with light
      // it still fires ceil(VTH/p) edges after the real reset.
    end
    // s while not requesting does not reset integration.
    @(negedge clk);
    photo = 8'd64;   // 64 edges to fire
    repeat (30) @(negedge clk);
    s = 1'b1;
    #1;
    check(!li, "li low for a pixel that is not requesting");
    @(negedge clk);
    s = 1'b0;
    edges = 31;
    while (req_n) begin
      @(posedge clk);
      edges++;
      #1;
    end
    check(edges == 64, $sformatf("s on idle pixel disturbed integration (%0d)", edges));
    photo = 8'd0;
    s = 1'b1; @(posedge clk); #1; s = 1'b0;
    // Dark pixel never fires.
    photo = 8'd0;
    repeat (10000) @(posedge clk);
    check(req_n, "dark pixel fired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
