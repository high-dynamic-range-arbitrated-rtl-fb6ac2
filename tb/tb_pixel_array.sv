// tb_pixel_array: self-checking testbench for the pixel array at a reduced
// size (8 columns x 6 rows, threshold 64).
//
// Each pixel gets its own light level; the testbench predicts from the
// levels the clock edge at which each pixel fires, and checks every cycle
// that row_req is the OR of the predicted requests of each row. It then
// acknowledges rows one at a time and checks that col_li shows exactly the
// requesting pixels of the acknowledged row and that they are reset.
module tb_pixel_array;
  localparam int unsigned NC = 8, NR = 6, VTH = 64;
  logic          clk = 1'b0, rst_n = 1'b0;
  logic [7:0]    photo [NR][NC];
  logic [NR-1:0] s, row_req, ref_row;
  logic [NC-1:0] col_li, ref_li;
  int            checks = 0, failures = 0;
  int            fire_at [NR][NC];
  bit            pending [NR][NC];
  int            t;

  pixel_array #(.N_COLS(NC), .N_ROWS(NR), .VTH(VTH)) dut (
    .clk, .rst_n, .photo, .s, .row_req, .col_li
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s = '0;
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++) begin
        // Some dark pixels, others with levels 1..40.
        photo[r][c] = ((r + c) % 5 == 0) ? 8'd0 : 8'(1 + (r * NC + c) % 40);
        fire_at[r][c] = (photo[r][c] == 0) ? -1 : int'((VTH + photo[r][c] - 1) / photo[r][c]);
        pending[r][c] = 0;
      end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // Phase 1: no acknowledges; follow the requests for 70 edges.
    for (t = 1; t <= 70; t++) begin
      @(posedge clk);
      #1;
      ref_row = '0;
      for (int r = 0; r < NR; r++)
        for (int c = 0; c < NC; c++)
          if (fire_at[r][c] > 0 && t >= fire_at[r][c]) ref_row[r] = 1'b1;
      checks++;
      if (row_req != ref_row) begin
        failures++; $display("FAIL edge %0d: row_req=%b expected %b", t, row_req, ref_row);
      end
    end
    // Phase 2: acknowledge each row and check the column lines.
    for (int r = 0; r < NR; r++) begin
      @(negedge clk);
      s = '0;
      s[r] = 1'b1;
      #1;
      ref_li = '0;
      for (int c = 0; c < NC; c++) if (fire_at[r][c] > 0) ref_li[c] = 1'b1;
      checks++;
      if (col_li != ref_li) begin
        failures++; $display("FAIL row %0d: col_li=%b expected %b", r, col_li, ref_li);
      end
      @(posedge clk);
      #1;
      checks++;
      if (row_req[r]) begin failures++; $display("FAIL row %0d not reset", r); end
    end
    @(negedge clk);
    s = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
