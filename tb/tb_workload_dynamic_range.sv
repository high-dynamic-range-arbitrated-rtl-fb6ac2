// tb_workload_dynamic_range: six decades of light on one array.
//
// The imaging system is built with a finer pixel model (24-bit photocurrent
// and charge, threshold 2^24 - 64) on a 4 x 4 array. Seven pixels receive
// light levels from 1 to 2^24 - 64, spread over more than seven decades,
// and the rest stay dark. The run lasts until the dimmest pixel has fired
// twice. The frame buffer must then hold, for every lit pixel, an interval
// no shorter than its light allows, ceil(VTH/p) + 1 cycles (never below the
// 6-cycle readout of a lone row), and longer only by the queueing behind
// the other lit pixels. The longest and shortest stored intervals must
// differ by at least a factor of 10^6 (120 dB), and all of them must still
// fit the 24-bit timer.
module tb_workload_dynamic_range;
  localparam int unsigned NC = 4, NR = 4, PW = 24;
  localparam int unsigned VTH = (1 << 24) - 64;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic [PW-1:0] photo [NR][NC];
  logic [1:0]    rd_x, ae_x;
  logic [1:0]    rd_y, ae_y;
  logic [23:0]   rd_isi, timer;
  logic          rd_valid, ae_req, ae_ack;
  logic [31:0]   events;
  int            checks = 0, failures = 0;

  aer_imaging_system #(
    .N_COLS(NC), .N_ROWS(NR), .PHOTO_W(PW), .ACC_W(PW), .VTH(VTH)
  ) dut (
    .clk, .rst_n, .photo, .ack_delay(8'd0), .rd_x, .rd_y, .rd_isi, .rd_valid,
    .events, .timer, .ae_req, .ae_ack, .ae_x, .ae_y
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  int unsigned level [NR][NC];
  longint      ideal, isi_min, isi_max;
  int          nlit;

  initial begin
    foreach (level[r, c]) level[r][c] = 0;
    level[0][0] = 1;
    level[0][3] = 10;
    level[1][1] = 100;
    level[1][2] = 1_000;
    level[2][0] = 10_000;
    level[2][3] = 100_000;
    level[3][1] = VTH;          // fires on every integration edge
    foreach (photo[r, c]) photo[r][c] = PW'(level[r][c]);
    rd_x = '0; rd_y = '0;
    nlit = 7;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Wait for the second event of the dimmest pixel.
    repeat (2 * (VTH + 1) + 100) @(negedge clk);
    isi_min = 64'h7fff_ffff_ffff_ffff;
    isi_max = 0;
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++) begin
        rd_x = 2'(c); rd_y = 2'(r);
        #1;
        if (level[r][c] == 0) begin
          check(!rd_valid, $sformatf("dark pixel (%0d,%0d) has an interval", c, r));
        end else begin
          ideal = (longint'(VTH) + longint'(level[r][c]) - 1) / longint'(level[r][c]) + 1;
          if (ideal < 6) ideal = 6;
          $display("pixel (%0d,%0d) light %0d: interval %0d cycles (ideal %0d)",
                   c, r, level[r][c], rd_isi, ideal);
          check(rd_valid, $sformatf("lit pixel (%0d,%0d) has no interval", c, r));
          check(longint'(rd_isi) >= ideal && longint'(rd_isi) <= ideal + 6 * nlit,
                $sformatf("pixel (%0d,%0d) interval %0d, ideal %0d", c, r, rd_isi, ideal));
          if (longint'(rd_isi) < isi_min) isi_min = longint'(rd_isi);
          if (longint'(rd_isi) > isi_max) isi_max = longint'(rd_isi);
        end
      end
    $display("interval range %0d .. %0d cycles: %.1f dB", isi_min, isi_max,
             20.0 * $log10(real'(isi_max) / real'(isi_min)));
    check(isi_max >= 1_000_000 * isi_min, "less than 120 dB between brightest and dimmest");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
