// tb_workload_frame_rate: maximum frame rate and its scaling with array
// size, under uniform bright light.
//
// Three complete imaging systems (20 x 15, 40 x 30 and the default 80 x 60)
// are lit uniformly and brightly, so every pixel is always waiting and the
// output bus is saturated. For each size the test counts events over a
// fixed window and checks the cost per event: 4 cycles of handshake plus 2
// cycles per row, shared by the N_COLS events of a full row. The effective
// frame rate, events per second divided by the pixel count, then falls as
// 1/(pixel count); the test prints it for a 160 MHz clock, the clock that
// gives a 40 MHz event rate.
//
// On the 80 x 60 system the testbench also follows one pixel, (30, 30),
// and checks that its inter-spike interval is steady: the standard
// deviation must be far below the mean, the variation coming only from the
// queueing of the arbitrated readout.
module tb_workload_frame_rate;
  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;

  localparam int unsigned WINDOW = 40000;
  localparam real         F_CLK_MHZ = 160.0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- 80 x 60, all parameters at their defaults ----
  logic [7:0]  photo_l [60][80];
  logic [6:0]  ae_x_l;
  logic [5:0]  ae_y_l;
  logic        ae_req_l, ae_ack_l, rd_valid_l;
  logic [23:0] rd_isi_l, timer_l;
  logic [31:0] events_l;
  aer_imaging_system sys_l (
    .clk, .rst_n, .photo(photo_l), .ack_delay(8'd0), .rd_x(7'd0), .rd_y(6'd0),
    .rd_isi(rd_isi_l), .rd_valid(rd_valid_l), .events(events_l), .timer(timer_l),
    .ae_req(ae_req_l), .ae_ack(ae_ack_l), .ae_x(ae_x_l), .ae_y(ae_y_l)
  );

  // ---- 40 x 30 ----
  logic [7:0]  photo_m [30][40];
  logic [5:0]  ae_x_m;
  logic [4:0]  ae_y_m;
  logic        ae_req_m, ae_ack_m, rd_valid_m;
  logic [23:0] rd_isi_m, timer_m;
  logic [31:0] events_m;
  aer_imaging_system #(.N_COLS(40), .N_ROWS(30)) sys_m (
    .clk, .rst_n, .photo(photo_m), .ack_delay(8'd0), .rd_x(6'd0), .rd_y(5'd0),
    .rd_isi(rd_isi_m), .rd_valid(rd_valid_m), .events(events_m), .timer(timer_m),
    .ae_req(ae_req_m), .ae_ack(ae_ack_m), .ae_x(ae_x_m), .ae_y(ae_y_m)
  );

  // ---- 20 x 15 ----
  logic [7:0]  photo_s [15][20];
  logic [4:0]  ae_x_s;
  logic [3:0]  ae_y_s;
  logic        ae_req_s, ae_ack_s, rd_valid_s;
  logic [23:0] rd_isi_s, timer_s;
  logic [31:0] events_s;
  aer_imaging_system #(.N_COLS(20), .N_ROWS(15)) sys_s (
    .clk, .rst_n, .photo(photo_s), .ack_delay(8'd0), .rd_x(5'd0), .rd_y(4'd0),
    .rd_isi(rd_isi_s), .rd_valid(rd_valid_s), .events(events_s), .timer(timer_s),
    .ae_req(ae_req_s), .ae_ack(ae_ack_s), .ae_x(ae_x_s), .ae_y(ae_y_s)
  );

  // Interval of pixel (30, 30) of the large system, taken from the bus.
  longint cyc = 0, last_t = -1;
  logic   req_d = 1'b0;
  bit     track = 1'b0;
  real    isi_sum = 0.0, isi_sq = 0.0;
  int     isi_n = 0;
  always @(posedge clk) begin
    cyc   <= cyc + 1;
    req_d <= ae_req_l;
    if (rst_n && ae_req_l && !req_d && ae_x_l == 7'd30 && ae_y_l == 6'd30) begin
      if (track && last_t >= 0) begin
        isi_sum += real'(cyc - last_t);
        isi_sq  += real'(cyc - last_t) * real'(cyc - last_t);
        isi_n++;
      end
      last_t = cyc;
    end
  end

  int unsigned e0_l, e0_m, e0_s, ev_l, ev_m, ev_s;

  function automatic void judge(string name, int unsigned ev, int unsigned ncols,
                                int unsigned npix);
    real per_event, bound, fps;
    per_event = real'(WINDOW) / real'(ev);
    bound     = 4.0 + 2.0 / real'(ncols);
    fps       = F_CLK_MHZ * 1.0e6 / per_event / real'(npix);
    $display("%s: %0d events in %0d cycles, %.3f cycles/event (full rows: %.3f), %.0f effective fps at %.0f MHz",
             name, ev, WINDOW, per_event, bound, fps, F_CLK_MHZ);
    checks++;
    if (per_event < 4.0 || per_event > bound + 0.02) begin
      failures++;
      $display("FAIL: %s cost per event %.3f outside [4, %.3f]", name, per_event, bound + 0.02);
    end
  endfunction

  real mean, sd;

  initial begin
    foreach (photo_l[r, c]) photo_l[r][c] = 8'd255;
    foreach (photo_m[r, c]) photo_m[r][c] = 8'd255;
    foreach (photo_s[r, c]) photo_s[r][c] = 8'd255;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (22000) @(negedge clk);   // past the first full round of 80 x 60
    e0_l = events_l; e0_m = events_m; e0_s = events_s;
    track = 1'b1;
    repeat (WINDOW) @(negedge clk);
    ev_l = events_l - e0_l; ev_m = events_m - e0_m; ev_s = events_s - e0_s;
    judge("80x60", ev_l, 80, 4800);
    judge("40x30", ev_m, 40, 1200);
    judge("20x15", ev_s, 20, 300);
    // Effective frame rate scales as 1 / pixel count at a fixed event rate.
    checks++;
    if (real'(ev_m) / real'(ev_l) < 0.95 || real'(ev_s) / real'(ev_l) < 0.95) begin
      failures++;
      $display("FAIL: event rate differs between array sizes");
    end
    // Single-pixel interval statistics over a longer run.
    repeat (150000) @(negedge clk);
    mean = isi_sum / real'(isi_n);
    sd   = (isi_n > 1) ? $sqrt(isi_sq / real'(isi_n) - mean * mean) : 0.0;
    $display("pixel (30,30): %0d intervals, mean %.1f cycles, std %.1f cycles (%.2f%%)",
             isi_n, mean, sd, 100.0 * sd / mean);
    check(isi_n >= 6, "pixel (30,30) sent too few events");
    check(sd < 0.2 * mean, "pixel (30,30) interval not steady");
    // Round time of the saturated 80 x 60 array: about one pass over all
    // 4800 pixels (the tree serves rows in half-empty subtrees more often).
    check(mean > 4800.0 * 4.0 && mean < 4800.0 * (4.0 + 2.0 / 80.0) * 1.1,
          $sformatf("pixel (30,30) interval %.0f is not one readout round", mean));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
