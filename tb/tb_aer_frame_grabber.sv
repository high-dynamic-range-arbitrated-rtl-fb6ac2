// tb_aer_frame_grabber: self-checking testbench for the event receiver and
// frame buffer.
//
// A sender drives random pixel addresses over the four-phase bus at random
// moments into a full-size grabber (80 x 60, 24-bit timer) and into a small
// one (8 x 6, 8-bit timer) whose timer wraps during the test. The testbench
// counts clock edges itself, notes the time of every accepted event, and
// checks the stored inter-spike interval (modulo the timer width), the valid
// flag of every pixel, the event count, and that Ack rises ack_delay + 1
// cycles after Req for a random ack_delay of 0 to 5.
module tb_aer_frame_grabber;
  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;

  // Full-size instance.
  logic        req, ack;
  logic [6:0]  x, rd_x;
  logic [5:0]  y, rd_y;
  logic [23:0] rd_isi, timer;
  logic        rd_valid;
  logic [31:0] events;
  // Small instance with an 8-bit timer.
  logic        req_s, ack_s;
  logic [2:0]  x_s, rd_x_s;
  logic [2:0]  y_s, rd_y_s;
  logic [7:0]  rd_isi_s, timer_s;
  logic        rd_valid_s;
  logic [31:0] events_s;

  logic [7:0]  ack_delay;

  aer_frame_grabber dut (
    .clk, .rst_n, .req, .ack, .x, .y, .ack_delay, .rd_x, .rd_y, .rd_isi, .rd_valid,
    .events, .timer
  );
  aer_frame_grabber #(.N_COLS(8), .N_ROWS(6), .TIMER_W(8)) dut_s (
    .clk, .rst_n, .req(req_s), .ack(ack_s), .x(x_s), .y(y_s), .ack_delay(8'd0),
    .rd_x(rd_x_s), .rd_y(rd_y_s), .rd_isi(rd_isi_s), .rd_valid(rd_valid_s),
    .events(events_s), .timer(timer_s)
  );

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

  // Edge counter since reset release: the reference time base.
  longint tnow = 0;
  always @(posedge clk) if (rst_n) tnow <= tnow + 1;

  longint last_big [80*60];
  longint isi_big  [80*60];
  int     nev_big  [80*60];
  longint last_sm  [48];
  longint isi_sm   [48];
  int     nev_sm   [48];
  int     sent = 0, sent_s = 0;

  // Sends one event; returns the time stamp the receiver should use.
  task automatic send_big(int px, int py);
    int idx = py * 80 + px;
    longint t;
    int waited;
    int edges = 0;
    @(negedge clk);
    x = 7'(px); y = 6'(py); req = 1'b1;
    ack_delay = 8'($urandom % 6);
    do begin
      @(posedge clk);
      t = tnow;            // the receiver stamps the event on the edge Ack rises
      edges++;
      #1;
    end while (!ack && edges < 20);
    check(edges == int'(ack_delay) + 1,
          $sformatf("Ack after %0d edges, expected %0d", edges, ack_delay + 1));
    @(negedge clk);
    req = 1'b0;
    waited = 0;
    while (ack) begin @(negedge clk); waited++; end
    check(waited == 1, "Ack falls one cycle after Req");
    if (nev_big[idx] > 0) isi_big[idx] = t - last_big[idx];
    last_big[idx] = t;
    nev_big[idx]++;
    sent++;
  endtask

  task automatic send_small(int px, int py);
    int idx = py * 8 + px;
    longint t;
    @(negedge clk);
    x_s = 3'(px); y_s = 3'(py); req_s = 1'b1;
    @(posedge clk);
    t = tnow;
    @(negedge clk);
    req_s = 1'b0;
    while (ack_s) @(negedge clk);
    if (nev_sm[idx] > 0) isi_sm[idx] = t - last_sm[idx];
    last_sm[idx] = t;
    nev_sm[idx]++;
    sent_s++;
  endtask

  initial begin
    req = 1'b0; x = '0; y = '0; rd_x = '0; rd_y = '0; ack_delay = '0;
    req_s = 1'b0; x_s = '0; y_s = '0; rd_x_s = '0; rd_y_s = '0;
    foreach (nev_big[i]) nev_big[i] = 0;
    foreach (nev_sm[i]) nev_sm[i] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    // Full-size grabber: events on a few pixels, including the corners.
    for (int k = 0; k < 600; k++) begin
      automatic int sel = $urandom % 6;
      int px, py;
      case (sel)
        0: begin px = 0;  py = 0;  end
        1: begin px = 79; py = 59; end
        2: begin px = 79; py = 0;  end
        default: begin px = $urandom % 80; py = $urandom % 60; end
      endcase
      send_big(px, py);
      repeat ($urandom % 50) @(negedge clk);
    end
    // Small grabber: long gaps so that its 8-bit timer wraps.
    for (int k = 0; k < 300; k++) begin
      send_small($urandom % 2, $urandom % 2);
      repeat ($urandom % 120) @(negedge clk);
    end
    @(negedge clk);
    check(events == 32'(sent) && events_s == 32'(sent_s), "event counters");
    for (int py = 0; py < 60; py++)
      for (int px = 0; px < 80; px++) begin
        automatic int idx = py * 80 + px;
        rd_x = 7'(px); rd_y = 6'(py);
        #1;
        check(rd_valid == (nev_big[idx] >= 2), $sformatf("valid (%0d,%0d)", px, py));
        if (nev_big[idx] >= 2)
          check(rd_isi == 24'(isi_big[idx]),
                $sformatf("isi (%0d,%0d) %0d expected %0d", px, py, rd_isi, isi_big[idx]));
      end
    for (int py = 0; py < 2; py++)
      for (int px = 0; px < 2; px++) begin
        automatic int idx = py * 8 + px;
        rd_x_s = 3'(px); rd_y_s = 3'(py);
        #1;
        check(rd_valid_s == (nev_sm[idx] >= 2), "valid small");
        if (nev_sm[idx] >= 2)
          check(rd_isi_s == 8'(isi_sm[idx] % 256),
                $sformatf("wrapped isi %0d expected %0d", rd_isi_s, isi_sm[idx] % 256));
      end
    check(tnow > 256, "small timer wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
