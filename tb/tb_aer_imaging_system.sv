// tb_aer_imaging_system: end-to-end testbench of the imager and its frame
// grabber, with every parameter at its default (80 x 60 pixels, threshold
// 4096, 24-bit timer).
//
// Sparse scene: a dozen pixels are lit with different levels, the rest are
// dark. Two of them share a row and fire together (several elements in the
// row latch), two others sit in different rows and fire together (two rows
// competing in the row arbiter). The frame buffer must hold an interval for
// every lit pixel and none for a dark one; a pixel's interval may never be
// shorter than its light allows, ceil(VTH/p) + 1 cycles, and may exceed it
// only by the queueing behind the other lit pixels (at most 6 cycles each).
//
// Full frame: after a reset every pixel is lit (levels 1 to 255). The bus
// saturates; the test runs until each of the 4800 pixels has an interval in
// the frame buffer (one complete image), checks the lower bound for every
// pixel, and checks the saturated throughput (one event per 4 cycles plus 2
// cycles per row). For a while the receiver holds Ack back by 4 cycles; the
// bus must then carry one event per 8 cycles plus 2 per row.
//
// The mechanisms of the readout are counted by watching the imager's
// internals, and each must have happened at least once: a row latch holding
// several events, a tie between rows in the row arbiter, a row kept waiting
// while another is read out, an event delayed by the receiver's handshake,
// saturation of the output bus, and a change of the request-acknowledge
// cycle time.
module tb_aer_imaging_system;
  import aer_pkg::*;
  localparam int unsigned NC = AER_COLS, NR = AER_ROWS, VTH = AER_VTH;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [7:0]  photo [NR][NC];
  logic [6:0]  rd_x, ae_x;
  logic [5:0]  rd_y, ae_y;
  logic [23:0] rd_isi, timer;
  logic        rd_valid, ae_req, ae_ack;
  logic [31:0] events;
  logic [7:0]  ack_delay;
  int          checks = 0, failures = 0;

  aer_imaging_system dut (
    .clk, .rst_n, .photo, .ack_delay, .rd_x, .rd_y, .rd_isi, .rd_valid, .events, .timer,
    .ae_req, .ae_ack, .ae_x, .ae_y
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
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Mechanism counters, from the imager's internal signals.
  int n_multi_latch = 0, n_row_tie = 0, n_row_wait = 0, n_bus_wait = 0, n_saturated = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_imager.latch_load && $countones(dut.u_imager.col_li) > 1) n_multi_latch++;
      if (dut.u_imager.row_en && $countones(dut.u_imager.row_req) > 1) n_row_tie++;
      if (!dut.u_imager.row_en && dut.u_imager.row_any) n_row_wait++;
      if (ae_req && !ae_ack && dut.u_imager.row_any) n_bus_wait++;
    end
  end

  // Independent event log from the bus.
  logic req_d = 1'b0;
  int   nev [NR][NC];
  always @(posedge clk) begin
    req_d <= ae_req && rst_n;
    if (rst_n && ae_req && !req_d) nev[ae_y][ae_x]++;
  end

  function automatic int ideal(int p);
    return (VTH + p - 1) / p + 1;
  endfunction

  typedef struct { int c; int r; int p; } lit_t;
  lit_t lit [12] = '{
    '{c: 3,  r: 2,  p: 64},  // same row and level as the next one
    '{c: 70, r: 2,  p: 64},
    '{c: 10, r: 40, p: 50},  // two rows with the same level
    '{c: 11, r: 41, p: 50},
    '{c: 0,  r: 0,  p: 255},
    '{c: 79, r: 59, p: 255},
    '{c: 40, r: 30, p: 17},
    '{c: 41, r: 31, p: 9},
    '{c: 5,  r: 55, p: 3},
    '{c: 66, r: 12, p: 1},
    '{c: 20, r: 20, p: 2},
    '{c: 60, r: 45, p: 100}
  };

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    foreach (nev[r, c]) nev[r][c] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
  endtask

  int unsigned ev_before, cycles_sat, rows_sat;
  int unsigned ev_slow_before, ev_slow, rows_slow, ev_fast;
  int          n_modulated = 0;
  bit all_valid;
  int lit_map [NR][NC];

  initial begin
    rd_x = '0; rd_y = '0; ack_delay = '0;
    foreach (photo[r, c]) photo[r][c] = 8'd0;
    foreach (lit_map[r, c]) lit_map[r][c] = 0;

    // ---------------- Sparse scene ----------------
    foreach (lit[i]) begin
      photo[lit[i].r][lit[i].c] = 8'(lit[i].p);
      lit_map[lit[i].r][lit[i].c] = lit[i].p;
    end
    do_reset();
    repeat (3 * 4097 + 200) @(negedge clk);
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++) begin
        rd_x = 7'(c); rd_y = 6'(r);
        #1;
        if (lit_map[r][c] == 0) begin
          check(!rd_valid && nev[r][c] == 0, $sformatf("dark pixel (%0d,%0d) reported", c, r));
        end else begin
          automatic int lo = ideal(lit_map[r][c]);
          check(rd_valid, $sformatf("lit pixel (%0d,%0d) has no interval", c, r));
          check(int'(rd_isi) >= lo && int'(rd_isi) <= lo + 6 * 12,
                $sformatf("pixel (%0d,%0d) p=%0d interval %0d, ideal %0d",
                          c, r, lit_map[r][c], rd_isi, lo));
        end
      end
    check(events == 32'(count_events()), "grabber event count matches the bus");

    // ---------------- Full frame, saturated ----------------
    foreach (photo[r, c]) photo[r][c] = 8'(1 + (r * NC + c) % 255);
    do_reset();
    // Throughput window while everything requests.
    repeat (5000) @(negedge clk);
    ev_before = events;
    rows_sat = 0;
    cycles_sat = 0;
    repeat (8000) begin
      @(negedge clk);
      cycles_sat++;
      if (dut.u_imager.latch_load) rows_sat++;
      if (dut.u_imager.row_any && dut.u_imager.u_ctrl.state != RD_IDLE) n_saturated++;
    end
    check((events - ev_before) * 4 + rows_sat * 2 >= cycles_sat - 16,
          $sformatf("saturated throughput: %0d events, %0d rows in %0d cycles",
                    events - ev_before, rows_sat, cycles_sat));
    // A slower receiver (Ack held back 4 cycles) stretches every event to
    // 8 cycles: the event rate, and so the frame rate, halves.
    ev_fast = events - ev_before;
    @(negedge clk);
    ack_delay = 8'd4;
    repeat (20) @(negedge clk);
    ev_slow_before = events;
    rows_slow = 0;
    repeat (8000) begin
      @(negedge clk);
      if (dut.u_imager.latch_load) rows_slow++;
    end
    ev_slow = events - ev_slow_before;
    check(ev_slow * 8 + rows_slow * 2 >= 8000 - 24 && ev_slow * 8 + rows_slow * 2 <= 8000 + 24,
          $sformatf("slow receiver: %0d events, %0d rows in 8000 cycles", ev_slow, rows_slow));
    check(ev_slow < ev_fast * 6 / 10, "slow receiver did not lower the event rate");
    if (ev_slow > 0) n_modulated++;
    ack_delay = 8'd0;
    // Run until the frame is complete.
    all_valid = 0;
    for (int w = 0; w < 60 && !all_valid; w++) begin
      repeat (4000) @(negedge clk);
      all_valid = 1;
      for (int r = 0; r < NR && all_valid; r++)
        for (int c = 0; c < NC; c++) begin
          rd_x = 7'(c); rd_y = 6'(r);
          #1;
          if (!rd_valid) begin all_valid = 0; break; end
        end
    end
    check(all_valid, "complete frame: every pixel has an interval");
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++) begin
        rd_x = 7'(c); rd_y = 6'(r);
        #1;
        check(int'(rd_isi) >= ideal(int'(photo[r][c])),
              $sformatf("pixel (%0d,%0d) faster than its light: %0d < %0d",
                        c, r, rd_isi, ideal(int'(photo[r][c]))));
      end
    $display("events %0d, frame complete after %0d cycles", events, timer);
    $display("mechanisms: multi-event rows %0d, row ties %0d, rows waiting %0d, bus waits %0d, saturated cycles %0d",
             n_multi_latch, n_row_tie, n_row_wait, n_bus_wait, n_saturated);
    check(n_multi_latch > 0, "row latch never held several events");
    check(n_row_tie > 0, "row arbiter never saw a tie");
    check(n_row_wait > 0, "no row ever waited");
    check(n_bus_wait > 0, "no event waited for the handshake");
    check(n_saturated > 0, "bus never saturated");
    check(n_modulated > 0, "request-acknowledge cycle time never changed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int count_events();
    int n = 0;
    foreach (nev[r, c]) n += nev[r][c];
    return n;
  endfunction
endmodule
