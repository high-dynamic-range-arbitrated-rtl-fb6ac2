// tb_aer_imager: self-checking testbench for the imager chip at a reduced
// size (8 columns x 6 rows, threshold 64).
//
// Flash test: a random set of pixels gets a light level equal to the
// threshold for a single clock, so each of them fires exactly once. The
// receiver must get exactly that set of addresses, each once, with the
// events of one row arriving back to back (the row latch), 4 cycles apart
// when the receiver answers in one cycle. Steady test: one pixel alone under
// constant light p must send events exactly ceil(VTH/p) + 1 cycles apart
// (integration plus the acknowledge cycle), or 6 cycles apart when that is
// shorter than one complete row readout. Contention test: all pixels lit;
// every pixel must still be served (no starvation) and the bus must carry
// an event every 4 cycles, plus 2 cycles per row, when saturated.
module tb_aer_imager;
  localparam int unsigned NC = 8, NR = 6, VTH = 64;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic [7:0] photo [NR][NC];
  logic       req, ack;
  logic [2:0] x;
  logic [2:0] y;
  int         checks = 0, failures = 0;

  aer_imager #(.N_COLS(NC), .N_ROWS(NR), .VTH(VTH)) dut (
    .clk, .rst_n, .photo, .req, .ack, .x, .y
  );

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

  // Receiver with a programmable extra delay; logs every event.
  int     ack_delay = 0, cnt = 0;
  longint cyc = 0;
  logic   req_d = 1'b0;
  int     got [NR][NC];
  longint last_t [NR][NC];
  longint isi [NR][NC];
  int     ev_total = 0;
  int     prev_y = -1;
  longint prev_t = -1;
  int     gap4 = 0, gap_other = 0, row_switches = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst_n) ack <= 1'b0;
    else if (req != ack) begin
      if (cnt >= ack_delay) begin ack <= req; cnt = 0; end
      else cnt++;
    end
    req_d <= req;
    if (rst_n && req && !req_d) begin
      got[y][x]++;
      if (last_t[y][x] >= 0) isi[y][x] = cyc - last_t[y][x];
      last_t[y][x] = cyc;
      ev_total++;
      if (int'(y) == prev_y) begin
        if (cyc - prev_t == 4) gap4++; else gap_other++;
      end else row_switches++;
      prev_y = int'(y);
      prev_t = cyc;
    end
  end

  task automatic clear_log();
    foreach (got[r, c]) begin got[r][c] = 0; last_t[r][c] = -1; isi[r][c] = 0; end
    ev_total = 0; gap4 = 0; gap_other = 0; row_switches = 0; prev_y = -1;
  endtask

  task automatic dark();
    foreach (photo[r, c]) photo[r][c] = 8'd0;
  endtask

  bit flash [NR][NC];
  int nflash;

  initial begin
    dark();
    ack = 1'b0;
    clear_log();
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    // Flash test, one-cycle receiver.
    for (int round = 0; round < 30; round++) begin
      clear_log();
      ack_delay = (round < 15) ? 0 : int'($urandom % 3);
      nflash = 0;
      @(negedge clk);
      foreach (flash[r, c]) begin
        flash[r][c] = ($urandom % 3) == 0;
        if (flash[r][c]) begin photo[r][c] = 8'(VTH); nflash++; end
      end
      @(negedge clk);
      dark();
      repeat (8 * nflash + 40) @(negedge clk);
      foreach (flash[r, c])
        check(got[r][c] == (flash[r][c] ? 1 : 0),
              $sformatf("round %0d pixel (%0d,%0d) sent %0d events", round, c, r, got[r][c]));
      // Each lit row is read out as one contiguous burst.
      begin
        automatic int rows_lit = 0;
        for (int r = 0; r < NR; r++) begin
          automatic bit any_lit = 0;
          for (int c = 0; c < NC; c++) any_lit |= flash[r][c];
          rows_lit += any_lit;
        end
        check(row_switches == rows_lit, $sformatf("round %0d: %0d row bursts for %0d rows",
                                                  round, row_switches, rows_lit));
        if (ack_delay == 0 && round < 15)
          check(gap_other == 0, $sformatf("round %0d: in-row event spacing not 4 cycles", round));
      end
    end

    // Steady test: pixel (5,3) alone, several light levels.
    for (int k = 0; k < 4; k++) begin
      automatic int p = (k == 0) ? 64 : (k == 1) ? 20 : (k == 2) ? 7 : 1;
      // A lone pixel cannot be served faster than one row cycle: acknowledge,
      // launch, four handshake edges = 6 cycles.
      automatic int expect_isi = ((VTH + p - 1) / p + 1 > 6) ? (VTH + p - 1) / p + 1 : 6;
      clear_log();
      ack_delay = 0;
      @(negedge clk);
      dark();
      photo[3][5] = 8'(p);
      repeat (expect_isi * 6 + 20) @(negedge clk);
      check(got[3][5] >= 4, $sformatf("p=%0d: only %0d events", p, got[3][5]));
      check(isi[3][5] == longint'(expect_isi),
            $sformatf("p=%0d: interval %0d expected %0d", p, isi[3][5], expect_isi));
    end

    // Contention test: every pixel lit, saturating the bus.
    clear_log();
    ack_delay = 0;
    @(negedge clk);
    foreach (photo[r, c]) photo[r][c] = 8'(16 + 4 * (r * NC + c) % 48);
    repeat (4000) @(negedge clk);
    foreach (got[r, c])
      check(got[r][c] > 0, $sformatf("pixel (%0d,%0d) starved", c, r));
    // Saturated: 4 cycles per event plus 2 cycles per row.
    check(ev_total * 4 + row_switches * 2 >= 4000 - 20,
          $sformatf("throughput %0d events, %0d rows in 4000 cycles", ev_total, row_switches));
    dark();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
