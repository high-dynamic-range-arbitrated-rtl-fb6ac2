// tb_aer_readout_ctrl: self-checking testbench for the readout (handshaking)
// controller.
//
// The testbench stands in for the arbiters and the row latch: it holds a
// queue of rows, each with a list of requesting columns. When the controller
// acknowledges a row the list moves into a model latch; col_any/col_addr show
// its first element and col_done removes it. A receiver answers Req with Ack
// after a programmable delay. Checks: every event arrives with the right
// (X, Y) and in order, a row is taken only when the latch is empty, and with
// a receiver that answers in one cycle each event takes exactly 4 cycles.
module tb_aer_readout_ctrl;
  import aer_pkg::*;
  localparam int unsigned X_W = 7, Y_W = 6;

  logic           clk = 1'b0, rst_n = 1'b0;
  logic           row_any, row_en, row_ack, latch_load, row_done;
  logic [Y_W-1:0] row_addr;
  logic           col_any, col_en, col_done;
  logic [X_W-1:0] col_addr;
  logic           req, ack;
  logic [X_W-1:0] x;
  logic [Y_W-1:0] y;
  rd_state_e      state;
  int             checks = 0, failures = 0;

  aer_readout_ctrl #(.X_W(X_W), .Y_W(Y_W)) dut (
    .clk, .rst_n, .row_any, .row_addr, .row_en, .row_ack, .latch_load, .row_done,
    .col_any, .col_addr, .col_en, .col_done, .req, .ack, .x, .y, .state
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Stimulus model.
  int row_q[$];          // rows waiting
  int cols_q[$][$];      // their columns
  int latch[$];          // model row latch
  int exp_x[$], exp_y[$];
  int ack_delay = 0;     // receiver latency in cycles beyond the first
  int cnt = 0;
  int cycle = 0;
  int last_req_rise = -1;
  int periods4 = 0;
  bit fixed_phase = 1'b0;
  logic req_d = 1'b0;

  assign row_any  = row_q.size() != 0;
  assign row_addr = row_any ? Y_W'(row_q[0]) : '0;
  assign col_any  = latch.size() != 0;
  assign col_addr = col_any ? X_W'(latch[0]) : '0;

  // The row and latch model follows the strobes sampled at the clock edge,
  // half a cycle later, so that it never races with the controller.
  logic ld_q = 1'b0, dn_q = 1'b0, en_q = 1'b0;
  always @(posedge clk) begin
    ld_q <= latch_load;
    dn_q <= col_done;
    en_q <= row_en && row_done;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (ld_q) begin
        checks++;
        if (latch.size() != 0) begin failures++; $display("FAIL: row taken, latch busy"); end
        if (!en_q) begin failures++; $display("FAIL: row strobes"); end
        latch = cols_q[0];
        void'(row_q.pop_front());
        void'(cols_q.pop_front());
      end else if (dn_q) begin
        void'(latch.pop_front());
      end
    end
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      // Receiver: Ack follows Req after 1 + ack_delay cycles.
      if (req != ack) begin
        if (cnt >= ack_delay) begin ack <= req; cnt = 0; end
        else cnt++;
      end
      // Event sampled on Req rise.
      req_d <= req;
      if (req && !req_d) begin
        checks++;
        if (exp_x.size() == 0 || x != X_W'(exp_x[0]) || y != Y_W'(exp_y[0])) begin
          failures++;
          $display("FAIL: event (%0d,%0d) unexpected", x, y);
        end else begin
          void'(exp_x.pop_front());
          void'(exp_y.pop_front());
        end
        if (fixed_phase && last_req_rise >= 0 && !row_done) begin
          // consecutive events of one row
          if (cycle - last_req_rise == 4) periods4++;
        end
        last_req_rise = cycle;
      end
    end
  end

  task automatic add_row(int r, int n);
    int cl[$];
    for (int i = 0; i < n; i++) begin
      cl.push_back((r * 7 + i * 11) % 80);
      exp_x.push_back((r * 7 + i * 11) % 80);
      exp_y.push_back(r);
    end
    row_q.push_back(r);
    cols_q.push_back(cl);
  endtask

  initial begin
    ack = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Phase 1: one-cycle receiver; check 4-cycle event period.
    fixed_phase = 1'b1;
    ack_delay = 0;
    @(negedge clk);
    add_row(5, 6);
    add_row(17, 1);
    add_row(59, 4);
    wait (exp_x.size() == 0 && !req && !ack && state == RD_IDLE);
    check(periods4 >= 5 + 3, $sformatf("4-cycle event period seen %0d times", periods4));
    // Phase 2: slow, varying receiver and rows added while reading out.
    fixed_phase = 1'b0;
    for (int k = 0; k < 40; k++) begin
      @(negedge clk);
      ack_delay = $urandom % 4;
      add_row(int'($urandom % 60), 1 + int'($urandom % 10));
      repeat ($urandom % 30) @(negedge clk);
    end
    wait (exp_x.size() == 0 && row_q.size() == 0);
    repeat (10) @(negedge clk);
    check(state == RD_IDLE && !req, "controller idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
