// aer_frame_grabber: receiver that turns address events into an image.
//
// The imager sends only addresses; intensity is the inverse of the time
// between two events of the same pixel. The receiver therefore keeps a
// free-running TIMER_W-bit timer (24 bits) and a frame buffer holding, for
// every pixel, the time of its latest event and its latest inter-spike
// interval. On each event it looks up the pixel's previous time, stores the
// difference (modulo 2^TIMER_W) as the pixel's intensity code, and stores
// the current time. A pixel's first event only sets its time.
//
// Interface: req/ack/x/y is the four-phase address-event bus (receiver
// side). rd_x/rd_y read one pixel: rd_isi is its latest interval in clock
// ticks, rd_valid says that it has one. events counts received events.
// Storing the interval rather than its reciprocal, the pixel index
// y*N_COLS + x, and one timer tick per clock are this design's choices.
//
// The request-acknowledge cycle time sets the event rate, and with it the
// frame rate: `ack_delay` holds Ack back by that many extra cycles, so a
// receiver can slow the imager down.
//
// Timing: Ack rises ack_delay + 1 clock edges after Req is first seen high
// (the buffer is updated and the event time-stamped on that edge) and falls
// on the edge after Req falls. The read port is combinational.
module aer_frame_grabber
  import aer_pkg::*;
#(
  parameter int unsigned N_COLS  = aer_pkg::AER_COLS,
  parameter int unsigned N_ROWS  = aer_pkg::AER_ROWS,
  parameter int unsigned TIMER_W = aer_pkg::AER_TIMER_W,
  parameter int unsigned X_W     = $clog2(N_COLS),
  parameter int unsigned Y_W     = $clog2(N_ROWS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // address-event bus
  input  logic               req,
  output logic               ack,
  input  logic [X_W-1:0]     x,
  input  logic [Y_W-1:0]     y,
  input  logic [7:0]         ack_delay,  // extra cycles before Ack
  // frame buffer read port
  input  logic [X_W-1:0]     rd_x,
  input  logic [Y_W-1:0]     rd_y,
  output logic [TIMER_W-1:0] rd_isi,
  output logic               rd_valid,
  output logic [31:0]        events,
  output logic [TIMER_W-1:0] timer
);

  localparam int unsigned NPIX  = N_COLS * N_ROWS;
  localparam int unsigned IDX_W = $clog2(NPIX);

  logic [TIMER_W-1:0] last_t [NPIX];  // time of the latest event
  logic [TIMER_W-1:0] isi    [NPIX];  // latest inter-spike interval
  logic [NPIX-1:0]    seen;           // pixel has had an event
  logic [NPIX-1:0]    has_isi;        // pixel has had two events

  fg_state_e          state;
  logic [IDX_W-1:0]   idx, rd_idx;
  logic               take;
  logic [7:0]         wait_cnt;       // cycles Req has waited for Ack

  assign idx    = IDX_W'(y) * IDX_W'(N_COLS) + IDX_W'(x);
  assign rd_idx = IDX_W'(rd_y) * IDX_W'(N_COLS) + IDX_W'(rd_x);
  assign take   = (state == FG_IDLE) && req && (wait_cnt >= ack_delay);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      timer   <= '0;
      state   <= FG_IDLE;
      ack     <= 1'b0;
      seen    <= '0;
      has_isi <= '0;
      events  <= '0;
      wait_cnt <= '0;
    end else begin
      timer <= timer + 1'b1;
      unique case (state)
        FG_IDLE: if (req && !take) begin
          wait_cnt     <= wait_cnt + 1'b1;
        end else if (take) begin
          wait_cnt     <= '0;
          ack          <= 1'b1;
          seen[idx]    <= 1'b1;
          has_isi[idx] <= seen[idx];
          events       <= events + 1;
          state        <= FG_DONE;
        end
        FG_DONE: if (!req) begin
          ack   <= 1'b0;
          state <= FG_IDLE;
        end
      endcase
    end
  end

  // Frame buffer memories (no reset; `seen` and `has_isi` qualify them).
  always_ff @(posedge clk) begin
    if (take) begin
      last_t[idx] <= timer;
      isi[idx]    <= timer - last_t[idx];
    end
  end

  assign rd_isi   = isi[rd_idx];
  assign rd_valid = has_isi[rd_idx];

  assert property (@(posedge clk) disable iff (!rst_n)
                   take |-> int'(x) < int'(N_COLS) && int'(y) < int'(N_ROWS))
    else $error("aer_frame_grabber: address outside the array");

endmodule
