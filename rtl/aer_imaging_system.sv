// aer_imaging_system: the imager chip connected to its frame grabber.
//
// The 80 x 60 address-event imager sends the address of every pixel that
// fires over a four-phase Req/Ack bus; the frame grabber time-stamps each
// event with a 24-bit timer and keeps, per pixel, the latest event time and
// inter-spike interval, from which the image is read (intensity is inversely
// proportional to the interval). The bus is brought out so that it can be
// observed.
//
// Interface: photo[r][c] is the light on pixel (c, r) as charge per clock;
// ack_delay stretches the receiver's request-acknowledge cycle by that many
// cycles, which lowers the event rate and so the frame rate;
// rd_x/rd_y/rd_isi/rd_valid read the frame buffer; events counts received
// events and timer is the grabber's time base; ae_* mirror the bus.
// Everything runs on one clock.
module aer_imaging_system
  import aer_pkg::*;
#(
  parameter int unsigned N_COLS  = aer_pkg::AER_COLS,
  parameter int unsigned N_ROWS  = aer_pkg::AER_ROWS,
  parameter int unsigned PHOTO_W = aer_pkg::AER_PHOTO_W,
  parameter int unsigned ACC_W   = aer_pkg::AER_ACC_W,
  parameter int unsigned VTH     = aer_pkg::AER_VTH,
  parameter int unsigned TIMER_W = aer_pkg::AER_TIMER_W,
  parameter int unsigned X_W     = $clog2(N_COLS),
  parameter int unsigned Y_W     = $clog2(N_ROWS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PHOTO_W-1:0] photo [N_ROWS][N_COLS],
  input  logic [7:0]         ack_delay,
  input  logic [X_W-1:0]     rd_x,
  input  logic [Y_W-1:0]     rd_y,
  output logic [TIMER_W-1:0] rd_isi,
  output logic               rd_valid,
  output logic [31:0]        events,
  output logic [TIMER_W-1:0] timer,
  output logic               ae_req,
  output logic               ae_ack,
  output logic [X_W-1:0]     ae_x,
  output logic [Y_W-1:0]     ae_y
);

  aer_imager #(
    .N_COLS(N_COLS), .N_ROWS(N_ROWS), .PHOTO_W(PHOTO_W), .ACC_W(ACC_W),
    .VTH(VTH), .X_W(X_W), .Y_W(Y_W)
  ) u_imager (
    .clk, .rst_n, .photo, .req(ae_req), .ack(ae_ack), .x(ae_x), .y(ae_y)
  );

  aer_frame_grabber #(
    .N_COLS(N_COLS), .N_ROWS(N_ROWS), .TIMER_W(TIMER_W), .X_W(X_W), .Y_W(Y_W)
  ) u_grabber (
    .clk, .rst_n, .req(ae_req), .ack(ae_ack), .x(ae_x), .y(ae_y), .ack_delay,
    .rd_x, .rd_y, .rd_isi, .rd_valid, .events, .timer
  );

endmodule
