// aer_pkg: constants and types shared by the address-event (AER) imager.
//
// The array is 80 columns by 60 rows, as built on the fabricated chip. Column
// (X) and row (Y) addresses are plain binary indices, 7 and 6 bits wide. The
// frame grabber time-stamps events with a 24-bit timer, the resolution the
// design calls for. The readout controller's state encoding lives here so
// that testbenches can name the states.
package aer_pkg;

  localparam int unsigned AER_COLS    = 80;
  localparam int unsigned AER_ROWS    = 60;
  localparam int unsigned AER_TIMER_W = 24;

  // Integrate-and-fire pixel model defaults (this design's own choice).
  localparam int unsigned AER_PHOTO_W = 8;   // photocurrent code added per clock
  localparam int unsigned AER_ACC_W   = 16;  // width of the integrated charge
  localparam int unsigned AER_VTH     = 4096; // firing threshold

  // States of the readout (handshaking) controller.
  typedef enum logic [1:0] {
    RD_IDLE   = 2'd0,  // wait for an empty row latch and a row request
    RD_COL    = 2'd1,  // launch the first event of a freshly latched row
    RD_ACK_HI = 2'd2,  // Req is high, waiting for Ack
    RD_ACK_LO = 2'd3   // Req is low, waiting for Ack to return low
  } rd_state_e;

  // States of the frame grabber's receiver.
  typedef enum logic {
    FG_IDLE = 1'b0,    // Ack low, waiting for Req
    FG_DONE = 1'b1     // event stored, Ack high, waiting for Req to fall
  } fg_state_e;

endpackage
