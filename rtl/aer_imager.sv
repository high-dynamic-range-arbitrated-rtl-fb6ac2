// aer_imager: the arbitrated address-event imager chip.
//
// Each pixel integrates its photocurrent and requests the output bus when it
// fires, so a bright pixel sends events often and a dark one seldom; the
// light intensity is carried by the interval between a pixel's events. The
// chip reads the array out on demand:
//   1. the row arbiter tree picks one row whose request line is active;
//   2. the row is acknowledged (s): its requesting pixels drive their column
//      lines li, the row latch copies them, the pixels reset and start to
//      integrate again, and the row ROM supplies the row address Y;
//   3. the column arbiter tree picks the buffered elements one at a time;
//      each address (X, Y) is sent with a four-phase Req/Ack handshake and
//      the element is cleared;
//   4. when the latch is empty the next row is taken.
//
// Interface: photo[r][c] is the light on pixel (c, r) as charge per clock
// (see aer_pixel); req/ack/x/y is the address-event output bus. Every block
// runs on clk; the chip itself is asynchronous, and this clocked version is
// this design's own. Timing: 4 cycles per event with a receiver that answers
// in one cycle, plus 2 cycles per row.
module aer_imager
  import aer_pkg::*;
#(
  parameter int unsigned N_COLS  = aer_pkg::AER_COLS,
  parameter int unsigned N_ROWS  = aer_pkg::AER_ROWS,
  parameter int unsigned PHOTO_W = aer_pkg::AER_PHOTO_W,
  parameter int unsigned ACC_W   = aer_pkg::AER_ACC_W,
  parameter int unsigned VTH     = aer_pkg::AER_VTH,
  parameter int unsigned X_W     = $clog2(N_COLS),
  parameter int unsigned Y_W     = $clog2(N_ROWS)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PHOTO_W-1:0] photo [N_ROWS][N_COLS],
  output logic               req,
  input  logic               ack,
  output logic [X_W-1:0]     x,
  output logic [Y_W-1:0]     y
);

  logic [N_ROWS-1:0] row_req, row_gnt, s;
  logic [N_COLS-1:0] col_li, latch_q, col_gnt;
  logic              row_any, row_en, row_ack, latch_load, row_done;
  logic              col_any, col_en, col_done, latch_empty;
  logic [Y_W-1:0]    row_addr;
  logic [X_W-1:0]    col_addr;
  logic              row_addr_valid, col_addr_valid;
  rd_state_e         state;

  pixel_array #(
    .N_COLS(N_COLS), .N_ROWS(N_ROWS), .PHOTO_W(PHOTO_W), .ACC_W(ACC_W), .VTH(VTH)
  ) u_array (
    .clk, .rst_n, .photo, .s, .row_req, .col_li
  );

  // Row arbitration and row address ROM.
  arbiter_tree #(.N(N_ROWS)) u_row_arb (
    .clk, .rst_n, .req(row_req), .en(row_en), .gnt(row_gnt),
    .any(row_any), .done(row_done)
  );
  addr_encoder #(.N(N_ROWS), .W(Y_W)) u_row_rom (
    .sel(row_gnt), .addr(row_addr), .valid(row_addr_valid)
  );
  assign s = row_gnt & {N_ROWS{row_ack}};

  // Row latch and column arbitration on the buffered row.
  row_latch #(.N(N_COLS)) u_latch (
    .clk, .rst_n, .load(latch_load), .li(col_li),
    .clr(col_gnt & {N_COLS{col_done}}), .q(latch_q), .empty(latch_empty)
  );
  arbiter_tree #(.N(N_COLS)) u_col_arb (
    .clk, .rst_n, .req(latch_q), .en(col_en), .gnt(col_gnt),
    .any(col_any), .done(col_done)
  );
  addr_encoder #(.N(N_COLS), .W(X_W)) u_col_enc (
    .sel(col_gnt), .addr(col_addr), .valid(col_addr_valid)
  );

  aer_readout_ctrl #(.X_W(X_W), .Y_W(Y_W)) u_ctrl (
    .clk, .rst_n,
    .row_any, .row_addr, .row_en, .row_ack, .latch_load, .row_done,
    .col_any, .col_addr, .col_en, .col_done,
    .req, .ack, .x, .y, .state
  );

  // A row is only taken when the latch is empty, and the row taken must
  // produce at least one column request.
  assert property (@(posedge clk) disable iff (!rst_n) row_ack |-> latch_empty)
    else $error("aer_imager: row taken while latch busy");
  assert property (@(posedge clk) disable iff (!rst_n)
                   row_ack |-> row_addr_valid && col_li != '0)
    else $error("aer_imager: acknowledged row has no requesting pixel");
  assert property (@(posedge clk) disable iff (!rst_n) col_done |-> col_addr_valid)
    else $error("aer_imager: column done without grant");

endmodule
