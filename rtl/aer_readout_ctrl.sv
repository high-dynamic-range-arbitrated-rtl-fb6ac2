// aer_readout_ctrl: the handshaking block that sequences the AER readout.
//
// Readout of a spike happens in three steps: the row arbiter picks one
// requesting row, the row is copied into the row latch and acknowledged
// (which resets its requesting pixels), and the column arbiter then picks
// the buffered elements one by one, each of whose address is sent off chip
// with a four-phase Req/Ack handshake and then cleared. A new row is taken
// only once the latch is empty.
//
// States (aer_pkg::rd_state_e):
//   RD_IDLE   the row arbiter is enabled; if a row requests, assert s_en
//             and latch_load for one cycle, register the row address Y and
//             mark the row as served (row_done); go to RD_COL.
//   RD_COL    register the address X of the column arbiter's choice and
//             raise Req (RD_ACK_HI); if the latch holds nothing, RD_IDLE.
//   RD_ACK_HI wait for Ack; then drop Req and, in the same cycle, clear the
//             served element and mark it served (col_done).
//   RD_ACK_LO wait for Ack to fall; then raise Req at once for the next
//             buffered element, or return to RD_IDLE when the latch is empty.
// With a receiver that answers each edge one cycle later, an event takes 4
// clock cycles and a row costs one extra cycle (RD_IDLE) plus one (RD_COL).
//
// The chip does this with asynchronous handshake circuits; this controller
// is a clocked equivalent, and assumes Ack is synchronous to clk.
module aer_readout_ctrl
  import aer_pkg::*;
#(
  parameter int unsigned X_W = 7,
  parameter int unsigned Y_W = 6
) (
  input  logic           clk,
  input  logic           rst_n,
  // row arbitration
  input  logic           row_any,     // some row requests
  input  logic [Y_W-1:0] row_addr,    // address of the granted row (ROM)
  output logic           row_en,      // enable the row arbiter's grant
  output logic           row_ack,     // drive s of the granted row
  output logic           latch_load,  // copy the column lines into the latch
  output logic           row_done,    // row served: update the row arbiter
  // column arbitration on the row latch
  input  logic           col_any,     // the latch holds a request
  input  logic [X_W-1:0] col_addr,    // address of the granted element
  output logic           col_en,      // enable the column arbiter's grant
  output logic           col_done,    // element sent: clear it, update arbiter
  // off-chip address-event bus
  output logic           req,
  input  logic           ack,
  output logic [X_W-1:0] x,
  output logic [Y_W-1:0] y,
  output rd_state_e      state
);

  rd_state_e state_q;

  always_comb begin
    row_en     = (state_q == RD_IDLE);
    row_ack    = (state_q == RD_IDLE) && row_any;
    latch_load = row_ack;
    row_done   = row_ack;
    col_en     = (state_q != RD_IDLE);
    col_done   = (state_q == RD_ACK_HI) && ack;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= RD_IDLE;
      req     <= 1'b0;
      x       <= '0;
      y       <= '0;
    end else begin
      unique case (state_q)
        RD_IDLE: if (row_any) begin
          y       <= row_addr;
          state_q <= RD_COL;
        end
        RD_COL: if (col_any) begin
          x       <= col_addr;
          req     <= 1'b1;
          state_q <= RD_ACK_HI;
        end else begin
          state_q <= RD_IDLE;
        end
        RD_ACK_HI: if (ack) begin
          req     <= 1'b0;
          state_q <= RD_ACK_LO;
        end
        RD_ACK_LO: if (!ack) begin
          if (col_any) begin
            x       <= col_addr;
            req     <= 1'b1;
            state_q <= RD_ACK_HI;
          end else begin
            state_q <= RD_IDLE;
          end
        end
      endcase
    end
  end

  assign state = state_q;

  // Four-phase rules: Req stays up until Ack, and the address is stable
  // while Req is up.
  assert property (@(posedge clk) disable iff (!rst_n) req && !ack |=> req)
    else $error("aer_readout_ctrl: Req dropped before Ack");
  assert property (@(posedge clk) disable iff (!rst_n)
                   req && !ack |=> $stable(x) && $stable(y))
    else $error("aer_readout_ctrl: address changed while Req high");
  // A new Req is raised only after Ack has fallen.
  assert property (@(posedge clk) disable iff (!rst_n) !req && ack |=> !req)
    else $error("aer_readout_ctrl: Req raised before Ack fell");

endmodule
