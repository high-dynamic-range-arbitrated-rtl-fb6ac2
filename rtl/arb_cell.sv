// arb_cell: two-input arbitration cell, the node of an arbitration tree.
//
// Requests from the two subtrees are ORed and passed up to the parent. When
// the parent grants this node (gnt_in), the grant is passed down to one
// requesting side. When both sides request, the cell gives the grant to the
// side it did not serve last, so that neither half of the tree can lock out
// the other; `last` records the side served and is updated on the cycle in
// which `done` marks the end of the granted transaction.
//
// Timing: req_up and gnt are combinational; `last` is a register updated on
// the rising clock edge. The grant is stable for as long as the requests and
// gnt_in are, which is what the readout controller relies on.
//
// The chip builds its trees of such cells; how the cell chooses between two
// simultaneous requests is not given there, and the alternating choice is
// this design's own.
module arb_cell (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] req,     // requests from side 0 and side 1
  output logic       req_up,  // request to the parent
  input  logic       gnt_in,  // grant from the parent
  output logic [1:0] gnt,     // grant to side 0 and side 1 (one-hot or zero)
  input  logic       done     // the granted transaction ends this cycle
);

  logic last;  // 1: side 1 was served last, so side 0 wins a tie

  assign req_up = |req;

  always_comb begin
    gnt = 2'b00;
    if (gnt_in) begin
      if (req[0] && (!req[1] || last)) gnt = 2'b01;
      else if (req[1])                 gnt = 2'b10;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 last <= 1'b1;
    else if (done && |gnt)      last <= gnt[1];
  end

endmodule
