// arbiter_tree: N-input arbitration tree built from two-input cells.
//
// The chip uses one such tree to pick a requesting row of the pixel array and
// another to pick the requesting elements of the row latch one at a time.
// The N inputs are padded with idle inputs to a power of two, L = 2^D, and
// the tree is built level by level: level 0 holds the L leaves and level D
// the root; cell j of level l decides between nodes 2j and 2j+1 of level
// l-1, passing their ORed request up and its grant down.
//
// Interface: req[i] requests input i; `en` is the grant into the root; gnt is
// one-hot (or zero when nothing requests or en is low); `any` is the OR of
// all requests. Pulse `done` for one cycle, while the grant is still shown,
// to record the serviced input in every cell on its path: at the next tie
// each of those cells prefers its other side.
//
// Timing: req -> any and req/en -> gnt are combinational paths of depth
// ceil(log2 N) cells; only the cells' `last` bits are registered.
module arbiter_tree #(
  parameter int unsigned N = 60
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         en,
  output logic [N-1:0] gnt,
  output logic         any,
  input  logic         done
);

  localparam int unsigned D = (N > 1) ? $clog2(N) : 1;
  localparam int unsigned L = 1 << D;

  // Request (r) and grant (g) lines of every level of the tree.
  for (genvar l = 0; l <= D; l++) begin : lv
    logic [(L >> l)-1:0] r;
    logic [(L >> l)-1:0] g;
  end

  assign lv[0].r   = L'(req);
  assign gnt       = lv[0].g[N-1:0];
  assign any       = lv[D].r[0];
  assign lv[D].g[0] = en;

  for (genvar l = 1; l <= D; l++) begin : g_level
    for (genvar j = 0; j < (L >> l); j++) begin : g_cell
      arb_cell u_cell (
        .clk, .rst_n,
        .req   (lv[l-1].r[2*j+1:2*j]),
        .req_up(lv[l].r[j]),
        .gnt_in(lv[l].g[j]),
        .gnt   (lv[l-1].g[2*j+1:2*j]),
        .done
      );
    end
  end

  // The grant must name at most one input, and only a requesting one.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt))
    else $error("arbiter_tree: grant not one-hot");
  assert property (@(posedge clk) disable iff (!rst_n) (gnt & ~req) == '0)
    else $error("arbiter_tree: grant without request");

endmodule
