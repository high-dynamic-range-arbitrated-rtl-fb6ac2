// addr_encoder: turns a one-hot select line into its binary address.
//
// On the chip the row address is produced by a ROM whose word lines are the
// row arbiter's grants: the granted line puts its own row number on the
// address bus. The column address of the element chosen in the row latch is
// produced the same way. This module is that ROM: each select line i ORs the
// constant i onto the output, which is exact while at most one line is high.
// `valid` is the OR of all lines.
//
// Timing: purely combinational.
module addr_encoder #(
  parameter int unsigned N = 60,
  parameter int unsigned W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0] sel,
  output logic [W-1:0] addr,
  output logic         valid
);

  always_comb begin
    addr = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (sel[i]) addr = addr | W'(i);
    end
    valid = |sel;
  end

endmodule
