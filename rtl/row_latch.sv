// row_latch: the buffer that holds the requests of one selected row.
//
// When the readout controller acknowledges a row, each requesting pixel of
// that row drives its column line `li`, and this buffer copies all N column
// lines at once (load). Column arbitration then runs on the buffered copy,
// not on the long column lines of the array. Each element is cleared after
// its address has been sent (clr, one bit per element), and `empty` tells the
// controller that the next row may be taken. Meanwhile the acknowledged
// pixels are already integrating again, which is the pipelining the buffer
// provides.
//
// Timing: q and empty change on the rising clock edge after load or clr;
// load has priority. Reset clears the buffer.
module row_latch #(
  parameter int unsigned N = 80
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,   // copy li into the buffer
  input  logic [N-1:0] li,     // column request lines of the selected row
  input  logic [N-1:0] clr,    // clear these elements
  output logic [N-1:0] q,      // buffered requests
  output logic         empty
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= li;
    else            q <= q & ~clr;
  end

  assign empty = (q == '0);

endmodule
