// pixel_array: the N_ROWS x N_COLS array of integrate-and-fire pixels.
//
// Every pixel of a row shares the row's request line and the row's
// acknowledge/reset line s; every pixel of a column shares the column line
// li. On the chip the row request is a wired line pulled low by any
// requesting pixel (~p); here it is presented active high, row_req[r] being
// high while any pixel of row r requests. Only the row whose s is high
// drives the column lines, so col_li is the request pattern of that row.
//
// Interface: photo[r][c] is the light falling on pixel (c, r); s is one-hot
// (or zero) over rows. Timing: row_req is registered inside the pixels;
// col_li is combinational from s.
module pixel_array #(
  parameter int unsigned N_COLS  = 80,
  parameter int unsigned N_ROWS  = 60,
  parameter int unsigned PHOTO_W = 8,
  parameter int unsigned ACC_W   = 16,
  parameter int unsigned VTH     = 4096
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [PHOTO_W-1:0]  photo [N_ROWS][N_COLS],
  input  logic [N_ROWS-1:0]   s,
  output logic [N_ROWS-1:0]   row_req,
  output logic [N_COLS-1:0]   col_li
);

  logic [N_COLS-1:0] req_n [N_ROWS];
  logic [N_COLS-1:0] li    [N_ROWS];

  for (genvar r = 0; r < N_ROWS; r++) begin : g_row
    for (genvar c = 0; c < N_COLS; c++) begin : g_col
      aer_pixel #(.PHOTO_W(PHOTO_W), .ACC_W(ACC_W), .VTH(VTH)) u_pix (
        .clk, .rst_n,
        .photo(photo[r][c]),
        .s(s[r]),
        .req_n(req_n[r][c]),
        .li(li[r][c])
      );
    end
    // Wired row request: low if any pixel of the row pulls it low.
    assign row_req[r] = ~(&req_n[r]);
  end

  // Column lines: each carries the li of the pixel in the selected row.
  always_comb begin
    col_li = '0;
    for (int unsigned r = 0; r < N_ROWS; r++) col_li = col_li | li[r];
  end

endmodule
