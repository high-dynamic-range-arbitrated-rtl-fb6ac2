// aer_pixel: behavioural model of the integrate-and-fire AER pixel.
//
// The real pixel is analog: a photodiode discharges a 0.1 pF capacitor, an
// inverter with positive feedback fires when the voltage crosses its
// threshold, the capacitor is then disconnected from the comparator, and the
// digital part raises the row request ~p. When the row is acknowledged (s),
// the pixel reports itself on its column line li and is reset, after which
// integration starts anew. The time between two firings is therefore
// inversely proportional to the light intensity.
//
// This model replaces the analog part by a clocked integrator: `photo` is
// the photocurrent expressed as charge per clock; `vmem` accumulates it and
// the pixel fires when vmem reaches VTH. While it requests it stops
// integrating (the capacitor is disconnected). The digital handshake follows
// the pins of the real pixel:
//   req_n (~p)  low while the pixel requests (active low, as on the chip)
//   s           row acknowledge/reset, common to the whole row
//   li          high while s is high and this pixel requests
// On a clock edge with s high a requesting pixel clears its charge and its
// request. A pixel that is not requesting ignores s. The supplies (VddA,
// VddD, Vdd_r, gndA, gndD) are not modelled.
//
// Timing: req_n changes on the clock edge at which vmem + photo >= VTH;
// li is combinational from s.
module aer_pixel #(
  parameter int unsigned PHOTO_W = 8,
  parameter int unsigned ACC_W   = 16,
  parameter int unsigned VTH     = 4096
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [PHOTO_W-1:0] photo,  // light intensity, charge per clock
  input  logic               s,      // row acknowledge / reset
  output logic               req_n,  // ~p: row request, active low
  output logic               li      // column line of the selected row
);

  logic [ACC_W-1:0] vmem;   // integrated charge
  logic             fired;  // comparator has switched; request pending
  logic [ACC_W:0]   sum;

  assign sum = {1'b0, vmem} + (ACC_W+1)'(photo);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vmem  <= '0;
      fired <= 1'b0;
    end else if (fired) begin
      if (s) begin
        vmem  <= '0;
        fired <= 1'b0;
      end
    end else if (sum >= (ACC_W+1)'(VTH)) begin
      vmem  <= ACC_W'(VTH);
      fired <= 1'b1;
    end else begin
      vmem  <= sum[ACC_W-1:0];
    end
  end

  assign req_n = ~fired;
  assign li    = fired & s;

endmodule
