// Top level of the 8-bit R-gate barrel rotator as wired on an FPGA board
// with slide switches and LEDs.
//
// Eleven switches carry the operands: sw[7:0] is the data byte D7..D0 and
// sw[10:8] the binary rotate distance {S0, S1, S2} (sw[10] has weight 4,
// sw[8] weight 1). The eight LEDs show the byte rotated right by that
// distance, led[i] = sw[(i + sw[10:8]) mod 8]. The port names and widths
// are those of the published board design; the assignment of individual
// switches to data and select bits is this implementation's choice.
// Combinational from switches to LEDs, no clock.
module rg_barrel_basys3 (
  input  logic [10:0] sw,
  output logic [7:0]  led
);
  import rg_barrel_pkg::*;

  logic [DATA_W-1:0]  data;
  logic [SHIFT_W-1:0] rot_dist;

  assign data = sw[DATA_W-1:0];
  assign rot_dist = sw[DATA_W +: SHIFT_W];

  rg_barrel_rotator #(.DATA_W(DATA_W)) u_rot (
    .d   (data),
    .amt (rot_dist),
    .q   (led)
  );
endmodule
