// Shared constants of the R-gate barrel rotator.
//
// DATA_W is the width of the rotated word (eight bits, D0..D7 / Q0..Q7) and
// SHIFT_W the width of the binary rotate distance (three select lines,
// S0..S2, one per column of multiplexers). Both numbers are those of the
// published 8-bit design; collecting them in a package is this
// implementation's choice.
package rg_barrel_pkg;
  localparam int unsigned DATA_W  = 8;
  localparam int unsigned SHIFT_W = $clog2(DATA_W);
endpackage
