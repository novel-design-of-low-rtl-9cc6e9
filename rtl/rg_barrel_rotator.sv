// Logarithmic right rotator built only from Rg Muxes (R-gate 2:1 muxes).
//
// The word passes through $clog2(DATA_W) columns of DATA_W muxes. Column k
// rotates its input right by 2**k positions when amt[k] is 1 and passes it
// unchanged when amt[k] is 0: mux input 0 takes the unrotated bit and
// input 1 the bit 2**k places above it (wrapping around). After all columns
// q[i] = d[(i + amt) mod DATA_W]. For the default eight bits this is the
// published 24-mux circuit: three columns of eight muxes rotating by 1, 2
// and 4. On its pins the select lines are S0 (weight 4), S1 (weight 2) and
// S2 (weight 1), i.e. amt = {S0, S1, S2}; that weighting is read from the
// published transient simulation, and the column order (1, 2, 4) follows
// the first column of the schematic, which rotates by one.
//
// Purely combinational: the result is valid one propagation delay after d
// or amt change, with no clock or reset. DATA_W must be a power of two; its
// default, 8, is the published width, other widths are this implementation's
// generalisation.
module rg_barrel_rotator #(
  parameter int unsigned DATA_W  = rg_barrel_pkg::DATA_W,
  parameter int unsigned SHIFT_W = $clog2(DATA_W)
) (
  input  logic [DATA_W-1:0]  d,
  input  logic [SHIFT_W-1:0] amt,
  output logic [DATA_W-1:0]  q
);
  // stage[0] is the input word, stage[k+1] the output of column k.
  logic [DATA_W-1:0] stage [SHIFT_W+1];

  assign stage[0] = d;

  for (genvar k = 0; k < SHIFT_W; k++) begin : g_col
    localparam int unsigned DIST = 2 ** k;
    for (genvar i = 0; i < DATA_W; i++) begin : g_bit
      rg_mux u_mux (
        .s  (amt[k]),
        .i0 (stage[k][i]),
        .i1 (stage[k][(i + DIST) % DATA_W]),
        .y  (stage[k+1][i])
      );
    end
  end

  assign q = stage[SHIFT_W];

  initial begin
    assert (DATA_W >= 2 && (DATA_W & (DATA_W - 1)) == 0)
      else $error("rg_barrel_rotator: DATA_W=%0d is not a power of two", DATA_W);
  end
endmodule
