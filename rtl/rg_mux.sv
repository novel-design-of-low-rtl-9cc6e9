// Rg Mux: a 2:1 multiplexer made of one R gate.
//
// The select line drives the gate's A input, I0 drives B and I1 drives C,
// so the gate's R output is Y = ~S & I0 | S & I1: S = 0 passes I0 and S = 1
// passes I1. The P and Q outputs are garbage outputs and are left open.
// Combinational, no clock. Port names follow the S0 / I0 / I1 / Y pins of
// the published cell; naming the select `s` is a local choice.
module rg_mux (
  input  logic s,
  input  logic i0,
  input  logic i1,
  output logic y
);
  logic garbage_p;
  logic garbage_q;

  r_gate u_rg (
    .a (s),
    .b (i0),
    .c (i1),
    .p (garbage_p),
    .q (garbage_q),
    .r (y)
  );
endmodule
