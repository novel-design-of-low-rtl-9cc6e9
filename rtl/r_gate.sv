// R gate: a 3-input, 3-output gate from the reversible-logic literature.
//
//   P = A
//   Q = A & B
//   R = ~A & B | A & C
//
// Purely combinational, no clock. The two product terms of R can never be 1
// at the same time, so they are merged with an XOR, which equals the OR of
// the defining equation (a synthesized view of the gate shows two ANDs and
// an XOR). Note that, with these output functions, C cannot be recovered
// from (P, Q, R) when A = 0; the gate is kept exactly as defined.
module r_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  logic term_b;  // ~A & B: B passes while A is low
  logic term_c;  // A & C : C passes while A is high

  always_comb begin
    term_b = ~a & b;
    term_c = a & c;
    p      = a;
    q      = a & b;
    r      = term_b ^ term_c;
  end
endmodule
