// Self-checking testbench for r_gate.
//
// Applies all eight input combinations and compares P, Q and R with a truth
// table written out by hand from P = A, Q = AB, R = A'B + AC. The gate is
// combinational; outputs are sampled 1 ns after each input change.
module tb_r_gate;
  logic a, b, c, p, q, r;
  int checks = 0;
  int failures = 0;

  r_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  // Expected {P,Q,R} indexed by {A,B,C}.
  localparam logic [2:0] EXP [8] = '{
    3'b000,  // A=0 B=0 C=0
    3'b000,  // A=0 B=0 C=1
    3'b001,  // A=0 B=1 C=0
    3'b001,  // A=0 B=1 C=1
    3'b100,  // A=1 B=0 C=0
    3'b101,  // A=1 B=0 C=1
    3'b110,  // A=1 B=1 C=0
    3'b111   // A=1 B=1 C=1
  };

  initial begin : watchdog
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1ns;
      checks++;
      if ({p, q, r} !== EXP[v]) begin
        failures++;
        $display("FAIL abc=%03b: got pqr=%03b expected %03b", 3'(v), {p, q, r}, EXP[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
