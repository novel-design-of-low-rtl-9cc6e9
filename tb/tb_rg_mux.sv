// Self-checking testbench for rg_mux.
//
// Applies all eight combinations of S, I0 and I1 and checks the 2:1 mux
// truth table: S = 0 gives I0, S = 1 gives I1. Combinational; outputs are
// sampled 1 ns after each input change.
module tb_rg_mux;
  logic s, i0, i1, y;
  int checks = 0;
  int failures = 0;

  rg_mux dut (.s(s), .i0(i0), .i1(i1), .y(y));

  initial begin : watchdog
    #10us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    for (int v = 0; v < 8; v++) begin
      {s, i0, i1} = 3'(v);
      #1ns;
      if (s == 1'b0) expected = i0;
      else           expected = i1;
      checks++;
      if (y !== expected) begin
        failures++;
        $display("FAIL s=%b i0=%b i1=%b: y=%b expected %b", s, i0, i1, y, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
