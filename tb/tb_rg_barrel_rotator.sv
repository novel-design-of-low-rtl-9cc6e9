// Self-checking testbench for rg_barrel_rotator.
//
// Part 1 replays the published transient test: data 0xF0 (D4..D7 high)
// with the select lines {S0,S1,S2} counting 0..7, one step every 20 ns, and
// compares Q with the eight output bytes read off that simulation.
// Part 2 checks every data byte at every rotate distance on the default
// 8-bit instance against a bit-by-bit reference q[i] = d[(i+n) mod 8].
// Part 3 checks random words on a 16-bit and a 4-bit instance to exercise
// the width parameter. The circuit is combinational: outputs are sampled
// 1 ns after each input change.
module tb_rg_barrel_rotator;
  int checks = 0;
  int failures = 0;

  logic [7:0]  d8,  q8;
  logic [2:0]  a8;
  logic [15:0] d16, q16;
  logic [3:0]  a16;
  logic [3:0]  d4,  q4;
  logic [1:0]  a4;

  rg_barrel_rotator dut8 (.d(d8), .amt(a8), .q(q8));
  rg_barrel_rotator #(.DATA_W(16)) dut16 (.d(d16), .amt(a16), .q(q16));
  rg_barrel_rotator #(.DATA_W(4))  dut4  (.d(d4),  .amt(a4),  .q(q4));

  // Output bytes of the published transient run, Q7..Q0, for counts 0..7.
  localparam logic [7:0] FIG_Q [8] = '{
    8'hF0, 8'h78, 8'h3C, 8'h1E, 8'h0F, 8'h87, 8'hC3, 8'hE1
  };

  initial begin : watchdog
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check8(input logic [7:0] exp, input string what);
    checks++;
    if (q8 !== exp) begin
      failures++;
      $display("FAIL %s: d=%h amt=%0d q=%h expected %h", what, d8, a8, q8, exp);
    end
  endtask

  initial begin
    logic [7:0]  e8;
    logic [15:0] e16;
    logic [3:0]  e4;

    // Part 1: published stimulus
    d8 = 8'hF0;
    for (int n = 0; n < 8; n++) begin
      a8 = 3'(n);
      #20ns;
      check8(FIG_Q[n], "published waveform");
    end

    // Part 2: exhaustive 8-bit
    for (int v = 0; v < 256; v++) begin
      for (int n = 0; n < 8; n++) begin
        d8 = 8'(v);
        a8 = 3'(n);
        #1ns;
        for (int i = 0; i < 8; i++) e8[i] = d8[(i + n) % 8];
        check8(e8, "exhaustive");
      end
    end

    // Part 3: other widths
    for (int t = 0; t < 2000; t++) begin
      d16 = 16'($urandom);
      a16 = 4'($urandom);
      d4  = 4'($urandom);
      a4  = 2'($urandom);
      #1ns;
      for (int i = 0; i < 16; i++) e16[i] = d16[(i + int'(a16)) % 16];
      for (int i = 0; i < 4; i++)  e4[i]  = d4[(i + int'(a4)) % 4];
      checks++;
      if (q16 !== e16) begin
        failures++;
        $display("FAIL 16-bit: d=%h amt=%0d q=%h expected %h", d16, a16, q16, e16);
      end
      checks++;
      if (q4 !== e4) begin
        failures++;
        $display("FAIL 4-bit: d=%h amt=%0d q=%h expected %h", d4, a4, q4, e4);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
