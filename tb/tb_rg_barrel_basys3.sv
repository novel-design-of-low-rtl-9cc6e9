// End-to-end testbench for the board-level top rg_barrel_basys3, at its
// default (published) size.
//
// Drives the eleven switches and checks the eight LEDs. It first replays
// the published transient test (data 0xF0, rotate distance counting 0..7,
// 20 ns per step), then every data byte at every distance. The reference is
// computed here independently: led[i] = data[(i + dist) mod 8].
//
// Mechanisms counted: each of the three mux columns both passing data
// straight through (select 0) and rotating (select 1), wrap-around of a 1
// bit from D0 past Q7, and each of the eight rotate distances. Any that
// never happens counts as a failure. The circuit is combinational: every
// result must be valid 1 ns after the switches change.
module tb_rg_barrel_basys3;
  logic [10:0] sw;
  logic [7:0]  led;
  int checks = 0;
  int failures = 0;

  int col_pass   [3];
  int col_rotate [3];
  int dist_seen  [8];
  int wraps = 0;

  rg_barrel_basys3 dut (.sw(sw), .led(led));

  localparam logic [7:0] FIG_Q [8] = '{
    8'hF0, 8'h78, 8'h3C, 8'h1E, 8'h0F, 8'h87, 8'hC3, 8'hE1
  };

  initial begin : watchdog
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [7:0] data, input int n, input time settle);
    logic [7:0] exp;
    sw = {3'(n), data};
    #settle;
    for (int i = 0; i < 8; i++) exp[i] = data[(i + n) % 8];
    checks++;
    if (led !== exp) begin
      failures++;
      $display("FAIL data=%h dist=%0d led=%h expected %h", data, n, led, exp);
    end
    for (int k = 0; k < 3; k++) begin
      if (n[k]) col_rotate[k]++;
      else      col_pass[k]++;
    end
    dist_seen[n]++;
    // A set D0 that lands in the upper positions has wrapped around.
    if (n != 0 && data[0] && led[8 - n]) wraps++;
  endtask

  initial begin
    foreach (col_pass[k]) begin
      col_pass[k]   = 0;
      col_rotate[k] = 0;
    end
    foreach (dist_seen[n]) dist_seen[n] = 0;

    // Published stimulus, with its 20 ns step; checked against the
    // recorded output bytes as well as the reference.
    for (int n = 0; n < 8; n++) begin
      apply(8'hF0, n, 20ns);
      checks++;
      if (led !== FIG_Q[n]) begin
        failures++;
        $display("FAIL published step %0d: led=%h expected %h", n, led, FIG_Q[n]);
      end
    end

    // Every byte at every distance, 1 ns per step.
    for (int v = 0; v < 256; v++)
      for (int n = 0; n < 8; n++)
        apply(8'(v), n, 1ns);

    for (int k = 0; k < 3; k++) begin
      $display("column %0d (rotate by %0d): pass=%0d rotate=%0d",
               k, 1 << k, col_pass[k], col_rotate[k]);
      checks++;
      if (col_pass[k] == 0 || col_rotate[k] == 0) begin
        failures++;
        $display("FAIL column %0d mode never exercised", k);
      end
    end
    for (int n = 0; n < 8; n++) begin
      checks++;
      if (dist_seen[n] == 0) begin
        failures++;
        $display("FAIL distance %0d never applied", n);
      end
    end
    $display("wrap-arounds observed: %0d", wraps);
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL no wrap-around observed");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
