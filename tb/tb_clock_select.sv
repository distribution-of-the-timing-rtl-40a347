// tb_clock_select: TTC clocks at 40.08/80.16 MHz and oscillator clocks at slightly
// different frequencies and phase. Switches to the oscillator and back several times and
// checks that (1) after each switch the outputs follow the selected source edge for edge,
// (2) no high or low phase of either output is shorter than half the faster source period
// (no glitch), (3) the oscillator is enabled as soon as it is selected and disabled once
// the TTC clocks are back.
module tb_clock_select;
  logic rst = 1, sel_osc = 0;
  logic clk40_ttc = 0, clk80_ttc = 0, clk40_osc = 0, clk80_osc = 0;
  logic clk40, clk80, osc_en;
  int checks = 0, failures = 0;

  clock_select dut (.*);

  always #12.475 clk40_ttc = ~clk40_ttc;
  always #6.2375 clk80_ttc = ~clk80_ttc;
  initial begin #3.1; forever #12.5 clk40_osc = ~clk40_osc; end
  initial begin #1.7; forever #6.25 clk80_osc = ~clk80_osc; end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // glitch monitor: shortest phase seen on each output after reset
  // (the first edge after reset only starts the measurement)
  realtime last40 = -1, last80 = -1, min40 = 1e9, min80 = 1e9;
  always @(clk40) if (!rst) begin
    if (last40 >= 0 && $realtime - last40 < min40) min40 = $realtime - last40;
    last40 = $realtime;
  end
  always @(clk80) if (!rst) begin
    if (last80 >= 0 && $realtime - last80 < min80) min80 = $realtime - last80;
    last80 = $realtime;
  end

  // compare output and expected source for a while
  task automatic follow(bit osc, int n);
    int bad = 0;
    for (int k = 0; k < n; k++) begin
      #0.9;
      if (clk40 !== (osc ? clk40_osc : clk40_ttc)) bad++;
      if (clk80 !== (osc ? clk80_osc : clk80_ttc)) bad++;
    end
    check($sformatf("outputs follow %s clocks", osc ? "oscillator" : "TTC"), bad == 0);
  endtask

  initial begin
    #50 rst = 0;
    check("oscillator off after reset", !osc_en);
    follow(0, 500);
    for (int r = 0; r < 3; r++) begin
      #($urandom % 20);
      sel_osc = 1;
      #0.1 check("oscillator enabled when selected", osc_en);
      #200;
      follow(1, 500);
      #($urandom % 20);
      sel_osc = 0;
      #0.1 check("oscillator kept running while switching", osc_en);
      #200;
      check("oscillator disabled on TTC clocks", !osc_en);
      follow(0, 500);
    end
    check($sformatf("no glitch on clk40 (min phase %0.3f ns)", min40), min40 > 12.4);
    check($sformatf("no glitch on clk80 (min phase %0.3f ns)", min80), min80 > 6.2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
