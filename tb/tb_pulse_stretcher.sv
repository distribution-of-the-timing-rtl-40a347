// tb_pulse_stretcher: checks the default 20-clock (500 ns) Hard_Reset pulse: it rises one
// clock after the trigger and its measured width is exactly 20 clocks, i.e. 499 ns at a
// 24.95 ns clock period. Also checks that a retrigger during a pulse restarts the count.
module tb_pulse_stretcher;
  logic clk = 0, rst = 1, trig = 0, pulse;
  int checks = 0, failures = 0;

  pulse_stretcher dut (.*);

  always #12.475 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // Measure the pulse that follows a trigger issued now; returns width in clocks and the
  // clock of its rising edge relative to the trigger edge.
  task automatic fire_and_measure(output int delay, output int width);
    @(negedge clk) trig = 1;
    @(negedge clk) trig = 0;
    delay = 1; width = 0;
    while (!pulse && delay < 50) begin @(negedge clk); delay++; end
    while (pulse && width < 100) begin @(negedge clk); width++; end
  endtask

  initial begin
    int d, w;
    realtime t0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check("idle low", pulse == 0);
    for (int k = 0; k < 3; k++) begin
      fire_and_measure(d, w);
      check($sformatf("rise 1 clock after trigger (got %0d)", d), d == 1);
      check($sformatf("width 20 clocks (got %0d)", w), w == 20);
      check("width is 499 ns", w * 24.95 > 498.9 && w * 24.95 < 499.1);
      repeat ($urandom % 5) @(negedge clk);
    end
    // retrigger after 7 clocks: from the retrigger edge the pulse lasts another 20 clocks
    @(negedge clk) trig = 1;
    @(negedge clk) trig = 0;
    repeat (7) @(negedge clk);
    trig = 1;
    @(negedge clk) trig = 0;
    w = 0;
    while (pulse && w < 100) begin @(negedge clk); w++; end
    check($sformatf("retrigger restarts full length (got %0d)", w), w == 20);
    // reset clears
    @(negedge clk) trig = 1;
    @(negedge clk) trig = 0; rst = 1;
    @(negedge clk) rst = 0;
    check("reset clears pulse", pulse == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
