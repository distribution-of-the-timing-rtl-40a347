// clk_switch: glitch-free switch between two free-running clocks.
//
// Each clock has an enable flip-flop pair clocked on its falling edge. A clock is enabled
// only after the other one has been disabled, so the output never carries a runt pulse.
// After reset clk_a is selected.
//
// Interface: clk_a, clk_b, sel (0 = clk_a, 1 = clk_b, may change at any time), rst (async);
// clk_out and the two enables (so a caller can keep a source running until released).
// Timing: a switch takes two falling edges of the old clock and then two of the new one.
// This is a standard circuit chosen by this design; the board description only says
// that either clock source can be used.
module clk_switch (
  input  logic clk_a,
  input  logic clk_b,
  input  logic rst,
  input  logic sel,
  output logic clk_out,
  output logic en_a,
  output logic en_b
);

  logic a_s1, b_s1;

  always_ff @(negedge clk_a or posedge rst) begin
    if (rst) begin
      a_s1 <= 1'b1;
      en_a <= 1'b1;
    end else begin
      a_s1 <= ~sel & ~en_b;
      en_a <= a_s1;
    end
  end

  always_ff @(negedge clk_b or posedge rst) begin
    if (rst) begin
      b_s1 <= 1'b0;
      en_b <= 1'b0;
    end else begin
      b_s1 <= sel & ~en_a;
      en_b <= b_s1;
    end
  end

  assign clk_out = (clk_a & en_a) | (clk_b & en_b);

endmodule
