// ttc_cmd_latch: holds a TTC command word and re-times its confirming strobe.
//
// The TTCrx receiver presents a command word together with a one-clock strobe. This block
// captures the word on the strobe and drives it, with a one-clock (25 ns) strobe, to the
// backplane bus one clock later. The captured word stays on the bus until the next strobe.
// It is used for the 6-bit broadcast command and for the 8-bit individual command subset.
//
// Interface: cmd_in/str_in from the TTCrx, cmd_out/str_out to the backplane drivers.
// Timing: latency one clock (40.08 MHz), a strobe every clock is accepted.
// Latching on the strobe follows the board description; the one-clock latency and the
// synchronous reset to zero are this design's choices.
module ttc_cmd_latch #(
  parameter int unsigned W = 6
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] cmd_in,
  input  logic         str_in,
  output logic [W-1:0] cmd_out,
  output logic         str_out
);

  always_ff @(posedge clk) begin
    if (rst) begin
      cmd_out <= '0;
      str_out <= 1'b0;
    end else begin
      str_out <= str_in;
      if (str_in) cmd_out <= cmd_in;
    end
  end

endmodule
