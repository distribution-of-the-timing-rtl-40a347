// pulse_stretcher: expands a one-clock request into a pulse of fixed length.
//
// Used for the Hard_Reset lines, which must stay asserted for 500 ns so that the
// receiving boards can wire them straight to the PROG_B pin of their Xilinx FPGA.
// A down-counter is loaded with LEN on a trigger; the output is high while it is non-zero.
// A trigger during a pulse restarts the full length.
//
// Interface: trig (one clock) in, pulse out.
// Timing: pulse rises one clock after trig and stays high for exactly LEN clocks.
// The 500 ns length is from the board description; LEN = 20 clocks (499 ns at 40.08 MHz)
// and the retrigger behaviour are this design's choices.
module pulse_stretcher #(
  parameter int unsigned LEN = 20
) (
  input  logic clk,
  input  logic rst,
  input  logic trig,
  output logic pulse
);

  localparam int unsigned CW = $clog2(LEN + 1);

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst)               count <= '0;
    else if (trig)         count <= CW'(LEN);
    else if (count != '0)  count <= count - 1'b1;
  end

  assign pulse = (count != '0);

  // A pulse, once started, lasts at least LEN clocks.
  a_min_width: assert property (@(posedge clk) disable iff (rst) $rose(pulse) |-> pulse [*LEN]);

endmodule
