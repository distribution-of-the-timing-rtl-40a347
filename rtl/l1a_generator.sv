// l1a_generator: FPGA-mode Level 1 Accept with selectable sources and programmable delay.
//
// Several L1A sources can feed the backplane in FPGA mode: the TTCrx, requests from the
// Trigger and the Data Acquisition Motherboards over the backplane, a VME write and the
// front panel. Each source has an enable bit; the enabled sources are ORed into one
// request, which then runs through a shift register of DEPTH stages. The output taps the
// stage chosen by the delay register, so an L1A leaves delay+1 clocks after its request.
//
// Interface: src (one-clock pulses, bit order in ccb_pkg), src_en mask, delay (bx) in;
// l1a out. delay values of DEPTH or more are clamped to DEPTH-1. The delay should be
// changed only while no L1A is in flight: the line keeps the last DEPTH clocks of
// requests, so a new tap position can repeat or skip an earlier request.
// Timing: latency delay+1 clocks; one L1A per clock can be in flight in every stage.
// The sources and the programmable delay follow the board description; the OR of
// enabled sources and the delay range of 0..255 bx are this design's choices.
module l1a_generator
  import ccb_pkg::*;
#(
  parameter int unsigned N_SRC   = N_L1A_SRC,
  parameter int unsigned DELAY_W = 8,
  parameter int unsigned DEPTH   = 2 ** DELAY_W
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [N_SRC-1:0]   src,
  input  logic [N_SRC-1:0]   src_en,
  input  logic [DELAY_W-1:0] delay,
  output logic               l1a
);

  logic [DEPTH-1:0] line;
  logic             req;

  assign req = |(src & src_en);

  always_ff @(posedge clk) begin
    if (rst) line <= '0;
    else     line <= {line[DEPTH-2:0], req};
  end

  always_comb begin
    if (32'(delay) >= DEPTH) l1a = line[DEPTH-1];
    else                     l1a = line[delay];
  end

endmodule
