// clock_select: chooses between the TTC clocks and the on-board oscillator clocks.
//
// The board receives low-jitter 40.08 MHz and 80.16 MHz clocks from the QPLL on the TTC
// mezzanine, and can instead use an on-board quartz oscillator that provides the same two
// frequencies. One select bit moves both clocks together, each through a glitch-free
// switch. The oscillator is enabled while it is selected and for as long as either switch
// still passes its clock, and disabled once both have gone over to the TTC clocks.
//
// Interface: four source clocks, sel_osc (from a register), rst (async); clk40, clk80 and
// osc_en out. After reset the TTC clocks are used.
// Timing: see clk_switch; the oscillator must be running (osc_en high) before switching
// to it, which holds because osc_en follows sel_osc immediately.
// The two sources and disabling the oscillator follow the board description; the switch
// circuit is this design's choice.
module clock_select (
  input  logic rst,
  input  logic sel_osc,
  input  logic clk40_ttc,
  input  logic clk80_ttc,
  input  logic clk40_osc,
  input  logic clk80_osc,
  output logic clk40,
  output logic clk80,
  output logic osc_en
);

  logic en40_ttc, en40_osc, en80_ttc, en80_osc;

  clk_switch u_sw40 (
    .clk_a(clk40_ttc), .clk_b(clk40_osc), .rst, .sel(sel_osc),
    .clk_out(clk40), .en_a(en40_ttc), .en_b(en40_osc)
  );

  clk_switch u_sw80 (
    .clk_a(clk80_ttc), .clk_b(clk80_osc), .rst, .sel(sel_osc),
    .clk_out(clk80), .en_a(en80_ttc), .en_b(en80_osc)
  );

  assign osc_en = sel_osc | en40_osc | en80_osc;

endmodule
