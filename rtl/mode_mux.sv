// mode_mux: chooses which side drives the backplane Fast Control Bus.
//
// In Discrete logic mode the latched TTCrx commands and the TTCrx L1A go to the backplane;
// the FPGA is bypassed, so an upset in the FPGA cannot disturb the crate. In FPGA mode the
// FPGA's commands and its L1A drive the backplane instead.
//
// Interface: mode and the two fast_ctrl_t bundles in; the backplane bundle out.
// Timing: combinational.
// The two modes and the multiplexer follow the board description.
module mode_mux
  import ccb_pkg::*;
(
  input  ccb_mode_e  mode,
  input  fast_ctrl_t discrete_in,
  input  fast_ctrl_t fpga_in,
  output fast_ctrl_t bp_out
);

  always_comb begin
    unique case (mode)
      MODE_FPGA:     bp_out = fpga_in;
      MODE_DISCRETE: bp_out = discrete_in;
      default:       bp_out = discrete_in;
    endcase
  end

endmodule
