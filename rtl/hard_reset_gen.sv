// hard_reset_gen: Hard_Reset and Soft_Reset line generation for the custom backplane.
//
// Watches the broadcast and the individual command busses as they are driven onto the
// backplane and decodes the reset commands from both with one shared table (cmd_decoder).
// A VME write can also request a Hard_Reset per board type. Each Hard_Reset line (TMB,
// ALCT, DMB, MPC) is expanded to 500 ns so that a receiving board can drive the PROG_B
// pin of its FPGA directly; the CCB's own FPGA reload request is expanded the same way and
// is honoured only in FPGA mode. Soft_Reset lines are one-clock (25 ns) pulses.
//
// Interface: command busses and mode in; hard_reset, ccb_prog, soft_reset out (active high,
// the inversion for PROG_B is left to the backplane drivers).
// Timing: all outputs rise one clock after the command strobe; Hard_Reset lasts HR_LEN clocks.
// Decoding in the discrete logic, the board types, the common reset and the 500 ns width
// follow the board description; the VME request path and Soft_Reset length are assumed.
module hard_reset_gen
  import ccb_pkg::*;
#(
  parameter int unsigned HR_LEN = HARD_RESET_BX
) (
  input  logic               clk,
  input  logic               rst,
  input  ccb_mode_e          mode,
  input  logic [BRCST_W-1:0] brcst,
  input  logic               brcst_str,
  input  logic [INDIV_W-1:0] data,
  input  logic               data_str,
  input  board_set_t         vme_hard_reset,
  output board_set_t         hard_reset,
  output logic               ccb_prog,
  output board_set_t         soft_reset
);

  board_set_t hr_b, hr_d, sr_b, sr_d, hr_req;
  logic       ccb_b, ccb_d, ccb_req;

  cmd_decoder #(.W(BRCST_W)) u_dec_brcst (
    .cmd(brcst), .str(brcst_str),
    .hard_reset(hr_b), .ccb_hard_reset(ccb_b), .soft_reset(sr_b)
  );

  cmd_decoder #(.W(INDIV_W)) u_dec_data (
    .cmd(data), .str(data_str),
    .hard_reset(hr_d), .ccb_hard_reset(ccb_d), .soft_reset(sr_d)
  );

  assign hr_req  = hr_b | hr_d | vme_hard_reset;
  assign ccb_req = (ccb_b | ccb_d) && (mode == MODE_FPGA);

  pulse_stretcher #(.LEN(HR_LEN)) u_st_tmb  (.clk, .rst, .trig(hr_req.tmb),  .pulse(hard_reset.tmb));
  pulse_stretcher #(.LEN(HR_LEN)) u_st_alct (.clk, .rst, .trig(hr_req.alct), .pulse(hard_reset.alct));
  pulse_stretcher #(.LEN(HR_LEN)) u_st_dmb  (.clk, .rst, .trig(hr_req.dmb),  .pulse(hard_reset.dmb));
  pulse_stretcher #(.LEN(HR_LEN)) u_st_mpc  (.clk, .rst, .trig(hr_req.mpc),  .pulse(hard_reset.mpc));
  pulse_stretcher #(.LEN(HR_LEN)) u_st_ccb  (.clk, .rst, .trig(ccb_req),     .pulse(ccb_prog));

  // The CCB's own FPGA is reloaded only on a command seen in FPGA mode.
  a_ccb_fpga_only: assert property (@(posedge clk) disable iff (rst)
    $rose(ccb_prog) |-> $past(mode) == MODE_FPGA);

  always_ff @(posedge clk) begin
    if (rst) soft_reset <= '0;
    else     soft_reset <= sr_b | sr_d;
  end

endmodule
