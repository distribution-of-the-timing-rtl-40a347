// ccb_top: the Clock and Control Board (CCB) of a CSC peripheral or Track Finder crate.
//
// The CCB is the top of the timing, trigger and control tree inside a crate. It receives
// the LHC clock, the TTC broadcast and individual commands and the Level 1 Accept from the
// TTCrx/QPLL mezzanine and drives them onto the custom backplane bus for every board of
// the crate. Two modes exist:
//   Discrete logic mode (the main one): the TTCrx commands are latched (ttc_cmd_latch) and
//     the TTCrx L1A re-timed, and both go straight to the backplane.
//   FPGA mode: the backplane is driven by the FPGA part, which passes the TTCrx commands
//     through or issues commands on VME writes (fpga_cmd_gen), and builds the L1A from
//     several enabled sources with a programmable delay (l1a_generator).
// mode_mux selects the side. Whatever reaches the backplane is watched by hard_reset_gen,
// which decodes the Hard_Reset and Soft_Reset commands and stretches Hard_Reset to 500 ns.
// ccb_csr decodes the VME address, holds the settings and reads back Configuration_Done
// of every board. A CCB_Hard_Reset in FPGA mode reloads the CCB's FPGA: ccb_prog goes out
// for 500 ns and the FPGA-side blocks are held in reset meanwhile, which is how an upset
// in them is cleared; the discrete side and the registers keep running. clock_select picks the TTC or the on-board oscillator clocks; all
// logic runs on the selected 40.08 MHz clock, which is also the clock driven to the slots.
//
// Interface: source clocks and async rst; TTCrx outputs; a synchronous register bus
// standing for VME; L1A requests from TMB, DMB and the front panel; Configuration_Done
// inputs; backplane Fast Control Bus, Hard_Reset and Soft_Reset lines, the CCB's own
// FPGA reload request and the front-panel L1A copy out.
// Timing: TTCrx command or L1A to backplane is one clock in Discrete logic mode and one
// clock (commands) or delay+1 clocks (L1A) in FPGA mode; reset lines follow one clock later.
// The partition into blocks follows the board's block diagram; the latencies, the register
// bus and the command codes are this design's choices (see the blocks' headers).
module ccb_top
  import ccb_pkg::*;
(
  // clocks and reset
  input  logic               rst,
  input  logic               clk40_ttc,
  input  logic               clk80_ttc,
  input  logic               clk40_osc,
  input  logic               clk80_osc,
  output logic               clk40_out,
  output logic               clk80_out,
  output logic               osc_en,
  // TTCrx outputs
  input  logic [BRCST_W-1:0] ttc_brcst,
  input  logic               ttc_brcst_str,
  input  logic [INDIV_W-1:0] ttc_data,
  input  logic               ttc_data_str,
  input  logic               ttc_l1a,
  // local L1A sources
  input  logic               tmb_l1a_req,
  input  logic               dmb_l1a_req,
  input  logic               fp_l1a_in,
  // register bus
  input  logic [4:0]         vme_ga,
  input  logic [23:1]        vme_addr,
  input  logic               vme_wr,
  input  logic               vme_rd,
  input  logic [15:0]        vme_wdata,
  output logic [15:0]        vme_rdata,
  output logic               vme_ack,
  // Configuration_Done from the boards
  input  logic [N_TMB-1:0]   cfg_done_tmb,
  input  logic [N_DMB-1:0]   cfg_done_dmb,
  input  logic               cfg_done_mpc,
  // backplane
  output fast_ctrl_t         bp,
  output board_set_t         hard_reset,
  output board_set_t         soft_reset,
  output logic               ccb_prog,
  output ccb_mode_e          ccb_mode,
  output logic               fp_l1a_out
);

  logic clk;
  logic sel_osc;

  clock_select u_clk (
    .rst, .sel_osc,
    .clk40_ttc, .clk80_ttc, .clk40_osc, .clk80_osc,
    .clk40(clk), .clk80(clk80_out), .osc_en
  );
  assign clk40_out = clk;

  // Reset for the synchronous logic: asserted at once with rst, released two rising edges
  // of the selected clock after rst falls.
  logic [1:0] rst_q;
  logic       srst;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) rst_q <= 2'b11;
    else     rst_q <= {rst_q[0], 1'b0};
  end
  assign srst = rst | rst_q[1];

  // ---------------------------------------------------------------- registers
  logic [N_L1A_SRC-1:0] l1a_src_en;
  logic [7:0]           l1a_delay;
  logic                 vme_brcst_wr, vme_data_wr, vme_l1a;
  logic [BRCST_W-1:0]   vme_brcst;
  logic [INDIV_W-1:0]   vme_data;
  board_set_t           vme_hard_reset;

  ccb_csr u_csr (
    .clk, .rst(srst),
    .ga(vme_ga), .addr(vme_addr), .wr(vme_wr), .rd(vme_rd),
    .wdata(vme_wdata), .rdata(vme_rdata), .ack(vme_ack),
    .cfg_done_tmb, .cfg_done_dmb, .cfg_done_mpc,
    .mode(ccb_mode), .clk_sel_osc(sel_osc),
    .l1a_src_en, .l1a_delay,
    .cmd_brcst_wr(vme_brcst_wr), .cmd_brcst(vme_brcst),
    .cmd_data_wr(vme_data_wr), .cmd_data(vme_data),
    .cmd_l1a(vme_l1a), .cmd_hard_reset(vme_hard_reset)
  );

  // ---------------------------------------------------------------- discrete logic path
  fast_ctrl_t disc;

  ttc_cmd_latch #(.W(BRCST_W)) u_latch_brcst (
    .clk, .rst(srst), .cmd_in(ttc_brcst), .str_in(ttc_brcst_str),
    .cmd_out(disc.brcst), .str_out(disc.brcst_str)
  );

  ttc_cmd_latch #(.W(INDIV_W)) u_latch_data (
    .clk, .rst(srst), .cmd_in(ttc_data), .str_in(ttc_data_str),
    .cmd_out(disc.data), .str_out(disc.data_str)
  );

  always_ff @(posedge clk) begin
    if (srst) disc.l1a <= 1'b0;
    else     disc.l1a <= ttc_l1a;
  end

  // ---------------------------------------------------------------- FPGA path
  // While the CCB's own reload pulse is high the FPGA side is held in reset, as its
  // reconfiguration would clear it: commands and L1As in flight there are dropped.
  fast_ctrl_t fpga;
  logic [N_L1A_SRC-1:0] l1a_src;
  logic fpga_rst;

  assign fpga_rst = srst | ccb_prog;

  fpga_cmd_gen u_fpga_cmd (
    .clk, .rst(fpga_rst),
    .ttc_brcst, .ttc_brcst_str, .ttc_data, .ttc_data_str,
    .vme_brcst_wr, .vme_brcst, .vme_data_wr, .vme_data,
    .brcst(fpga.brcst), .brcst_str(fpga.brcst_str),
    .data(fpga.data), .data_str(fpga.data_str)
  );

  always_comb begin
    l1a_src              = '0;
    l1a_src[L1A_SRC_TTC] = ttc_l1a;
    l1a_src[L1A_SRC_TMB] = tmb_l1a_req;
    l1a_src[L1A_SRC_DMB] = dmb_l1a_req;
    l1a_src[L1A_SRC_VME] = vme_l1a;
    l1a_src[L1A_SRC_FP]  = fp_l1a_in;
  end

  l1a_generator u_l1a (
    .clk, .rst(fpga_rst), .src(l1a_src), .src_en(l1a_src_en), .delay(l1a_delay), .l1a(fpga.l1a)
  );

  // ---------------------------------------------------------------- backplane
  mode_mux u_mux (.mode(ccb_mode), .discrete_in(disc), .fpga_in(fpga), .bp_out(bp));

  hard_reset_gen u_hr (
    .clk, .rst(srst), .mode(ccb_mode),
    .brcst(bp.brcst), .brcst_str(bp.brcst_str),
    .data(bp.data), .data_str(bp.data_str),
    .vme_hard_reset,
    .hard_reset, .ccb_prog, .soft_reset
  );

  assign fp_l1a_out = bp.l1a;

endmodule
