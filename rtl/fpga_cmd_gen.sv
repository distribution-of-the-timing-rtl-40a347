// fpga_cmd_gen: the FPGA-mode source of broadcast and individual commands.
//
// In FPGA mode the backplane commands come either from the TTCrx, passed through the FPGA,
// or from the FPGA itself when software writes a command register over VME. TTCrx
// commands always go first. A VME command is held in a one-entry pending register and
// goes out in the first clock in which the TTCrx sends nothing on that bus; a second VME
// write to the same bus while one is pending replaces it.
//
// Interface: TTCrx command busses and VME command requests in; broadcast and individual
// command busses with their one-clock strobes out.
// Timing: one clock from a TTCrx strobe or from an unblocked VME write to the output.
// The two sources follow the board description; the arbitration is this design's choice.
module fpga_cmd_gen
  import ccb_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic [BRCST_W-1:0] ttc_brcst,
  input  logic               ttc_brcst_str,
  input  logic [INDIV_W-1:0] ttc_data,
  input  logic               ttc_data_str,
  input  logic               vme_brcst_wr,
  input  logic [BRCST_W-1:0] vme_brcst,
  input  logic               vme_data_wr,
  input  logic [INDIV_W-1:0] vme_data,
  output logic [BRCST_W-1:0] brcst,
  output logic               brcst_str,
  output logic [INDIV_W-1:0] data,
  output logic               data_str
);

  logic               pend_b_vld, pend_d_vld;
  logic [BRCST_W-1:0] pend_b;
  logic [INDIV_W-1:0] pend_d;

  // Broadcast bus.
  always_ff @(posedge clk) begin
    if (rst) begin
      brcst      <= '0;
      brcst_str  <= 1'b0;
      pend_b_vld <= 1'b0;
      pend_b     <= '0;
    end else begin
      brcst_str <= 1'b0;
      if (ttc_brcst_str) begin
        brcst     <= ttc_brcst;
        brcst_str <= 1'b1;
        if (vme_brcst_wr) begin
          pend_b     <= vme_brcst;
          pend_b_vld <= 1'b1;
        end
      end else if (vme_brcst_wr) begin
        brcst      <= vme_brcst;
        brcst_str  <= 1'b1;
        // an older pending command is superseded by the new write
        pend_b_vld <= 1'b0;
      end else if (pend_b_vld) begin
        brcst      <= pend_b;
        brcst_str  <= 1'b1;
        pend_b_vld <= 1'b0;
      end
    end
  end

  // A VME command waits only while the bus is busy with a TTCrx command.
  a_pend_b: assert property (@(posedge clk) disable iff (rst) pend_b_vld |-> brcst_str);
  a_pend_d: assert property (@(posedge clk) disable iff (rst) pend_d_vld |-> data_str);

  // Individual command bus.
  always_ff @(posedge clk) begin
    if (rst) begin
      data       <= '0;
      data_str   <= 1'b0;
      pend_d_vld <= 1'b0;
      pend_d     <= '0;
    end else begin
      data_str <= 1'b0;
      if (ttc_data_str) begin
        data     <= ttc_data;
        data_str <= 1'b1;
        if (vme_data_wr) begin
          pend_d     <= vme_data;
          pend_d_vld <= 1'b1;
        end
      end else if (vme_data_wr) begin
        data       <= vme_data;
        data_str   <= 1'b1;
        pend_d_vld <= 1'b0;
      end else if (pend_d_vld) begin
        data       <= pend_d;
        data_str   <= 1'b1;
        pend_d_vld <= 1'b0;
      end
    end
  end

endmodule
