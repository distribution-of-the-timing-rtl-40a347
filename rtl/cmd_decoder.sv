// cmd_decoder: decodes the reset commands carried on a Fast Control Bus command.
//
// A command is decoded only in the clock where its strobe is high. Each Hard_Reset code
// selects one board type; the common Hard_Reset selects every board type and the CCB
// itself. CCB_Hard_Reset selects only the CCB's own FPGA. Soft_Reset codes work the same
// way without the CCB. The same table serves the broadcast and the individual bus: an
// individual command is decoded from its low six bits when its top two bits are zero.
//
// Interface: cmd/str in, one-hot-per-board-type request vectors out.
// Timing: purely combinational.
// Decoding per board type plus a common code follows the board description; the code
// values (ccb_pkg) and the handling of the individual bus's top bits are assumed.
module cmd_decoder
  import ccb_pkg::*;
#(
  parameter int unsigned W = BRCST_W
) (
  input  logic [W-1:0] cmd,
  input  logic         str,
  output board_set_t   hard_reset,
  output logic         ccb_hard_reset,
  output board_set_t   soft_reset
);

  logic                valid;
  logic [BRCST_W-1:0]  code;

  always_comb begin
    code  = cmd[BRCST_W-1:0];
    valid = str;
    if (W > BRCST_W) valid = str && (cmd >> BRCST_W) == '0;
  end

  always_comb begin
    hard_reset     = '0;
    soft_reset     = '0;
    ccb_hard_reset = 1'b0;
    if (valid) begin
      unique case (code)
        CMD_HARD_RESET_ALL: begin
          hard_reset     = '{tmb: 1'b1, alct: 1'b1, dmb: 1'b1, mpc: 1'b1};
          ccb_hard_reset = 1'b1;
        end
        CMD_HARD_RESET_TMB:  hard_reset.tmb  = 1'b1;
        CMD_HARD_RESET_ALCT: hard_reset.alct = 1'b1;
        CMD_HARD_RESET_DMB:  hard_reset.dmb  = 1'b1;
        CMD_HARD_RESET_MPC:  hard_reset.mpc  = 1'b1;
        CMD_HARD_RESET_CCB:  ccb_hard_reset  = 1'b1;
        CMD_SOFT_RESET_ALL:  soft_reset = '{tmb: 1'b1, alct: 1'b1, dmb: 1'b1, mpc: 1'b1};
        CMD_SOFT_RESET_TMB:  soft_reset.tmb  = 1'b1;
        CMD_SOFT_RESET_DMB:  soft_reset.dmb  = 1'b1;
        CMD_SOFT_RESET_MPC:  soft_reset.mpc  = 1'b1;
        default: ;
      endcase
    end
  end

endmodule
