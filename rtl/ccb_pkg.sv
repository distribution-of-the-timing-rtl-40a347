// ccb_pkg: types and constants shared by the Clock and Control Board (CCB) logic.
//
// The CCB sits in the middle of a CSC peripheral or Track Finder crate and drives the
// custom backplane with the 40.08 MHz LHC clock, the 6-bit TTC broadcast command, an
// 8-bit subset of the individual command, the Level 1 Accept (L1A) and the Hard_Reset /
// Soft_Reset lines. Widths of the command busses, the 25 ns (one bunch crossing) strobes
// and the 500 ns Hard_Reset length follow the board description. The numeric command
// codes, the register map and the L1A source list order are this design's own choices:
// the description says only that 32 of the 64 broadcast codes are assigned.
package ccb_pkg;

  // Bus widths (from the board description).
  localparam int unsigned BRCST_W = 6;   // broadcast command, TTC B channel
  localparam int unsigned INDIV_W = 8;   // subset of the 14-bit individual command

  // One bunch crossing is 24.95 ns at 40.08 MHz; 20 bx = 499 ns is the nearest
  // whole number of clocks to the required 500 ns Hard_Reset width.
  localparam int unsigned HARD_RESET_BX = 20;

  // Crate population of a peripheral crate: nine TMB, nine DMB, one MPC.
  localparam int unsigned N_TMB = 9;
  localparam int unsigned N_DMB = 9;

  // Command codes (assumed; the description does not list them). The same table is used
  // for the broadcast bus and for the individual bus.
  typedef enum logic [BRCST_W-1:0] {
    CMD_HARD_RESET_ALL  = 6'h03,
    CMD_HARD_RESET_TMB  = 6'h04,
    CMD_HARD_RESET_ALCT = 6'h05,
    CMD_HARD_RESET_DMB  = 6'h06,
    CMD_HARD_RESET_MPC  = 6'h07,
    CMD_HARD_RESET_CCB  = 6'h08,
    CMD_SOFT_RESET_ALL  = 6'h09,
    CMD_SOFT_RESET_TMB  = 6'h0A,
    CMD_SOFT_RESET_DMB  = 6'h0B,
    CMD_SOFT_RESET_MPC  = 6'h0C
  } ccb_cmd_e;

  // The two operating modes of the board.
  typedef enum logic {
    MODE_DISCRETE = 1'b0,   // TTCrx commands and L1A go straight to the backplane
    MODE_FPGA     = 1'b1    // backplane is driven by the FPGA
  } ccb_mode_e;

  // One bit per receiving board type.
  typedef struct packed {
    logic tmb;
    logic alct;
    logic dmb;
    logic mpc;
  } board_set_t;

  // Fast Control Bus as driven onto the backplane.
  typedef struct packed {
    logic [BRCST_W-1:0] brcst;
    logic               brcst_str;
    logic [INDIV_W-1:0] data;
    logic               data_str;
    logic               l1a;
  } fast_ctrl_t;

  // L1A sources available in FPGA mode (bit positions of the source enable mask).
  localparam int unsigned N_L1A_SRC = 5;
  localparam int unsigned L1A_SRC_TTC = 0;
  localparam int unsigned L1A_SRC_TMB = 1;
  localparam int unsigned L1A_SRC_DMB = 2;
  localparam int unsigned L1A_SRC_VME = 3;
  localparam int unsigned L1A_SRC_FP  = 4;

  // Register map, byte offsets within the board's A24 window (assumed).
  localparam logic [18:0] REG_CSR       = 19'h00;  // rw [0] mode, [1] oscillator clocks
  localparam logic [18:0] REG_L1A_EN    = 19'h02;  // rw [4:0] L1A source enable mask
  localparam logic [18:0] REG_L1A_DELAY = 19'h04;  // rw [7:0] L1A delay in bx
  localparam logic [18:0] REG_CMD_BRCST = 19'h06;  // w  [5:0] issue broadcast command
  localparam logic [18:0] REG_CMD_DATA  = 19'h08;  // w  [7:0] issue individual command
  localparam logic [18:0] REG_CMD_L1A   = 19'h0A;  // w  issue an L1A from VME
  localparam logic [18:0] REG_HARD_RST  = 19'h0C;  // w  [3:0] Hard_Reset mask {tmb,alct,dmb,mpc}
  localparam logic [18:0] REG_CFG_TMB   = 19'h10;  // r  [8:0] Configuration_Done of TMBs
  localparam logic [18:0] REG_CFG_DMB   = 19'h12;  // r  [8:0] Configuration_Done of DMBs
  localparam logic [18:0] REG_CFG_MPC   = 19'h14;  // r  [0]   Configuration_Done of MPC

endpackage
