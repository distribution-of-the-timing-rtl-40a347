// ccb_csr: VME address decoding and the CCB's control and status registers.
//
// The board answers in the A24 window selected by its slot: address bits 23:19 must equal
// the geographic address of the VME64x backplane. Inside the window the low address bits
// pick a register (map in ccb_pkg). Writes set the operating mode, the clock source, the
// L1A source mask and delay, and issue one-clock requests: a broadcast or individual
// command, an L1A, or a Hard_Reset per board type. Reads return those settings and the
// Configuration_Done lines of every board in the crate, brought into the clock domain
// through two flip-flops.
//
// Interface: a simple synchronous bus (addr, wr, rd, wdata, rdata, ack) stands for the VME
// slave; the VME handshake itself (DS/DTACK, address modifiers) is outside this block.
// Timing: ack and rdata one clock after wr or rd, only when the board is addressed; the
// request outputs pulse in that same clock.
// VME control of the mode, L1A sources, delay and commands and monitoring of
// Configuration_Done follow the board description; the bus, the register map and the
// reset values (Discrete logic mode, TTC clocks, all L1A sources off, delay 0) are assumed.
module ccb_csr
  import ccb_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  // register bus
  input  logic [4:0]         ga,
  input  logic [23:1]        addr,
  input  logic               wr,
  input  logic               rd,
  input  logic [15:0]        wdata,
  output logic [15:0]        rdata,
  output logic               ack,
  // board status
  input  logic [N_TMB-1:0]   cfg_done_tmb,
  input  logic [N_DMB-1:0]   cfg_done_dmb,
  input  logic               cfg_done_mpc,
  // settings
  output ccb_mode_e          mode,
  output logic               clk_sel_osc,
  output logic [N_L1A_SRC-1:0] l1a_src_en,
  output logic [7:0]         l1a_delay,
  // one-clock requests
  output logic               cmd_brcst_wr,
  output logic [BRCST_W-1:0] cmd_brcst,
  output logic               cmd_data_wr,
  output logic [INDIV_W-1:0] cmd_data,
  output logic               cmd_l1a,
  output board_set_t         cmd_hard_reset
);

  logic        sel;
  logic [18:0] off;

  assign sel = (addr[23:19] == ga);
  assign off = {addr[18:1], 1'b0};

  // Configuration_Done synchronisers.
  logic [N_TMB-1:0] tmb_s1, tmb_s2;
  logic [N_DMB-1:0] dmb_s1, dmb_s2;
  logic             mpc_s1, mpc_s2;

  always_ff @(posedge clk) begin
    tmb_s1 <= cfg_done_tmb;  tmb_s2 <= tmb_s1;
    dmb_s1 <= cfg_done_dmb;  dmb_s2 <= dmb_s1;
    mpc_s1 <= cfg_done_mpc;  mpc_s2 <= mpc_s1;
  end

  // Requests and acknowledges only for accesses to this board.
  a_ack_own: assert property (@(posedge clk) disable iff (rst) ack |-> $past(sel && (wr || rd)));
  a_req_one: assert property (@(posedge clk) disable iff (rst)
    $onehot0({cmd_brcst_wr, cmd_data_wr, cmd_l1a, cmd_hard_reset != '0}));

  always_ff @(posedge clk) begin
    if (rst) begin
      mode           <= MODE_DISCRETE;
      clk_sel_osc    <= 1'b0;
      l1a_src_en     <= '0;
      l1a_delay      <= '0;
      cmd_brcst_wr   <= 1'b0;
      cmd_brcst      <= '0;
      cmd_data_wr    <= 1'b0;
      cmd_data       <= '0;
      cmd_l1a        <= 1'b0;
      cmd_hard_reset <= '0;
      rdata          <= '0;
      ack            <= 1'b0;
    end else begin
      cmd_brcst_wr   <= 1'b0;
      cmd_data_wr    <= 1'b0;
      cmd_l1a        <= 1'b0;
      cmd_hard_reset <= '0;
      ack            <= sel && (wr || rd);
      if (sel && wr) begin
        unique case (off)
          REG_CSR: begin
            mode        <= ccb_mode_e'(wdata[0]);
            clk_sel_osc <= wdata[1];
          end
          REG_L1A_EN:    l1a_src_en <= wdata[N_L1A_SRC-1:0];
          REG_L1A_DELAY: l1a_delay  <= wdata[7:0];
          REG_CMD_BRCST: begin
            cmd_brcst    <= wdata[BRCST_W-1:0];
            cmd_brcst_wr <= 1'b1;
          end
          REG_CMD_DATA: begin
            cmd_data    <= wdata[INDIV_W-1:0];
            cmd_data_wr <= 1'b1;
          end
          REG_CMD_L1A:   cmd_l1a <= 1'b1;
          REG_HARD_RST:  cmd_hard_reset <= board_set_t'(wdata[3:0]);
          default: ;
        endcase
      end
      if (sel && rd) begin
        unique case (off)
          REG_CSR:       rdata <= 16'({clk_sel_osc, mode});
          REG_L1A_EN:    rdata <= 16'(l1a_src_en);
          REG_L1A_DELAY: rdata <= 16'(l1a_delay);
          REG_CFG_TMB:   rdata <= 16'(tmb_s2);
          REG_CFG_DMB:   rdata <= 16'(dmb_s2);
          REG_CFG_MPC:   rdata <= 16'(mpc_s2);
          default:       rdata <= '0;
        endcase
      end
    end
  end

endmodule
