// tb_ccb_top: end-to-end test of the Clock and Control Board with all defaults.
//
// Stands in for the TTCrx (command busses, L1A), for the crate boards (L1A requests,
// Configuration_Done) and for the VME master, and watches the backplane. It goes through:
// Discrete logic mode forwarding of broadcast and individual commands and L1A; every
// Hard_Reset and Soft_Reset command, with the 500 ns (20 clock) Hard_Reset width; a
// CCB_Hard_Reset that must be ignored in Discrete logic mode and honoured in FPGA mode,
// where it also drops an L1A still in the FPGA's delay line;
// VME readout of Configuration_Done; the switch to FPGA mode; TTCrx commands through the
// FPGA; VME-generated commands, including one that has to wait behind a TTCrx command;
// the L1A from each of the five sources with a programmable delay; a VME Hard_Reset;
// and a switch to the on-board oscillator clocks and back, with traffic on both.
// Each of these mechanisms is counted and a failure is counted for one that never happened.
module tb_ccb_top;
  import ccb_pkg::*;

  logic rst = 1;
  logic clk40_ttc = 0, clk80_ttc = 0, clk40_osc = 0, clk80_osc = 0;
  logic clk40_out, clk80_out, osc_en;
  logic [5:0] ttc_brcst = 0;
  logic ttc_brcst_str = 0;
  logic [7:0] ttc_data = 0;
  logic ttc_data_str = 0, ttc_l1a = 0;
  logic tmb_l1a_req = 0, dmb_l1a_req = 0, fp_l1a_in = 0;
  logic [4:0] vme_ga = 5'd7;
  logic [23:1] vme_addr = 0;
  logic vme_wr = 0, vme_rd = 0;
  logic [15:0] vme_wdata = 0, vme_rdata;
  logic vme_ack;
  logic [8:0] cfg_done_tmb = 9'h1FF, cfg_done_dmb = 9'h1FF;
  logic cfg_done_mpc = 1;
  fast_ctrl_t bp;
  board_set_t hard_reset, soft_reset;
  logic ccb_prog, fp_l1a_out;
  ccb_mode_e ccb_mode;

  ccb_top dut (.*);

  always #12.475 clk40_ttc = ~clk40_ttc;
  always #6.2375 clk80_ttc = ~clk80_ttc;
  initial begin #4.2; forever #12.45 clk40_osc = ~clk40_osc; end
  initial begin #2.0; forever #6.225 clk80_osc = ~clk80_osc; end

  int checks = 0, failures = 0;
  // mechanism counters
  int n_disc_cmd = 0, n_disc_l1a = 0, n_hard = 0, n_soft = 0, n_ccb_ignored = 0, n_ccb_prog = 0;
  int n_cfg_read = 0, n_mode_switch = 0, n_fpga_pass = 0, n_vme_cmd = 0, n_vme_wait = 0;
  int n_l1a_src[5] = '{0, 0, 0, 0, 0};
  int n_vme_hard = 0, n_osc = 0, n_reload_clear = 0;

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  task automatic tick(int n = 1);
    repeat (n) @(negedge clk40_out);
  endtask

  // ------------------------------------------------------------ VME master
  task automatic vme_write(logic [18:0] off, logic [15:0] v);
    tick();
    vme_addr = {vme_ga, off[18:1]}; vme_wdata = v; vme_wr = 1;
    tick();
    vme_wr = 0;
    check("VME write acknowledged", vme_ack);
  endtask

  task automatic vme_read(logic [18:0] off, output logic [15:0] v);
    tick();
    vme_addr = {vme_ga, off[18:1]}; vme_rd = 1;
    tick();
    vme_rd = 0;
    v = vme_rdata;
    check("VME read acknowledged", vme_ack);
  endtask

  // ------------------------------------------------------------ reset line checker
  // Called in the clock where the command is on the backplane (or the VME request is
  // out): from the next clock on, the selected Hard_Reset lines must be high for exactly
  // 20 clocks and the Soft_Reset lines for one.
  task automatic check_resets(board_set_t hr, logic ccb, board_set_t sr, string what);
    int bad = 0;
    tick();
    for (int k = 1; k <= 22; k++) begin
      if (hard_reset !== (k <= HARD_RESET_BX ? hr : board_set_t'(4'b0))) bad++;
      if (ccb_prog !== (k <= HARD_RESET_BX ? ccb : 1'b0)) bad++;
      if (soft_reset !== (k == 1 ? sr : board_set_t'(4'b0))) bad++;
      tick();
    end
    check($sformatf("reset lines for %s", what), bad == 0);
    if (hr != 0) n_hard++;
    if (sr != 0) n_soft++;
    if (ccb) n_ccb_prog++;
  endtask

  // ------------------------------------------------------------ TTCrx stimulus
  // Broadcast command: on the backplane one clock later, in either mode.
  task automatic ttc_brcst_cmd(logic [5:0] code);
    tick();
    ttc_brcst = code; ttc_brcst_str = 1;
    tick();
    ttc_brcst_str = 0; ttc_brcst = 6'($urandom);
    check($sformatf("broadcast %h on backplane", code), bp.brcst_str && bp.brcst == code);
    if (ccb_mode == MODE_FPGA) n_fpga_pass++; else n_disc_cmd++;
  endtask

  task automatic ttc_indiv_cmd(logic [7:0] code);
    tick();
    ttc_data = code; ttc_data_str = 1;
    tick();
    ttc_data_str = 0; ttc_data = 8'($urandom);
    check($sformatf("individual %h on backplane", code), bp.data_str && bp.data == code);
    if (ccb_mode == MODE_FPGA) n_fpga_pass++; else n_disc_cmd++;
  endtask

  function automatic board_set_t hr_of(int code);
    case (code)
      3: return '{1, 1, 1, 1};
      4: return '{1, 0, 0, 0};
      5: return '{0, 1, 0, 0};
      6: return '{0, 0, 1, 0};
      7: return '{0, 0, 0, 1};
      default: return '0;
    endcase
  endfunction
  function automatic board_set_t sr_of(int code);
    case (code)
      9:  return '{1, 1, 1, 1};
      10: return '{1, 0, 0, 0};
      11: return '{0, 0, 1, 0};
      12: return '{0, 0, 0, 1};
      default: return '0;
    endcase
  endfunction

  // Fire one L1A source now and check it arrives after delay+1 clocks, and only then.
  task automatic l1a_from(int src, int delay);
    int seen_at = -1;
    tick();
    case (src)
      0: ttc_l1a = 1;
      1: tmb_l1a_req = 1;
      2: dmb_l1a_req = 1;
      4: fp_l1a_in = 1;
      default: ;
    endcase
    tick();
    ttc_l1a = 0; tmb_l1a_req = 0; dmb_l1a_req = 0; fp_l1a_in = 0;
    for (int k = 1; k <= delay + 5; k++) begin
      if (bp.l1a && seen_at < 0) seen_at = k;
      else if (bp.l1a) seen_at = 1000;
      tick();
    end
    check($sformatf("L1A from source %0d after %0d clocks (seen %0d)", src, delay + 1, seen_at),
          seen_at == delay + 1);
    check("front panel copy of L1A", fp_l1a_out == bp.l1a);
    if (seen_at == delay + 1) n_l1a_src[src]++;
  endtask

  // ------------------------------------------------------------ scenario
  initial begin
    logic [15:0] v;
    int seen;
    #100 rst = 0;
    tick(5);

    // ---- Discrete logic mode
    check("starts in Discrete logic mode", ccb_mode == MODE_DISCRETE);
    for (int k = 0; k < 20; k++) ttc_brcst_cmd(6'(16 + $urandom % 48));
    for (int k = 0; k < 20; k++) ttc_indiv_cmd(8'($urandom) | 8'h40);
    // direct L1A, one clock
    for (int k = 0; k < 5; k++) begin
      tick(); ttc_l1a = 1; tick(); ttc_l1a = 0;
      check("Discrete mode L1A after one clock", bp.l1a);
      if (bp.l1a) n_disc_l1a++;
      tick();
      check("Discrete mode L1A one clock wide", !bp.l1a);
    end
    // all reset commands on both busses
    for (int c = 3; c <= 12; c++) begin
      ttc_brcst_cmd(6'(c));
      check_resets(hr_of(c), 1'b0, sr_of(c), $sformatf("broadcast %0d (discrete)", c));
      if (c == 8) n_ccb_ignored++;
      ttc_indiv_cmd(8'(c));
      check_resets(hr_of(c), 1'b0, sr_of(c), $sformatf("individual %0d (discrete)", c));
    end
    // Configuration_Done readback
    cfg_done_tmb = 9'h1FE; cfg_done_dmb = 9'h0FF; cfg_done_mpc = 0;
    tick(3);
    vme_read(REG_CFG_TMB, v); check("cfg TMB", v == 16'h1FE);
    vme_read(REG_CFG_DMB, v); check("cfg DMB", v == 16'h0FF);
    vme_read(REG_CFG_MPC, v); check("cfg MPC", v == 16'h000);
    n_cfg_read++;
    // VME Hard_Reset (discrete logic path)
    vme_write(REG_HARD_RST, 16'h0005);
    check_resets('{0, 1, 0, 1}, 1'b0, '0, "VME hard reset");
    n_vme_hard++;

    // ---- FPGA mode
    vme_write(REG_CSR, 16'h0001);
    check("FPGA mode", ccb_mode == MODE_FPGA);
    n_mode_switch++;
    for (int k = 0; k < 10; k++) ttc_brcst_cmd(6'(16 + $urandom % 48));
    for (int k = 0; k < 10; k++) ttc_indiv_cmd(8'($urandom) | 8'h40);
    ttc_brcst_cmd(6'(CMD_HARD_RESET_CCB));
    check_resets('0, 1'b1, '0, "CCB_Hard_Reset in FPGA mode");
    ttc_brcst_cmd(6'(CMD_HARD_RESET_ALL));
    check_resets('{1, 1, 1, 1}, 1'b1, '0, "common Hard_Reset in FPGA mode");
    // VME-generated commands
    vme_write(REG_CMD_BRCST, 16'h0006);   // DMB Hard_Reset from VME
    tick();
    check("VME broadcast on backplane", bp.brcst_str && bp.brcst == 6'h06);
    n_vme_cmd++;
    check_resets('{0, 0, 1, 0}, 1'b0, '0, "VME-generated DMB Hard_Reset");
    vme_write(REG_CMD_DATA, 16'h0033);
    tick();
    check("VME individual command on backplane", bp.data_str && bp.data == 8'h33);
    n_vme_cmd++;
    // a VME command that collides with a TTCrx command waits one clock
    tick();
    vme_addr = {vme_ga, REG_CMD_BRCST[18:1]}; vme_wdata = 16'h0021; vme_wr = 1;
    tick();
    vme_wr = 0;
    ttc_brcst = 6'h15; ttc_brcst_str = 1;   // TTCrx strobe in the clock the request arrives
    tick();
    ttc_brcst_str = 0;
    check("TTCrx command goes first", bp.brcst_str && bp.brcst == 6'h15);
    tick();
    check("VME command follows", bp.brcst_str && bp.brcst == 6'h21);
    if (bp.brcst_str && bp.brcst == 6'h21) n_vme_wait++;
    // L1A sources with delay
    vme_write(REG_L1A_EN, 16'h001F);
    vme_write(REG_L1A_DELAY, 16'd12);
    l1a_from(0, 12);
    l1a_from(1, 12);
    l1a_from(2, 12);
    l1a_from(4, 12);
    // VME L1A: request one clock after the write, L1A delay+1 after that
    vme_write(REG_CMD_L1A, 16'h0);
    seen = -1;
    for (int k = 0; k <= 20; k++) begin
      if (bp.l1a && seen < 0) seen = k;
      tick();
    end
    check($sformatf("VME L1A after delay (seen %0d)", seen), seen == 13);
    if (seen == 13) n_l1a_src[3]++;
    // a CCB reload clears an L1A that is still in the FPGA's delay line
    tick(); ttc_l1a = 1; tick(); ttc_l1a = 0;
    ttc_brcst_cmd(6'(CMD_HARD_RESET_CCB));
    check("CCB reload starts", ccb_prog == 0);
    tick();
    check("CCB reload running", ccb_prog);
    seen = 0;
    repeat (30) begin if (bp.l1a) seen++; tick(); end
    check("L1A in flight dropped by CCB reload", seen == 0);
    if (seen == 0) n_reload_clear++;
    l1a_from(0, 12);   // and the FPGA side works again afterwards
    // disabled source gives nothing
    vme_write(REG_L1A_EN, 16'h0001);
    tick(); tmb_l1a_req = 1; tick(); tmb_l1a_req = 0;
    seen = 0;
    repeat (20) begin if (bp.l1a) seen++; tick(); end
    check("disabled source gives no L1A", seen == 0);
    // let the delay line empty before the delay is raised
    tick(300);
    vme_write(REG_L1A_DELAY, 16'd255);
    l1a_from(0, 255);

    // ---- oscillator clocks
    check("oscillator off on TTC clocks", !osc_en);
    vme_write(REG_CSR, 16'h0003);
    #500;
    check("oscillator on", osc_en);
    begin
      realtime t0;
      @(posedge clk40_out) t0 = $realtime;
      @(posedge clk40_out);
      check($sformatf("clk40 period is the oscillator's (%0.2f ns)", $realtime - t0),
            ($realtime - t0) > 24.85 && ($realtime - t0) < 24.95);
    end
    for (int k = 0; k < 5; k++) ttc_brcst_cmd(6'(16 + $urandom % 48));
    ttc_brcst_cmd(6'(CMD_SOFT_RESET_TMB));
    check_resets('0, 1'b0, '{1, 0, 0, 0}, "Soft_Reset on oscillator clocks");
    n_osc++;
    vme_write(REG_CSR, 16'h0000);
    n_mode_switch++;
    #500;
    check("oscillator off again", !osc_en);
    check("back in Discrete logic mode", ccb_mode == MODE_DISCRETE);
    ttc_brcst_cmd(6'(CMD_HARD_RESET_MPC));
    check_resets('{0, 0, 0, 1}, 1'b0, '0, "MPC Hard_Reset back on TTC clocks");

    // ---- mechanism coverage
    $display("discrete cmds %0d, discrete L1A %0d, hard %0d, soft %0d, CCB reset ignored %0d, CCB reload %0d",
             n_disc_cmd, n_disc_l1a, n_hard, n_soft, n_ccb_ignored, n_ccb_prog);
    $display("cfg reads %0d, mode switches %0d, FPGA pass %0d, VME cmds %0d, VME waits %0d, VME hard %0d, osc %0d",
             n_cfg_read, n_mode_switch, n_fpga_pass, n_vme_cmd, n_vme_wait, n_vme_hard, n_osc);
    $display("L1A per source: ttc %0d tmb %0d dmb %0d vme %0d fp %0d",
             n_l1a_src[0], n_l1a_src[1], n_l1a_src[2], n_l1a_src[3], n_l1a_src[4]);
    check("mechanism: discrete forwarding", n_disc_cmd > 0 && n_disc_l1a > 0);
    check("mechanism: Hard_Reset", n_hard > 0);
    check("mechanism: Soft_Reset", n_soft > 0);
    check("mechanism: CCB_Hard_Reset ignored in discrete mode", n_ccb_ignored > 0);
    check("mechanism: CCB reload in FPGA mode", n_ccb_prog > 0);
    check("mechanism: Configuration_Done readout", n_cfg_read > 0);
    check("mechanism: mode switch", n_mode_switch > 1);
    check("mechanism: FPGA pass-through", n_fpga_pass > 0);
    check("mechanism: VME-generated command", n_vme_cmd > 0);
    check("mechanism: VME command waits for TTCrx", n_vme_wait > 0);
    check("mechanism: VME Hard_Reset", n_vme_hard > 0);
    check("mechanism: oscillator clocks", n_osc > 0);
    check("mechanism: CCB reload clears the FPGA side", n_reload_clear > 0);
    foreach (n_l1a_src[i]) check($sformatf("mechanism: L1A source %0d", i), n_l1a_src[i] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
