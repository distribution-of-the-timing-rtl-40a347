// tb_ccb_csr: register bus tests. Checks that only the slot's own A24 window answers,
// that every read/write register holds what was written, that command registers give
// one-clock requests with the written value, that Configuration_Done reads back after the
// two-stage synchroniser, and the reset values.
module tb_ccb_csr;
  import ccb_pkg::*;
  logic clk = 0, rst = 1;
  logic [4:0] ga = 5'd13;
  logic [23:1] addr;
  logic wr, rd, ack;
  logic [15:0] wdata, rdata;
  logic [8:0] cfg_done_tmb, cfg_done_dmb;
  logic cfg_done_mpc;
  ccb_mode_e mode;
  logic clk_sel_osc, cmd_brcst_wr, cmd_data_wr, cmd_l1a;
  logic [4:0] l1a_src_en;
  logic [7:0] l1a_delay, cmd_data;
  logic [5:0] cmd_brcst;
  board_set_t cmd_hard_reset;
  int checks = 0, failures = 0;

  ccb_csr dut (.*);

  always #12.475 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s at %0t", what, $time); end
  endtask

  // A write; returns the request outputs seen in the clock after it.
  task automatic write(logic [4:0] slot, logic [18:0] off, logic [15:0] v, output bit acked);
    @(negedge clk);
    addr = {slot, off[18:1]}; wdata = v; wr = 1;
    @(negedge clk);
    wr = 0;
    acked = ack;
  endtask

  task automatic read(logic [4:0] slot, logic [18:0] off, output logic [15:0] v, output bit acked);
    @(negedge clk);
    addr = {slot, off[18:1]}; rd = 1;
    @(negedge clk);
    rd = 0;
    v = rdata; acked = ack;
  endtask

  initial begin
    bit a;
    logic [15:0] v;
    addr = '0; wr = 0; rd = 0; wdata = '0;
    cfg_done_tmb = 9'h0A5; cfg_done_dmb = 9'h15A; cfg_done_mpc = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check("reset mode discrete", mode == MODE_DISCRETE && !clk_sel_osc);
    check("reset L1A settings", l1a_src_en == 0 && l1a_delay == 0);
    // registers
    write(ga, REG_CSR, 16'h0003, a);       check("ack on own slot", a);
    check("mode FPGA, osc", mode == MODE_FPGA && clk_sel_osc);
    write(ga, REG_L1A_EN, 16'h0016, a);    check("src mask", l1a_src_en == 5'h16);
    write(ga, REG_L1A_DELAY, 16'h00C8, a); check("delay", l1a_delay == 8'd200);
    read(ga, REG_CSR, v, a);               check("read CSR", a && v == 16'h3);
    read(ga, REG_L1A_EN, v, a);            check("read mask", v == 16'h16);
    read(ga, REG_L1A_DELAY, v, a);         check("read delay", v == 16'hC8);
    // other slot must not answer or change anything
    write(ga + 1, REG_CSR, 16'h0000, a);   check("no ack other slot", !a);
    check("other slot leaves mode", mode == MODE_FPGA);
    read(ga ^ 5'h10, REG_L1A_DELAY, v, a); check("no read ack other slot", !a);
    // one-clock requests
    write(ga, REG_CMD_BRCST, 16'h0027, a);
    check("brcst request", cmd_brcst_wr && cmd_brcst == 6'h27);
    @(negedge clk); check("brcst request one clock", !cmd_brcst_wr);
    write(ga, REG_CMD_DATA, 16'h00B4, a);
    check("data request", cmd_data_wr && cmd_data == 8'hB4);
    @(negedge clk); check("data request one clock", !cmd_data_wr);
    write(ga, REG_CMD_L1A, 16'h0000, a);   check("l1a request", cmd_l1a);
    @(negedge clk); check("l1a request one clock", !cmd_l1a);
    write(ga, REG_HARD_RST, 16'h000A, a);
    check("hard reset mask", cmd_hard_reset == board_set_t'(4'hA));
    @(negedge clk); check("hard reset one clock", cmd_hard_reset == '0);
    // Configuration_Done monitoring
    read(ga, REG_CFG_TMB, v, a); check("cfg tmb", v == 16'h0A5);
    read(ga, REG_CFG_DMB, v, a); check("cfg dmb", v == 16'h15A);
    read(ga, REG_CFG_MPC, v, a); check("cfg mpc", v == 16'h1);
    cfg_done_tmb = 9'h1FF; cfg_done_mpc = 0;
    read(ga, REG_CFG_TMB, v, a); check("cfg tmb not yet through synchroniser", v == 16'h0A5);
    read(ga, REG_CFG_TMB, v, a); check("cfg tmb updated", v == 16'h1FF);
    read(ga, REG_CFG_MPC, v, a); check("cfg mpc updated", v == 16'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
