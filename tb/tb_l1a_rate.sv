// tb_l1a_rate: L1A delivery at the 100 kHz high-rate DAQ condition, through the whole board.
//
// Sends 300 TTCrx L1As with random spacing averaging 400 bunch crossings (100 kHz at
// 40.08 MHz; the shortest gap is 3 crossings) in Discrete logic mode, then 300 more in FPGA
// mode with a 4-crossing delay (the largest chamber-to-chamber timing spread quoted for
// the system), and checks that every L1A reaches the backplane exactly once, at one clock
// (discrete) or delay+1 clocks (FPGA) after it was sent, with broadcast commands mixed in.
module tb_l1a_rate;
  import ccb_pkg::*;

  logic rst = 1;
  logic clk40_ttc = 0, clk80_ttc = 0, clk40_osc = 0, clk80_osc = 0;
  logic clk40_out, clk80_out, osc_en;
  logic [5:0] ttc_brcst = 0;
  logic ttc_brcst_str = 0;
  logic [7:0] ttc_data = 0;
  logic ttc_data_str = 0, ttc_l1a = 0;
  logic tmb_l1a_req = 0, dmb_l1a_req = 0, fp_l1a_in = 0;
  logic [4:0] vme_ga = 5'd3;
  logic [23:1] vme_addr = 0;
  logic vme_wr = 0, vme_rd = 0;
  logic [15:0] vme_wdata = 0, vme_rdata;
  logic vme_ack;
  logic [8:0] cfg_done_tmb = '1, cfg_done_dmb = '1;
  logic cfg_done_mpc = 1;
  fast_ctrl_t bp;
  board_set_t hard_reset, soft_reset;
  logic ccb_prog, fp_l1a_out;
  ccb_mode_e ccb_mode;

  ccb_top dut (.*);

  always #12.475 clk40_ttc = ~clk40_ttc;
  always #6.2375 clk80_ttc = ~clk80_ttc;
  always #12.5 clk40_osc = ~clk40_osc;
  always #6.25 clk80_osc = ~clk80_osc;

  int checks = 0, failures = 0;
  longint cyc = 0;
  int latency = 1;
  int sent = 0, got = 0;
  longint expect_q [$];   // expected arrival cycles, in order

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // backplane L1A monitor: samples the bus as it stands just before each rising edge,
  // then counts the edge; stimulus is applied at falling edges
  always @(posedge clk40_out) if (!rst) begin
    if (bp.l1a) begin
      got++;
      checks++;
      if (expect_q.size() == 0 || expect_q[0] != cyc) begin
        failures++;
        if (failures < 10) $display("unexpected L1A at cycle %0d", cyc);
      end else void'(expect_q.pop_front());
    end
    cyc++;
  end

  task automatic vme_write(logic [18:0] off, logic [15:0] v);
    @(negedge clk40_out);
    vme_addr = {vme_ga, off[18:1]}; vme_wdata = v; vme_wr = 1;
    @(negedge clk40_out);
    vme_wr = 0;
  endtask

  task automatic run(int n);
    for (int k = 0; k < n; k++) begin
      int gap = 3 + $urandom % 795;   // mean 400 crossings
      repeat (gap - 1) @(negedge clk40_out);
      ttc_l1a = 1;
      ttc_brcst = 6'(16 + $urandom % 48); ttc_brcst_str = ($urandom % 4 == 0);
      expect_q.push_back(cyc + latency);
      sent++;
      @(negedge clk40_out);
      ttc_l1a = 0; ttc_brcst_str = 0;
    end
    repeat (300) @(negedge clk40_out);
    checks++;
    if (expect_q.size() != 0) begin
      failures++; $display("%0d L1As never arrived", expect_q.size());
    end
  endtask

  initial begin
    real rate;
    longint c0;
    #100 rst = 0;
    repeat (5) @(negedge clk40_out);
    c0 = cyc;
    latency = 1;
    run(300);
    vme_write(REG_L1A_EN, 16'(1 << L1A_SRC_TTC));
    vme_write(REG_L1A_DELAY, 16'd4);
    vme_write(REG_CSR, 16'h0001);
    latency = 5;
    run(300);
    rate = 40.08e3 * sent / real'(cyc - c0);
    $display("sent %0d received %0d, average rate %0.1f kHz", sent, got, rate);
    checks++;
    if (sent != 600 || got != 600) begin failures++; $display("count mismatch"); end
    checks++;
    if (rate < 80.0 || rate > 120.0) begin failures++; $display("rate not near 100 kHz"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
