// tb_hard_reset_gen: drives reset commands on the broadcast and the individual bus and
// from the VME request, in both modes, and checks for every output line that it rises one
// clock after the strobe and stays high exactly 20 clocks (Hard_Reset) or 1 clock
// (Soft_Reset). The CCB's own reload must appear only in FPGA mode. Expected line sets
// come from a table in this testbench.
module tb_hard_reset_gen;
  import ccb_pkg::*;
  logic clk = 0, rst = 1;
  ccb_mode_e mode;
  logic [5:0] brcst; logic brcst_str;
  logic [7:0] data;  logic data_str;
  board_set_t vme_hard_reset, hard_reset, soft_reset;
  logic ccb_prog;
  int checks = 0, failures = 0;

  hard_reset_gen dut (.*);

  always #12.475 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // {hard tmb,alct,dmb,mpc, ccb, soft tmb,alct,dmb,mpc}
  function automatic logic [8:0] expect_of(int code);
    case (code)
      3:  return 9'b1111_1_0000;
      4:  return 9'b1000_0_0000;
      5:  return 9'b0100_0_0000;
      6:  return 9'b0010_0_0000;
      7:  return 9'b0001_0_0000;
      8:  return 9'b0000_1_0000;
      9:  return 9'b0000_0_1111;
      10: return 9'b0000_0_1000;
      11: return 9'b0000_0_0010;
      12: return 9'b0000_0_0001;
      default: return 9'b0;
    endcase
  endfunction

  // Issue one command (bus 0 broadcast, 1 individual, 2 VME mask) and record the output
  // vector for 25 clocks after it.
  task automatic run_one(int bus, int code, logic [3:0] mask, ccb_mode_e m);
    logic [8:0] e, got;
    int hw;
    mode = m;
    @(negedge clk);
    if (bus == 0) begin brcst = 6'(code); brcst_str = 1; end
    else if (bus == 1) begin data = 8'(code); data_str = 1; end
    else vme_hard_reset = board_set_t'(mask);
    @(negedge clk);
    brcst_str = 0; data_str = 0; vme_hard_reset = '0;
    e = (bus == 2) ? {mask, 5'b0} : expect_of(code);
    if (m != MODE_FPGA) e[4] = 1'b0;
    for (int k = 1; k <= 24; k++) begin
      got = {hard_reset, ccb_prog, soft_reset};
      hw = (k <= 20) ? 1 : 0;
      checks++;
      if (got !== {e[8:4] & {5{hw[0]}}, e[3:0] & {4{k == 1}}}) begin
        failures++;
        if (failures < 10) $display("bus %0d code %h mode %0d clk %0d: got %b exp hard %b soft %b",
                                    bus, code, m, k, got, e[8:4], e[3:0]);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    brcst = '0; data = '0; brcst_str = 0; data_str = 0; vme_hard_reset = '0; mode = MODE_DISCRETE;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int m = 0; m < 2; m++)
      for (int c = 0; c < 16; c++) begin
        run_one(0, c, 4'b0, ccb_mode_e'(m));
        run_one(1, c, 4'b0, ccb_mode_e'(m));
      end
    // individual command with upper bits set is not a reset command
    run_one(1, 8'h43, 4'b0, MODE_FPGA);   // e must be all zero
    for (int k = 1; k < 16; k++) run_one(2, 0, 4'(k), MODE_DISCRETE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
