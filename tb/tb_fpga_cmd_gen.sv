// tb_fpga_cmd_gen: random TTCrx strobes and VME command writes on both busses. A
// reference model in the testbench (TTCrx first, one pending VME command that a newer
// write replaces) predicts every output clock. Counts how often a VME command had to wait
// behind a TTCrx command and how often one was replaced, and fails if either never happened.
module tb_fpga_cmd_gen;
  import ccb_pkg::*;
  logic clk = 0, rst = 1;
  logic [5:0] ttc_brcst, vme_brcst, brcst;
  logic [7:0] ttc_data, vme_data, data;
  logic ttc_brcst_str, ttc_data_str, vme_brcst_wr, vme_data_wr, brcst_str, data_str;
  int checks = 0, failures = 0, n_wait = 0, n_replace = 0;

  fpga_cmd_gen dut (.*);

  always #12.475 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state
  logic [7:0] m_out [2];
  logic       m_str [2];
  logic [7:0] m_pend [2];
  logic       m_pv [2];

  function automatic void model(int b, logic ts, logic [7:0] tv, logic vw, logic [7:0] vv);
    m_str[b] = 0;
    if (ts) begin
      m_out[b] = tv; m_str[b] = 1;
      if (vw) begin
        if (m_pv[b]) n_replace++;
        m_pend[b] = vv; m_pv[b] = 1; n_wait++;
      end
    end else if (vw) begin
      if (m_pv[b]) n_replace++;
      m_out[b] = vv; m_str[b] = 1; m_pv[b] = 0;
    end else if (m_pv[b]) begin
      m_out[b] = m_pend[b]; m_str[b] = 1; m_pv[b] = 0;
    end
  endfunction

  initial begin
    ttc_brcst = 0; vme_brcst = 0; ttc_data = 0; vme_data = 0;
    ttc_brcst_str = 0; ttc_data_str = 0; vme_brcst_wr = 0; vme_data_wr = 0;
    for (int b = 0; b < 2; b++) begin m_out[b] = 0; m_str[b] = 0; m_pend[b] = 0; m_pv[b] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int k = 0; k < 5000; k++) begin
      checks++;
      if (brcst !== m_out[0][5:0] || brcst_str !== m_str[0] ||
          data !== m_out[1] || data_str !== m_str[1]) begin
        failures++;
        if (failures < 10) $display("k=%0d b %h/%h %b/%b d %h/%h %b/%b", k, brcst, m_out[0][5:0],
                                    brcst_str, m_str[0], data, m_out[1], data_str, m_str[1]);
      end
      ttc_brcst = 6'($urandom); ttc_brcst_str = ($urandom % 3) == 0;
      vme_brcst = 6'($urandom); vme_brcst_wr = ($urandom % 4) == 0;
      ttc_data  = 8'($urandom); ttc_data_str  = ($urandom % 3) == 0;
      vme_data  = 8'($urandom); vme_data_wr  = ($urandom % 4) == 0;
      model(0, ttc_brcst_str, 8'(ttc_brcst), vme_brcst_wr, 8'(vme_brcst));
      model(1, ttc_data_str, ttc_data, vme_data_wr, vme_data);
      @(negedge clk);
    end
    checks++;
    if (n_wait == 0 || n_replace == 0) begin
      failures++; $display("waits %0d replacements %0d", n_wait, n_replace);
    end
    $display("waits=%0d replacements=%0d", n_wait, n_replace);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
