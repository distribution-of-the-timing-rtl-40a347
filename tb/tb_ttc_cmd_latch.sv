// tb_ttc_cmd_latch: checks that a command is captured on its strobe, held until the next
// strobe, and that the output strobe is the input strobe delayed by exactly one clock.
// A reference model (a plain one-clock delay plus a hold register) is compared every clock
// against random traffic on an 8-bit instance.
module tb_ttc_cmd_latch;
  localparam int W = 8;
  logic clk = 0, rst = 1;
  logic [W-1:0] cmd_in, cmd_out, exp_cmd;
  logic str_in, str_out, exp_str;
  int checks = 0, failures = 0;

  ttc_cmd_latch #(.W(W)) dut (.*);

  always #12.475 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmd_in = '0; str_in = 0; exp_cmd = '0; exp_str = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      // compare outputs of the previous clock edge
      checks++;
      if (cmd_out !== exp_cmd || str_out !== exp_str) begin
        failures++;
        if (failures < 10) $display("mismatch t=%0t cmd %h/%h str %b/%b", $time, cmd_out, exp_cmd, str_out, exp_str);
      end
      // next stimulus, and what the latch must show after the coming edge
      cmd_in = W'($urandom);
      str_in = ($urandom % 4) == 0;
      exp_str = str_in;
      if (str_in) exp_cmd = cmd_in;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
