// tb_l1a_generator: random source pulses and masks; the reference is a queue of
// expected L1A times (request clock + delay + 1). Checks every clock, for several
// delays including 0 and the largest, that the L1A appears exactly then and never else.
module tb_l1a_generator;
  import ccb_pkg::*;
  logic clk = 0, rst = 1;
  logic [4:0] src, src_en;
  logic [7:0] delay;
  logic l1a;
  int checks = 0, failures = 0, n_l1a = 0;
  bit expect_at [int];
  int cyc = 0;

  l1a_generator dut (.*);

  always #12.475 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int delays [6] = '{0, 1, 3, 15, 100, 255};
    src = '0; src_en = '0; delay = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    foreach (delays[i]) begin
      delay = 8'(delays[i]);
      expect_at.delete();
      for (int k = 0; k < 1500; k++) begin
        // check what the last edge produced
        checks++;
        if (l1a !== expect_at.exists(cyc)) begin
          failures++;
          if (failures < 10) $display("delay %0d cyc %0d: l1a %b exp %b", delays[i], cyc, l1a, expect_at.exists(cyc));
        end
        if (l1a) n_l1a++;
        // new stimulus for the next edge (stop requesting near the end to let the line drain)
        if (k % 300 == 0) src_en = 5'($urandom);
        src = (k < 1500 - 260 && ($urandom % 8 == 0)) ? 5'($urandom) : 5'b0;
        if (|(src & src_en)) expect_at[cyc + 1 + delays[i]] = 1;
        @(negedge clk);
        cyc++;
      end
    end
    checks++;
    if (n_l1a < 50) begin failures++; $display("too few L1As: %0d", n_l1a); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
