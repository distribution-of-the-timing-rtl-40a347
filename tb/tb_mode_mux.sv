// tb_mode_mux: random bundles on both sides; in each mode every field of the backplane
// bundle must equal the bundle of the selected side.
module tb_mode_mux;
  import ccb_pkg::*;
  ccb_mode_e mode;
  fast_ctrl_t discrete_in, fpga_in, bp_out;
  int checks = 0, failures = 0;

  mode_mux dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 1000; k++) begin
      mode        = ccb_mode_e'(k[0]);
      discrete_in = fast_ctrl_t'({$urandom, $urandom});
      fpga_in     = fast_ctrl_t'({$urandom, $urandom});
      #1;
      checks++;
      if (bp_out !== (k[0] ? fpga_in : discrete_in)) begin
        failures++;
        if (failures < 10) $display("mode %0d: bp %h disc %h fpga %h", k[0], bp_out, discrete_in, fpga_in);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
