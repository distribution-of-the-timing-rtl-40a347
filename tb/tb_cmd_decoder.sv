// tb_cmd_decoder: sweeps every code on both a 6-bit (broadcast) and an 8-bit (individual)
// decoder, with and without strobe, and compares with a table written out here
// independently of the design's package enum.
module tb_cmd_decoder;
  import ccb_pkg::*;
  logic [5:0] bcmd; logic bstr;
  logic [7:0] icmd; logic istr;
  board_set_t bhr, bsr, ihr, isr;
  logic bccb, iccb;
  int checks = 0, failures = 0;

  cmd_decoder #(.W(6)) dut_b (.cmd(bcmd), .str(bstr), .hard_reset(bhr), .ccb_hard_reset(bccb), .soft_reset(bsr));
  cmd_decoder #(.W(8)) dut_i (.cmd(icmd), .str(istr), .hard_reset(ihr), .ccb_hard_reset(iccb), .soft_reset(isr));

  // expected {hard tmb,alct,dmb,mpc, ccb, soft tmb,alct,dmb,mpc} for a 6-bit code
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

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int c = 0; c < 256; c++) begin
        logic [8:0] e;
        icmd = 8'(c); istr = s[0];
        bcmd = 6'(c); bstr = s[0];
        #1;
        if (c < 64) begin
          e = s[0] ? expect_of(c) : 9'b0;
          checks++;
          if ({bhr, bccb, bsr} !== e) begin
            failures++; $display("brcst code %h str %0d: got %b exp %b", c, s, {bhr, bccb, bsr}, e);
          end
        end
        e = (s[0] && c < 64) ? expect_of(c) : 9'b0;
        checks++;
        if ({ihr, iccb, isr} !== e) begin
          failures++; $display("indiv code %h str %0d: got %b exp %b", c, s, {ihr, iccb, isr}, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
