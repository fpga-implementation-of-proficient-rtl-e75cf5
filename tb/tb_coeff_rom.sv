// tb_coeff_rom: reads every address of the default coefficient ROM and
// compares it with the 16-tap benchmark set written out below; also checks
// that a ROM given another set returns that set.
module tb_coeff_rom;
  import dtg_pkg::*;

  logic [TAP_AW-1:0] addr;
  coef_t             dout, dout2;
  int checks = 0, failures = 0;

  localparam int EXP_H [16] = '{3, 6, 0, -16, -19, 12, 76, 128, 128, 76, 12, -19, -16, 0, 6, 3};
  localparam coef_set_t RAMP = '{16'sd1, 16'sd2, 16'sd3, 16'sd4, 16'sd5, 16'sd6, 16'sd7, 16'sd8,
                                 -16'sd1, -16'sd2, -16'sd3, -16'sd4, -16'sd5, -16'sd6, -16'sd7, -16'sd8};

  coeff_rom dut (.addr(addr), .dout(dout));
  coeff_rom #(.H(RAMP)) dut2 (.addr(addr), .dout(dout2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      addr = TAP_AW'(i);
      #1;
      checks++;
      if (int'(dout) != EXP_H[i]) begin failures++; $display("FAIL h[%0d]=%0d exp %0d", i, dout, EXP_H[i]); end
      checks++;
      if (int'(dout2) != ((i < 8) ? i + 1 : -(i - 7))) begin failures++; $display("FAIL ramp[%0d]=%0d", i, dout2); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
