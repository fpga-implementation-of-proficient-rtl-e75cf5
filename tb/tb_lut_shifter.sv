// tb_lut_shifter: random values through every shift amount 0..4, compared
// with multiplication by the matching power of two.
module tb_lut_shifter;
  import dtg_pkg::*;

  mult_t      din, dout;
  logic [2:0] shamt;
  int checks = 0, failures = 0;

  lut_shifter dut (.din(din), .shamt(shamt), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      longint v;
      v     = longint'($signed($urandom_range(0, 32767))) - 16384;  // fits after x16
      din   = mult_t'(v);
      shamt = 3'(i % 5);
      #1;
      checks++;
      if (longint'(dout) != v * (longint'(1) << shamt)) begin
        failures++;
        $display("FAIL din=%0d shamt=%0d dout=%0d", v, shamt, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
