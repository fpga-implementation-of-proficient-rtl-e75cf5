// tb_complement_unit: for random coefficients A and multiples m = 1..8 of A,
// checks 16A - mA when complement is set and mA unchanged when it is not.
module tb_complement_unit;
  import dtg_pkg::*;

  mult_t din, a1, dout;
  logic  complement;
  int checks = 0, failures = 0;

  complement_unit dut (.din(din), .a1(a1), .complement(complement), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      longint a, m, exp;
      a          = longint'($urandom_range(0, 65535)) - 32768;
      m          = longint'($urandom_range(1, 8));
      a1         = mult_t'(a);
      din        = mult_t'(m * a);
      complement = i[0];
      #1;
      exp = complement ? (16 - m) * a : m * a;
      checks++;
      if (longint'(dout) != exp) begin
        failures++;
        $display("FAIL a=%0d m=%0d comp=%b dout=%0d exp=%0d", a, m, complement, dout, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
