// tb_coeff_lut_unit: for random coefficients A, sweeps all 16 table codes
// and checks product = k*A with k taken from the coefficient table
// (A..8A, then 15A..9A, then 16A).
module tb_coeff_lut_unit;
  import dtg_pkg::*;

  logic       clk = 0, rst = 1, load = 0;
  coef_t      coef;
  logic [3:0] code;
  mult_t      product;
  dt_instr_t  instr;
  int checks = 0, failures = 0;

  localparam int EXP_K [16] = '{1, 2, 3, 4, 5, 6, 7, 8, 15, 14, 13, 12, 11, 10, 9, 16};

  coeff_lut_unit dut (.clk(clk), .rst(rst), .load(load), .coef(coef), .code(code),
                      .product(product), .instr(instr));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    coef = '0; code = '0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 50; i++) begin
      longint a;
      a = (i == 0) ? -32768 : (i == 1) ? 32767 : longint'($urandom_range(0, 65535)) - 32768;
      coef = coef_t'(a); load = 1;
      @(posedge clk); #1 load = 0;
      for (int c = 0; c < 16; c++) begin
        code = 4'(c);
        #1;
        checks++;
        if (longint'(product) != EXP_K[c] * a) begin
          failures++;
          $display("FAIL A=%0d code=%b product=%0d exp=%0d", a, code, product, EXP_K[c] * a);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
