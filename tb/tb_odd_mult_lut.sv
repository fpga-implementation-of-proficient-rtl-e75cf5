// tb_odd_mult_lut: loads random coefficients (and the extremes of the
// 16-bit range) and checks that the four entries read back as A, 3A, 5A, 7A,
// that a1 shows A, and that the entries hold while load is low.
module tb_odd_mult_lut;
  import dtg_pkg::*;

  logic       clk = 0, rst = 1, load = 0;
  coef_t      coef;
  logic [1:0] rd_sel;
  mult_t      rd_data, a1;
  int checks = 0, failures = 0;

  odd_mult_lut dut (.clk(clk), .rst(rst), .load(load), .coef(coef),
                    .rd_sel(rd_sel), .rd_data(rd_data), .a1(a1));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_entries(input longint a);
    for (int s = 0; s < 4; s++) begin
      rd_sel = 2'(s);
      #1;
      checks++;
      if (longint'(rd_data) != (2 * s + 1) * a) begin
        failures++;
        $display("FAIL A=%0d entry %0d = %0d", a, s, rd_data);
      end
    end
    checks++;
    if (longint'(a1) != a) begin failures++; $display("FAIL a1=%0d A=%0d", a1, a); end
  endtask

  initial begin
    coef = '0; rd_sel = '0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 60; i++) begin
      longint a;
      a = (i == 0) ? -32768 : (i == 1) ? 32767 : longint'($urandom_range(0, 65535)) - 32768;
      coef = coef_t'(a); load = 1;
      @(posedge clk); #1 load = 0;
      coef = coef_t'($urandom);             // must not be captured
      check_entries(a);
      @(posedge clk); #1;
      check_entries(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
