// tb_mac_accumulator: drives random partial products with random
// zero/negate/high-nibble flags, clears and captures, and compares the
// running sum, the captured output and the one-cycle y_valid strobe with a
// model.
module tb_mac_accumulator;
  import dtg_pkg::*;

  logic    clk = 0, rst = 1, clear = 0, en = 0, hi = 0, capture = 0, y_valid;
  nib_op_t op;
  mult_t   product;
  acc_t    acc, y_out;
  longint  model = 0, y_model = 0;
  int checks = 0, failures = 0;

  mac_accumulator dut (.clk(clk), .rst(rst), .clear(clear), .en(en), .hi(hi), .op(op),
                       .product(product), .capture(capture), .acc(acc), .y_out(y_out),
                       .y_valid(y_valid));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op = '0; product = '0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 500; i++) begin
      longint p;
      p         = longint'($urandom_range(0, 1 << 20)) - (1 << 19);
      product   = mult_t'(p);
      op.zero   = ($urandom_range(0, 5) == 0);
      op.negate = $urandom_range(0, 1);
      op.code   = 4'($urandom);
      hi        = $urandom_range(0, 1);
      en        = ($urandom_range(0, 3) != 0);
      clear     = ($urandom_range(0, 30) == 0);
      capture   = ($urandom_range(0, 10) == 0);
      @(posedge clk);
      if (capture) y_model = model;
      if (clear) model = 0;
      else if (en && !op.zero) model += (op.negate ? -p : p) * (hi ? 16 : 1);
      #1;
      checks++;
      if (longint'(acc) != model) begin failures++; $display("FAIL acc=%0d model=%0d", acc, model); end
      checks++;
      if (y_valid != capture || (capture && longint'(y_out) != y_model)) begin
        failures++; $display("FAIL y_out=%0d y_valid=%b exp %0d", y_out, y_valid, y_model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
