// tb_addr_gen: steps the address generator at random, compares it with a
// counter model (wrap after tap 15, clear back to 0, last flag).
module tb_addr_gen;
  import dtg_pkg::*;

  logic              clk = 0, rst = 1, clear = 0, step = 0, last;
  logic [TAP_AW-1:0] addr;
  int                model = 0;
  int checks = 0, failures = 0, wraps = 0;

  addr_gen dut (.clk(clk), .rst(rst), .clear(clear), .step(step), .addr(addr), .last(last));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 400; i++) begin
      step  = ($urandom_range(0, 3) != 0);
      clear = ($urandom_range(0, 40) == 0);
      @(posedge clk);
      if (clear)      model = 0;
      else if (step) begin
        if (model == 15) wraps++;
        model = (model + 1) % 16;
      end
      #1;
      checks++;
      if (int'(addr) != model || last != (model == 15)) begin
        failures++;
        $display("FAIL addr=%0d last=%b model=%0d", addr, last, model);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL no wrap seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
