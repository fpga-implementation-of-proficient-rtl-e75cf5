// tb_sample_delay_line: shifts random samples in at random times and reads
// every tap, comparing with an array model of x[n-t] (zero before the first
// samples).
module tb_sample_delay_line;
  import dtg_pkg::*;

  logic              clk = 0, rst = 1, shift = 0;
  sample_t           din, dout;
  logic [TAP_AW-1:0] sel;
  int                model [16];
  int checks = 0, failures = 0;

  sample_delay_line dut (.clk(clk), .rst(rst), .shift(shift), .din(din), .sel(sel), .dout(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = 0;
    din = '0; sel = '0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 200; i++) begin
      shift = ($urandom_range(0, 2) != 0);
      din   = sample_t'($urandom);
      @(posedge clk);
      if (shift) begin
        for (int k = 15; k > 0; k--) model[k] = model[k-1];
        model[0] = int'(din);
      end
      #1 shift = 0;
      for (int t = 0; t < 16; t++) begin
        sel = TAP_AW'(t);
        #1;
        checks++;
        if (int'(dout) != model[t]) begin failures++; $display("FAIL tap %0d = %0d exp %0d", t, dout, model[t]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
