// tb_dtg_fir_workloads: runs the filter with coefficient sets other than the
// default benchmark, side by side and in lock-step:
//   u_7tap : the 7-tap example set {-1, 0, 9, 16, 9, 0, -1}, zero-padded to
//            16 taps
//   u_wide : a set that spans the whole 16-bit coefficient range
//            (-32768 and 32767 included) with mixed signs
// Both are fed the same random 8-bit samples (including -128 and 127) and
// every output is compared with a direct convolution.
module tb_dtg_fir_workloads;
  import dtg_pkg::*;

  localparam int NSAMP = 120;
  localparam coef_set_t H7 = '{-16'sd1, 16'sd0, 16'sd9, 16'sd16, 16'sd9, 16'sd0, -16'sd1, 16'sd0,
                               16'sd0, 16'sd0, 16'sd0, 16'sd0, 16'sd0, 16'sd0, 16'sd0, 16'sd0};
  localparam coef_set_t HW = '{-16'sd32768, 16'sd32767, 16'sd1, -16'sd1, 16'sd12345, -16'sd23456,
                               16'sd255, -16'sd256, 16'sd4096, -16'sd4095, 16'sd7, -16'sd9,
                               16'sd30000, -16'sd30001, 16'sd16, 16'sd0};

  logic    clk = 0, rst = 1, in_valid = 0;
  logic    rdy7, rdyw, v7, vw;
  sample_t x_in;
  acc_t    y7, yw;
  int      hist [16];
  longint  e7_q [$], ew_q [$];
  int checks = 0, failures = 0, n7 = 0, nw = 0;

  dtg_fir_top #(.H(H7)) u_7tap (.clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(rdy7),
                                .x_in(x_in), .y_valid(v7), .y_out(y7));
  dtg_fir_top #(.H(HW)) u_wide (.clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(rdyw),
                                .x_in(x_in), .y_valid(vw), .y_out(yw));

  always #5 clk = ~clk;

  initial begin
    repeat (NSAMP * 60 + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst) begin
      if (in_valid && rdy7) begin
        longint a, b;
        a = 0; b = 0;
        for (int k = 15; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'(x_in);
        for (int t = 0; t < 16; t++) begin
          a += longint'(H7[t]) * hist[t];
          b += longint'(HW[t]) * hist[t];
        end
        e7_q.push_back(a);
        ew_q.push_back(b);
      end
      if (rdy7 != rdyw) begin checks++; failures++; $display("FAIL instances out of step"); end
      if (v7) begin
        longint e;
        e = e7_q.pop_front();
        n7++; checks++;
        if (longint'(y7) != e) begin failures++; $display("FAIL 7-tap y=%0d exp %0d", y7, e); end
      end
      if (vw) begin
        longint e;
        e = ew_q.pop_front();
        nw++; checks++;
        if (longint'(yw) != e) begin failures++; $display("FAIL wide y=%0d exp %0d", yw, e); end
      end
    end
  end

  initial begin
    foreach (hist[i]) hist[i] = 0;
    x_in = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < NSAMP; i++) begin
      x_in = (i % 17 == 3) ? -8'sd128 : (i % 17 == 9) ? 8'sd127 : sample_t'($urandom);
      in_valid = 1;
      while (!rdy7) begin @(posedge clk); #1; end
      @(posedge clk);
      #1;
    end
    in_valid = 0;
    repeat (60) @(posedge clk);
    checks++;
    if (n7 != NSAMP || nw != NSAMP) begin failures++; $display("FAIL output count %0d/%0d", n7, nw); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
