// tb_dtg_fir_top: end-to-end test of the 16-tap decision-tree FIR filter
// at its default parameters.
//
// Streams an impulse (the output must reproduce the coefficient set), the
// extreme samples -128 and 127, and random samples with random gaps and
// held in_valid, and compares every output with a direct convolution
// against the benchmark coefficients written out below. It also checks
// that y_valid rises exactly 49 edges after the accepting edge
// (the monitor, sampling at clock edges, first sees it 50 edges later), that the
// filter refuses samples while busy, and counts how often each path of the
// multiplier is used: direct odd multiple, shifted multiple, complement
// 16A - mA, zero nibble, negative high nibble, 8A, and back-pressure on
// in_valid. A path never used counts as a failure.
module tb_dtg_fir_top;
  import dtg_pkg::*;

  localparam int NSAMP   = 260;
  localparam int LATENCY = 50;  // y_valid rises on edge 49, first sampled high on edge 50
  localparam int EXP_H [16] = '{3, 6, 0, -16, -19, 12, 76, 128, 128, 76, 12, -19, -16, 0, 6, 3};

  logic    clk = 0, rst = 1, in_valid = 0, in_ready, y_valid;
  sample_t x_in;
  acc_t    y_out;
  int checks = 0, failures = 0;

  int     hist [16];
  longint exp_q [$];
  int     accept_cycle [$];
  int     cycle = 0, n_out = 0;
  int     n_direct = 0, n_shift = 0, n_comp = 0, n_zero = 0, n_neg = 0, n_8a = 0, n_stall = 0;

  dtg_fir_top dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready),
                   .x_in(x_in), .y_valid(y_valid), .y_out(y_out));

  always #5 clk = ~clk;

  initial begin
    repeat (NSAMP * 60 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int stimulus(int i);
    if (i == 0)       return 1;           // impulse
    if (i < 16)       return 0;
    if (i < 36)       return -128;
    if (i < 56)       return 127;
    if (i < 60)       return -8 * 16;     // high nibble -8
    return int'($signed(8'($urandom)));
  endfunction

  // Reference model and monitors, sampled at each rising edge.
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst) begin
      if (in_valid && in_ready) begin
        longint y;
        y = 0;
        for (int k = 15; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'(x_in);
        for (int t = 0; t < 16; t++) y += longint'(EXP_H[t]) * hist[t];
        exp_q.push_back(y);
        accept_cycle.push_back(cycle);
      end
      if (in_valid && !in_ready) n_stall++;
      if (dut.acc_en) begin
        if (dut.op.zero)                                               n_zero++;
        else if (dut.instr.complement)                                 n_comp++;
        else if (dut.instr.shamt != 0)                                 n_shift++;
        else                                                           n_direct++;
        if (!dut.op.zero && dut.op.negate)                             n_neg++;
        if (!dut.op.zero && dut.op.code == 4'b0111)                    n_8a++;
      end
      if (y_valid) begin
        n_out++;
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("FAIL output without input");
        end else begin
          longint e;
          int     a;
          e = exp_q.pop_front();
          a = accept_cycle.pop_front();
          if (longint'(y_out) != e) begin
            failures++; $display("FAIL output %0d: y=%0d expected %0d", n_out, y_out, e);
          end
          checks++;
          if (cycle - a != LATENCY) begin
            failures++; $display("FAIL latency %0d, expected %0d", cycle - a, LATENCY);
          end
        end
      end
    end
  end

  initial begin
    foreach (hist[i]) hist[i] = 0;
    x_in = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < NSAMP; i++) begin
      x_in     = sample_t'(stimulus(i));
      in_valid = 1;
      while (!in_ready) begin @(posedge clk); #1; end
      @(posedge clk);                      // accepted on this edge
      #1;
      if (i >= 60 && $urandom_range(0, 3) == 0) begin
        in_valid = 0;
        repeat ($urandom_range(1, 70)) @(posedge clk);
        #1;
      end
    end
    in_valid = 0;
    repeat (LATENCY + 5) @(posedge clk);

    checks++;
    if (n_out != NSAMP) begin failures++; $display("FAIL %0d outputs for %0d samples", n_out, NSAMP); end
    $display("paths: direct=%0d shift=%0d complement=%0d zero=%0d negative=%0d 8A=%0d stall=%0d",
             n_direct, n_shift, n_comp, n_zero, n_neg, n_8a, n_stall);
    checks++; if (n_direct == 0) begin failures++; $display("FAIL direct path unused"); end
    checks++; if (n_shift  == 0) begin failures++; $display("FAIL shift path unused"); end
    checks++; if (n_comp   == 0) begin failures++; $display("FAIL complement path unused"); end
    checks++; if (n_zero   == 0) begin failures++; $display("FAIL zero nibble unused"); end
    checks++; if (n_neg    == 0) begin failures++; $display("FAIL negative nibble unused"); end
    checks++; if (n_8a     == 0) begin failures++; $display("FAIL 8A unused"); end
    checks++; if (n_stall  == 0) begin failures++; $display("FAIL no back-pressure seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
