// tb_fir_controller: runs the controller against a tap counter model and
// checks, for each sample, the control sequence: accept only when idle,
// 16 coefficient loads, 32 accumulations (low then high nibble), one
// capture, and 50 cycles from the accepting edge to the capture edge + 1.
module tb_fir_controller;
  import dtg_pkg::*;

  logic clk = 0, rst = 1, in_valid = 0, in_ready, tap_last;
  logic shift_in, acc_clear, addr_clear, lut_load, acc_en, nib_hi, addr_step, capture;
  int   tap = 0;
  int checks = 0, failures = 0;

  fir_controller dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_ready(in_ready),
                      .tap_last(tap_last), .shift_in(shift_in), .acc_clear(acc_clear),
                      .addr_clear(addr_clear), .lut_load(lut_load), .acc_en(acc_en),
                      .nib_hi(nib_hi), .addr_step(addr_step), .capture(capture));

  assign tap_last = (tap == 15);
  always_ff @(posedge clk)
    if (addr_clear) tap <= 0;
    else if (addr_step) tap <= (tap == 15) ? 0 : tap + 1;

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1 rst = 0;
    repeat (2) @(posedge clk);
    for (int s = 0; s < 6; s++) begin
      int loads, lo, hi, caps, cycles, accepts;
      loads = 0; lo = 0; hi = 0; caps = 0; cycles = 0; accepts = 0;
      #1 in_valid = 1;
      #1;
      // wait for the accepting edge
      while (!(in_ready && in_valid)) @(posedge clk);
      checks++;
      if (!(shift_in && acc_clear && addr_clear)) begin failures++; $display("FAIL accept controls"); end
      @(posedge clk); #1;
      if (s % 2 == 0) in_valid = 0;        // also test a held in_valid
      cycles = 1;
      while (!caps) begin
        if (in_ready) accepts++;
        if (lut_load) loads++;
        if (acc_en && !nib_hi) lo++;
        if (acc_en && nib_hi) hi++;
        if (capture) caps++;
        @(posedge clk); #1;
        cycles++;
      end
      checks++;
      if (loads != 16 || lo != 16 || hi != 16 || accepts != 0) begin
        failures++; $display("FAIL loads=%0d lo=%0d hi=%0d ready_while_busy=%0d", loads, lo, hi, accepts);
      end
      checks++;
      if (cycles != 50) begin failures++; $display("FAIL latency %0d cycles, expected 50", cycles); end
      checks++;
      if (!in_ready) begin failures++; $display("FAIL not idle after capture"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
