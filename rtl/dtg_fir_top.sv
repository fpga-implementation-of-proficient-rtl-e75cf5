// dtg_fir_top: 16-tap direct-form FIR filter whose tap products are formed
// by a decision-tree look-up-table multiplier instead of a multiplier.
//
// y[n] = sum_{t=0}^{15} h[t] * x[n-t], 8-bit signed samples, 16-bit signed
// coefficients, full-precision ACC_W-bit result.
//
// One tap is processed at a time. The address generator steps through the
// taps; the coefficient ROM gives h[t], which is captured as A in the
// 4-entry odd-multiple memory (A, 3A, 5A, 7A). The sample x[n-t] from the
// delay line is split into an unsigned low nibble and a signed high nibble;
// each nibble's magnitude is turned into a table code, the decision tree
// rebuilds |nibble| * A by shift and complement, and the accumulator adds
// the result (negated for a negative high nibble, weighted by 16 for the
// high nibble). A zero nibble adds nothing.
//
// Interface: in_valid/in_ready handshake for x_in; y_valid is a one-cycle
// pulse with y_out. Timing: one sample every 50 cycles for 16 taps; y_valid
// rises 49 clock edges after the edge that accepted the sample (see
// fir_controller). Synchronous, active-high reset `rst`.
//
// The block structure (coefficient ROM, address generator, controller,
// coefficient register and shifter, odd-multiple memory, decision tree,
// complement unit, accumulator) and the numbers (16 taps, 8-bit samples,
// 16-bit coefficients, benchmark coefficients) follow the design; the
// nibble-serial schedule, handshake and result width are this
// implementation's choices.
module dtg_fir_top
  import dtg_pkg::*;
#(
  parameter coef_set_t H = H_DEFAULT
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t x_in,
  output logic    y_valid,
  output acc_t    y_out
);

  logic              shift_in, acc_clear, addr_clear, lut_load;
  logic              acc_en, nib_hi, addr_step, capture, tap_last;
  logic [TAP_AW-1:0] tap;
  coef_t             coef;
  sample_t           x_tap;
  logic [3:0]        nib;
  nib_op_t           op;
  mult_t             product;
  dt_instr_t         instr;

  fir_controller u_ctrl (
    .clk        (clk),
    .rst        (rst),
    .in_valid   (in_valid),
    .in_ready   (in_ready),
    .tap_last   (tap_last),
    .shift_in   (shift_in),
    .acc_clear  (acc_clear),
    .addr_clear (addr_clear),
    .lut_load   (lut_load),
    .acc_en     (acc_en),
    .nib_hi     (nib_hi),
    .addr_step  (addr_step),
    .capture    (capture)
  );

  addr_gen u_addr (
    .clk   (clk),
    .rst   (rst),
    .clear (addr_clear),
    .step  (addr_step),
    .addr  (tap),
    .last  (tap_last)
  );

  coeff_rom #(.H(H)) u_rom (
    .addr (tap),
    .dout (coef)
  );

  sample_delay_line u_delay (
    .clk   (clk),
    .rst   (rst),
    .shift (shift_in),
    .din   (x_in),
    .sel   (tap),
    .dout  (x_tap)
  );

  assign nib = nib_hi ? x_tap[7:4] : x_tap[3:0];
  assign op  = encode_nibble(nib, nib_hi);

  coeff_lut_unit u_lut (
    .clk     (clk),
    .rst     (rst),
    .load    (lut_load),
    .coef    (coef),
    .code    (op.code),
    .product (product),
    .instr   (instr)
  );

  mac_accumulator u_mac (
    .clk     (clk),
    .rst     (rst),
    .clear   (acc_clear),
    .en      (acc_en),
    .hi      (nib_hi),
    .op      (op),
    .product (product),
    .capture (capture),
    .acc     (),
    .y_out   (y_out),
    .y_valid (y_valid)
  );

  // Handshake rules: an accepted sample makes the filter busy, and each
  // result is announced by a single-cycle pulse.
  a_busy_after_accept: assert property (@(posedge clk) disable iff (rst)
                                        (in_valid && in_ready) |=> !in_ready);
  a_valid_pulse:       assert property (@(posedge clk) disable iff (rst)
                                        y_valid |=> !y_valid);

endmodule
