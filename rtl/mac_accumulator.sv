// mac_accumulator: the accumulate stage ("FIR" block) of the serial filter.
//
// Each enabled cycle adds one partial product to the running sum y:
//   y += (zero ? 0 : (negate ? -p : p)) * (hi ? 16 : 1)
// where p = |nibble| * h[t] comes from the decision-tree multiplier, `hi`
// marks the upper (signed) nibble of the sample and `zero`/`negate` come from
// the nibble encoding. `clear` loads zero into y before the first tap of an
// output, as the design describes for its y register. `capture` copies the
// finished sum to `y_out` and raises `y_valid` for one cycle on the next
// edge. Full-precision ACC_W-bit arithmetic, so no rounding or overflow.
// Synchronous, active-high reset.
module mac_accumulator
  import dtg_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    clear,
  input  logic    en,
  input  logic    hi,
  input  nib_op_t op,
  input  mult_t   product,
  input  logic    capture,
  output acc_t    acc,
  output acc_t    y_out,
  output logic    y_valid
);

  acc_t term;

  always_comb begin
    term = acc_t'(product);
    if (op.negate) term = -term;
    if (hi)        term = term <<< 4;
    if (op.zero)   term = '0;
  end

  always_ff @(posedge clk) begin
    if (rst || clear) acc <= '0;
    else if (en)      acc <= acc + term;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      y_out   <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= capture;
      if (capture) y_out <= acc;
    end
  end

endmodule
