// coeff_lut_unit: multiplier-free product of a coefficient A and a 4-bit
// multiple, built from a 4-entry odd-multiple memory and a decision tree.
//
// Data path: odd_mult_lut (A, 3A, 5A, 7A, captured on `load`) ->
// lut_shifter (x1, x2, x4, x8, x16) -> complement_unit (16A - m). The
// decision tree turns the 4-bit table code into the memory entry, shift
// amount and complement flag, so `product` = k * A with
//   k = code+1 for code 0000..0111, 23-code for 1000..1110, 16 for 1111.
// Timing: `load` takes one clock edge; after it the product follows `code`
// combinationally and stays valid until the next load. The structure
// (memory, shifter, complement unit, decision tree) is the design's; the
// sequencing by the filter controller is this implementation's.
module coeff_lut_unit
  import dtg_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       load,
  input  coef_t      coef,
  input  logic [3:0] code,
  output mult_t      product,
  output dt_instr_t  instr
);

  mult_t odd_val, a1, shifted;

  decision_tree_gen u_tree (
    .code  (code),
    .instr (instr)
  );

  odd_mult_lut u_mem (
    .clk     (clk),
    .rst     (rst),
    .load    (load),
    .coef    (coef),
    .rd_sel  (instr.odd_sel),
    .rd_data (odd_val),
    .a1      (a1)
  );

  lut_shifter u_shift (
    .din   (odd_val),
    .shamt (instr.shamt),
    .dout  (shifted)
  );

  complement_unit u_comp (
    .din        (shifted),
    .a1         (a1),
    .complement (instr.complement),
    .dout       (product)
  );

endmodule
