// complement_unit: applies the mirror relation of the coefficient table.
//
// Codes 1000..1110 of the table hold 15A..9A, which are 16A minus the
// multiple held in the same row of the lower half (1A..7A). When
// `complement` is set the unit outputs 16A - din, with 16A formed as A
// shifted left by four; otherwise din passes unchanged. Combinational.
// The relation follows the design's table; computing it with one subtractor
// is the simplest circuit for it.
module complement_unit
  import dtg_pkg::*;
(
  input  mult_t din,
  input  mult_t a1,
  input  logic  complement,
  output mult_t dout
);

  assign dout = complement ? (a1 <<< 4) - din : din;

endmodule
