// coeff_rom: read-only store of the filter's tap coefficients.
//
// One coefficient word per tap, read asynchronously at the tap index given by
// the address generator; the coefficient register that follows it (inside
// odd_mult_lut) captures the word. The default contents are the 16-tap
// benchmark set 3, 6, 0, -16, -19, 12, 76, 128 and its mirror image, in
// 16-bit words, as the design specifies. Storing all taps, rather than only
// the unique half of the symmetric set, is this implementation's choice: it
// keeps the ROM usable for any coefficient set passed through H.
module coeff_rom
  import dtg_pkg::*;
#(
  parameter coef_set_t H = H_DEFAULT
) (
  input  logic [TAP_AW-1:0] addr,
  output coef_t             dout
);

  assign dout = H[addr];

endmodule
