// odd_mult_lut: the 4-coefficient LUT memory of the decision-tree multiplier.
//
// On `load` it captures a coefficient A and stores its odd multiples
// A, 3A, 5A and 7A, built with shifts and one adder each
// (3A = 2A + A, 5A = 4A + A, 7A = 8A - A). These four words are the only
// stored products: every other multiple of A up to 16A is derived from them
// by the shifter and the complement unit. `rd_sel` reads one entry
// combinationally; `a1` always shows entry 0 (A itself), which the
// complement unit needs to form 16A. Entries are MULT_W bits wide so that
// the later shifts and the 16A subtraction cannot overflow.
// Storing exactly four odd multiples follows the design; computing them at
// load time from A, so the same memory serves every tap, is this
// implementation's reading of how the memory is filled.
module odd_mult_lut
  import dtg_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       load,
  input  coef_t      coef,
  input  logic [1:0] rd_sel,
  output mult_t      rd_data,
  output mult_t      a1
);

  mult_t entry [4];
  mult_t a;

  assign a = mult_t'(coef);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 4; i++) entry[i] <= '0;
    end else if (load) begin
      entry[0] <= a;
      entry[1] <= (a <<< 1) + a;
      entry[2] <= (a <<< 2) + a;
      entry[3] <= (a <<< 3) - a;
    end
  end

  assign rd_data = entry[rd_sel];
  assign a1      = entry[0];

endmodule
