// lut_shifter: the shift stage between the odd-multiple memory and the
// complement unit.
//
// Passes the selected odd multiple unchanged (shamt = 0, single-constant
// case) or shifted left by 1..4 places (the power-of-two part chosen by the
// decision tree). Written as the multiplexer between the unshifted register
// value and the shifted value that the block diagram shows; the shift is
// arithmetic on a signed word. Combinational.
module lut_shifter
  import dtg_pkg::*;
(
  input  mult_t      din,
  input  logic [2:0] shamt,
  output mult_t      dout
);

  mult_t shifted;

  always_comb begin
    unique case (shamt)
      3'd1:    shifted = din <<< 1;
      3'd2:    shifted = din <<< 2;
      3'd3:    shifted = din <<< 3;
      3'd4:    shifted = din <<< 4;
      default: shifted = din;
    endcase
    dout = (shamt == 3'd0) ? din : shifted;
  end

endmodule
