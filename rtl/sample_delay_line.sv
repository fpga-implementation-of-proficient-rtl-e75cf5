// sample_delay_line: the z^-1 chain of the direct-form filter.
//
// Holds the newest DEPTH input samples: x[n] in stage 0 up to x[n-DEPTH+1].
// `shift` moves every stage one place on and writes `din` into stage 0.
// `sel` picks the stage read out on `dout`, so the serial multiply-accumulate
// can visit x[n-t] for tap t. All stages reset to zero so the first outputs
// are those of a filter started from rest. The read multiplexer is this
// implementation's choice; the chain follows the direct-form structure.
module sample_delay_line
  import dtg_pkg::*;
#(
  parameter int unsigned DEPTH = N_TAPS,
  parameter int unsigned W     = DATA_W
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         shift,
  input  logic signed [W-1:0]          din,
  input  logic [$clog2(DEPTH)-1:0]     sel,
  output logic signed [W-1:0]          dout
);

  logic signed [W-1:0] stage [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < DEPTH; i++) stage[i] <= '0;
    end else if (shift) begin
      stage[0] <= din;
      for (int unsigned i = 1; i < DEPTH; i++) stage[i] <= stage[i-1];
    end
  end

  assign dout = stage[sel];

endmodule
