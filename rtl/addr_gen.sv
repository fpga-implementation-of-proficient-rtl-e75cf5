// addr_gen: tap address generator.
//
// A counter that walks the coefficient ROM and the sample delay line from tap
// 0 to tap DEPTH-1, one step each time the controller asserts `step`. `clear`
// (or reset) returns it to tap 0; `last` is high while it points at the final
// tap. The design names this block and its role; the counter itself is the
// simplest circuit that does the job. Synchronous, active-high reset.
module addr_gen
  import dtg_pkg::*;
#(
  parameter int unsigned DEPTH = N_TAPS
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     clear,
  input  logic                     step,
  output logic [$clog2(DEPTH)-1:0] addr,
  output logic                     last
);

  localparam logic [$clog2(DEPTH)-1:0] LAST_ADDR = ($clog2(DEPTH))'(DEPTH - 1);

  always_ff @(posedge clk) begin
    if (rst || clear)  addr <= '0;
    else if (step)     addr <= last ? '0 : addr + 1'b1;
  end

  assign last = (addr == LAST_ADDR);

endmodule
