// fir_controller: sequencer of the serial decision-tree FIR filter.
//
// For every accepted input sample it runs the taps one after another:
//   IDLE : in_ready high; on in_valid shift the sample in, clear y and the
//          tap address
//   LOAD : capture h[t] into the odd-multiple memory (A, 3A, 5A, 7A)
//   LO   : add h[t] * low nibble of x[n-t]
//   HI   : add 16 * h[t] * signed high nibble of x[n-t]; next tap
//   DONE : copy y to the output register
// A sample therefore takes 1 + 3*N_TAPS + 1 = 50 cycles for 16 taps: with
// the accepting edge counted as edge 0, `capture` is high before edge
// 3*N_TAPS + 1 and y_valid rises on it (edge 49), and a new sample can be
// accepted at edge 50. The design gives the controller's role (driving the address
// generator, the coefficient register, the shifter and the accumulator) but
// not its states; this schedule is the implementation's own.
module fir_controller
  import dtg_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  output logic in_ready,
  input  logic tap_last,
  output logic shift_in,
  output logic acc_clear,
  output logic addr_clear,
  output logic lut_load,
  output logic acc_en,
  output logic nib_hi,
  output logic addr_step,
  output logic capture
);

  typedef enum logic [2:0] {IDLE, LOAD, LO, HI, DONE} state_t;
  state_t state, next;

  always_ff @(posedge clk) begin
    if (rst) state <= IDLE;
    else     state <= next;
  end

  always_comb begin
    next       = state;
    in_ready   = 1'b0;
    shift_in   = 1'b0;
    acc_clear  = 1'b0;
    addr_clear = 1'b0;
    lut_load   = 1'b0;
    acc_en     = 1'b0;
    nib_hi     = 1'b0;
    addr_step  = 1'b0;
    capture    = 1'b0;
    unique case (state)
      IDLE: begin
        in_ready = 1'b1;
        if (in_valid) begin
          shift_in   = 1'b1;
          acc_clear  = 1'b1;
          addr_clear = 1'b1;
          next       = LOAD;
        end
      end
      LOAD: begin
        lut_load = 1'b1;
        next     = LO;
      end
      LO: begin
        acc_en = 1'b1;
        next   = HI;
      end
      HI: begin
        acc_en    = 1'b1;
        nib_hi    = 1'b1;
        addr_step = 1'b1;
        next      = tap_last ? DONE : LOAD;
      end
      DONE: begin
        capture = 1'b1;
        next    = IDLE;
      end
      default: next = IDLE;
    endcase
  end

  // The accumulator is only written while a tap is being processed.
  a_acc_in_tap: assert property (@(posedge clk) disable iff (rst)
                                 acc_en |-> (state == LO || state == HI));

endmodule
