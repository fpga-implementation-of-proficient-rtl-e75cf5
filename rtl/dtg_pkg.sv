// dtg_pkg: sizes, types and helper functions shared by the decision-tree
// (DTG) FIR filter.
//
// The filter is a 16-tap direct-form FIR with 8-bit samples and 16-bit
// coefficients. Multiplications are done without a multiplier: a 4-entry
// look-up table holds the odd multiples A, 3A, 5A and 7A of the current
// coefficient A, and every multiple kA with k = 1..16 is rebuilt from one of
// them by a left shift and, for k = 9..15, by the complement relation
// kA = 16A - (16-k)A. The 4-bit code used to address that table follows the
// general coefficient table of the design:
//   code 0000..0111 -> 1A..8A, code 1000..1110 -> 15A..9A, code 1111 -> 16A.
// The tap count, the sample width of eight bits, the 16-bit coefficient word
// and the benchmark coefficient set are the design's published numbers; the
// accumulator width (full precision) is this implementation's choice.
package dtg_pkg;

  localparam int unsigned N_TAPS = 16;
  localparam int unsigned DATA_W = 8;
  localparam int unsigned COEF_W = 16;
  // A multiple kA with k <= 16 needs four bits more than A, plus headroom for
  // the 16A - mA subtraction.
  localparam int unsigned MULT_W = COEF_W + 5;
  // Full-precision sum of N_TAPS products of DATA_W x COEF_W bits.
  localparam int unsigned ACC_W  = DATA_W + COEF_W + $clog2(N_TAPS);
  localparam int unsigned TAP_AW = $clog2(N_TAPS);

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [MULT_W-1:0] mult_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef coef_t                    coef_set_t [N_TAPS];

  // 16-tap benchmark coefficient set (linear phase, even symmetry).
  localparam coef_set_t H_DEFAULT = '{
    16'sd3,   16'sd6,   16'sd0,  -16'sd16, -16'sd19,  16'sd12,  16'sd76,  16'sd128,
    16'sd128, 16'sd76,  16'sd12, -16'sd19, -16'sd16,  16'sd0,   16'sd6,   16'sd3
  };

  // One instruction of the decision tree: which odd multiple to read
  // (0:A 1:3A 2:5A 3:7A), how far to shift it left, and whether the result
  // is to be taken as 16A minus it.
  typedef struct packed {
    logic [1:0] odd_sel;
    logic [2:0] shamt;
    logic       complement;
  } dt_instr_t;

  // Multiple k that a 4-bit table code stands for (1..16).
  function automatic int unsigned code_factor(input logic [3:0] code);
    if (!code[3])        return int'(code) + 1;
    else if (code == 4'hF) return 16;
    else                 return 23 - int'(code);
  endfunction

  // Table code that yields the multiple k, for k = 1..15 (k = 0 has no code
  // and is handled as a zero product by the caller).
  function automatic logic [3:0] factor_code(input logic [3:0] k);
    // 23 - k taken modulo 16 is 7 - k
    return (k <= 4'd8) ? k - 4'd1 : 4'd7 - k;
  endfunction

  // Operation of the serial multiply-accumulate for one nibble of a sample.
  typedef struct packed {
    logic       zero;    // nibble value is 0: nothing to add
    logic       negate;  // signed high nibble below 0: subtract the product
    logic [3:0] code;    // table code of |nibble|
  } nib_op_t;

  // Low nibble: unsigned 0..15. High nibble: signed -8..7.
  function automatic nib_op_t encode_nibble(input logic [3:0] nib, input logic is_signed);
    nib_op_t    op;
    logic [3:0] mag;
    op.negate = is_signed && nib[3];
    mag       = op.negate ? 4'(-nib) : nib;   // -8 gives magnitude 8
    op.zero   = (mag == 4'd0);
    op.code   = op.zero ? 4'd0 : factor_code(mag);
    return op;
  endfunction

endpackage
