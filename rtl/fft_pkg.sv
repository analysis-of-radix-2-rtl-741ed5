// fft_pkg: constants and types shared by the radix-2^4 SDF FFT.
//
// The transform length is fixed at N = 16, the length the design is built
// for. Twiddle constants are signed fixed-point numbers with TW_FRAC
// fractional bits (Q2.14 in a 16-bit word), i.e. round(value * 2^14):
//   C8  = cos(pi/4) = 0.70710678 -> 11585
//   C16 = cos(pi/8) = 0.92387953 -> 15137
//   S16 = sin(pi/8) = 0.38268343 ->  6270
//   ONE = 1.0                    -> 16384
// The coefficient width and rounding are choices of this implementation.
package fft_pkg;

  localparam int unsigned N       = 16;
  localparam int unsigned LOG2N   = 4;

  localparam int unsigned TW_W    = 16;
  localparam int unsigned TW_FRAC = 14;

  localparam logic signed [TW_W-1:0] TW_ONE = 16'sd16384;
  localparam logic signed [TW_W-1:0] TW_C8  = 16'sd11585;
  localparam logic signed [TW_W-1:0] TW_C16 = 16'sd15137;
  localparam logic signed [TW_W-1:0] TW_S16 = 16'sd6270;

  // Zero-tracing class of one butterfly operation.
  //   PR_NONE    : both operands non-zero, full butterfly
  //   PR_PARTIAL : exactly one operand zero, single operation (copy/negate)
  //   PR_FULL    : both operands zero, result is zero, no operation
  typedef enum logic [1:0] {
    PR_NONE    = 2'd0,
    PR_PARTIAL = 2'd1,
    PR_FULL    = 2'd2
  } prune_e;

  // Butterfly flavour of an SDF stage.
  typedef enum logic {
    BF_TYPE_I  = 1'b0,   // plain radix-2 butterfly
    BF_TYPE_II = 1'b1    // radix-2 butterfly with trivial -j pre-multiplication
  } bf_type_e;

endpackage
