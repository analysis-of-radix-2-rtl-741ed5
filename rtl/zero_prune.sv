// zero_prune: zero tracing for one radix-2 butterfly.
//
// Looks at the two complex operands of a butterfly and classifies the
// operation: both zero -> PR_FULL (the result is zero and nothing needs to
// be computed), exactly one zero -> PR_PARTIAL (sum and difference are a
// copy or a negation of the other operand), neither zero -> PR_NONE (full
// butterfly). The butterflies use the class to bypass and isolate their
// adders. Purely combinational. The three classes follow the pruning legend
// of the design; how they are detected (a compare of both components with
// zero) is this implementation's choice.
module zero_prune
  import fft_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] a_re,
  input  logic signed [W-1:0] a_im,
  input  logic signed [W-1:0] b_re,
  input  logic signed [W-1:0] b_im,
  output logic                a_zero,
  output logic                b_zero,
  output prune_e              cls
);

  always_comb begin
    a_zero = (a_re == '0) && (a_im == '0);
    b_zero = (b_re == '0) && (b_im == '0);
    if (a_zero && b_zero)      cls = PR_FULL;
    else if (a_zero || b_zero) cls = PR_PARTIAL;
    else                       cls = PR_NONE;
  end

endmodule
