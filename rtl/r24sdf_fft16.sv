// r24sdf_fft16: 16-point radix-2^4 single-path delay-feedback pipeline FFT.
//
// One complex sample enters per valid cycle, in natural order; one complex
// frequency bin leaves per valid cycle, in bit-reversed order (X(0), X(8),
// X(4), X(12), X(2), ...), with out_k giving the bin index. The pipeline is
//   stage 1: BF I,  8-word delay line   (R1..R8)
//   stage 2: BF II, 4-word delay line   (R9..R12)   -j inside the butterfly
//   W8 rotator:  1, W16^2, -j, W16^6    (real constant multiplications)
//   stage 3: BF I,  2-word delay line   (R13, R14)
//   W16 multiplier: W16^0..W16^3        (complex constant multiplication)
//   stage 4: BF II, 1-word delay line   (R15)       -j inside the butterfly
// so the whole design holds N-1 = 15 words of data memory and one general
// complex constant multiplier. The radix-2^4 split of the twiddle factors
// follows from n = 8n1 + 4n2 + 2n3 + n4, k = k1 + 2k2 + 4k3 + 8k4:
//   W16^(nk) = (-1)^(n1k1) (-j)^(n2k1) (-1)^(n2k2) W16^(2n3(k1+2k2))
//              (-1)^(n3k3) W16^(n4(k1+2k2)) (-j)^(n4k3) (-1)^(n4k4).
//
// Timing: every block has a one-cycle output register. With a gap-free
// stream the bin of frame position 0 leaves 21 cycles after sample 0 of
// the frame entered (8+1, 4+1, 1, 2+1, 1, 1+1); after that one bin leaves
// per cycle. Gaps in in_valid pause the pipeline without losing data; the
// last frame leaves once the next frame (or 16 flush samples) follows it.
//
// Word growth: one bit per butterfly and per rotator, so an input of W_IN
// bits gives W_IN+6 output bits and nothing can overflow. X(k) is the
// unscaled DFT sum over x(n) W16^(nk), rounded in the two rotators.
//
// prune_full / prune_part are one strobe per stage (bit 0 = stage 1) that
// pulse when that stage's butterfly found both / one of its operands zero
// and skipped the corresponding arithmetic (zero tracing).
module r24sdf_fft16
  import fft_pkg::*;
#(
  parameter int unsigned W_IN = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [W_IN-1:0]   in_re,
  input  logic signed [W_IN-1:0]   in_im,
  output logic                     out_valid,
  output logic signed [W_IN+5:0]   out_re,
  output logic signed [W_IN+5:0]   out_im,
  output logic [LOG2N-1:0]         out_k,
  output logic [3:0]               prune_full,
  output logic [3:0]               prune_part
);

  localparam int unsigned W1 = W_IN + 1;   // after stage 1
  localparam int unsigned W2 = W_IN + 2;   // after stage 2
  localparam int unsigned W3 = W_IN + 3;   // after W8 rotator
  localparam int unsigned W4 = W_IN + 4;   // after stage 3
  localparam int unsigned W5 = W_IN + 5;   // after W16 multiplier

  logic                 v1, v2, v3, v4, v5;
  logic signed [W1-1:0] d1_re, d1_im;
  logic signed [W2-1:0] d2_re, d2_im;
  logic signed [W3-1:0] d3_re, d3_im;
  logic signed [W4-1:0] d4_re, d4_im;
  logic signed [W5-1:0] d5_re, d5_im;
  logic [3:0]           act;
  prune_e               cls [4];
  logic [LOG2N-1:0]     out_pos;

  sdf_stage #(.W(W_IN), .DELAY(8), .BF_TYPE(BF_TYPE_I)) u_st1 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
    .out_valid(v1), .out_re(d1_re), .out_im(d1_im),
    .bf_active(act[0]), .bf_cls(cls[0])
  );

  sdf_stage #(.W(W1), .DELAY(4), .BF_TYPE(BF_TYPE_II)) u_st2 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(v1), .in_re(d1_re), .in_im(d1_im),
    .out_valid(v2), .out_re(d2_re), .out_im(d2_im),
    .bf_active(act[1]), .bf_cls(cls[1])
  );

  tw_mult_w8 #(.W(W2)) u_tw8 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(v2), .in_re(d2_re), .in_im(d2_im),
    .out_valid(v3), .out_re(d3_re), .out_im(d3_im)
  );

  sdf_stage #(.W(W3), .DELAY(2), .BF_TYPE(BF_TYPE_I)) u_st3 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(v3), .in_re(d3_re), .in_im(d3_im),
    .out_valid(v4), .out_re(d4_re), .out_im(d4_im),
    .bf_active(act[2]), .bf_cls(cls[2])
  );

  tw_mult_w16 #(.W(W4)) u_tw16 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(v4), .in_re(d4_re), .in_im(d4_im),
    .out_valid(v5), .out_re(d5_re), .out_im(d5_im)
  );

  sdf_stage #(.W(W5), .DELAY(1), .BF_TYPE(BF_TYPE_II)) u_st4 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(v5), .in_re(d5_re), .in_im(d5_im),
    .out_valid(out_valid), .out_re(out_re), .out_im(out_im),
    .bf_active(act[3]), .bf_cls(cls[3])
  );

  // Output position counter; the bin index is its bit reversal.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         out_pos <= '0;
    else if (out_valid) out_pos <= out_pos + 1'b1;
  end

  always_comb begin
    for (int i = 0; i < LOG2N; i++) out_k[i] = out_pos[LOG2N-1-i];
    for (int i = 0; i < 4; i++) begin
      prune_full[i] = act[i] && (cls[i] == PR_FULL);
      prune_part[i] = act[i] && (cls[i] == PR_PARTIAL);
    end
  end

endmodule
