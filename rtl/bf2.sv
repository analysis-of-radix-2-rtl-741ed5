// bf2: radix-2 butterfly with trivial -j pre-multiplication (butterfly
// type II).
//
// Combinational. Same as bf1 (see there for the s modes and the zero
// tracing), plus one more control, t. While s and t are both high the
// arriving sample is first multiplied by -j, which needs no multiplier:
//   (a + jb) * (-j) = b - ja
// i.e. real and imaginary parts swap and the new imaginary part is negated.
// The swap and the sign change are done at W+1 bits so that negating the
// most negative W-bit value is exact. t marks the half of the frame whose
// samples carry the -j factor; its timing comes from the owning stage.
// Inputs W bits, out/fb W+1 bits; no overflow is possible (|re|,|im| of
// the sum and difference stay within +-2^W).
module bf2
  import fft_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic              s,
  input  logic              t,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  input  logic signed [W:0]   dl_re,
  input  logic signed [W:0]   dl_im,
  output logic signed [W:0]   out_re,
  output logic signed [W:0]   out_im,
  output logic signed [W:0]   fb_re,
  output logic signed [W:0]   fb_im,
  output prune_e              cls
);

  logic signed [W:0] x_re, x_im;     // arriving sample, sign-extended
  logic signed [W:0] b_re, b_im;     // after the optional -j
  logic signed [W:0] a_re_g, a_im_g, b_re_g, b_im_g;
  logic              a_zero;
  logic              neg_j;
  prune_e            zcls;

  assign x_re  = {in_re[W-1], in_re};
  assign x_im  = {in_im[W-1], in_im};
  assign neg_j = s & t;

  always_comb begin
    if (neg_j) begin
      b_re = x_im;
      b_im = -x_re;
    end else begin
      b_re = x_re;
      b_im = x_im;
    end
  end

  zero_prune #(.W(W+1)) u_zp (
    .a_re(dl_re), .a_im(dl_im), .b_re(b_re), .b_im(b_im),
    .a_zero(a_zero), .b_zero(), .cls(zcls)
  );

  always_comb begin
    if (s && zcls == PR_NONE) begin
      a_re_g = dl_re;  a_im_g = dl_im;
      b_re_g = b_re;   b_im_g = b_im;
    end else begin
      a_re_g = '0;     a_im_g = '0;
      b_re_g = '0;     b_im_g = '0;
    end

    cls = s ? zcls : PR_NONE;

    if (!s) begin
      out_re = dl_re;  out_im = dl_im;
      fb_re  = b_re;   fb_im  = b_im;
    end else begin
      unique case (zcls)
        PR_FULL: begin
          out_re = '0;  out_im = '0;
          fb_re  = '0;  fb_im  = '0;
        end
        PR_PARTIAL: begin
          if (a_zero) begin
            out_re = b_re;   out_im = b_im;
            fb_re  = -b_re;  fb_im  = -b_im;
          end else begin
            out_re = dl_re;  out_im = dl_im;
            fb_re  = dl_re;  fb_im  = dl_im;
          end
        end
        default: begin
          out_re = a_re_g + b_re_g;  out_im = a_im_g + b_im_g;
          fb_re  = a_re_g - b_re_g;  fb_im  = a_im_g - b_im_g;
        end
      endcase
    end
  end

endmodule
