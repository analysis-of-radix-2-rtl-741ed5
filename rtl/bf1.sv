// bf1: radix-2 butterfly of an SDF stage (butterfly type I).
//
// Combinational. Two operands meet here: dl, the word leaving the stage's
// delay line (the earlier sample x(n)), and in, the sample arriving now
// (x(n+N/2)). The control s selects the mode:
//   s = 0 : the butterfly is idle; the delay line's word goes out
//           (out = dl) and the new sample is fed back into the line
//           (fb = in).
//   s = 1 : out = dl + in goes to the next stage and fb = dl - in goes back
//           into the delay line, to leave the stage DEPTH cycles later.
// The result grows by one bit: inputs W bits, out/fb W+1 bits. dl is W+1
// bits wide because the line also carries differences; while s = 1 it only
// holds first-half samples, which fit W bits, so the sum cannot overflow.
//
// Zero tracing (pruning): a zero_prune instance classifies the operation.
// With both operands zero the outputs are zero; with one operand zero the
// outputs are a copy / negation of the other; only a full butterfly uses the
// adders, whose operands are otherwise held at zero (operand isolation).
// cls reports the class while s = 1 and PR_NONE otherwise.
module bf1
  import fft_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic              s,
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

  logic signed [W:0] b_re, b_im;
  logic signed [W:0] a_re_g, a_im_g, b_re_g, b_im_g;
  logic              a_zero;
  prune_e            zcls;

  assign b_re = {in_re[W-1], in_re};
  assign b_im = {in_im[W-1], in_im};

  zero_prune #(.W(W+1)) u_zp (
    .a_re(dl_re), .a_im(dl_im), .b_re(b_re), .b_im(b_im),
    .a_zero(a_zero), .b_zero(), .cls(zcls)
  );

  always_comb begin
    // operand isolation: the adders only see data for a full butterfly
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
