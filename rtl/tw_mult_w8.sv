// tw_mult_w8: twiddle rotator between the second and third stage of the
// 16-point radix-2^4 pipeline.
//
// The samples leaving stage 2 need the factor W16^(2*m) = W8^m with
// m = n3*(k1 + 2*k2) in 0..3, where, for the position p = 0..15 of a sample
// in its frame, n3 = p[1], k1 = p[3] and k2 = p[2]. The four factors are
// 1, W8 = (1-j)/sqrt(2), -j and W8^3 = -j*W8, so the rotation needs no
// general complex multiplier:
//   m[1] = 1 : multiply by -j (swap re/im, negate the new im)
//   m[0] = 1 : multiply by W8: re' = (re + im)*C8, im' = (im - re)*C8,
//              two multiplications by the real constant C8 = cos(pi/4)
// Products are rounded to nearest (ties up) back to integer scale. A
// counter of valid samples gives p; the stream must start at a frame
// boundary after reset. Output registered, one cycle latency; width grows
// one bit (W -> W+1) because the rotated components can exceed the input
// range by sqrt(2).
module tw_mult_w8
  import fft_pkg::*;
#(
  parameter int unsigned W = 18
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic signed [W:0]   out_re,
  output logic signed [W:0]   out_im
);

  localparam int unsigned PW = W + 2 + TW_W;

  logic [LOG2N-1:0]       pos;
  logic [1:0]             m;
  logic signed [W:0]      x_re, x_im, p_re, p_im;
  logic signed [W+1:0]    sum, dif;
  logic signed [PW-1:0]   prod_re, prod_im;
  logic signed [W:0]      r_re, r_im;

  assign m    = pos[1] ? {pos[2], pos[3]} : 2'd0;
  assign x_re = {in_re[W-1], in_re};
  assign x_im = {in_im[W-1], in_im};

  always_comb begin
    if (m[1]) begin
      p_re = x_im;
      p_im = -x_re;
    end else begin
      p_re = x_re;
      p_im = x_im;
    end
    sum     = {p_re[W], p_re} + {p_im[W], p_im};
    dif     = {p_im[W], p_im} - {p_re[W], p_re};
    prod_re = PW'(sum) * PW'(TW_C8) + (PW'(1) <<< (TW_FRAC - 1));
    prod_im = PW'(dif) * PW'(TW_C8) + (PW'(1) <<< (TW_FRAC - 1));
    if (m[0]) begin
      r_re = prod_re[TW_FRAC +: W+1];
      r_im = prod_im[TW_FRAC +: W+1];
    end else begin
      r_re = p_re;
      r_im = p_im;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos       <= '0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        pos    <= pos + 1'b1;
        out_re <= r_re;
        out_im <= r_im;
      end
    end
  end

endmodule
