// tw_mult_w16: twiddle multiplier between the third and fourth stage of the
// 16-point radix-2^4 pipeline.
//
// The samples leaving stage 3 need the factor W16^m with
// m = n4*(k1 + 2*k2) in 0..3, where, for the position p = 0..15 of a sample
// in its frame, n4 = p[0], k1 = p[3] and k2 = p[2]. W16^m = C - jS with
// (C, S) taken from a four-entry table of constants:
//   m=0: (1, 0)   m=1: (cos pi/8, sin pi/8)
//   m=2: (cos pi/4, cos pi/4)   m=3: (sin pi/8, cos pi/8)
// and (re + j*im)(C - jS) = (re*C + im*S) + j(im*C - re*S): a complex
// multiplication by a constant, four real products. The constant 1.0 is
// exact in the coefficient format, so m = 0 passes samples unchanged.
// Products are rounded to nearest (ties up). A counter of valid samples
// gives p; the stream must start at a frame boundary after reset. Output
// registered, one cycle latency; width grows one bit (W -> W+1).
module tw_mult_w16
  import fft_pkg::*;
#(
  parameter int unsigned W = 20
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

  localparam int unsigned PW = W + TW_W + 1;

  logic [LOG2N-1:0]        pos;
  logic [1:0]              m;
  logic signed [TW_W-1:0]  c, s;
  logic signed [PW-1:0]    acc_re, acc_im;

  assign m = pos[0] ? {pos[2], pos[3]} : 2'd0;

  always_comb begin
    unique case (m)
      2'd0:    begin c = TW_ONE; s = '0;     end
      2'd1:    begin c = TW_C16; s = TW_S16; end
      2'd2:    begin c = TW_C8;  s = TW_C8;  end
      default: begin c = TW_S16; s = TW_C16; end
    endcase
    acc_re = PW'(in_re) * PW'(c) + PW'(in_im) * PW'(s) + (PW'(1) <<< (TW_FRAC - 1));
    acc_im = PW'(in_im) * PW'(c) - PW'(in_re) * PW'(s) + (PW'(1) <<< (TW_FRAC - 1));
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
        out_re <= acc_re[TW_FRAC +: W+1];
        out_im <= acc_im[TW_FRAC +: W+1];
      end
    end
  end

endmodule
