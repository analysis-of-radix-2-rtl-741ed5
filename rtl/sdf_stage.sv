// sdf_stage: one single-path delay-feedback (SDF) stage.
//
// A stage is a feedback mux, a delay line of DELAY complex words and a
// butterfly (bf1 or bf2, chosen by BF_TYPE), run by a counter of the
// samples that have entered the stage. Per frame of 2*DELAY samples:
//   first DELAY samples  (s = 0): the arriving samples are stored in the
//       delay line; the stage sends on the differences left in the line by
//       the previous frame.
//   last DELAY samples   (s = 1): each arriving sample x(n+DELAY) meets
//       x(n) leaving the line; the sum goes to the next stage and the
//       difference goes back into the line.
// For a type II stage the counter bit above s is t: it marks the half of
// the 4*DELAY-sample group whose second-half samples are multiplied by -j.
//
// Interface: samples are qualified by in_valid; the stage advances only on
// valid samples, so gaps in the stream simply pause it. The first frame's
// s = 0 outputs come from an empty line and are not flagged valid; from
// then on every valid input produces a valid output. Outputs are
// registered: one cycle after the butterfly. Data grow one bit (W -> W+1).
// bf_cls is the zero-tracing class of the butterfly operation done in the
// cycle that produced the current output (PR_NONE when the butterfly was
// idle). Reset (asynchronous, active low) clears the counter, the valid
// flag and the output register; the delay line is not reset.
module sdf_stage
  import fft_pkg::*;
#(
  parameter int unsigned W       = 16,
  parameter int unsigned DELAY   = 8,
  parameter bf_type_e    BF_TYPE = BF_TYPE_I
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic signed [W:0]   out_re,
  output logic signed [W:0]   out_im,
  output logic                bf_active,
  output prune_e              bf_cls
);

  localparam int unsigned SB   = $clog2(DELAY);
  localparam int unsigned CNTW = SB + ((BF_TYPE == BF_TYPE_II) ? 2 : 1);

  logic [CNTW-1:0]   cnt;
  logic              s, primed;
  logic signed [W:0] dl_re, dl_im, bo_re, bo_im, fb_re, fb_im;
  prune_e            cls;

  assign s = cnt[SB];

  delay_line #(.W(W+1), .DEPTH(DELAY)) u_dl (
    .clk(clk), .en(in_valid),
    .din_re(fb_re), .din_im(fb_im),
    .dout_re(dl_re), .dout_im(dl_im)
  );

  if (BF_TYPE == BF_TYPE_II) begin : g_bf2
    bf2 #(.W(W)) u_bf (
      .s(s), .t(cnt[SB+1]),
      .in_re(in_re), .in_im(in_im), .dl_re(dl_re), .dl_im(dl_im),
      .out_re(bo_re), .out_im(bo_im), .fb_re(fb_re), .fb_im(fb_im),
      .cls(cls)
    );
  end else begin : g_bf1
    bf1 #(.W(W)) u_bf (
      .s(s),
      .in_re(in_re), .in_im(in_im), .dl_re(dl_re), .dl_im(dl_im),
      .out_re(bo_re), .out_im(bo_im), .fb_re(fb_re), .fb_im(fb_im),
      .cls(cls)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      primed    <= 1'b0;
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      bf_active <= 1'b0;
      bf_cls    <= PR_NONE;
    end else begin
      out_valid <= in_valid & (s | primed);
      bf_active <= in_valid & s;
      bf_cls    <= in_valid ? cls : PR_NONE;
      if (in_valid) begin
        cnt    <= cnt + 1'b1;
        out_re <= bo_re;
        out_im <= bo_im;
        if (s) primed <= 1'b1;
      end
    end
  end

  // A pruning class is only reported for a cycle in which the butterfly
  // computed, and a valid output always follows a valid input.
  a_cls_only_when_active: assert property (
    @(posedge clk) disable iff (!rst_n) (bf_cls != PR_NONE) |-> bf_active);
  a_out_follows_in: assert property (
    @(posedge clk) disable iff (!rst_n) out_valid |-> $past(in_valid));

endmodule
