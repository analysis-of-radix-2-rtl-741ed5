// tb_bf2: self-checking test of the type II butterfly.
// Random operands (with zeros mixed in to exercise all pruning classes);
// expected values are computed here from the butterfly equations, with
// in' = in * (-j) = (in_im, -in_re) when s and t are high, else in' = in:
// s=0: out=dl, fb=in; s=1: out=dl+in', fb=dl-in'.
module tb_bf2;
  import fft_pkg::*;
  localparam int W = 10;
  logic s, t;
  int n_negj = 0;
  logic signed [W-1:0] in_re, in_im;
  logic signed [W:0]   dl_re, dl_im, out_re, out_im, fb_re, fb_im;
  prune_e cls;
  int checks = 0, failures = 0;
  int n_cls [3] = '{0, 0, 0};

  bf2 #(.W(W)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rnd(input int bits, input bit zero);
    if (zero) return 0;
    return int'($urandom_range(0, (1 << bits) - 1)) - (1 << (bits - 1));
  endfunction

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int a_r, a_i, b_r, b_i, eo_r, eo_i, ef_r, ef_i;
      bit za, zb;
      za = ($urandom_range(0, 3) == 0);
      zb = ($urandom_range(0, 3) == 0);
      s = 1'($urandom);
      t = 1'($urandom);
      // while s=1 the delay line holds first-half samples (W bits)
      a_r = s ? rnd(W, za) : rnd(W+1, za);
      a_i = s ? rnd(W, za) : rnd(W+1, za);
      b_r = rnd(W, zb); b_i = rnd(W, zb);
      dl_re = (W+1)'(a_r); dl_im = (W+1)'(a_i);
      in_re = W'(b_r);     in_im = W'(b_i);
      #1;
      if (s && t) begin int tmp; tmp = b_r; b_r = b_i; b_i = -tmp; n_negj++; end
      if (s) begin eo_r = a_r + b_r; eo_i = a_i + b_i; ef_r = a_r - b_r; ef_i = a_i - b_i; end
      else   begin eo_r = a_r; eo_i = a_i; ef_r = b_r; ef_i = b_i; end
      checks++;
      if (out_re != eo_r || out_im != eo_i || fb_re != ef_r || fb_im != ef_i) begin
        failures++;
        $display("s=%0d a=(%0d,%0d) b=(%0d,%0d): out=(%0d,%0d) fb=(%0d,%0d)",
                 s, a_r, a_i, b_r, b_i, out_re, out_im, fb_re, fb_im);
      end
      checks++;
      if (!s && cls != PR_NONE) failures++;
      if (s) n_cls[int'(cls)]++;
    end
    for (int c = 0; c < 3; c++) begin
      checks++;
      if (n_cls[c] == 0) begin failures++; $display("pruning class %0d never seen", c); end
    end
    checks++;
    if (n_negj == 0) failures++;
    $display("classes none=%0d partial=%0d full=%0d", n_cls[0], n_cls[1], n_cls[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
