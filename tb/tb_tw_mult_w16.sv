// tb_tw_mult_w16: self-checking test of the W16 twiddle multiplier.
// A random stream (with gaps in in_valid) passes through the rotator. For
// the o-th valid sample, p = o mod 16 and the factor is W16^e with
// e = p[0]*(p[3] + 2*p[2]). Each output is checked twice:
//  - exactly, against integer arithmetic with the coefficients
//    C = round(cos(2*pi*e/16)*2^14), S = round(sin(2*pi*e/16)*2^14)
//    derived here: re = (xr*C + xi*S), im = (xi*C - xr*S), scaled with
//    round-half-up;
//  - loosely, against x*exp(-j*2*pi*e/16) in real arithmetic.
module tb_tw_mult_w16;
  localparam int W = 20;
  localparam real PI = 3.14159265358979;
  // coefficient quantisation (2^-15) times the input range
  localparam real TOL = 2.0 ** (W - 15) + 1.0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] in_re = 0, in_im = 0;
  logic out_valid;
  logic signed [W:0] out_re, out_im;
  longint xr [$], xi [$];
  int nout = 0, checks = 0, failures = 0, ngaps = 0;
  int seen_m [4] = '{0, 0, 0, 0};

  tw_mult_w16 #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rnd_scale(input longint v);
    return (v + (longint'(1) << 13)) >>> 14;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int p, m, e;
      longint ar, ai, er, ei;
      real rr, ri, ang;
      p = nout % 16;
      m = p[0] ? (p[3] + 2 * p[2]) : 0;
      e = m;
      seen_m[m]++;
      ar = xr[nout]; ai = xi[nout];
      begin
        longint c, s;
        c = longint'($floor($cos(2.0 * PI * e / 16.0) * 16384.0 + 0.5));
        s = longint'($floor($sin(2.0 * PI * e / 16.0) * 16384.0 + 0.5));
        er = rnd_scale(ar * c + ai * s);
        ei = rnd_scale(ai * c - ar * s);
      end
      checks++;
      if (out_re != er || out_im != ei) begin
        failures++;
        $display("out %0d m=%0d: got (%0d,%0d) expected (%0d,%0d)", nout, m, out_re, out_im, er, ei);
      end
      ang = -2.0 * PI * e / 16.0;
      rr = xr[nout] * $cos(ang) - xi[nout] * $sin(ang);
      ri = xr[nout] * $sin(ang) + xi[nout] * $cos(ang);
      checks++;
      if ((out_re - rr) > TOL || (rr - out_re) > TOL || (out_im - ri) > TOL || (ri - out_im) > TOL) begin
        failures++;
        $display("out %0d: (%0d,%0d) far from (%f,%f)", nout, out_re, out_im, rr, ri);
      end
      nout++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 320;) begin
      @(negedge clk);
      if ($urandom_range(0, 4) == 0) begin
        in_valid = 0; ngaps++;
      end else begin
        in_valid = 1;
        in_re = W'($urandom); in_im = W'($urandom);
        if (n < 16) begin   // extremes of the input range
          in_re = n[0] ? {1'b1, {(W-1){1'b0}}} : {1'b0, {(W-1){1'b1}}};
          in_im = n[1] ? {1'b1, {(W-1){1'b0}}} : {1'b0, {(W-1){1'b1}}};
        end
        xr.push_back(in_re); xi.push_back(in_im);
        n++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (nout != 320) begin failures++; $display("%0d outputs", nout); end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (seen_m[m] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
