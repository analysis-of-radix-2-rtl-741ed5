// tb_r24sdf_fft16: end-to-end test of the 16-point radix-2^4 SDF FFT at its
// default parameters (16-bit input components).
//
// Frames sent, in this order: 4 gap-free frames (random full-scale, all
// samples at the positive and at the negative limit, an impulse), then
// frames with sparse non-zero samples (zero tracing), then random frames
// with random gaps in in_valid (stalls), then one flush frame. Each output
// bin is compared with a DFT computed here in real arithmetic,
// X(k) = sum_n x(n) exp(-j*2*pi*n*k/16); the tolerance covers the rounding
// of the two twiddle rotators. Also checked: out_k follows the
// bit-reversed order, the first bin leaves 21 cycles after the first
// sample, the gap-free part delivers one bin per cycle, and every stage
// reports full and partial pruning at least once.
module tb_r24sdf_fft16;
  import fft_pkg::*;
  localparam int  W_IN   = 16;
  localparam int  NF     = 24;       // frames checked
  localparam int  NF_GF  = 4;        // gap-free frames at the start
  localparam real PI     = 3.14159265358979;
  localparam real TOL    = 8.0;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W_IN-1:0] in_re = 0, in_im = 0;
  logic out_valid;
  logic signed [W_IN+5:0] out_re, out_im;
  logic [3:0] out_k, prune_full, prune_part;

  int  xr [NF+1][16], xi [NF+1][16];
  real Xr [NF][16], Xi [NF][16];
  int  cyc = 0, first_in = -1, first_out = -1, nout = 0;
  int  checks = 0, failures = 0;
  int  n_stall = 0, n_full [4], n_part [4], run = 0, max_run = 0;
  real max_err = 0.0;

  r24sdf_fft16 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bitrev4(input int p);
    return int'({p[0], p[1], p[2], p[3]});
  endfunction

  task automatic make_frames();
    int lim = (1 << (W_IN - 1)) - 1;
    for (int f = 0; f <= NF; f++)
      for (int n = 0; n < 16; n++) begin
        case (f)
          1:       begin xr[f][n] = lim;      xi[f][n] = lim;      end
          2:       begin xr[f][n] = -lim - 1; xi[f][n] = -lim - 1; end
          3:       begin xr[f][n] = (n == 5) ? 1000 : 0; xi[f][n] = (n == 5) ? -700 : 0; end
          default: begin
            xr[f][n] = int'($urandom_range(0, 2 * lim + 1)) - lim - 1;
            xi[f][n] = int'($urandom_range(0, 2 * lim + 1)) - lim - 1;
          end
        endcase
        // sparse frames: most samples zero
        if (f >= 4 && f < 10 && $urandom_range(0, 2) != 0) begin
          xr[f][n] = 0; xi[f][n] = 0;
        end
        if (f == NF) begin xr[f][n] = 0; xi[f][n] = 0; end
      end
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < 16; k++) begin
        Xr[f][k] = 0.0; Xi[f][k] = 0.0;
        for (int n = 0; n < 16; n++) begin
          real a = -2.0 * PI * ((n * k) % 16) / 16.0;
          Xr[f][k] += xr[f][n] * $cos(a) - xi[f][n] * $sin(a);
          Xi[f][k] += xr[f][n] * $sin(a) + xi[f][n] * $cos(a);
        end
      end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int s = 0; s < 4; s++) begin
        if (prune_full[s]) n_full[s]++;
        if (prune_part[s]) n_part[s]++;
      end
      if (out_valid) begin
        run++;
        if (run > max_run) max_run = run;
      end else run = 0;
      if (out_valid && nout < NF * 16) begin
        int f, p, k;
        real er, ei;
        f = nout / 16; p = nout % 16; k = bitrev4(p);
        if (first_out < 0) first_out = cyc;
        checks++;
        if (int'(out_k) != k) begin
          failures++;
          $display("output %0d: out_k=%0d expected %0d", nout, out_k, k);
        end
        er = real'(out_re) - Xr[f][k];
        ei = real'(out_im) - Xi[f][k];
        if (er < 0) er = -er;
        if (ei < 0) ei = -ei;
        if (er > max_err) max_err = er;
        if (ei > max_err) max_err = ei;
        checks++;
        if (er > TOL || ei > TOL) begin
          failures++;
          $display("frame %0d X(%0d): got (%0d,%0d) expected (%f,%f)",
                   f, k, out_re, out_im, Xr[f][k], Xi[f][k]);
        end
        nout++;
      end
    end
  end

  initial begin
    for (int s = 0; s < 4; s++) begin n_full[s] = 0; n_part[s] = 0; end
    make_frames();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f <= NF; f++)
      for (int n = 0; n < 16;) begin
        @(negedge clk);
        if (f >= NF_GF + 6 && f < NF && $urandom_range(0, 3) == 0) begin
          in_valid = 0;
          n_stall++;
        end else begin
          in_valid = 1;
          in_re = W_IN'(xr[f][n]);
          in_im = W_IN'(xi[f][n]);
          if (first_in < 0) first_in = cyc;
          n++;
        end
      end
    @(negedge clk) in_valid = 0;
    repeat (30) @(posedge clk);

    checks++;
    if (nout != NF * 16) begin failures++; $display("only %0d outputs", nout); end
    checks++;
    if (first_out - first_in != 21) begin
      failures++; $display("latency %0d cycles, expected 21", first_out - first_in);
    end
    // gap-free frames: one bin per clock once the pipeline is full
    checks++;
    if (max_run < 16 * NF_GF) begin failures++; $display("longest output burst %0d", max_run); end
    checks++;
    if (n_stall == 0) begin failures++; $display("no stall happened"); end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (n_full[s] == 0) begin failures++; $display("stage %0d: no full pruning", s + 1); end
      checks++;
      if (n_part[s] == 0) begin failures++; $display("stage %0d: no partial pruning", s + 1); end
    end
    $display("latency=%0d stalls=%0d burst=%0d max_err=%f", first_out - first_in, n_stall, max_run, max_err);
    for (int s = 0; s < 4; s++)
      $display("stage %0d pruning: full=%0d partial=%0d", s + 1, n_full[s], n_part[s]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
