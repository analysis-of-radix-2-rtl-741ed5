// tb_sdf_stage: self-checking test of sdf_stage, one type I stage with an
// 8-word delay line and one type II stage with a 4-word delay line, fed
// the same random stream with random gaps in in_valid.
// Reference: per group of 2*D valid samples x[0..2D-1] the stage must emit
// x[r] + y[r] for r < D, then x[r] - y[r], where y[r] = x[r+D], times -j
// for a type II stage in every odd group. Also checks the latency of the
// first output (D+1 cycles after the first sample of a gap-free start).
module tb_sdf_stage;
  import fft_pkg::*;
  localparam int W = 12, NS = 400;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] in_re = 0, in_im = 0;
  logic ov1, ov2, act1, act2;
  logic signed [W:0] o1_re, o1_im, o2_re, o2_im;
  prune_e cls1, cls2;
  int xr [NS], xi [NS];
  int nin = 0, nout1 = 0, nout2 = 0, cyc = 0, first_in = -1;
  int first_out1 = -1, first_out2 = -1, ngaps = 0;
  int checks = 0, failures = 0;

  sdf_stage #(.W(W), .DELAY(8), .BF_TYPE(BF_TYPE_I)) u1 (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(ov1), .out_re(o1_re), .out_im(o1_im), .bf_active(act1), .bf_cls(cls1));
  sdf_stage #(.W(W), .DELAY(4), .BF_TYPE(BF_TYPE_II)) u2 (
    .clk, .rst_n, .in_valid, .in_re, .in_im,
    .out_valid(ov2), .out_re(o2_re), .out_im(o2_im), .bf_active(act2), .bf_cls(cls2));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected o-th output of a stage with delay d
  task automatic expect_out(input int o, input int d, input bit type2,
                            output int er, output int ei);
    int g = o / (2*d), r = o % (2*d), base = g * 2 * d;
    int ar, ai, br, bi;
    if (r < d) begin ar = xr[base+r];   ai = xi[base+r];   br = xr[base+r+d]; bi = xi[base+r+d]; end
    else       begin ar = xr[base+r-d]; ai = xi[base+r-d]; br = xr[base+r];   bi = xi[base+r];   end
    if (type2 && g[0]) begin int tmp; tmp = br; br = bi; bi = -tmp; end
    if (r < d) begin er = ar + br; ei = ai + bi; end
    else       begin er = ar - br; ei = ai - bi; end
  endtask

  always @(posedge clk) begin
    int er, ei;
    cyc <= cyc + 1;
    if (rst_n && ov1) begin
      if (first_out1 < 0) first_out1 = cyc;
      expect_out(nout1, 8, 1'b0, er, ei);
      checks++;
      if (o1_re != er || o1_im != ei) begin
        failures++;
        $display("stage I out %0d: got (%0d,%0d) expected (%0d,%0d)", nout1, o1_re, o1_im, er, ei);
      end
      nout1++;
    end
    if (rst_n && ov2) begin
      if (first_out2 < 0) first_out2 = cyc;
      expect_out(nout2, 4, 1'b1, er, ei);
      checks++;
      if (o2_re != er || o2_im != ei) begin
        failures++;
        $display("stage II out %0d: got (%0d,%0d) expected (%0d,%0d)", nout2, o2_re, o2_im, er, ei);
      end
      nout2++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (nin < NS) begin
      @(negedge clk);
      if (nin > 32 && $urandom_range(0, 4) == 0) begin
        in_valid = 0;
        ngaps++;
      end else begin
        in_valid = 1;
        xr[nin] = $signed(W'($urandom));
        xi[nin] = $signed(W'($urandom));
        if (nin % 7 == 3) begin xr[nin] = 0; xi[nin] = 0; end
        in_re = W'(xr[nin]);
        in_im = W'(xi[nin]);
        if (first_in < 0) first_in = cyc;
        nin++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (5) @(posedge clk);
    // all but the last, incomplete difference half have come out
    checks++;
    if (nout1 != NS - 8) begin failures++; $display("stage I produced %0d outputs", nout1); end
    checks++;
    if (nout2 != NS - 4) begin failures++; $display("stage II produced %0d outputs", nout2); end
    // latency of a gap-free start: first output D+1 cycles after first input
    checks++;
    if (first_out1 - first_in != 9) begin failures++; $display("stage I latency %0d", first_out1 - first_in); end
    checks++;
    if (first_out2 - first_in != 5) begin failures++; $display("stage II latency %0d", first_out2 - first_in); end
    checks++;
    if (ngaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
