// tb_delay_line: self-checking test of delay_line.
// Pushes random words with a random enable and checks that dout always
// equals the word written DEPTH enabled cycles earlier, and that the
// contents hold while en is low.
module tb_delay_line;
  localparam int W = 12, DEPTH = 8;
  logic clk = 0, en;
  logic signed [W-1:0] din_re, din_im, dout_re, dout_im;
  logic signed [W-1:0] hist_re [$], hist_im [$];
  int checks = 0, failures = 0, nwritten = 0;

  delay_line #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; din_re = 0; din_im = 0;
    @(negedge clk);
    for (int c = 0; c < 400; c++) begin
      en     = ($urandom_range(0, 3) != 0);
      din_re = W'($urandom);
      din_im = W'($urandom);
      @(posedge clk);
      if (en) begin
        hist_re.push_back(din_re); hist_im.push_back(din_im);
        nwritten++;
      end
      @(negedge clk);
      if (nwritten >= DEPTH) begin
        checks++;
        if (dout_re !== hist_re[hist_re.size()-DEPTH] ||
            dout_im !== hist_im[hist_im.size()-DEPTH]) begin
          failures++;
          $display("mismatch at cycle %0d: got %0d,%0d", c, dout_re, dout_im);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
