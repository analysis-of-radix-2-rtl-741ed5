// tb_zero_prune: checks the zero-tracing classification of zero_prune on
// every combination of zero / non-zero operand components.
module tb_zero_prune;
  import fft_pkg::*;
  localparam int W = 8;
  logic signed [W-1:0] a_re, a_im, b_re, b_im;
  logic a_zero, b_zero;
  prune_e cls, exp_cls;
  int checks = 0, failures = 0;

  zero_prune #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [W-1:0] pick(input bit nz);
    logic signed [W-1:0] v;
    if (!nz) return '0;
    do v = W'($urandom); while (v == 0);
    return v;
  endfunction

  initial begin
    for (int rep = 0; rep < 20; rep++)
      for (int m = 0; m < 16; m++) begin
        a_re = pick(m[0]); a_im = pick(m[1]);
        b_re = pick(m[2]); b_im = pick(m[3]);
        #1;
        begin
          bit az, bz;
          az = (m[1:0] == 0);
          bz = (m[3:2] == 0);
          exp_cls = (az && bz) ? PR_FULL : (az || bz) ? PR_PARTIAL : PR_NONE;
          checks++;
          if (cls !== exp_cls || a_zero !== az || b_zero !== bz) begin
            failures++;
            $display("m=%0d cls=%s expected %s", m, cls.name(), exp_cls.name());
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
