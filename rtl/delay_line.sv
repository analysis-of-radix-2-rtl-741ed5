// delay_line: feedback shift register of one SDF stage (R1..R15 of the
// 16-point pipeline).
//
// DEPTH complex words of W bits per component. On every cycle with en high
// the word at din enters the first register and every register moves one
// place towards the output; dout is the word that entered DEPTH enabled
// cycles earlier. With en low the contents hold. The registers are not reset:
// the stage that owns the line never uses a word before it has written it.
// The chain of registers is the structure drawn for the design; a RAM-based
// FIFO would do the same job for long lines.
module delay_line #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 8
) (
  input  logic                clk,
  input  logic                en,
  input  logic signed [W-1:0] din_re,
  input  logic signed [W-1:0] din_im,
  output logic signed [W-1:0] dout_re,
  output logic signed [W-1:0] dout_im
);

  logic signed [W-1:0] sr_re [DEPTH];
  logic signed [W-1:0] sr_im [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      sr_re[0] <= din_re;
      sr_im[0] <= din_im;
      for (int i = 1; i < DEPTH; i++) begin
        sr_re[i] <= sr_re[i-1];
        sr_im[i] <= sr_im[i-1];
      end
    end
  end

  assign dout_re = sr_re[DEPTH-1];
  assign dout_im = sr_im[DEPTH-1];

endmodule
