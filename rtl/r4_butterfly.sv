// r4_butterfly: radix-4 (4-point DFT) butterfly with a registered partial-sum level.
//
// For operands a, b, c, d (x(m), m = 0..3) the 4-point DFT is
//   y0 = (a+c) + (b+d)        y2 = (a+c) - (b+d)
//   y1 = (a-c) - j*(b-d)      y3 = (a-c) + j*(b-d)
// The four partial sums a+c, a-c, b+d, b-d each feed two outputs, so they are
// computed once in the first clock and held in a register; the second level
// combines them. Multiplication by -j or +j is a swap of real and imaginary
// parts with one negation, so the butterfly has no multipliers and uses 8
// complex additions instead of 12. Reusing stored partial results follows the
// specification; the one-clock register split is this design's choice.
//
// Interface: in_valid with a/b/c/d (re/im arrays, index 0..3 = a..d); one
// clock later out_valid with y[0..3]. Outputs have the input width W and wrap
// on overflow, so the caller must provide headroom (2 bits per butterfly).
// Timing: latency 1 clock, one butterfly accepted every clock.
module r4_butterfly
  import fft_pkg::*;
#(
  parameter int unsigned W = DATA_W_DEF + 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x_re [4],
  input  logic signed [W-1:0] x_im [4],
  output logic                out_valid,
  output logic signed [W-1:0] y_re [4],
  output logic signed [W-1:0] y_im [4]
);

  // Stored partial sums: 0 = a+c, 1 = a-c, 2 = b+d, 3 = b-d.
  logic signed [W-1:0] s_re [4];
  logic signed [W-1:0] s_im [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int i = 0; i < 4; i++) begin
        s_re[i] <= '0;
        s_im[i] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        s_re[0] <= x_re[0] + x_re[2];
        s_im[0] <= x_im[0] + x_im[2];
        s_re[1] <= x_re[0] - x_re[2];
        s_im[1] <= x_im[0] - x_im[2];
        s_re[2] <= x_re[1] + x_re[3];
        s_im[2] <= x_im[1] + x_im[3];
        s_re[3] <= x_re[1] - x_re[3];
        s_im[3] <= x_im[1] - x_im[3];
      end
    end
  end

  always_comb begin
    y_re[0] = s_re[0] + s_re[2];
    y_im[0] = s_im[0] + s_im[2];
    y_re[2] = s_re[0] - s_re[2];
    y_im[2] = s_im[0] - s_im[2];
    // -j*(b-d) = im(b-d) - j*re(b-d)
    y_re[1] = s_re[1] + s_im[3];
    y_im[1] = s_im[1] - s_re[3];
    // +j*(b-d) = -im(b-d) + j*re(b-d)
    y_re[3] = s_re[1] - s_im[3];
    y_im[3] = s_im[1] + s_re[3];
  end

endmodule
