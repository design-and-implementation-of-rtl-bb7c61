// r2_butterfly: radix-2 decimation-in-time butterfly.
//
// Following the DIT butterfly, the lower operand is multiplied by the twiddle
// first and then added to and subtracted from the upper one:
//   t = W16^e * bot,  y_top = top + t,  y_bot = top - t.
// These are the equations X(k) = G1(k) + W_N^k F2(k) and
// X(k+N/2) = G1(k) - W_N^k F2(k) of the radix-2 algorithm. An 8-point
// transform uses W8^k = W16^(2k), i.e. e = 2k. The twiddle product comes from
// twiddle_mult (trivial twiddles bypass the multipliers).
//
// Interface: e, top and bot (re/im) in, y_top and y_bot out, all W bits wide;
// the results wrap on overflow, so the caller provides one bit of headroom
// per stage. Timing: purely combinational.
module r2_butterfly
  import fft_pkg::*;
#(
  parameter int unsigned W    = DATA_W_DEF + 4,
  parameter int unsigned TW_W = TW_W_DEF
) (
  input  logic [3:0]          e,
  input  logic signed [W-1:0] top_re,
  input  logic signed [W-1:0] top_im,
  input  logic signed [W-1:0] bot_re,
  input  logic signed [W-1:0] bot_im,
  output logic signed [W-1:0] y_top_re,
  output logic signed [W-1:0] y_top_im,
  output logic signed [W-1:0] y_bot_re,
  output logic signed [W-1:0] y_bot_im,
  output logic                bypass
);

  logic signed [W-1:0] t_re, t_im;

  twiddle_mult #(.W(W), .TW_W(TW_W)) u_tw (
    .e(e), .x_re(bot_re), .x_im(bot_im), .y_re(t_re), .y_im(t_im), .bypass(bypass)
  );

  always_comb begin
    y_top_re = top_re + t_re;
    y_top_im = top_im + t_im;
    y_bot_re = top_re - t_re;
    y_bot_im = top_im - t_im;
  end

endmodule
