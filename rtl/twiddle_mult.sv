// twiddle_mult: multiply a complex word by the twiddle factor W16^e.
//
// W16^e = exp(-j*2*pi*e/16) is split as (-j)^q * W16^r with q = e[3:2] and
// r = e[1:0]. The W16^r part uses the constants of twiddle_rom:
//   (xr + j*xi) * (c - j*s) = (xr*c + xi*s) + j*(xi*c - xr*s),
// each sum rounded to nearest and shifted back by TW_W-2 bits. When r = 0 the
// multipliers are bypassed and x passes exactly. The (-j)^q part is applied
// afterwards by swapping and negating (-j*(a+jb) = b - j*a), so only three
// of the sixteen twiddles need real multiplications. Skipping the
// multiplications for trivial twiddles follows the specification's aim of
// fewer multiplications; the split, rounding and widths are this design's.
//
// Interface: e is the exponent, x_re/x_im the operand, y_re/y_im the product
// (same width W, wrapping if the caller gives no headroom), bypass tells that
// no real multiplication was needed. Timing: purely combinational.
module twiddle_mult
  import fft_pkg::*;
#(
  parameter int unsigned W    = DATA_W_DEF + 5,
  parameter int unsigned TW_W = TW_W_DEF
) (
  input  logic [3:0]          e,
  input  logic signed [W-1:0] x_re,
  input  logic signed [W-1:0] x_im,
  output logic signed [W-1:0] y_re,
  output logic signed [W-1:0] y_im,
  output logic                bypass
);

  localparam int unsigned FRAC = TW_W - 2;
  localparam int unsigned PW   = W + TW_W + 1;

  logic signed [TW_W-1:0] c, s;
  logic signed [PW-1:0]   p_re, p_im;
  logic signed [W-1:0]    m_re, m_im;

  twiddle_rom #(.TW_W(TW_W)) u_rom (
    .r(e[1:0]), .cos_o(c), .sin_o(s), .trivial(bypass)
  );

  always_comb begin
    p_re = PW'(x_re) * PW'(c) + PW'(x_im) * PW'(s) + PW'(1 << (FRAC - 1));
    p_im = PW'(x_im) * PW'(c) - PW'(x_re) * PW'(s) + PW'(1 << (FRAC - 1));
    if (bypass) begin
      m_re = x_re;
      m_im = x_im;
    end else begin
      m_re = W'(p_re >>> FRAC);
      m_im = W'(p_im >>> FRAC);
    end
    unique case (e[3:2])
      2'd0: begin y_re =  m_re; y_im =  m_im; end  // * 1
      2'd1: begin y_re =  m_im; y_im = -m_re; end  // * -j
      2'd2: begin y_re = -m_re; y_im = -m_im; end  // * -1
      2'd3: begin y_re = -m_im; y_im =  m_re; end  // * +j
    endcase
  end

endmodule
