// twiddle_rom: first-quadrant twiddle constants of a 16-point FFT.
//
// Returns cos and sin of 2*pi*r/16 for r = 0..3. Only three distinct numbers
// are held (cos(pi/8), sin(pi/8), cos(pi/4)); r = 3 reuses the r = 1 pair with
// cos and sin exchanged, and r = 0 is flagged as trivial so that the caller
// can skip its multipliers. Keeping a few precomputed constants in place of a
// full twiddle table follows the specification's idea of storing repeated
// precomputed values; the fixed-point format (scale 2^(TW_W-2), round to
// nearest) is this design's choice.
//
// Interface: r selects the angle; cos_o/sin_o are signed TW_W-bit words.
// Timing: purely combinational.
module twiddle_rom
  import fft_pkg::*;
#(
  parameter int unsigned TW_W = TW_W_DEF
) (
  input  logic [1:0]             r,
  output logic signed [TW_W-1:0] cos_o,
  output logic signed [TW_W-1:0] sin_o,
  output logic                   trivial
);

  localparam logic signed [TW_W-1:0] ONE = TW_W'(1 << (TW_W - 2));
  localparam logic signed [TW_W-1:0] C1  = TW_W'(tw_const(COS_PI_8, TW_W));
  localparam logic signed [TW_W-1:0] S1  = TW_W'(tw_const(SIN_PI_8, TW_W));
  localparam logic signed [TW_W-1:0] C2  = TW_W'(tw_const(COS_PI_4, TW_W));

  always_comb begin
    trivial = 1'b0;
    unique case (r)
      2'd0: begin cos_o = ONE; sin_o = '0; trivial = 1'b1; end
      2'd1: begin cos_o = C1;  sin_o = S1; end
      2'd2: begin cos_o = C2;  sin_o = C2; end
      2'd3: begin cos_o = S1;  sin_o = C1; end
    endcase
  end

endmodule
