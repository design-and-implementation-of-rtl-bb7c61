// fft_pkg: constants and types shared by the 16-point radix-4 and the
// 8-point radix-2 FFT processors.
//
// The twiddle constants are the only three distinct non-trivial magnitudes
// of the 16th roots of unity, cos(pi/8), sin(pi/8) and cos(pi/4). Every other
// twiddle W16^e is one of these pairs rotated by a multiple of -j, so the
// design stores three numbers and derives the rest by swapping and negating.
// Constants are scaled by 2^(TW_W-2) (two integer bits, one of them the sign)
// and rounded to nearest: value = floor(c * 2^(TW_W-2) + 0.5).
// The FSM state encoding of the radix-4 controller is this design's choice.
package fft_pkg;

  // Default word widths (not given by the specification this design follows).
  localparam int unsigned DATA_W_DEF = 16;  // input sample width
  localparam int unsigned TW_W_DEF   = 16;  // twiddle constant width

  localparam real COS_PI_8 = 0.9238795325112867;  // cos(pi/8)
  localparam real SIN_PI_8 = 0.3826834323650898;  // sin(pi/8)
  localparam real COS_PI_4 = 0.7071067811865476;  // cos(pi/4) = sin(pi/4)

  // Fixed-point twiddle constant of width tw_w, scaled by 2^(tw_w-2).
  function automatic int tw_const(input real c, input int tw_w);
    return $rtoi(c * (2.0 ** (tw_w - 2)) + 0.5);
  endfunction

  // States of the radix-4 processor's controller.
  typedef enum logic [2:0] {
    ST_LOAD   = 3'd0,  // idle / accepting input samples
    ST_STAGE1 = 3'd1,  // issuing the four column butterflies (with twiddles)
    ST_DRAIN1 = 3'd2,  // waiting for the last stage-1 write-back
    ST_STAGE2 = 3'd3,  // issuing the four row butterflies
    ST_DRAIN2 = 3'd4,  // waiting for the last stage-2 write-back
    ST_OUTPUT = 3'd5   // streaming X(0)..X(15)
  } r4_state_e;

endpackage
