// fft_top: the two FFT processors, side by side.
//
// u_r4 is the 16-point radix-4 FFT processor, the main design: a register
// memory, one radix-4 butterfly with stored partial sums and twiddles built
// from three stored constants. u_r2 is the 8-point radix-2 DIT FFT processor,
// a separate, smaller chip. The two share no logic and no ports apart from
// clock and reset; each has its own serial sample input (valid/ready) and
// serial bin output (valid, index, real, imaginary). That both exist follows
// the specification; the interfaces and widths are this design's choice.
//
// Timing: see fft16_r4 (first bin 12 clocks after the 16th sample) and
// fft8_r2 (first bin 14 clocks after the 8th sample). The specification's
// clock is 40 MHz.
module fft_top
  import fft_pkg::*;
#(
  parameter int unsigned DATA_W = DATA_W_DEF,
  parameter int unsigned TW_W   = TW_W_DEF
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // 16-point radix-4 FFT
  input  logic                      r4_in_valid,
  output logic                      r4_in_ready,
  input  logic signed [DATA_W-1:0]  r4_in_re,
  input  logic signed [DATA_W-1:0]  r4_in_im,
  output logic                      r4_out_valid,
  output logic [3:0]                r4_out_idx,
  output logic signed [DATA_W+4:0]  r4_out_re,
  output logic signed [DATA_W+4:0]  r4_out_im,
  output logic                      r4_busy,
  // 8-point radix-2 FFT
  input  logic                      r2_in_valid,
  output logic                      r2_in_ready,
  input  logic signed [DATA_W-1:0]  r2_in_re,
  input  logic signed [DATA_W-1:0]  r2_in_im,
  output logic                      r2_out_valid,
  output logic [2:0]                r2_out_idx,
  output logic signed [DATA_W+3:0]  r2_out_re,
  output logic signed [DATA_W+3:0]  r2_out_im,
  output logic                      r2_busy
);

  fft16_r4 #(.DATA_W(DATA_W), .TW_W(TW_W)) u_r4 (
    .clk, .rst_n,
    .in_valid(r4_in_valid), .in_ready(r4_in_ready), .in_re(r4_in_re), .in_im(r4_in_im),
    .out_valid(r4_out_valid), .out_idx(r4_out_idx), .out_re(r4_out_re), .out_im(r4_out_im),
    .busy(r4_busy)
  );

  fft8_r2 #(.DATA_W(DATA_W), .TW_W(TW_W)) u_r2 (
    .clk, .rst_n,
    .in_valid(r2_in_valid), .in_ready(r2_in_ready), .in_re(r2_in_re), .in_im(r2_in_im),
    .out_valid(r2_out_valid), .out_idx(r2_out_idx), .out_re(r2_out_re), .out_im(r2_out_im),
    .busy(r2_busy)
  );

endmodule
