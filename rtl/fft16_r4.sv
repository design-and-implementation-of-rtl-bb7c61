// fft16_r4: 16-point radix-4 FFT processor.
//
// Computes X(k) = sum_n x(n) W16^(nk) by the two-level decomposition
// N = L*M with L = M = 4, n = l + 4m and k = 4p + q:
//   F(l,q) = sum_m x(l,m) W4^(mq)       (stage 1: one 4-point DFT per l)
//   G(l,q) = W16^(l*q) F(l,q)           (twiddle, stage 1 write-back)
//   X(p,q) = sum_l G(l,q) W4^(lp)       (stage 2: one 4-point DFT per q)
// This decomposition and the 16-point radix-4 size follow the specification.
// The architecture is this design's: a 16-word complex register memory, one
// r4_butterfly issued once per clock, three twiddle_mult units on butterfly
// outputs 1..3 (output 0 always has twiddle 1), and fft16_r4_ctrl.
// Stage 1 butterfly l reads and writes addresses l+4m (m = 0..3); stage 2
// butterfly q reads and writes 4q+l. The results sit in place at address
// 4q+p for bin 4p+q, so unloading swaps the two base-4 digits of k.
//
// Interface: in_valid/in_ready handshake with in_re/in_im (x(0) first). After
// the 16th sample the core computes and then presents X(0)..X(15) on
// out_re/out_im with out_valid and out_idx, one bin per clock, with no
// back-pressure. Outputs are DATA_W+5 bits and unscaled, which is enough for
// any input, so no overflow can occur.
// Timing: the first bin appears 12 clocks after the clock that accepts the
// 16th sample; a transform occupies 16 + 10 + 16 clocks.
module fft16_r4
  import fft_pkg::*;
#(
  parameter int unsigned DATA_W = DATA_W_DEF,
  parameter int unsigned TW_W   = TW_W_DEF,
  localparam int unsigned W     = DATA_W + 5
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_re,
  input  logic signed [DATA_W-1:0] in_im,
  output logic                     out_valid,
  output logic [3:0]               out_idx,
  output logic signed [W-1:0]      out_re,
  output logic signed [W-1:0]      out_im,
  output logic                     busy
);

  logic signed [W-1:0] mem_re [16];
  logic signed [W-1:0] mem_im [16];

  // Controller
  logic       load_we, bf_issue, bf_stage, rd_valid;
  logic [3:0] load_addr, out_k;
  logic [1:0] bf_idx;
  r4_state_e  ctrl_state;  // observation only

  fft16_r4_ctrl u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .load_we, .load_addr,
    .bf_issue, .bf_stage, .bf_idx, .out_valid(rd_valid), .out_k, .busy, .state(ctrl_state)
  );

  // Operand address i of a butterfly: stage 1 -> 4*i + idx, stage 2 -> 4*idx + i.
  function automatic logic [3:0] bf_addr(input logic stage, input logic [1:0] idx,
                                          input logic [1:0] i);
    return stage ? {idx, i} : {i, idx};
  endfunction

  // Butterfly read
  logic signed [W-1:0] op_re [4], op_im [4];
  always_comb
    for (int i = 0; i < 4; i++) begin
      op_re[i] = mem_re[bf_addr(bf_stage, bf_idx, 2'(i))];
      op_im[i] = mem_im[bf_addr(bf_stage, bf_idx, 2'(i))];
    end

  logic                bf_valid;
  logic signed [W-1:0] bf_re [4], bf_im [4];

  r4_butterfly #(.W(W)) u_bf (
    .clk, .rst_n, .in_valid(bf_issue), .x_re(op_re), .x_im(op_im),
    .out_valid(bf_valid), .y_re(bf_re), .y_im(bf_im)
  );

  // Stage and index of the butterfly whose results are being written back.
  logic       wb_stage;
  logic [1:0] wb_idx;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wb_stage <= 1'b0;
      wb_idx   <= '0;
    end else if (bf_issue) begin
      wb_stage <= bf_stage;
      wb_idx   <= bf_idx;
    end

  // Twiddles W16^(l*q) on outputs q = 1..3 in stage 1, none in stage 2.
  logic signed [W-1:0] wb_re [4], wb_im [4];
  logic [3:1]          tw_bypass;
  assign wb_re[0] = bf_re[0];
  assign wb_im[0] = bf_im[0];
  for (genvar q = 1; q < 4; q++) begin : g_tw
    logic [3:0] e;
    assign e = wb_stage ? 4'd0 : 4'(wb_idx * q);
    twiddle_mult #(.W(W), .TW_W(TW_W)) u_tw (
      .e(e), .x_re(bf_re[q]), .x_im(bf_im[q]),
      .y_re(wb_re[q]), .y_im(wb_im[q]), .bypass(tw_bypass[q])
    );
  end

  // Register memory: serial load and in-place butterfly write-back.
  always_ff @(posedge clk) begin
    if (load_we) begin
      mem_re[load_addr] <= W'(in_re);
      mem_im[load_addr] <= W'(in_im);
    end
    if (bf_valid)
      for (int j = 0; j < 4; j++) begin
        mem_re[bf_addr(wb_stage, wb_idx, 2'(j))] <= wb_re[j];
        mem_im[bf_addr(wb_stage, wb_idx, 2'(j))] <= wb_im[j];
      end
  end

  // Unload in natural order: bin k = 4p+q lives at address 4q+p.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= rd_valid;
      if (rd_valid) begin
        out_idx <= out_k;
        out_re  <= mem_re[{out_k[1:0], out_k[3:2]}];
        out_im  <= mem_im[{out_k[1:0], out_k[3:2]}];
      end
    end

  // A load never collides with a write-back.
  a_no_load_during_wb: assert property (@(posedge clk) disable iff (!rst_n)
    !(load_we && bf_valid));

endmodule
