// fft8_r2: 8-point radix-2 decimation-in-time FFT processor.
//
// The DIT algorithm splits x(n) into even and odd samples, recursively, down
// to 2-point DFTs, and recombines with X(k) = G1(k) + W8^k G2(k) and
// X(k+4) = G1(k) - W8^k G2(k). This design runs it in place on an 8-word
// complex register memory with one r2_butterfly per clock:
//   - loading writes sample n to address bitrev(n), so the recombination
//     stages read neighbouring groups;
//   - stage s (s = 0, 1, 2) has span 2^s; butterfly j (0..3) uses
//     pos = j mod 2^s, top = (j div 2^s) * 2^(s+1) + pos, bot = top + 2^s and
//     twiddle W8^(pos * 4/2^s) (= W16^e with e twice that exponent);
//   - the memory then holds X(k) at address k, read out in natural order.
// The radix-2 DIT algorithm and the 8-point size follow the specification;
// the single-butterfly in-place architecture, serial ports and word widths
// are this design's choice.
//
// Interface: in_valid/in_ready handshake with in_re/in_im (x(0) first); after
// the 8th sample the core computes, then presents X(0)..X(7) with out_valid
// and out_idx, one bin per clock, no back-pressure. Outputs are DATA_W+4 bits,
// unscaled, which no input can overflow.
// Timing: the first bin appears 14 clocks after the clock that accepts the
// 8th sample; a transform occupies 8 + 12 + 8 clocks.
module fft8_r2
  import fft_pkg::*;
#(
  parameter int unsigned DATA_W = DATA_W_DEF,
  parameter int unsigned TW_W   = TW_W_DEF,
  localparam int unsigned W     = DATA_W + 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic signed [DATA_W-1:0] in_re,
  input  logic signed [DATA_W-1:0] in_im,
  output logic                     out_valid,
  output logic [2:0]               out_idx,
  output logic signed [W-1:0]      out_re,
  output logic signed [W-1:0]      out_im,
  output logic                     busy
);

  typedef enum logic [1:0] {S_LOAD, S_COMPUTE, S_OUTPUT} state_e;

  state_e     state;
  logic [1:0] stage;   // 0..2
  logic [2:0] cnt;     // load / output counter; butterfly index in cnt[1:0]

  logic signed [W-1:0] mem_re [8];
  logic signed [W-1:0] mem_im [8];

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      stage <= '0;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          cnt <= cnt + 3'd1;
          if (cnt == 3'd7) begin
            state <= S_COMPUTE;
            stage <= '0;
          end
        end
        S_COMPUTE: begin
          cnt <= {1'b0, cnt[1:0] + 2'd1};
          if (cnt[1:0] == 2'd3) begin
            cnt <= '0;
            if (stage == 2'd2) state <= S_OUTPUT;
            else               stage <= stage + 2'd1;
          end
        end
        S_OUTPUT: begin
          cnt <= cnt + 3'd1;
          if (cnt == 3'd7) state <= S_LOAD;
        end
        default: begin
          state <= S_LOAD;
          cnt   <= '0;
        end
      endcase
    end
  end

  assign in_ready = (state == S_LOAD);
  assign busy     = (state != S_LOAD);

  // ------------------------------------------------------- butterfly datapath
  logic [1:0] j;
  logic [2:0] a_top, a_bot;
  logic [3:0] e;
  always_comb begin
    j = cnt[1:0];
    unique case (stage)
      2'd0:    begin a_top = {j, 1'b0};          e = 4'd0;         end
      2'd1:    begin a_top = {j[1], 1'b0, j[0]}; e = {1'b0, j[0], 2'b00}; end
      default: begin a_top = {1'b0, j};          e = {1'b0, j, 1'b0};     end
    endcase
    a_bot = a_top | (3'd1 << stage);
  end

  logic signed [W-1:0] yt_re, yt_im, yb_re, yb_im;
  logic                tw_bypass;

  r2_butterfly #(.W(W), .TW_W(TW_W)) u_bf (
    .e(e),
    .top_re(mem_re[a_top]), .top_im(mem_im[a_top]),
    .bot_re(mem_re[a_bot]), .bot_im(mem_im[a_bot]),
    .y_top_re(yt_re), .y_top_im(yt_im), .y_bot_re(yb_re), .y_bot_im(yb_im),
    .bypass(tw_bypass)
  );

  // ---------------------------------------------------------- register memory
  always_ff @(posedge clk) begin
    if (state == S_LOAD && in_valid) begin
      mem_re[{cnt[0], cnt[1], cnt[2]}] <= W'(in_re);  // bit-reversed address
      mem_im[{cnt[0], cnt[1], cnt[2]}] <= W'(in_im);
    end
    if (state == S_COMPUTE) begin
      mem_re[a_top] <= yt_re;
      mem_im[a_top] <= yt_im;
      mem_re[a_bot] <= yb_re;
      mem_im[a_bot] <= yb_im;
    end
  end

  // ------------------------------------------------------------------ unload
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= (state == S_OUTPUT);
      if (state == S_OUTPUT) begin
        out_idx <= cnt;
        out_re  <= mem_re[cnt];
        out_im  <= mem_im[cnt];
      end
    end

  a_stage_range: assert property (@(posedge clk) disable iff (!rst_n) stage <= 2'd2);

endmodule
