// fft16_r4_ctrl: state machine that sequences the 16-point radix-4 processor.
//
// States (fft_pkg::r4_state_e):
//   LOAD    accept one input sample per clock while in_valid; the 16th moves on
//   STAGE1  issue column butterflies l = 0..3 (one per clock)
//   DRAIN1  one idle clock so the last stage-1 result is written back before
//           stage 2 reads it (the butterfly has one clock of latency)
//   STAGE2  issue row butterflies q = 0..3
//   DRAIN2  one idle clock for the last stage-2 write-back
//   OUTPUT  read bins k = 0..15, one per clock, then return to LOAD
// The specification names a control circuit and its state machine but does not
// give them; these states, their lengths and the handshake are this design's.
//
// Interface: in_valid/in_ready is a valid/ready handshake (a sample moves when
// both are high); load_we/load_addr write that sample; bf_issue/bf_stage/
// bf_idx start a butterfly; out_valid/out_k select the bin to read.
// Timing: 16 load clocks, 10 compute clocks, 16 output clocks per transform.
module fft16_r4_ctrl
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  output logic       load_we,
  output logic [3:0] load_addr,
  output logic       bf_issue,
  output logic       bf_stage,   // 0: column butterflies with twiddles, 1: row butterflies
  output logic [1:0] bf_idx,
  output logic       out_valid,
  output logic [3:0] out_k,
  output logic       busy,
  output r4_state_e  state
);

  logic [3:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_LOAD;
      cnt   <= '0;
    end else begin
      unique case (state)
        ST_LOAD: if (in_valid) begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd15) state <= ST_STAGE1;
        end
        ST_STAGE1: begin
          cnt <= (cnt == 4'd3) ? 4'd0 : cnt + 4'd1;
          if (cnt == 4'd3) state <= ST_DRAIN1;
        end
        ST_DRAIN1: state <= ST_STAGE2;
        ST_STAGE2: begin
          cnt <= (cnt == 4'd3) ? 4'd0 : cnt + 4'd1;
          if (cnt == 4'd3) state <= ST_DRAIN2;
        end
        ST_DRAIN2: state <= ST_OUTPUT;
        ST_OUTPUT: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd15) state <= ST_LOAD;
        end
        default: begin
          state <= ST_LOAD;
          cnt   <= '0;
        end
      endcase
    end
  end

  always_comb begin
    in_ready  = (state == ST_LOAD);
    load_we   = in_ready && in_valid;
    load_addr = cnt;
    bf_issue  = (state == ST_STAGE1) || (state == ST_STAGE2);
    bf_stage  = (state == ST_STAGE2);
    bf_idx    = cnt[1:0];
    out_valid = (state == ST_OUTPUT);
    out_k     = cnt;
    busy      = (state != ST_LOAD);
  end

  // The register memory has one owner per clock: loading, butterflies or unloading.
  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({load_we, bf_issue, out_valid}));

endmodule
