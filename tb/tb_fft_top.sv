// tb_fft_top: end-to-end test of both FFT processors at their default sizes
// (16-point radix-4 and 8-point radix-2, 16-bit samples), run concurrently.
// Each side streams frames with random input gaps and keeps offering the next
// frame while the core is busy, so refused samples (in_ready low) occur.
// Every output bin is compared with a floating-point DFT (tolerance 8 LSB),
// and the bin order and first-bin latency (12 and 14 clocks) are checked.
// The testbench also counts, and requires at least once, each mechanism of
// the design: refused input while busy, idle clocks during loading, radix-4
// butterfly issues in both stages, the drain clocks between stages, twiddle
// multiplications skipped for trivial twiddles, real twiddle multiplications,
// and back-to-back transforms.
module tb_fft_top;
  import fft_pkg::*;
  localparam int DATA_W = 16;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 8.0;
  localparam int FRAMES = 30;

  logic clk = 0, rst_n = 0;
  logic r4_in_valid = 0, r4_in_ready, r4_out_valid, r4_busy;
  logic signed [DATA_W-1:0] r4_in_re = '0, r4_in_im = '0;
  logic [3:0] r4_out_idx;
  logic signed [DATA_W+4:0] r4_out_re, r4_out_im;
  logic r2_in_valid = 0, r2_in_ready, r2_out_valid, r2_busy;
  logic signed [DATA_W-1:0] r2_in_re = '0, r2_in_im = '0;
  logic [2:0] r2_out_idx;
  logic signed [DATA_W+3:0] r2_out_re, r2_out_im;

  int checks = 0, failures = 0;

  fft_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Frame generator shared by both sides: f selects the pattern.
  task automatic gen(input int f, input int n_pts, output int xr[16], output int xi[16],
                     output real er[16], output real ei[16]);
    for (int n = 0; n < n_pts; n++) begin
      case (f % 4)
        0: begin xr[n] = (n == f % n_pts) ? 32767 : 0; xi[n] = 0; end
        1: begin
          xr[n] = $rtoi(32000.0 * $cos(2.0 * PI * (f % n_pts) * n / n_pts));
          xi[n] = $rtoi(32000.0 * $sin(2.0 * PI * (f % n_pts) * n / n_pts));
        end
        2: begin xr[n] = -32768; xi[n] = 32767; end
        default: begin
          xr[n] = int'($urandom_range(0, 65535)) - 32768;
          xi[n] = int'($urandom_range(0, 65535)) - 32768;
        end
      endcase
    end
    for (int k = 0; k < n_pts; k++) begin
      er[k] = 0.0; ei[k] = 0.0;
      for (int n = 0; n < n_pts; n++) begin
        real a;
        a = 2.0 * PI * ((n * k) % n_pts) / n_pts;
        er[k] += xr[n] * $cos(a) + xi[n] * $sin(a);
        ei[k] += xi[n] * $cos(a) - xr[n] * $sin(a);
      end
    end
  endtask

  // Mechanism counters
  int r4_frames = 0, r2_frames = 0, r4_refused = 0, r2_refused = 0;
  int load_gaps = 0, r4_issue_s1 = 0, r4_issue_s2 = 0, r4_drains = 0;
  int tw_skipped = 0, tw_multiplied = 0, r2_tw_skipped = 0, r2_tw_multiplied = 0;
  int r4_back_to_back = 0, r2_back_to_back = 0;

  always @(negedge clk) if (rst_n) begin
    if (r4_in_valid && !r4_in_ready) r4_refused++;
    if (r2_in_valid && !r2_in_ready) r2_refused++;
    if ((r4_in_ready && !r4_in_valid) || (r2_in_ready && !r2_in_valid)) load_gaps++;
    if (dut.u_r4.u_ctrl.bf_issue && !dut.u_r4.u_ctrl.bf_stage) r4_issue_s1++;
    if (dut.u_r4.u_ctrl.bf_issue &&  dut.u_r4.u_ctrl.bf_stage) r4_issue_s2++;
    if (dut.u_r4.u_ctrl.state inside {ST_DRAIN1, ST_DRAIN2}) r4_drains++;
    if (dut.u_r4.bf_valid && !dut.u_r4.wb_stage)
      for (int q = 1; q < 4; q++)
        if (dut.u_r4.tw_bypass[q]) tw_skipped++; else tw_multiplied++;
    if (dut.u_r2.state == 2'd1) begin  // S_COMPUTE
      if (dut.u_r2.tw_bypass) r2_tw_skipped++; else r2_tw_multiplied++;
    end
  end

  // 16-point radix-4 side
  task automatic run_r4();
    bit first_try;
    first_try = 0;
    @(negedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      int xr[16], xi[16];
      real er[16], ei[16];
      int n, lat;
      gen(f, 16, xr, xi, er, ei);
      n = 0; lat = 0;
      // enter at a falling edge; the first try of a frame is the clock where
      // the core has just become ready again
      while (n < 16) begin
        bit accepted;
        r4_in_valid = ($urandom_range(0, 4) != 0);
        r4_in_re = DATA_W'(xr[n]);
        r4_in_im = DATA_W'(xi[n]);
        accepted = r4_in_valid && r4_in_ready;
        if (f > 0 && n == 0 && accepted && first_try) r4_back_to_back++;
        first_try = 0;
        @(posedge clk);
        if (accepted) n++;
        @(negedge clk);
      end
      // keep offering samples while busy on some frames: they must be refused
      r4_in_valid = (f % 3 != 2);
      lat = 1;
      while (!r4_out_valid && lat < 100) begin
        @(negedge clk);
        lat++;
      end
      check(lat == 12, $sformatf("r4 frame %0d latency %0d", f, lat));
      for (int k = 0; k < 16; k++) begin
        if (k > 0) @(negedge clk);
        check(r4_out_valid && r4_out_idx == 4'(k), $sformatf("r4 frame %0d bin order %0d", f, k));
        check(absr(real'(r4_out_re) - er[k]) <= TOL && absr(real'(r4_out_im) - ei[k]) <= TOL,
              $sformatf("r4 frame %0d X(%0d) got (%0d,%0d) exp (%f,%f)",
                        f, k, r4_out_re, r4_out_im, er[k], ei[k]));
      end
      // the core is ready again on the clock that presents the last bin; the
      // next frame's first sample is offered on that same clock
      check(r4_in_ready, "r4 ready while its last bin is presented");
      first_try = 1;
      r4_frames++;
    end
    r4_in_valid = 0;
  endtask

  // 8-point radix-2 side
  task automatic run_r2();
    bit first_try;
    first_try = 0;
    @(negedge clk);
    for (int f = 0; f < FRAMES; f++) begin
      int xr[16], xi[16];
      real er[16], ei[16];
      int n, lat;
      gen(f + 1, 8, xr, xi, er, ei);
      n = 0; lat = 0;
      // enter at a falling edge; the first try of a frame is the clock where
      // the core has just become ready again
      while (n < 8) begin
        bit accepted;
        r2_in_valid = ($urandom_range(0, 4) != 0);
        r2_in_re = DATA_W'(xr[n]);
        r2_in_im = DATA_W'(xi[n]);
        accepted = r2_in_valid && r2_in_ready;
        if (f > 0 && n == 0 && accepted && first_try) r2_back_to_back++;
        first_try = 0;
        @(posedge clk);
        if (accepted) n++;
        @(negedge clk);
      end
      // keep offering samples while busy on some frames: they must be refused
      r2_in_valid = (f % 2 == 0);
      lat = 1;
      while (!r2_out_valid && lat < 100) begin
        @(negedge clk);
        lat++;
      end
      check(lat == 14, $sformatf("r2 frame %0d latency %0d", f, lat));
      for (int k = 0; k < 8; k++) begin
        if (k > 0) @(negedge clk);
        check(r2_out_valid && r2_out_idx == 3'(k), $sformatf("r2 frame %0d bin order %0d", f, k));
        check(absr(real'(r2_out_re) - er[k]) <= TOL && absr(real'(r2_out_im) - ei[k]) <= TOL,
              $sformatf("r2 frame %0d X(%0d) got (%0d,%0d) exp (%f,%f)",
                        f, k, r2_out_re, r2_out_im, er[k], ei[k]));
      end
      // the core is ready again on the clock that presents the last bin; the
      // next frame's first sample is offered on that same clock
      check(r2_in_ready, "r2 ready while its last bin is presented");
      first_try = 1;
      r2_frames++;
    end
    r2_in_valid = 0;
  endtask

  task automatic need(input int count, input string what);
    $display("  %-40s %0d", what, count);
    check(count > 0, {"mechanism never exercised: ", what});
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    fork
      run_r4();
      run_r2();
    join
    @(negedge clk);
    check(!r4_out_valid && !r2_out_valid && !r4_busy && !r2_busy, "both idle at the end");
    $display("mechanism counts:");
    need(r4_frames, "radix-4 transforms");
    need(r2_frames, "radix-2 transforms");
    need(r4_refused, "radix-4 samples refused while busy");
    need(r2_refused, "radix-2 samples refused while busy");
    need(load_gaps, "idle clocks while loading");
    need(r4_issue_s1, "radix-4 stage-1 butterflies");
    need(r4_issue_s2, "radix-4 stage-2 butterflies");
    need(r4_drains, "radix-4 drain clocks");
    need(tw_skipped, "radix-4 trivial twiddles (no multiply)");
    need(tw_multiplied, "radix-4 twiddle multiplications");
    need(r2_tw_skipped, "radix-2 trivial twiddles (no multiply)");
    need(r2_tw_multiplied, "radix-2 twiddle multiplications");
    need(r4_back_to_back, "radix-4 back-to-back transforms");
    need(r2_back_to_back, "radix-2 back-to-back transforms");
    check(r4_issue_s1 == 4 * FRAMES && r4_issue_s2 == 4 * FRAMES, "4 butterflies per stage");
    check(r4_drains == 2 * FRAMES, "2 drain clocks per transform");
    // stage-1 twiddle exponents l*q (l = 0..3, q = 1..3): 4 of the 12 are
    // multiples of 4 (l = 0 three times, l*q = 4 once)
    check(tw_skipped == 4 * FRAMES && tw_multiplied == 8 * FRAMES, "trivial twiddle split per frame");
    // radix-2: stages 0 and 1 only use W8^0 and W8^2 = -j; stage 2 uses
    // W8^0..W8^3, of which W8^1 and W8^3 need multipliers
    check(r2_tw_skipped == 10 * FRAMES && r2_tw_multiplied == 2 * FRAMES, "radix-2 twiddle split per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
