// tb_fft8_r2: sends test frames (impulses, a constant, a single tone, full-
// scale extremes and random data) to the 8-point radix-2 FFT with random gaps
// in the input, and compares every output bin with the DFT
// X(k) = sum_n x(n) exp(-j*2*pi*n*k/8) computed in floating point (tolerance
// 8 LSB for twiddle rounding). Also checks the bin order and the latency:
// first bin 14 clocks after the clock that accepts the 8th sample.
module tb_fft8_r2;
  localparam int N = 8;
  localparam int DATA_W = 16;
  localparam int OW = DATA_W + 4;
  localparam real PI = 3.14159265358979323846;
  localparam real TOL = 8.0;

  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, busy;
  logic signed [DATA_W-1:0] in_re = '0, in_im = '0;
  logic [2:0] out_idx;
  logic signed [OW-1:0] out_re, out_im;
  int checks = 0, failures = 0;

  fft8_r2 dut (.*);

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
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr[N], xi[N];
  real er[N], ei[N];
  int max_err_x100 = 0;

  task automatic make_frame(input int f);
    for (int n = 0; n < N; n++) begin
      case (f)
        0: begin xr[n] = (n == 0) ? 1000 : 0; xi[n] = 0; end
        1: begin xr[n] = (n == 5) ? 32767 : 0; xi[n] = (n == 5) ? -32768 : 0; end
        2: begin xr[n] = 20000; xi[n] = -7000; end
        3: begin
          xr[n] = $rtoi(30000.0 * $cos(2.0 * PI * 3 * n / N));
          xi[n] = $rtoi(30000.0 * $sin(2.0 * PI * 3 * n / N));
        end
        4: begin xr[n] = 32767; xi[n] = -32768; end
        5: begin xr[n] = (n % 2 != 0) ? 32767 : -32768; xi[n] = (n % 3 != 0) ? -32768 : 32767; end
        default: begin
          xr[n] = int'($urandom_range(0, 65535)) - 32768;
          xi[n] = int'($urandom_range(0, 65535)) - 32768;
        end
      endcase
    end
    for (int k = 0; k < N; k++) begin
      er[k] = 0.0; ei[k] = 0.0;
      for (int n = 0; n < N; n++) begin
        real a;
        a = 2.0 * PI * ((n * k) % N) / N;
        er[k] += xr[n] * $cos(a) + xi[n] * $sin(a);
        ei[k] += xi[n] * $cos(a) - xr[n] * $sin(a);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int f = 0; f < 40; f++) begin
      int n, lat, k;
      n = 0; lat = 0; k = 0;
      make_frame(f);
      while (n < N) begin
        bit accepted;
        @(negedge clk);
        in_valid = ($urandom_range(0, 3) != 0);
        in_re = DATA_W'(xr[n]);
        in_im = DATA_W'(xi[n]);
        accepted = in_valid && in_ready;
        @(posedge clk);
        if (accepted) n++;
      end
      // clocks from the accepting clock of the last sample to the first bin
      do begin
        @(negedge clk);
        in_valid = 0;
        lat++;
      end while (!out_valid && lat < 100);
      check(lat == 14, $sformatf("frame %0d latency %0d exp 14", f, lat));
      for (k = 0; k < N; k++) begin
        real dr, di;
        if (k > 0) @(negedge clk);
        check(out_valid && out_idx == 3'(k), $sformatf("frame %0d bin order %0d", f, k));
        dr = absr(real'(out_re) - er[k]);
        di = absr(real'(out_im) - ei[k]);
        if ($rtoi(dr * 100) > max_err_x100) max_err_x100 = $rtoi(dr * 100);
        if ($rtoi(di * 100) > max_err_x100) max_err_x100 = $rtoi(di * 100);
        check(dr <= TOL && di <= TOL,
              $sformatf("frame %0d X(%0d) got (%0d,%0d) exp (%f,%f)", f, k, out_re, out_im, er[k], ei[k]));
      end
      @(negedge clk);
      check(!out_valid, "exactly 8 bins");
    end
    $display("max abs error %0d.%02d LSB", max_err_x100 / 100, max_err_x100 % 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
