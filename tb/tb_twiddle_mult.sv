// tb_twiddle_mult: multiplies random complex words by every W16^e, e = 0..15,
// and compares with the product computed in floating point. The tolerance is
// the error bound of 16-bit twiddle constants plus the final rounding; trivial twiddles (e multiple of 4) must be
// exact and must report bypass.
module tb_twiddle_mult;
  localparam int W = 21;
  localparam int TW_W = 16;
  localparam real PI = 3.14159265358979323846;

  logic [3:0] e;
  logic signed [W-1:0] x_re, x_im, y_re, y_im;
  logic bypass;
  int checks = 0, failures = 0;

  twiddle_mult dut (.*);

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
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      for (int k = 0; k < 16; k++) begin
        real xr, xi, c, s, er, ei, tol;
        // operands up to +-2^18 (stage-1 magnitude range of the 16-point core)
        x_re = W'($signed($urandom_range(0, 1 << 19)) - (1 << 18));
        x_im = W'($signed($urandom_range(0, 1 << 19)) - (1 << 18));
        if (t == 0) begin x_re = W'(1 << 18); x_im = -W'(1 << 18); end
        e = 4'(k);
        #1;
        xr = real'(x_re); xi = real'(x_im);
        c = $cos(2.0 * PI * k / 16.0); s = $sin(2.0 * PI * k / 16.0);
        er = xr * c + xi * s;
        ei = xi * c - xr * s;
        if (k % 4 == 0) begin
          check(bypass, $sformatf("bypass e=%0d", k));
          check(real'(y_re) == $floor(er + 0.5) && real'(y_im) == $floor(ei + 0.5),
                $sformatf("exact e=%0d x=(%0d,%0d) y=(%0d,%0d)", k, x_re, x_im, y_re, y_im));
        end else begin
          check(!bypass, $sformatf("no bypass e=%0d", k));
          // bound: constants rounded to 2^-(TW_W-1), product rounded to 1/2 LSB
          tol = (absr(xr) + absr(xi)) * (2.0 ** (1 - TW_W)) + 0.5;
          check(absr(real'(y_re) - er) <= tol && absr(real'(y_im) - ei) <= tol,
                $sformatf("e=%0d x=(%0d,%0d) y=(%0d,%0d) exp=(%f,%f)", k, x_re, x_im, y_re, y_im, er, ei));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
