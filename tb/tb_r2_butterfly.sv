// tb_r2_butterfly: random operands with each 8-point twiddle W8^k (e = 2k);
// y_top and y_bot are compared with top +- W*bot computed in floating point
// (tolerance: error bound of the 16-bit twiddle constants plus rounding).
module tb_r2_butterfly;
  localparam int W = 20;
  localparam real PI = 3.14159265358979323846;

  logic [3:0] e;
  logic signed [W-1:0] top_re, top_im, bot_re, bot_im;
  logic signed [W-1:0] y_top_re, y_top_im, y_bot_re, y_bot_im;
  logic bypass;
  int checks = 0, failures = 0;

  r2_butterfly dut (.*);

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 300; t++) begin
      for (int k = 0; k < 4; k++) begin
        real c, s, tr, ti, tol;
        top_re = W'($signed($urandom_range(0, 1 << 18)) - (1 << 17));
        top_im = W'($signed($urandom_range(0, 1 << 18)) - (1 << 17));
        bot_re = W'($signed($urandom_range(0, 1 << 18)) - (1 << 17));
        bot_im = W'($signed($urandom_range(0, 1 << 18)) - (1 << 17));
        e = 4'(2 * k);
        #1;
        c = $cos(2.0 * PI * k / 8.0); s = $sin(2.0 * PI * k / 8.0);
        tr = real'(bot_re) * c + real'(bot_im) * s;
        ti = real'(bot_im) * c - real'(bot_re) * s;
        tol = (absr(real'(bot_re)) + absr(real'(bot_im))) * (2.0 ** (-15)) + 0.5;
        check(absr(real'(y_top_re) - (real'(top_re) + tr)) <= tol &&
              absr(real'(y_top_im) - (real'(top_im) + ti)) <= tol,
              $sformatf("top k=%0d", k));
        check(absr(real'(y_bot_re) - (real'(top_re) - tr)) <= tol &&
              absr(real'(y_bot_im) - (real'(top_im) - ti)) <= tol,
              $sformatf("bot k=%0d", k));
        check(bypass == (k == 0 || k == 2), $sformatf("bypass k=%0d", k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
