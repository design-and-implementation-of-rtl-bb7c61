// tb_twiddle_rom: checks the stored first-quadrant twiddle constants against
// cos/sin computed in floating point (tolerance half an LSB of the 2^(TW_W-2)
// scale, i.e. correct rounding) and the trivial flag.
module tb_twiddle_rom;
  localparam int TW_W = 16;
  localparam real PI = 3.14159265358979323846;
  localparam real SCALE = 2.0 ** (TW_W - 2);

  logic [1:0] r;
  logic signed [TW_W-1:0] c, s;
  logic trivial;
  int checks = 0, failures = 0;

  twiddle_rom dut (.r(r), .cos_o(c), .sin_o(s), .trivial(trivial));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      real ec, es;
      r = 2'(i);
      #1;
      ec = $cos(2.0 * PI * i / 16.0) * SCALE;
      es = $sin(2.0 * PI * i / 16.0) * SCALE;
      check((real'(c) - ec) <= 0.5 && (ec - real'(c)) <= 0.5, $sformatf("cos r=%0d got %0d exp %f", i, c, ec));
      check((real'(s) - es) <= 0.5 && (es - real'(s)) <= 0.5, $sformatf("sin r=%0d got %0d exp %f", i, s, es));
      check(trivial == (i == 0), $sformatf("trivial r=%0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
