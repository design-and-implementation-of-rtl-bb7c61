// tb_r4_butterfly: streams random operand sets into the radix-4 butterfly,
// one per clock with random gaps, and compares each result, one clock later,
// with the 4-point DFT y(k) = sum_m x(m) * (-j)^(m*k) evaluated directly.
module tb_r4_butterfly;
  localparam int W = 21;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [W-1:0] x_re [4], x_im [4], y_re [4], y_im [4];
  int checks = 0, failures = 0;

  r4_butterfly dut (.*);

  always #5 clk = ~clk;

  // Expected results, queued when operands are issued.
  typedef struct { longint re[4]; longint im[4]; } res_t;
  res_t q[$];

  function automatic res_t dft4(input longint ar[4], input longint ai[4]);
    res_t r;
    for (int k = 0; k < 4; k++) begin
      r.re[k] = 0; r.im[k] = 0;
      for (int m = 0; m < 4; m++) begin
        // (-j)^p: p=0 -> 1, 1 -> -j, 2 -> -1, 3 -> +j
        case ((m * k) % 4)
          0: begin r.re[k] += ar[m]; r.im[k] += ai[m]; end
          1: begin r.re[k] += ai[m]; r.im[k] -= ar[m]; end
          2: begin r.re[k] -= ar[m]; r.im[k] -= ai[m]; end
          3: begin r.re[k] -= ai[m]; r.im[k] += ar[m]; end
        endcase
      end
    end
    return r;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int issued = 0;
  initial begin
    for (int i = 0; i < 4; i++) begin x_re[i] = '0; x_im[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    while (issued < 500) begin
      longint ar[4], ai[4];
      in_valid <= ($urandom_range(0, 3) != 0);
      for (int i = 0; i < 4; i++) begin
        ar[i] = longint'($urandom_range(0, 1 << 18)) - (1 << 17);
        ai[i] = longint'($urandom_range(0, 1 << 18)) - (1 << 17);
        x_re[i] <= W'(ar[i]);
        x_im[i] <= W'(ai[i]);
      end
      @(posedge clk);
      if (in_valid) begin
        q.push_back(dft4(ar, ai));
        issued++;
      end
    end
    in_valid <= 0;
    repeat (3) @(posedge clk);
    check(q.size() == 0, "all results seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Results must appear exactly one clock after issue.
  logic valid_d = 0;
  always @(posedge clk) begin
    valid_d <= in_valid && rst_n;
    if (rst_n) begin
      check(out_valid == valid_d, "out_valid one clock after in_valid");
      if (out_valid) begin
        res_t r;
        r = q.pop_front();
        for (int k = 0; k < 4; k++)
          check(longint'(y_re[k]) == r.re[k] && longint'(y_im[k]) == r.im[k],
                $sformatf("y%0d got (%0d,%0d) exp (%0d,%0d)", k, y_re[k], y_im[k], r.re[k], r.im[k]));
      end
    end
  end
endmodule
