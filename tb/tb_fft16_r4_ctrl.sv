// tb_fft16_r4_ctrl: drives the controller with gapped input, follows the
// expected schedule cycle by cycle (16 accepted samples, 4 stage-1 issues,
// one drain, 4 stage-2 issues, one drain, 16 output reads) and checks every
// output against it, for three transforms in a row.
module tb_fft16_r4_ctrl;
  import fft_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, load_we, bf_issue, bf_stage, out_valid, busy;
  logic [3:0] load_addr, out_k;
  logic [1:0] bf_idx;
  r4_state_e state;
  int checks = 0, failures = 0;

  fft16_r4_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int frame = 0; frame < 3; frame++) begin
      int n;
      n = 0;
      // load: 16 accepted samples, with random idle clocks
      while (n < 16) begin
        in_valid <= ($urandom_range(0, 2) != 0);
        @(negedge clk);
        check(in_ready && !busy && !bf_issue && !out_valid, "load state outputs");
        check(load_we == in_valid, "load_we follows in_valid");
        if (in_valid) begin
          check(load_addr == 4'(n), $sformatf("load_addr %0d exp %0d", load_addr, n));
          n++;
        end
        @(posedge clk);
      end
      in_valid <= 1;   // keep offering: must be refused while busy
      for (int s = 0; s < 2; s++) begin
        for (int i = 0; i < 4; i++) begin
          @(negedge clk);
          check(bf_issue && bf_stage == 1'(s) && bf_idx == 2'(i) && !in_ready && !load_we && busy,
                $sformatf("issue stage %0d idx %0d", s, i));
          @(posedge clk);
        end
        @(negedge clk);
        check(!bf_issue && !load_we && !out_valid && busy, "drain clock");
        check(state == (s == 0 ? ST_DRAIN1 : ST_DRAIN2), "drain state");
        @(posedge clk);
      end
      for (int k = 0; k < 16; k++) begin
        @(negedge clk);
        check(out_valid && out_k == 4'(k) && !in_ready && !load_we, $sformatf("output k=%0d", k));
        @(posedge clk);
      end
      in_valid <= 0;
    end
    @(negedge clk);
    check(state == ST_LOAD && in_ready, "back to load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
