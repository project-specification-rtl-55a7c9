// Self-checking testbench for hit_sum, the saturating adder of 3-bit hit
// counts from 14 modules. Random counts (biased towards small values so that
// both in-range and saturated sums occur) are compared with an integer model
// that clips at 7. The adder is combinational, so results are checked after
// a short settling delay.
module tb_hit_sum;
  localparam int N = 14, W = 3;
  logic [N-1:0][W-1:0] counts = '0;
  logic [W-1:0] sum;
  int checks = 0, failures = 0, n_sat = 0, n_lin = 0;

  hit_sum #(.N(N), .W(W)) dut (.*);

  initial begin
    #1_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int s;
  initial begin
    #1;
    check(sum == 0, "zero input");
    for (int i = 0; i < 3000; i++) begin
      s = 0;
      for (int k = 0; k < N; k++) begin
        counts[k] = ($urandom_range(0, 5) == 0) ? W'($urandom) : '0;
        s += counts[k];
      end
      #5;
      check(sum == W'((s > 7) ? 7 : s), "saturating sum");
      if (s > 7) n_sat++; else n_lin++;
    end
    check(n_sat > 0 && n_lin > 0, "both ranges exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
