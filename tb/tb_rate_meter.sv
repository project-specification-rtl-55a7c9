// Self-checking testbench for rate_meter: 32 hit counters plus a
// normalisation counter of bunch crossings. Random increment vectors,
// inhibit and clear pulses are applied and every counter is compared with a
// model each clock (one clock latency). Saturation at 0xFFFFFFFF would take
// 2^32 clocks and is not simulated.
module tb_rate_meter;
  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] inc = '0;
  logic inhibit = 1, clear = 0;
  logic [N-1:0][31:0] count;
  logic [31:0] norm;
  int checks = 0, failures = 0, n_inh = 0, n_clr = 0;

  rate_meter #(.N(N)) dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    #5_000_000;
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

  int unsigned m [N];
  int unsigned mn;
  logic ok;
  initial begin
    foreach (m[i]) m[i] = 0;
    mn = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      inc     = N'($urandom);
      inhibit = ($urandom_range(0, 9) == 0);
      clear   = ($urandom_range(0, 499) == 0);
      if (clear) begin
        foreach (m[i]) m[i] = 0;
        mn = 0;
        n_clr++;
      end else if (!inhibit) begin
        foreach (m[i]) if (inc[i]) m[i]++;
        mn++;
      end else n_inh++;
      @(posedge clk);
      #1;
      ok = 1;
      foreach (m[i]) if (count[i] != m[i]) ok = 0;
      check(ok, "hit counters");
      check(norm == mn, "normalisation counter");
    end
    check(n_inh > 0 && n_clr > 0, "inhibit and clear exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
