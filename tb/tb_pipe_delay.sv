// Self-checking testbench for pipe_delay, the programmable 0-15 clock delay
// for the local crate sums. For each delay setting a random stream is fed in
// and every output word is compared with the input from exactly `delay`
// clocks earlier (delay 0 is a straight-through path within the clock).
module tb_pipe_delay;
  localparam int W = 50, MAXD = 15;
  logic clk = 0, rst_n = 0;
  logic [3:0] delay = '0;
  logic [W-1:0] din = '0, dout;
  int checks = 0, failures = 0;

  pipe_delay #(.W(W), .MAX_DELAY(MAXD)) dut (.*);

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
      $display("FAIL %s delay %0d at %0t", what, delay, $time);
    end
  endtask

  logic [W-1:0] hist [64];
  int t;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    t = 0;
    for (int d = 0; d <= MAXD; d++) begin
      @(negedge clk);
      delay = 4'(d);
      for (int i = 0; i < 60; i++) begin
        @(negedge clk);
        din = {W'($urandom), 32'($urandom)};
        hist[t % 64] = din;
        #1;
        if (i >= d) check(dout == hist[(t - d) % 64], "delayed word");
        t++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
