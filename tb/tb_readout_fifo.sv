// Self-checking testbench for readout_fifo, the first-word-fall-through
// slice and BCN FIFO. Random push/pop traffic is compared with a queue model:
// data order, empty/full flags and the one-clock overflow pulse when pushing
// into a full FIFO. Pushes are biased so that the FIFO fills completely
// (256 words) and overflows, and pops so that it drains.
module tb_readout_fifo;
  localparam int W = 32, DEPTH = 256;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [W-1:0] din = '0, dout;
  logic empty, full, overflow;
  logic [7:0] rd_ptr, wr_ptr;
  int checks = 0, failures = 0, n_ovf = 0, n_full = 0;

  readout_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

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

  logic [W-1:0] q[$];
  logic exp_ovf;
  int bias;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 6000; c++) begin
      @(negedge clk);
      bias = ((c / 1000) % 2 == 0) ? 8 : 2;
      push = ($urandom_range(0, 9) < bias);
      pop  = ($urandom_range(0, 9) < 10 - bias);
      din  = W'($urandom);
      #1;
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == DEPTH), "full flag");
      if (q.size() > 0) check(dout == q[0], "head word");
      if (full) n_full++;
      exp_ovf = push && q.size() == DEPTH;
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push && !exp_ovf) q.push_back(din);
      @(posedge clk);
      #1;
      check(overflow == exp_ovf, "overflow pulse");
      if (overflow) n_ovf++;
    end
    check(n_ovf > 0 && n_full > 0, "full and overflow reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
