// Self-checking testbench for ttc_decode. Checks that the bunch counter
// counts every clock, returns to 0 after ORBIT_LEN-1 (a full orbit of 3564
// crossings is run at the default size) and is reset by BCR one clock later.
// Random broadcast bytes are strobed; the sync pulse must follow exactly one
// clock after every strobe whose two top bits are 01, and the last broadcast
// byte must be held.
module tb_ttc_decode;
  logic clk = 0, rst_n = 0;
  logic bcr = 0, brcst_str = 0;
  logic [7:0] brcst = '0;
  logic [11:0] bcn;
  logic sync;
  logic [7:0] brcst_last;
  int checks = 0, failures = 0, n_sync = 0;

  ttc_decode dut (.*);

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

  int exp_bcn;
  logic [7:0] exp_last;
  logic exp_sync;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    exp_bcn = 0;
    exp_last = 0;
    for (int c = 0; c < 8000; c++) begin
      bcr       = ($urandom_range(0, 2999) == 0);
      brcst_str = ($urandom_range(0, 7) == 0);
      brcst     = 8'($urandom);
      exp_sync  = brcst_str && brcst[7:6] == 2'b01;
      if (brcst_str) exp_last = brcst;
      @(posedge clk);
      exp_bcn = bcr ? 0 : (exp_bcn == 3563 ? 0 : exp_bcn + 1);
      #1;
      check(bcn == 12'(exp_bcn), "bunch counter");
      check(sync == exp_sync, "sync command");
      check(brcst_last == exp_last, "last broadcast");
      if (sync) n_sync++;
      @(negedge clk);
    end
    check(n_sync > 0, "sync seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
