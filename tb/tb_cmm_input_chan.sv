// Self-checking testbench for cmm_input_chan, one input channel of the CMM.
// Random 24-bit words are sent with good or bad odd parity, through either
// the live input or the playback port, and with the channel enabled or
// masked off. A reference model predicts the recorded word {pe, parity, data},
// the algorithm data (forced to zero on a parity error) and the error flag.
// All outputs are checked one clock after the input is applied, which is the
// channel's one-register latency. A watchdog ends the run if it stalls.
module tb_cmm_input_chan;
  localparam int DW = 24;
  logic clk = 0, rst_n = 0;
  logic [DW:0] rx = '0, pb_word = '0;
  logic playback = 0, disable_ch = 0;
  logic [DW+1:0] rec_word;
  logic [DW-1:0] alg_data;
  logic pe;
  int checks = 0, failures = 0;
  int n_pe = 0, n_dis = 0, n_pb = 0;

  cmm_input_chan #(.DW(DW)) dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    #2_000_000;
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

  logic [DW:0] sel, msk;
  logic exp_pe;
  initial begin
    repeat (3) @(posedge clk);
    check(rec_word == {2'b01, {DW{1'b0}}}, "reset record word");
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      rx[DW-1:0]      = DW'($urandom);
      rx[DW]          = ~^rx[DW-1:0] ^ ($urandom_range(0, 3) == 0);
      pb_word[DW-1:0] = DW'($urandom);
      pb_word[DW]     = ~^pb_word[DW-1:0] ^ ($urandom_range(0, 3) == 0);
      playback        = ($urandom_range(0, 3) == 0);
      disable_ch      = ($urandom_range(0, 5) == 0);
      sel    = playback ? pb_word : rx;
      msk    = disable_ch ? {1'b1, {DW{1'b0}}} : sel;
      exp_pe = !disable_ch && !(^sel);
      @(posedge clk);
      #1;
      check(rec_word == {exp_pe, msk}, "recorded word");
      check(alg_data == (exp_pe ? '0 : msk[DW-1:0]), "algorithm data");
      check(pe == exp_pe, "parity error flag");
      if (exp_pe) n_pe++;
      if (disable_ch) n_dis++;
      if (playback) n_pb++;
    end
    check(n_pe > 0 && n_dis > 0 && n_pb > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
