// Self-checking testbench for scroll_dpr, the 256-deep scrolling readout
// memory. A random word is written every clock. For several read offsets the
// readout word must equal the word written exactly 256 - offset clocks
// earlier (256 for offset 0), which is the programmable readout latency; the
// playback port must show the word written 256 clocks earlier. The TTC sync
// command must reset the write pointer to 0 and load the read pointer with
// the offset. Finally recording is stopped, the host fills every address and
// 16-bit lane, and the playback port must replay the host data in address
// order.
module tb_scroll_dpr;
  localparam int W = 416, DEPTH = 256, LANES = 26;
  logic clk = 0, rst_n = 0;
  logic sync = 0, rec_en = 1, host_we = 0;
  logic [7:0] offset = '0, host_addr = '0;
  logic [4:0] host_lane = '0;
  logic [15:0] host_wdata = '0;
  logic [W-1:0] wr_word = '0, rd_word, pb_word;
  logic [7:0] wr_ptr, rd_ptr;
  int checks = 0, failures = 0;

  scroll_dpr #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #12.5 clk = ~clk;
  initial begin
    #20_000_000;
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

  logic [W-1:0] hist [1024];
  int t = 0, d;
  function automatic logic [15:0] hpat(int a, int l);
    return 16'(a * 131 + l * 7 + 5);
  endfunction
  logic [W-1:0] e;
  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    foreach (offset[i]) ;
    for (int k = 0; k < 5; k++) begin
      offset = (k == 0) ? 8'd0 : (k == 1) ? 8'd255 : 8'($urandom);
      d = (offset == 0) ? 256 : 256 - int'(offset);
      sync = 1;
      @(posedge clk);
      #1;
      check(wr_ptr == 0 && rd_ptr == offset, "sync loads pointers");
      @(negedge clk);
      sync = 0;
      for (int c = 0; c < 700; c++) begin
        for (int l = 0; l < 13; l++) wr_word[32*l +: 32] = $urandom;
        hist[t % 1024] = wr_word;
        @(posedge clk);
        #1;
        if (c >= 256) begin
          check(rd_word == hist[(t - d) % 1024], "readout word at offset latency");
          check(pb_word == hist[(t - 256) % 1024], "playback word");
        end
        t++;
        @(negedge clk);
      end
    end
    // Host preload and playback.
    rec_en = 0;
    host_we = 1;
    for (int a = 0; a < DEPTH; a++)
      for (int l = 0; l < LANES; l++) begin
        host_addr = 8'(a); host_lane = 5'(l); host_wdata = hpat(a, l);
        @(negedge clk);
      end
    host_we = 0;
    repeat (300) begin
      @(posedge clk);
      #1;
      for (int l = 0; l < LANES; l++) e[16*l +: 16] = hpat(int'(8'(wr_ptr - 8'd1)), l);
      check(pb_word == e, "playback of host data");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
