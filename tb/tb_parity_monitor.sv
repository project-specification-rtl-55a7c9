// Self-checking testbench for parity_monitor. Random parity-error vectors are
// applied; a model tracks the per-channel error latch, the parity error
// counter (one count per clock with any error) and the PE status bit, and
// checks them every clock (one clock latency). Clear Errors is pulsed at
// random. The counter is then driven with errors on every clock for more than
// 65535 clocks to show that it stops at 0xFFFF.
module tb_parity_monitor;
  localparam int N = 20;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] pe_vec = '0;
  logic clear = 0;
  logic [N-1:0] err_latch;
  logic [15:0] pec;
  logic pe_status, pcr;
  int checks = 0, failures = 0;

  parity_monitor #(.N(N)) dut (.*);

  always #12.5 clk = ~clk;

  initial begin
    #10_000_000;
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

  logic [N-1:0] m_latch = '0;
  int m_pec = 0;
  logic m_pcr;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      pe_vec = ($urandom_range(0, 2) == 0) ? N'(1 << $urandom_range(0, N-1)) : '0;
      clear  = ($urandom_range(0, 99) == 0);
      m_pcr  = |pe_vec;
      if (clear) begin m_latch = '0; m_pec = 0; end
      else begin
        m_latch |= pe_vec;
        if (|pe_vec && m_pec < 65535) m_pec++;
      end
      @(posedge clk);
      #1;
      check(err_latch == m_latch, "error latch");
      check(pec == 16'(m_pec), "parity error counter");
      check(pe_status == (m_pec != 0), "PE status");
      check(pcr == m_pcr, "parity check result");
    end
    // Saturation.
    @(negedge clk);
    clear = 0;
    pe_vec = '1;
    repeat (66000) @(posedge clk);
    #1;
    check(pec == 16'hFFFF, "counter saturates at FFFF");
    @(negedge clk);
    clear = 1;
    @(posedge clk);
    #1;
    check(pec == 16'h0 && err_latch == '0 && !pe_status, "clear errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
