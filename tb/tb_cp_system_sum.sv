// Self-checking testbench for cp_system_sum. Random hit sums from three
// remote crates and the local crate are added per threshold, clipped at 7,
// and must appear one clock later on final_sums and on the CTP word with
// odd parity in bit 32 and zero in bits 31:24.
module tb_cp_system_sum;
  import cmm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [N_CABLES-1:0][BP_DW-1:0] remote = '0;
  logic [BP_DW-1:0] local_sums = '0;
  logic [N_THR-1:0][HIT_W-1:0] final_sums;
  logic [CTP_W-1:0] ctp_word;
  int checks = 0, failures = 0, n_sat = 0, n_lin = 0;

  cp_system_sum dut (.*);

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

  logic [23:0] e;
  int s;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      for (int k = 0; k < 3; k++) remote[k] = 24'($urandom) & ((c % 2) ? 24'hFFFFFF : 24'h492492);
      local_sums = 24'($urandom) & ((c % 2) ? 24'hFFFFFF : 24'h249249);
      for (int t = 0; t < N_THR; t++) begin
        s = local_sums[3*t +: 3];
        for (int k = 0; k < 3; k++) s += remote[k][3*t +: 3];
        e[3*t +: 3] = 3'((s > 7) ? 7 : s);
        if (s > 7) n_sat++; else n_lin++;
      end
      @(posedge clk);
      #1;
      check(final_sums == e, "final sums");
      check(ctp_word == {~^e, 8'h00, e}, "CTP word");
    end
    check(n_sat > 0 && n_lin > 0, "both ranges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
