// Self-checking testbench for cp_crate_sum, the cluster crate sum. Each
// clock random 24-bit words are put on all 16 backplane slots (eight 3-bit
// hit counts per CPM). The model adds the counts of slots 1-14 per threshold,
// clips at 7 and adds odd parity over the 24 result bits; slots 0 and 15
// must not contribute. The cable word must appear exactly one clock later.
// Counts are sometimes forced small so both unsaturated and saturated sums
// occur.
module tb_cp_crate_sum;
  import cmm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [N_SLOTS-1:0][BP_DW-1:0] slot_data = '0;
  logic [CABLE_W-1:0] cable_word;
  int checks = 0, failures = 0, n_sat = 0, n_lin = 0;

  cp_crate_sum dut (.*);

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

  logic [23:0] exp_s;
  int s;
  initial begin
    repeat (2) @(posedge clk);
    #1;
    check(cable_word == {1'b1, 24'h0}, "reset word has odd parity");
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      for (int j = 0; j < N_SLOTS; j++) begin
        slot_data[j] = 24'($urandom);
        if (c % 2 == 0) slot_data[j] &= 24'h249249;   // counts 0/1 only
      end
      for (int t = 0; t < N_THR; t++) begin
        s = 0;
        for (int j = 1; j <= 14; j++) s += slot_data[j][3*t +: 3];
        exp_s[3*t +: 3] = 3'((s > 7) ? 7 : s);
        if (s > 7) n_sat++; else n_lin++;
      end
      @(posedge clk);
      #1;
      check(cable_word == {~^exp_s, exp_s}, "crate sum cable word");
    end
    check(n_sat > 0 && n_lin > 0, "both ranges");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
