// Self-checking testbench for jet_crate_sum. Random JEM words go on the 16
// slots. The model treats JEMs 0, 7, 8 and 15 as forward JEMs (eight 2-bit
// main counts in bits 15:0, four 2-bit forward counts in bits 23:16) and the
// others as central JEMs (eight 3-bit counts). Main sums clip at 7; forward
// left (JEMs 0+8) and right (JEMs 7+15) sums clip at 3. Both cable words,
// with odd parity in bit 24, are checked one clock after the input.
module tb_jet_crate_sum;
  import cmm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [N_SLOTS-1:0][BP_DW-1:0] slot_data = '0;
  logic [CABLE_W-1:0] main_word, fwd_word;
  int checks = 0, failures = 0, n_fsat = 0;

  jet_crate_sum dut (.*);

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

  logic [23:0] em;
  logic [15:0] ef;
  int s, l, r;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      for (int j = 0; j < N_SLOTS; j++) begin
        slot_data[j] = 24'($urandom);
        if (c % 2 == 0 && !(j == 0 || j == 7 || j == 8 || j == 15)) slot_data[j] &= 24'h249249;
      end
      for (int t = 0; t < N_THR; t++) begin
        s = 0;
        for (int j = 0; j < N_SLOTS; j++)
          if (j == 0 || j == 7 || j == 8 || j == 15) s += slot_data[j][2*t +: 2];
          else                                       s += slot_data[j][3*t +: 3];
        em[3*t +: 3] = 3'((s > 7) ? 7 : s);
      end
      for (int f = 0; f < 4; f++) begin
        l = slot_data[0][16+2*f +: 2] + slot_data[8][16+2*f +: 2];
        r = slot_data[7][16+2*f +: 2] + slot_data[15][16+2*f +: 2];
        if (l > 3) n_fsat++;
        ef[2*f +: 2]     = 2'((l > 3) ? 3 : l);
        ef[8 + 2*f +: 2] = 2'((r > 3) ? 3 : r);
      end
      @(posedge clk);
      #1;
      check(main_word == {~^em, em}, "main cable word");
      check(fwd_word == {~^ef, 8'h00, ef}, "forward cable word");
    end
    check(n_fsat > 0, "forward saturation seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
