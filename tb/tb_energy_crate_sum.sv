// Self-checking testbench for energy_crate_sum. Each clock the 16 JEMs send
// random quad-linear Ex, Ey and Et codes (bits 7:0, 15:8, 23:16). The model
// decodes them (6-bit value times 1/4/16/64), sums JEMs 0-7 and 8-15
// separately, forms Ex and Ey as the difference and Et as the sum, sets the
// overflow bit on a saturated input (code 0xFF) or a magnitude above 16383,
// and adds an odd parity bit per component. The 50-bit word and the two
// cable halves are checked one clock later. Code ranges are varied so that
// small sums, large sums, overflows and saturated inputs all occur.
module tb_energy_crate_sum;
  import cmm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [N_SLOTS-1:0][BP_DW-1:0] slot_data = '0;
  energy_word_t sum_word;
  logic [CABLE_W-1:0] cable0, cable1;
  int checks = 0, failures = 0, n_ovf = 0, n_neg = 0, n_sat = 0;

  energy_crate_sum dut (.*);

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

  function automatic int lin(logic [7:0] c);
    return int'(c[5:0]) << (2 * c[7:6]);
  endfunction

  int ha [3], hb [3], d;
  logic sat [3];
  energy_word_t e;
  logic [7:0] code;
  initial begin
    repeat (2) @(posedge clk);
    #1;
    check(sum_word.px && sum_word.py && sum_word.pt, "reset parity bits");
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      for (int k = 0; k < 3; k++) begin ha[k] = 0; hb[k] = 0; sat[k] = 0; end
      for (int j = 0; j < N_SLOTS; j++)
        for (int k = 0; k < 3; k++) begin
          code = 8'($urandom);
          if (c % 4 == 0) code[7:6] = 2'b00;
          if ($urandom_range(0, 199) == 0) code = 8'hFF;
          slot_data[j][8*k +: 8] = code;
          if (code == 8'hFF) sat[k] = 1;
          if (j < 8) ha[k] += lin(code); else hb[k] += lin(code);
        end
      d = ha[0] - hb[0];
      e.ex = 15'(d);
      e.ox = sat[0] || d > 16383 || d < -16383;
      if (d < 0) n_neg++;
      d = ha[1] - hb[1];
      e.ey = 15'(d);
      e.oy = sat[1] || d > 16383 || d < -16383;
      d = ha[2] + hb[2];
      e.et = 14'(d);
      e.ot = sat[2] || d > 16383;
      e.px = ~^{e.ox, e.ex};
      e.py = ~^{e.oy, e.ey};
      e.pt = ~^{e.ot, e.et};
      if (e.ot && !sat[2]) n_ovf++;
      if (sat[0]) n_sat++;
      @(posedge clk);
      #1;
      check(sum_word == e, "energy crate word");
      check({cable1, cable0} == 50'(e), "cable halves");
    end
    check(n_ovf > 0 && n_neg > 0 && n_sat > 0, "overflow, negative and saturated inputs seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
