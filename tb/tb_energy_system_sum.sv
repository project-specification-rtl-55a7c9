// Self-checking testbench for energy_system_sum. The missing-ET tables are
// loaded with a pattern and four Sum-ET thresholds set. Random crate sums
// from the remote (crate 4) and local (crate 5) energy CMMs stream in. The
// model forms Ex = remote - local, Ey = remote + local, Et = remote + local
// (one clock latency, checked exactly), the Sum-ET map (Et above threshold or
// Et overflow) and the missing-ET map via the same table lookup rule, both
// checked exactly three clocks after the input, and the CTP word.
module tb_energy_system_sum;
  import cmm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [EXY_W-1:0] rem_ex = '0, rem_ey = '0, loc_ex = '0, loc_ey = '0;
  logic [ET_W-1:0] rem_et = '0, loc_et = '0;
  logic [2:0] rem_ovf = '0, loc_ovf = '0;
  logic [3:0][15:0] sum_et_thr = '0;
  logic lut_we = 0, lut_bank = 0;
  logic [11:0] lut_addr = '0;
  logic [15:0] lut_wdata = '0;
  logic signed [16:0] tot_ex, tot_ey;
  logic [ET_W:0] tot_et;
  logic [2:0] tot_ovf;
  logic [3:0] sum_et_hits;
  logic [7:0] miss_et_hits;
  logic [CTP_W-1:0] ctp_word;
  int checks = 0, failures = 0, n_set = 0, n_miss = 0;

  energy_system_sum dut (.*);

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

  function automatic logic [7:0] pat(int field, int a);
    return 8'((a * (4 * field + 1) + field * 17) % 256);
  endfunction
  function automatic int mag(int v);
    v = (v < 0) ? -v : v;
    return (v > 2047) ? 2047 : v;
  endfunction
  function automatic int sx15(logic [14:0] v);
    return v[14] ? int'(v) - 32768 : int'(v);
  endfunction

  typedef struct { int x, y, t; logic [2:0] o; logic [3:0] s; logic [7:0] m; } exp_t;
  exp_t q [$], e;
  int mx, my, mo, rng, sh, a;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 2; b++)
      for (int k = 0; k < 4096; k++) begin
        @(negedge clk);
        lut_we = 1; lut_bank = b[0]; lut_addr = 12'(k);
        lut_wdata = {pat(2*b + 1, k), pat(2*b, k)};
      end
    @(negedge clk);
    lut_we = 0;
    for (int k = 0; k < 4; k++) sum_et_thr[k] = 16'(1000 + 3000 * k);
    for (int c = 0; c < 4000; c++) begin
      rem_ex = 15'($urandom_range(0, 4095) - 2048);
      loc_ex = 15'($urandom_range(0, 4095) - 2048);
      rem_ey = 15'($urandom_range(0, 1023) - 512);
      loc_ey = 15'($urandom_range(0, 1023) - 512);
      if (c % 3 == 0) begin rem_ex = 15'($urandom_range(0, 63)); loc_ex = 15'($urandom_range(0, 63)); rem_ey = 15'($urandom_range(0, 31)); loc_ey = 15'($urandom_range(0, 31)); end
      rem_et = 14'($urandom);
      loc_et = 14'($urandom);
      rem_ovf = ($urandom_range(0, 29) == 0) ? 3'($urandom) : 3'b000;
      loc_ovf = ($urandom_range(0, 29) == 0) ? 3'($urandom) : 3'b000;
      e.x = sx15(rem_ex) - sx15(loc_ex);
      e.y = sx15(rem_ey) + sx15(loc_ey);
      e.t = int'(rem_et) + int'(loc_et);
      e.o = rem_ovf | loc_ovf;
      for (int k = 0; k < 4; k++) e.s[k] = e.o[2] || (e.t > int'(sum_et_thr[k]));
      mx = mag(e.x); my = mag(e.y); mo = mx | my;
      rng = (mo >= 1024) ? 3 : (mo >= 256) ? 2 : (mo >= 64) ? 1 : 0;
      sh  = (rng == 3) ? 5 : 2 * rng;
      a = (((my >> sh) & 63) << 6) | ((mx >> sh) & 63);
      e.m = (e.o[0] || e.o[1]) ? 8'hFF : pat(rng, a);
      q.push_back(e);
      @(posedge clk);
      #1;
      e = q[q.size() - 1];
      check(int'(tot_ex) == e.x && int'(tot_ey) == e.y && int'(tot_et) == e.t && tot_ovf == e.o,
            "system totals, one clock latency");
      if (q.size() == 3) begin
        e = q.pop_front();
        check(sum_et_hits == e.s, "Sum-ET map, three clocks latency");
        check(miss_et_hits == e.m, "missing-ET map, three clocks latency");
        check(ctp_word == {~^{e.s, e.m}, 20'h0, e.s, e.m}, "CTP word");
        if (|e.s) n_set++;
        if (|e.m) n_miss++;
      end
      @(negedge clk);
    end
    check(n_set > 0 && n_miss > 0, "hits seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
