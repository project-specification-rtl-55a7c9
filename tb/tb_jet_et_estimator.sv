// Self-checking testbench for jet_et_estimator. All three 4096-entry tables
// are loaded through the write port with known patterns. Then random jet
// counts stream in one set per clock; the model looks up the three energies,
// sums them and compares with four random thresholds. The energy sum and the
// 4-bit Jet-ET map are checked exactly two clocks after each input set
// (table read, then sum and compare).
module tb_jet_et_estimator;
  import cmm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [N_THR-1:0][HIT_W-1:0] main_cnt = '0;
  logic [N_FWD_THR-1:0][FWD_W-1:0] fwd_left = '0, fwd_right = '0;
  logic [3:0][15:0] thr = '0;
  logic lut_we_main = 0, lut_we_fwd = 0;
  logic [11:0] lut_addr = '0;
  logic [15:0] lut_wdata = '0;
  logic [9:0] etj;
  logic [3:0] hits;
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0;

  jet_et_estimator dut (.*);

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

  function automatic logic [7:0] f_lo(int a);  return 8'((a * 37) % 211); endfunction
  function automatic logic [7:0] f_hi(int a);  return 8'((a * 11 + 5) % 256); endfunction
  function automatic logic [7:0] f_fwd(int a); return 8'((a * 3) % 199); endfunction

  logic [9:0] exp_e [$];
  logic [11:0] alo, ahi, afw;
  int e;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk);
      lut_addr = 12'(a);
      lut_we_main = 1; lut_we_fwd = 1;
      lut_wdata = {f_hi(a), f_lo(a)};
      @(posedge clk);
      @(negedge clk);
      lut_wdata = {8'h00, f_fwd(a)};
      lut_we_main = 0;
      @(posedge clk);
    end
    @(negedge clk);
    lut_we_main = 0; lut_we_fwd = 0;
    for (int k = 0; k < 4; k++) thr[k] = 16'($urandom_range(100, 500));
    for (int c = 0; c < 3000; c++) begin
      main_cnt  = 24'($urandom);
      fwd_left  = 8'($urandom);
      fwd_right = 8'($urandom);
      alo = {main_cnt[3], main_cnt[2], main_cnt[1], main_cnt[0]};
      ahi = {main_cnt[7], main_cnt[6], main_cnt[5], main_cnt[4]};
      for (int f = 0; f < 4; f++) afw[3*f +: 3] = 3'(fwd_left[f]) + 3'(fwd_right[f]);
      e = f_lo(alo) + f_hi(ahi) + f_fwd(afw);
      exp_e.push_back(10'(e));
      @(posedge clk);
      #1;
      if (exp_e.size() == 2) begin
        e = exp_e.pop_front();
        check(etj == 10'(e), "Jet-ET sum, two clocks latency");
        for (int k = 0; k < 4; k++) begin
          check(hits[k] == (e > thr[k]), "Jet-ET hit");
          if (hits[k]) n_hit++; else n_miss++;
        end
      end
      @(negedge clk);
    end
    check(n_hit > 0 && n_miss > 0, "hits and misses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
