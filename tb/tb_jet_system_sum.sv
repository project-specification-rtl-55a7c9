// Self-checking testbench for jet_system_sum. The Jet-ET tables are loaded
// with known patterns, four thresholds are set, and random remote and local
// crate sums stream in one set per clock. The model adds main counts (clip
// at 7) and forward counts per side (clip at 3), looks up and sums the jet
// energies and compares with the thresholds. The final sums, Jet-ET value and
// map, and both CTP words (with odd parity in bit 32) must all appear exactly
// three clocks after their inputs, aligned to the same bunch crossing.
module tb_jet_system_sum;
  import cmm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [23:0] remote_main = '0, local_main = '0;
  logic [15:0] remote_fwd = '0, local_fwd = '0;
  logic [3:0][15:0] jet_et_thr = '0;
  logic lut_we_main = 0, lut_we_fwd = 0;
  logic [11:0] lut_addr = '0;
  logic [15:0] lut_wdata = '0;
  logic [23:0] final_main;
  logic [15:0] final_fwd;
  logic [3:0] etj_hits;
  logic [9:0] etj_value;
  logic [CTP_W-1:0] ctp_main, ctp_fwd;
  int checks = 0, failures = 0, n_hit = 0;

  jet_system_sum dut (.*);

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

  function automatic logic [7:0] f_lo(int a);  return 8'((a * 13) % 97); endfunction
  function automatic logic [7:0] f_hi(int a);  return 8'((a * 29) % 151); endfunction
  function automatic logic [7:0] f_fwd(int a); return 8'((a * 7) % 83); endfunction

  typedef struct { logic [23:0] m; logic [15:0] f; logic [9:0] e; } exp_t;
  exp_t q [$], x;
  int s, e;
  logic [11:0] alo, ahi, afw;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk);
      lut_addr = 12'(a);
      lut_we_main = 1; lut_we_fwd = 0;
      lut_wdata = {f_hi(a), f_lo(a)};
      @(negedge clk);
      lut_we_main = 0; lut_we_fwd = 1;
      lut_wdata = {8'h00, f_fwd(a)};
    end
    @(negedge clk);
    lut_we_fwd = 0;
    for (int k = 0; k < 4; k++) jet_et_thr[k] = 16'(60 + 40 * k);
    for (int c = 0; c < 3000; c++) begin
      remote_main = 24'($urandom) & 24'h6DB6DB;
      local_main  = 24'($urandom) & ((c % 3 == 0) ? 24'hFFFFFF : 24'h249249);
      remote_fwd  = 16'($urandom);
      local_fwd   = 16'($urandom) & 16'h5555;
      for (int t = 0; t < 8; t++) begin
        s = remote_main[3*t +: 3] + local_main[3*t +: 3];
        x.m[3*t +: 3] = 3'((s > 7) ? 7 : s);
        s = remote_fwd[2*t +: 2] + local_fwd[2*t +: 2];
        x.f[2*t +: 2] = 2'((s > 3) ? 3 : s);
      end
      alo = x.m[11:0];
      ahi = x.m[23:12];
      for (int f = 0; f < 4; f++) afw[3*f +: 3] = 3'(x.f[2*f +: 2]) + 3'(x.f[8 + 2*f +: 2]);
      x.e = 10'(f_lo(alo) + f_hi(ahi) + f_fwd(afw));
      q.push_back(x);
      @(posedge clk);
      #1;
      if (q.size() == 3) begin
        x = q.pop_front();
        check(final_main == x.m, "final main sums");
        check(final_fwd == x.f, "final forward sums");
        check(etj_value == x.e, "Jet-ET value");
        for (int k = 0; k < 4; k++) begin
          check(etj_hits[k] == (x.e > jet_et_thr[k]), "Jet-ET map");
          if (etj_hits[k]) n_hit++;
        end
        check(ctp_main == {~^{etj_hits, x.m}, 4'h0, etj_hits, x.m}, "CTP main word");
        check(ctp_fwd == {~^x.f, 16'h0, x.f}, "CTP forward word");
      end
      @(negedge clk);
    end
    check(n_hit > 0, "Jet-ET hits seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
