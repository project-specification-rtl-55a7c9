// Self-checking testbench for missing_et_lut. Both host banks are loaded
// over all 4096 addresses (bank 0 holds the fields for ranges 0 and 1, bank 1
// those for ranges 2 and 3) with a pattern that depends on the field and the
// address. Random Ex/Ey totals of all magnitudes stream in; the model clips
// the magnitudes to 11 bits, picks the range from the highest set bit of
// either, forms the 12-bit address from the two 6-bit windows and reads the
// pattern back. The hit map must appear two clocks after the input, and be
// all ones when the overflow input is set.
module tb_missing_et_lut;
  logic clk = 0, rst_n = 0;
  logic signed [16:0] ex = '0, ey = '0;
  logic ovf = 0, lut_we = 0, lut_bank = 0;
  logic [11:0] lut_addr = '0;
  logic [15:0] lut_wdata = '0;
  logic [7:0] hits;
  int checks = 0, failures = 0;
  int n_rng [4];

  missing_et_lut dut (.*);

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
    return 8'((a * (2 * field + 3) + field * 41) % 256);
  endfunction
  function automatic int mag(int v);
    v = (v < 0) ? -v : v;
    return (v > 2047) ? 2047 : v;
  endfunction

  logic [7:0] q [$];
  int mx, my, mo, rng, sh, a;
  logic [7:0] x;
  initial begin
    foreach (n_rng[i]) n_rng[i] = 0;
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
    for (int c = 0; c < 4000; c++) begin
      case (c % 5)
        0: begin ex = 17'($urandom_range(0, 127) - 64);   ey = 17'($urandom_range(0, 127) - 64); end
        1: begin ex = 17'($urandom_range(0, 511) - 256);  ey = 17'($urandom_range(0, 511) - 256); end
        2: begin ex = 17'($urandom_range(0, 2047) - 1024); ey = 17'($urandom_range(0, 2047) - 1024); end
        default: begin ex = 17'($urandom); ey = 17'($urandom); end
      endcase
      ovf = ($urandom_range(0, 19) == 0);
      mx = mag(int'(ex));
      my = mag(int'(ey));
      mo = mx | my;
      rng = (mo >= 1024) ? 3 : (mo >= 256) ? 2 : (mo >= 64) ? 1 : 0;
      sh  = (rng == 3) ? 5 : 2 * rng;
      a = (((my >> sh) & 63) << 6) | ((mx >> sh) & 63);
      n_rng[rng]++;
      q.push_back(ovf ? 8'hFF : pat(rng, a));
      @(posedge clk);
      #1;
      if (q.size() == 2) begin
        x = q.pop_front();
        check(hits == x, "missing-ET hit map, two clocks latency");
      end
      @(negedge clk);
    end
    check(n_rng[0] > 0 && n_rng[1] > 0 && n_rng[2] > 0 && n_rng[3] > 0, "all four ranges used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
