// Self-checking testbench for quadlin_decode. Every one of the 256 codes is
// applied: the 6-bit magnitude times 1, 4, 16 or 64 (chosen by the two top
// bits) must appear on the linear output, and only the full-scale code 0xFF
// may be flagged as saturated. Combinational; checked after settling.
module tb_quadlin_decode;
  logic [7:0] code = '0;
  logic [11:0] value;
  logic saturated;
  int checks = 0, failures = 0;

  quadlin_decode dut (.*);

  initial begin
    #1_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s code %02h", what, code);
    end
  endtask

  int scale;
  initial begin
    for (int c = 0; c < 256; c++) begin
      code = 8'(c);
      #5;
      scale = 1 << (2 * (c >> 6));
      check(int'(value) == (c & 63) * scale, "linear value");
      check(saturated == (c == 255), "saturation flag");
    end
    code = 8'hBF;
    #5;
    check(value == 12'd1008, "63 x 16");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
