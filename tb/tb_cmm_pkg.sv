// Self-checking testbench for cmm_pkg. Checks the function selection from
// the geographical address for all 16 combinations (Table 1 of the
// specification: GEOADD 6:4 = 111/110/101 cluster crate, 100 cluster system,
// 011 and 010 energy or jet crate/system chosen by GEOADD 0, others
// reserved), the quad-linear decode function for all codes, and the widths
// of the energy and slice words.
module tb_cmm_pkg;
  import cmm_pkg::*;
  int checks = 0, failures = 0;
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
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  cmm_func_t f;
  initial begin
    for (int g = 0; g < 16; g++) begin
      f = decode_geoadd(4'(g));
      case (g >> 1)
        7, 6, 5: check(f.ftype == FW_CP && f.level == LVL_CRATE, "CP crate");
        4:       check(f.ftype == FW_CP && f.level == LVL_SYSTEM, "CP system");
        3:       check(f.ftype == ((g & 1) ? FW_JET : FW_ENERGY) && f.level == LVL_CRATE, "jet/energy crate");
        2:       check(f.ftype == ((g & 1) ? FW_JET : FW_ENERGY) && f.level == LVL_SYSTEM, "jet/energy system");
        default: check(f.ftype == FW_RESERVED, "reserved");
      endcase
    end
    for (int c = 0; c < 256; c++)
      check(int'(quadlin_to_linear(8'(c))) == (c % 64) * (1 << (2 * (c / 64))), "quad-linear");
    check($bits(energy_word_t) == 50, "energy word is 50 bits");
    check(SLICE_W == 608, "slice width");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
