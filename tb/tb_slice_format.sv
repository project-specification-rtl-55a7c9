// Self-checking testbench for slice_format. Random slices are formatted for
// each firmware function and the pin words are checked against the pin
// allocation: which recorded backplane slot or cable word appears on which
// pin, where the system results go, that bit 26 of pins 0-11 and 14 (used
// for the BCN and FIFO-overflow bits added by the serialiser) is always zero, and that the
// reserved function gives all-zero pins. Combinational.
module tb_slice_format;
  import cmm_pkg::*;
  fw_type_e ftype = FW_CP;
  slice_t s = '0;
  logic [GL_PINS-1:0][SER_BITS-1:0] pins;
  int checks = 0, failures = 0;

  slice_format dut (.*);
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

  logic ok;
  logic [55:0] et;
  initial begin
    for (int k = 0; k < 400; k++) begin
      for (int i = 0; i < SLICE_W / 32 + 1; i++) s[32*i +: 32] = $urandom;
      ftype = fw_type_e'(k % 4);
      #5;
      ok = 1;
      for (int p = 0; p < 15; p++) if ((p < 12 || p == 14) && pins[p][26]) ok = 0;
      check(ok, "bit 26 left free");
      unique case (ftype)
        FW_CP: begin
          for (int p = 0; p < 14; p++) check(pins[p] == 35'(s.bp[p+1]), "CP slot on pin");
          for (int c = 0; c < 3; c++) check(pins[14+c] == 35'(s.cab[c]), "CP cable on pin");
          check(pins[17] == 35'(s.crate[0]), "CP crate sums");
          check(pins[18] == 35'(s.sys[24:0]), "CP final sums");
          check(pins[19] == '0, "CP pin 19 unused");
        end
        FW_JET: begin
          for (int p = 0; p < 16; p++) check(pins[p][25:0] == s.bp[p], "jet slot on pin");
          check(pins[16][25:0] == s.cab[0] && pins[16][30:27] == s.sys[43:40], "jet remote main and Jet-ET");
          check(pins[18][23:0] == s.sys[23:0] && ^pins[18][24:0] == 1'b1, "jet totals with odd parity");
          check(pins[19][15:0] == s.cab[1][15:0] && pins[19][33:18] == s.crate[1][15:0], "jet forward words");
        end
        FW_ENERGY: begin
          for (int p = 0; p < 16; p++) check(pins[p][25:0] == s.bp[p], "energy slot on pin");
          for (int p = 0; p < 7; p++) et[8*p +: 8] = pins[p][34:27];
          check(et[16:0] == s.sys[63:47] && et[33:17] == s.sys[46:30] && et[48:34] == s.sys[29:15]
                && et[51:49] == s.sys[14:12], "energy totals spread over pins 0-6");
          check(pins[16][34:27] == s.sys[7:0] && pins[16][21:18] == s.sys[11:8], "energy hit maps");
          check(pins[18][24:0] == s.crate[0] && pins[19][24:0] == s.crate[1], "energy crate words");
        end
        default: check(pins == '0, "reserved function gives zero");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
