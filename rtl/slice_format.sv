// Readout slice formatter: one slice of stored data to the 20 G-Link pins.
//
// Each G-Link data pin carries a 35-bit word per slice (sent LSB first by
// readout_ctrl, which also adds a parity bit, the BCN bits on pins 0-11 and
// the FIFO-overflow flag on pin 14, all in bit 26, which this formatter
// leaves zero there). A recorded input occupies bits 24:0 (data and its
// parity) with its parity-error flag in bit 25. The pin allocation follows
// the specification's readout description per firmware function; the exact
// bit positions within a pin are this design's choice:
//
//  CP:     pins 0-13  backplane slots 1-14
//          pins 14-16 remote cable words 0-2
//          pin 17     local crate sums (cable word), pin 18 final sums, pin 19 zero
//  Jet:    pins 0-15  backplane slots 0-15
//          pin 16     remote main sub-sums; Jet-ET hits in 30:27
//          pin 17     local main sub-sums; total forward L0-L3 in 34:27
//          pin 18     total main counts; total forward R0-R3 in 34:27
//          pin 19     remote forward sub-sums (16:0, flag 17), local 33:18
//  Energy: pins 0-15  backplane slots 0-15; totals {ovf, Et, Ey, Ex} spread
//                     over bits 34:27 of pins 0-6 (Ex from pin 0 upward)
//          pin 16     remote Ex {pe, par, ovf, Ex} in 17:0, sum-ET hits
//                     21:18, missing-ET hits 34:27
//          pin 17     remote Ey in 17:0, remote Et {pe, par, ovf, Et} 34:18
//          pins 18-19 local crate energy cable words 0 and 1
// Combinational.
module slice_format
  import cmm_pkg::*;
(
  input  fw_type_e                          ftype,
  input  slice_t                            s,
  output logic [GL_PINS-1:0][SER_BITS-1:0]  pins
);

  logic [55:0] etot;

  always_comb begin
    pins = '0;
    etot = '0;
    unique case (ftype)
      FW_CP: begin
        for (int p = 0; p < 14; p++) pins[p][25:0] = s.bp[p+1];
        for (int c = 0; c < 3; c++)  pins[14+c][25:0] = s.cab[c];
        pins[17][24:0] = s.crate[0];
        pins[18][24:0] = s.sys[24:0];
      end
      FW_JET: begin
        for (int p = 0; p < 16; p++) pins[p][25:0] = s.bp[p];
        pins[16][25:0]  = s.cab[0];
        pins[16][30:27] = s.sys[43:40];
        pins[17][24:0]  = s.crate[0];
        pins[17][34:27] = s.sys[31:24];
        pins[18][23:0]  = s.sys[23:0];
        pins[18][24]    = ~^s.sys[23:0];
        pins[18][34:27] = s.sys[39:32];
        pins[19][15:0]  = s.cab[1][15:0];
        pins[19][16]    = s.cab[1][24];
        pins[19][17]    = s.cab[1][25];
        pins[19][33:18] = s.crate[1][15:0];
      end
      FW_ENERGY: begin
        for (int p = 0; p < 16; p++) pins[p][25:0] = s.bp[p];
        // {ovf, Et, Ey, Ex}
        etot = {4'h0, s.sys[14:12], s.sys[29:15], s.sys[46:30], s.sys[63:47]};
        for (int p = 0; p < 7; p++) pins[p][34:27] = etot[8*p +: 8];
        pins[16][17:0]  = s.cab[0][17:0];
        pins[16][21:18] = s.sys[11:8];
        pins[16][34:27] = s.sys[7:0];
        pins[17][17:0]  = s.cab[1][17:0];
        pins[17][34:18] = s.cab[2][16:0];
        pins[18][24:0]  = s.crate[0];
        pins[19][24:0]  = s.crate[1];
      end
      default: ;
    endcase
  end

endmodule
