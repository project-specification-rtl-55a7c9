// Quad-linear energy decoder.
//
// JEMs send each energy component as an 8-bit compressed code: a 2-bit scale
// (bits 7:6) and a 6-bit magnitude. The linear value is magnitude times
// 1, 4, 16 or 64, up to 4032. The code 8'hFF (largest scale, largest
// magnitude) is flagged as saturated; the crate sum turns a saturated input
// into an overflow bit. Combinational.
module quadlin_decode
  import cmm_pkg::*;
(
  input  logic [7:0]       code,
  output logic [LIN_W-1:0] value,
  output logic             saturated
);

  assign value     = quadlin_to_linear(code);
  assign saturated = (code == 8'hFF);

endmodule
