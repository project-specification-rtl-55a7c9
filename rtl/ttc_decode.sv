// TTC-derived timing signals: bunch-crossing counter and broadcast decode.
//
// The bunch-crossing number (BCN) counter advances every clock, wraps after
// ORBIT_LEN bunch crossings and is reset to zero by BCReset (bcr). Broadcast
// command bytes from the TTC receiver, qualified by brcst_str, are kept for
// the TTC broadcast register; a command of the form 01xxxxxx is the
// scrolling-memory synchronisation command and gives a one-clock sync pulse
// that resets the memory write pointers to zero and the read pointers to
// their offsets. All outputs are registered.
module ttc_decode
  import cmm_pkg::*;
#(
  parameter int unsigned ORBIT_LEN = 3564
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bcr,
  input  logic [7:0]       brcst,
  input  logic             brcst_str,
  output logic [BCN_W-1:0] bcn,
  output logic             sync,
  output logic [7:0]       brcst_last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcn        <= '0;
      sync       <= 1'b0;
      brcst_last <= '0;
    end else begin
      if (bcr)                                    bcn <= '0;
      else if (bcn == BCN_W'(ORBIT_LEN - 1))      bcn <= '0;
      else                                        bcn <= bcn + 1'b1;
      sync <= brcst_str && (brcst[7:6] == 2'b01);
      if (brcst_str) brcst_last <= brcst;
    end
  end

endmodule
