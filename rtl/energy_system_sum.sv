// Energy system-level summation and the sum-ET and missing-ET hit maps.
//
// The energy System CMM sits in crate 5; its remote input is crate 4's sum.
// Both crate sums are in their own quadrant coordinates, so the totals are
//   Ex = Ex(4) - Ex(5),  Ey = Ey(4) + Ey(5),  Et = Et(4) + Et(5).
// No new overflow is created here; the crate overflow bits are ORed. The
// total Et is compared with four programmable thresholds (hit k when
// Et > threshold k, or when Et overflowed) to give the sum-ET hit map; Ex
// and Ey go to the missing-ET lookup for the eight missing-ET hits.
//
// CTP word: bits 7:0 missing-ET hits, 11:8 sum-ET hits, odd parity in 32.
// Timing: totals registered one clock after the inputs; both hit maps and
// the CTP word three clocks after the inputs.
module energy_system_sum
  import cmm_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  // Remote (crate 4) and local (crate 5) sums, parity-checked.
  input  logic [EXY_W-1:0]         rem_ex, rem_ey,
  input  logic [ET_W-1:0]          rem_et,
  input  logic [2:0]               rem_ovf,      // {ot, oy, ox}
  input  logic [EXY_W-1:0]         loc_ex, loc_ey,
  input  logic [ET_W-1:0]          loc_et,
  input  logic [2:0]               loc_ovf,
  input  logic [3:0][15:0]         sum_et_thr,
  input  logic                     lut_we,
  input  logic                     lut_bank,
  input  logic [11:0]              lut_addr,
  input  logic [15:0]              lut_wdata,
  output logic signed [16:0]       tot_ex,
  output logic signed [16:0]       tot_ey,
  output logic [ET_W:0]            tot_et,
  output logic [2:0]               tot_ovf,
  output logic [3:0]               sum_et_hits,
  output logic [7:0]               miss_et_hits,
  output logic [CTP_W-1:0]         ctp_word
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tot_ex  <= '0;
      tot_ey  <= '0;
      tot_et  <= '0;
      tot_ovf <= '0;
    end else begin
      tot_ex  <= 17'(signed'(rem_ex)) - 17'(signed'(loc_ex));
      tot_ey  <= 17'(signed'(rem_ey)) + 17'(signed'(loc_ey));
      tot_et  <= {1'b0, rem_et} + {1'b0, loc_et};
      tot_ovf <= rem_ovf | loc_ovf;
    end
  end

  // Sum-ET thresholds, delayed to line up with the two-clock missing-ET path.
  logic [3:0] set_d1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      set_d1      <= '0;
      sum_et_hits <= '0;
    end else begin
      for (int k = 0; k < 4; k++)
        set_d1[k] <= tot_ovf[2] || (16'(tot_et) > sum_et_thr[k]);
      sum_et_hits <= set_d1;
    end
  end

  missing_et_lut u_miss (
    .clk, .rst_n,
    .ex  (tot_ex),
    .ey  (tot_ey),
    .ovf (tot_ovf[0] | tot_ovf[1]),
    .lut_we, .lut_bank, .lut_addr, .lut_wdata,
    .hits(miss_et_hits)
  );

  assign ctp_word = {~^{sum_et_hits, miss_et_hits}, 20'h0, sum_et_hits, miss_et_hits};

endmodule
