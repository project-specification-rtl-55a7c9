// Jet transverse-energy (Jet-ET) estimator.
//
// A multiplicity-based estimate of the total jet ET: the numbers of jets
// passing each main and forward threshold are turned into energies by
// lookup tables, the energies are added and the sum is compared with four
// programmable thresholds to give the 4-bit Jet-ET hit map.
//
// Three 4096 x 8-bit tables, loaded by the host (VME) write port; a main
// write loads tables 0 (low byte) and 1 (high byte) at one address, a
// forward write loads table 2 from the low byte:
//   table 0: address {n3,n2,n1,n0}  main-jet counts of thresholds 0-3
//   table 1: address {n7,n6,n5,n4}  main-jet counts of thresholds 4-7
//   table 2: address {s3,s2,s1,s0}  forward counts, sk = Lk + Rk (0..6)
// The table contents decide the estimator (for instance a lower limit,
// sum over k of (n_k - n_k+1) times threshold k). Hit k is set when the
// 10-bit energy sum is strictly greater than threshold k.
//
// Timing: table read registered (clock 1), sum and compare registered
// (clock 2); etj and hits follow the counts by two clocks.
module jet_et_estimator
  import cmm_pkg::*;
(
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [N_THR-1:0][HIT_W-1:0]     main_cnt,
  input  logic [N_FWD_THR-1:0][FWD_W-1:0] fwd_left,
  input  logic [N_FWD_THR-1:0][FWD_W-1:0] fwd_right,
  input  logic [3:0][15:0]                thr,
  input  logic                            lut_we_main,
  input  logic                            lut_we_fwd,
  input  logic [11:0]                     lut_addr,
  input  logic [15:0]                     lut_wdata,
  output logic [9:0]                      etj,
  output logic [3:0]                      hits
);

  logic [7:0] lut_lo  [4096];
  logic [7:0] lut_hi  [4096];
  logic [7:0] lut_fwd [4096];

  logic [11:0] a_lo, a_hi, a_fwd;
  always_comb begin
    a_lo = {main_cnt[3], main_cnt[2], main_cnt[1], main_cnt[0]};
    a_hi = {main_cnt[7], main_cnt[6], main_cnt[5], main_cnt[4]};
    for (int f = 0; f < N_FWD_THR; f++)
      a_fwd[3*f +: 3] = {1'b0, fwd_left[f]} + {1'b0, fwd_right[f]};
  end

  always_ff @(posedge clk) begin
    if (lut_we_main) lut_lo[lut_addr]  <= lut_wdata[7:0];
    if (lut_we_main) lut_hi[lut_addr]  <= lut_wdata[15:8];
    if (lut_we_fwd)  lut_fwd[lut_addr] <= lut_wdata[7:0];
  end

  logic [7:0] e_lo, e_hi, e_fwd;
  always_ff @(posedge clk) begin
    e_lo  <= lut_lo[a_lo];
    e_hi  <= lut_hi[a_hi];
    e_fwd <= lut_fwd[a_fwd];
  end

  logic [9:0] esum;
  assign esum = 10'(e_lo) + 10'(e_hi) + 10'(e_fwd);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      etj  <= '0;
      hits <= '0;
    end else begin
      etj <= esum;
      for (int k = 0; k < 4; k++) hits[k] <= (16'(esum) > thr[k]);
    end
  end

endmodule
