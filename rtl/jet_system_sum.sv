// Jet system-level hit summation and Jet-ET hits.
//
// Adds the remote crate's intermediate sums (cable, parity-checked) to the
// local crate's (delayed to match the cable): eight main-jet sums saturating
// at 7 and eight forward sums (four thresholds, left and right) saturating
// at 3. The final counts feed the Jet-ET estimator.
//
// CTP cable 0: bits 23:0 main sums, 27:24 Jet-ET hit map, odd parity in 32.
// CTP cable 1: bits 15:0 forward sums (L0..L3, R0..R3), odd parity in 32.
// Forward word layout as in jet_crate_sum. Latency: three clocks from the
// inputs to both CTP words (one for the sums, two for the estimator; the
// sums are held two extra clocks so both words refer to one bunch crossing).
module jet_system_sum
  import cmm_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [23:0]               remote_main,
  input  logic [15:0]               remote_fwd,
  input  logic [23:0]               local_main,
  input  logic [15:0]               local_fwd,
  input  logic [3:0][15:0]          jet_et_thr,
  input  logic                      lut_we_main,
  input  logic                      lut_we_fwd,
  input  logic [11:0]               lut_addr,
  input  logic [15:0]               lut_wdata,
  output logic [23:0]               final_main,
  output logic [15:0]               final_fwd,
  output logic [3:0]                etj_hits,
  output logic [9:0]                etj_value,
  output logic [CTP_W-1:0]          ctp_main,
  output logic [CTP_W-1:0]          ctp_fwd
);

  logic [N_THR-1:0][HIT_W-1:0]  m_sum;
  logic [2*N_FWD_THR-1:0][FWD_W-1:0] f_sum;

  for (genvar t = 0; t < N_THR; t++) begin : g_main
    logic [1:0][HIT_W-1:0] c;
    assign c = {remote_main[3*t +: 3], local_main[3*t +: 3]};
    hit_sum #(.N(2), .W(HIT_W)) u_s (.counts(c), .sum(m_sum[t]));
  end
  for (genvar f = 0; f < 2*N_FWD_THR; f++) begin : g_fwd
    logic [1:0][FWD_W-1:0] c;
    assign c = {remote_fwd[2*f +: 2], local_fwd[2*f +: 2]};
    hit_sum #(.N(2), .W(FWD_W)) u_s (.counts(c), .sum(f_sum[f]));
  end

  logic [23:0] main_q, main_d1, main_d2;
  logic [15:0] fwd_q,  fwd_d1,  fwd_d2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      main_q <= '0; main_d1 <= '0; main_d2 <= '0;
      fwd_q  <= '0; fwd_d1  <= '0; fwd_d2  <= '0;
    end else begin
      main_q <= m_sum;  main_d1 <= main_q; main_d2 <= main_d1;
      fwd_q  <= f_sum;  fwd_d1  <= fwd_q;  fwd_d2  <= fwd_d1;
    end
  end

  jet_et_estimator u_etj (
    .clk, .rst_n,
    .main_cnt (main_q),
    .fwd_left (fwd_q[7:0]),
    .fwd_right(fwd_q[15:8]),
    .thr      (jet_et_thr),
    .lut_we_main, .lut_we_fwd, .lut_addr, .lut_wdata,
    .etj      (etj_value),
    .hits     (etj_hits)
  );

  assign final_main = main_d2;
  assign final_fwd  = fwd_d2;
  assign ctp_main   = {~^{etj_hits, main_d2}, 4'h0, etj_hits, main_d2};
  assign ctp_fwd    = {~^fwd_d2, 16'h0000, fwd_d2};

endmodule
