// Cluster (CP) system-level hit summation.
//
// Adds, threshold by threshold with saturation at 7, the intermediate sums
// from the three remote crates (received on cable links, parity-checked) and
// the local crate's sums (delayed to match the cable timing). The eight
// final 3-bit sums go to the CTP in bits 23:0 of the CTP cable word with odd
// parity in bit 32; bits 31:24 (reserved pairs and forwarded clock) are 0.
//
// Output registered: one clock after the inputs.
module cp_system_sum
  import cmm_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [N_CABLES-1:0][BP_DW-1:0]    remote,
  input  logic [BP_DW-1:0]                  local_sums,
  output logic [N_THR-1:0][HIT_W-1:0]       final_sums,
  output logic [CTP_W-1:0]                  ctp_word
);

  logic [N_THR-1:0][HIT_W-1:0] sums;

  for (genvar t = 0; t < N_THR; t++) begin : g_thr
    logic [N_CABLES:0][HIT_W-1:0] cnt;
    for (genvar c = 0; c < N_CABLES; c++) begin : g_c
      assign cnt[c] = remote[c][HIT_W*t +: HIT_W];
    end
    assign cnt[N_CABLES] = local_sums[HIT_W*t +: HIT_W];
    hit_sum #(.N(N_CABLES+1), .W(HIT_W)) u_sum (.counts(cnt), .sum(sums[t]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) final_sums <= '0;
    else        final_sums <= sums;
  end

  assign ctp_word = {~^final_sums, 8'h00, final_sums};

endmodule
