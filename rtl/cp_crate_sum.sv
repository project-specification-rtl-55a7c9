// Cluster (CP) crate-level hit summation.
//
// Each of the 14 CPMs, in backplane slots 1 to 14, sends eight 3-bit hit
// counts (threshold k in bits 3k+2:3k). For each threshold the 14 counts
// are added with saturation at 7, giving eight 3-bit intermediate sums. The
// 24 sum bits and an odd parity bit (bit 24) form the 25-bit cable word sent
// to the System CMM. Slots 0 and 15 are not used by CP firmware.
//
// Input is the parity-checked, masked data of all 16 slots; output is
// registered, one clock after the input.
module cp_crate_sum
  import cmm_pkg::*;
(
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic [N_SLOTS-1:0][BP_DW-1:0]     slot_data,
  output logic [CABLE_W-1:0]                cable_word
);

  localparam int unsigned N_CPM = 14;

  logic [N_THR-1:0][HIT_W-1:0] sums;

  for (genvar t = 0; t < N_THR; t++) begin : g_thr
    logic [N_CPM-1:0][HIT_W-1:0] cnt;
    for (genvar m = 0; m < N_CPM; m++) begin : g_cpm
      assign cnt[m] = slot_data[m+1][HIT_W*t +: HIT_W];
    end
    hit_sum #(.N(N_CPM), .W(HIT_W)) u_sum (.counts(cnt), .sum(sums[t]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cable_word <= {1'b1, {(CABLE_W-1){1'b0}}};
    else        cable_word <= {~^sums, sums};
  end

endmodule
