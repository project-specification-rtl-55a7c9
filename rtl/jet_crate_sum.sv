// Jet crate-level hit summation, with the input routing block.
//
// JEMs 1-6 and 9-14 (barrel and end-cap) send eight 3-bit main-jet hit
// counts, formatted like CPM data. JEMs 0, 7, 8 and 15 (end-cap and forward)
// send eight 2-bit main-jet counts M0..M7 in bits 15:0 and four 2-bit
// forward counts F0..F3 in bits 23:16. The routing block below maps these
// mixtures to the processing elements; it is the only place that changes
// if the bit allocation changes.
//
// Main sums: all 16 JEMs, per threshold, saturating at 7. Forward sums: per
// forward threshold, JEMs 0+8 form the left sum and JEMs 7+15 the right
// sum, saturating at 3.
//
// Outputs (registered, one clock): main cable word {odd parity, 8 x 3-bit}
// and forward cable word {odd parity (bit 24), 8'b0, R3..R0, L3..L0} with
// Lk in bits 2k+1:2k and Rk in bits 2k+9:2k+8.
module jet_crate_sum
  import cmm_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [N_SLOTS-1:0][BP_DW-1:0] slot_data,
  output logic [CABLE_W-1:0]            main_word,
  output logic [CABLE_W-1:0]            fwd_word
);

  // JEMs 0, 7, 8, 15 carry forward data.
  function automatic logic is_fwd_jem(input int unsigned j);
    return (j == 0) || (j == 7) || (j == 8) || (j == 15);
  endfunction

  // Routing block.
  logic [N_THR-1:0][N_SLOTS-1:0][HIT_W-1:0] main_cnt;
  logic [N_FWD_THR-1:0][1:0][FWD_W-1:0]     left_cnt, right_cnt;

  always_comb begin
    for (int t = 0; t < N_THR; t++)
      for (int j = 0; j < N_SLOTS; j++)
        main_cnt[t][j] = is_fwd_jem(j) ? {1'b0, slot_data[j][FWD_W*t +: FWD_W]}
                                       : slot_data[j][HIT_W*t +: HIT_W];
    for (int f = 0; f < N_FWD_THR; f++) begin
      left_cnt[f][0]  = slot_data[0][16 + FWD_W*f +: FWD_W];
      left_cnt[f][1]  = slot_data[8][16 + FWD_W*f +: FWD_W];
      right_cnt[f][0] = slot_data[7][16 + FWD_W*f +: FWD_W];
      right_cnt[f][1] = slot_data[15][16 + FWD_W*f +: FWD_W];
    end
  end

  logic [N_THR-1:0][HIT_W-1:0]     main_sum;
  logic [N_FWD_THR-1:0][FWD_W-1:0] left_sum, right_sum;

  for (genvar t = 0; t < N_THR; t++) begin : g_main
    hit_sum #(.N(N_SLOTS), .W(HIT_W)) u_sum (.counts(main_cnt[t]), .sum(main_sum[t]));
  end
  for (genvar f = 0; f < N_FWD_THR; f++) begin : g_fwd
    hit_sum #(.N(2), .W(FWD_W)) u_l (.counts(left_cnt[f]),  .sum(left_sum[f]));
    hit_sum #(.N(2), .W(FWD_W)) u_r (.counts(right_cnt[f]), .sum(right_sum[f]));
  end

  logic [15:0] fwd_bits;
  assign fwd_bits = {right_sum, left_sum};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      main_word <= {1'b1, 24'h0};
      fwd_word  <= {1'b1, 24'h0};
    end else begin
      main_word <= {~^main_sum, main_sum};
      fwd_word  <= {~^fwd_bits, 8'h00, fwd_bits};
    end
  end

endmodule
