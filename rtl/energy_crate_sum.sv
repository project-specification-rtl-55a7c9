// Energy crate-level summation.
//
// Each JEM sends quad-linear Ex (bits 7:0), Ey (15:8) and Et (23:16). The
// crate holds two quadrants: JEMs 0-7 form one half crate, JEMs 8-15 the
// diagonally opposite half. Each half is summed unsigned; the half sums are
// subtracted for Ex and Ey (15-bit two's complement, range +-16383) and added
// for Et (14-bit unsigned). An overflow bit per component is set when any
// JEM input of that component is saturated or the result's magnitude exceeds
// 14 bits; the sum itself is not saturated (its sign stays correct).
//
// Output (registered, one clock): the 50-bit energy word of cmm_pkg (value,
// overflow and odd parity for each component), split over two cable words.
module energy_crate_sum
  import cmm_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [N_SLOTS-1:0][BP_DW-1:0] slot_data,
  output energy_word_t                  sum_word,
  output logic [CABLE_W-1:0]            cable0,
  output logic [CABLE_W-1:0]            cable1
);

  logic [N_SLOTS-1:0][2:0][LIN_W-1:0] lin;
  logic [N_SLOTS-1:0][2:0]            sat;

  for (genvar j = 0; j < N_SLOTS; j++) begin : g_jem
    for (genvar c = 0; c < 3; c++) begin : g_comp
      quadlin_decode u_dec (
        .code     (slot_data[j][8*c +: 8]),
        .value    (lin[j][c]),
        .saturated(sat[j][c])
      );
    end
  end

  // Half-crate sums (8 x 4032 = 32256 fits 15 bits).
  logic [2:0][14:0] half_a, half_b;
  logic [2:0]       any_sat;
  always_comb begin
    half_a  = '0;
    half_b  = '0;
    any_sat = '0;
    for (int j = 0; j < N_SLOTS; j++)
      for (int c = 0; c < 3; c++) begin
        if (j < N_SLOTS/2) half_a[c] = half_a[c] + 15'(lin[j][c]);
        else               half_b[c] = half_b[c] + 15'(lin[j][c]);
        any_sat[c] = any_sat[c] | sat[j][c];
      end
  end

  logic signed [16:0] dx, dy;
  logic        [15:0] st;
  energy_word_t       w;
  always_comb begin
    dx   = signed'({2'b00, half_a[0]}) - signed'({2'b00, half_b[0]});
    dy   = signed'({2'b00, half_a[1]}) - signed'({2'b00, half_b[1]});
    st   = {1'b0, half_a[2]} + {1'b0, half_b[2]};
    w.ex = dx[EXY_W-1:0];
    w.ey = dy[EXY_W-1:0];
    w.et = st[ET_W-1:0];
    w.ox = any_sat[0] || (dx > 17'sd16383) || (dx < -17'sd16383);
    w.oy = any_sat[1] || (dy > 17'sd16383) || (dy < -17'sd16383);
    w.ot = any_sat[2] || (st > 16'd16383);
    w.px = ~^{w.ox, w.ex};
    w.py = ~^{w.oy, w.ey};
    w.pt = ~^{w.ot, w.et};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sum_word <= '{px: 1'b1, py: 1'b1, pt: 1'b1, default: '0};
    else        sum_word <= w;
  end

  assign cable0 = sum_word[24:0];
  assign cable1 = sum_word[49:25];

endmodule
