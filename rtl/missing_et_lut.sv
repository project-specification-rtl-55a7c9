// Missing-ET threshold map by lookup table.
//
// The magnitudes of the summed Ex and Ey are taken as 11-bit values
// (larger magnitudes are clipped to 2047). One common range is chosen from
// the highest set bit of the two: range 0 below 64 uses bits 5:0, range 1
// below 256 uses bits 7:2, range 2 below 1024 uses bits 9:4, range 3 uses
// bits 10:5. The two 6-bit truncated values form a 12-bit address into a
// 4096-entry table of 32 bits; the 8-bit field of the chosen range is the
// map of the eight missing-ET thresholds passed. The host loads the table
// so that each field equals the result of comparing Ex^2 + Ey^2 with the
// eight squared thresholds at that range's precision. An overflow on Ex or
// Ey sets all eight hits.
//
// Host writes load two fields at once: bank 0 writes fields 0 (low byte)
// and 1 (high byte) of entry lut_addr, bank 1 fields 2 and 3. Timing: range/address registered (clock 1), table read and field
// select registered (clock 2).
module missing_et_lut (
  input  logic               clk,
  input  logic               rst_n,
  input  logic signed [16:0] ex,
  input  logic signed [16:0] ey,
  input  logic               ovf,
  input  logic               lut_we,
  input  logic               lut_bank,
  input  logic [11:0]        lut_addr,
  input  logic [15:0]        lut_wdata,
  output logic [7:0]         hits
);

  logic [7:0] lut [4][4096];

  function automatic logic [10:0] mag11(input logic signed [16:0] v);
    logic [16:0] a;
    a = v[16] ? 17'(-v) : 17'(v);
    return (a > 17'd2047) ? 11'd2047 : a[10:0];
  endfunction

  logic [10:0] mx, my, mor;
  logic [1:0]  range_d;
  logic [5:0]  tx, ty;
  always_comb begin
    mx  = mag11(ex);
    my  = mag11(ey);
    mor = mx | my;
    if      (mor[10]   != 1'b0) range_d = 2'd3;
    else if (mor[9:8]  != 2'b0) range_d = 2'd2;
    else if (mor[7:6]  != 2'b0) range_d = 2'd1;
    else                        range_d = 2'd0;
    unique case (range_d)
      2'd0: begin tx = mx[5:0];  ty = my[5:0];  end
      2'd1: begin tx = mx[7:2];  ty = my[7:2];  end
      2'd2: begin tx = mx[9:4];  ty = my[9:4];  end
      2'd3: begin tx = mx[10:5]; ty = my[10:5]; end
    endcase
  end

  logic [11:0] addr_q;
  logic [1:0]  range_q;
  logic        ovf_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q  <= '0;
      range_q <= '0;
      ovf_q   <= 1'b0;
    end else begin
      addr_q  <= {ty, tx};
      range_q <= range_d;
      ovf_q   <= ovf;
    end
  end

  always_ff @(posedge clk) begin
    if (lut_we) begin
      lut[{lut_bank, 1'b0}][lut_addr] <= lut_wdata[7:0];
      lut[{lut_bank, 1'b1}][lut_addr] <= lut_wdata[15:8];
    end
  end

  logic [7:0] rd;
  assign rd = lut[range_q][addr_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) hits <= '0;
    else        hits <= ovf_q ? 8'hFF : rd;
  end

endmodule
