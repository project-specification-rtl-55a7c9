// Rate meter counters.
//
// N 32-bit hit counters plus the rate normalisation counter, which counts
// every clock. Each counter adds one per clock when its inc bit is set.
// All counters stop at 32'hFFFFFFFF so that an overflow can be seen. The
// inhibit input (Rate Counter Inhibit bit) freezes all of them together;
// clear (Reset Rate Counters pulse) sets all to zero. Software inhibits,
// reads, clears and releases, so every counter of a module covers the same
// live time. Counter values are registered outputs.
module rate_meter #(
  parameter int unsigned N = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         inc,
  input  logic                 inhibit,
  input  logic                 clear,
  output logic [N-1:0][31:0]   count,
  output logic [31:0]          norm
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      norm  <= '0;
    end else if (clear) begin
      count <= '0;
      norm  <= '0;
    end else if (!inhibit) begin
      for (int i = 0; i < N; i++)
        if (inc[i] && count[i] != 32'hFFFF_FFFF) count[i] <= count[i] + 32'd1;
      if (norm != 32'hFFFF_FFFF) norm <= norm + 32'd1;
    end
  end

endmodule
