// Saturating adder tree for hit counts.
//
// Adds N unsigned W-bit hit counts; any result above 2**W-1 gives 2**W-1
// (7 for the 3-bit main counts, 3 for the 2-bit forward counts), which is the
// overflow rule the specification gives for cluster and jet hit sums.
// Purely combinational; the summing modules register the result.
module hit_sum #(
  parameter int unsigned N = 14,
  parameter int unsigned W = 3
) (
  input  logic [N-1:0][W-1:0] counts,
  output logic [W-1:0]        sum
);

  localparam int unsigned SW = W + $clog2(N + 1);
  localparam logic [SW-1:0] MAXV = SW'((1 << W) - 1);

  logic [SW-1:0] acc;

  always_comb begin
    acc = '0;
    for (int i = 0; i < N; i++) acc = acc + SW'(counts[i]);
    sum = (acc > MAXV) ? W'(MAXV) : acc[W-1:0];
  end

endmodule
