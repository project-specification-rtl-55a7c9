// Programmable pipeline delay.
//
// Delays the local crate sums by 0 to MAX_DELAY clocks so that they meet the
// remote sums, which arrive later by the cable delay between CMMs. The
// delay comes from the 4-bit Pipeline Delay register; zero passes the data
// straight through (combinational), n > 0 gives n clocks. Settings above
// MAX_DELAY are not meaningful (the register field is 0..15).
module pipe_delay #(
  parameter int unsigned W         = 50,
  parameter int unsigned MAX_DELAY = 15
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [$clog2(MAX_DELAY+1)-1:0] delay,
  input  logic [W-1:0]                  din,
  output logic [W-1:0]                  dout
);

  logic [MAX_DELAY-1:0][W-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sr <= '0;
    else        sr <= {sr[MAX_DELAY-2:0], din};
  end

  always_comb begin
    if (delay == 0) dout = din;
    else            dout = sr[delay-1];
  end

endmodule
