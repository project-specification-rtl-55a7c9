// Synchronous FIFO used for the G-Link slice FIFO and the bunch-crossing
// number FIFO of the readout.
//
// First-word fall-through: dout shows the oldest entry while not empty.
// A push into a full FIFO is dropped and pulses overflow. A pop of an empty
// FIFO is ignored. The read and write pointers are visible for the FIFO
// address-pointer registers.
module readout_fifo #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 256
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      push,
  input  logic [W-1:0]              din,
  input  logic                      pop,
  output logic [W-1:0]              dout,
  output logic                      empty,
  output logic                      full,
  output logic                      overflow,
  output logic [$clog2(DEPTH)-1:0]  rd_ptr,
  output logic [$clog2(DEPTH)-1:0]  wr_ptr
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  count;
  logic         do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      count    <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= push && full;
      if (do_push) wr_ptr <= wr_ptr + AW'(1);
      if (do_pop)  rd_ptr <= rd_ptr + AW'(1);
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

endmodule
