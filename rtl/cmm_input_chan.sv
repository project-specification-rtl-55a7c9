// Input channel: re-timing, playback, disable mask and odd-parity check for one
// backplane slot or one cable link.
//
// The specification orders the input controls as: (1) receive, or in playback
// mode take the word from the playback memory; (2) apply the channel disable
// mask; (3) record the word (the caller writes rec_word to the scrolling
// memory unless it is playing back); (4) check odd parity; (5) pass the data
// to the algorithm. A disabled channel records all-zero data with a correct
// (set) parity bit, is not parity-checked and feeds zeros to the algorithm. A
// parity error zeroes the data for that cycle and raises pe.
//
// Interface: rx is {parity, data[DW-1:0]}; rec_word adds the parity-error
// flag on top: {pe, parity, data}. All outputs are registered: one clock of
// latency from rx to alg_data. Selection of one of four sampling clock phases
// per source is an input-timing function of the hardware and is not modelled;
// this register stands in for the re-timing flip-flop.
module cmm_input_chan #(
  parameter int unsigned DW = 24
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW:0]   rx,
  input  logic          playback,
  input  logic [DW:0]   pb_word,
  input  logic          disable_ch,
  output logic [DW+1:0] rec_word,
  output logic [DW-1:0] alg_data,
  output logic          pe
);

  logic [DW:0] sel, masked;
  logic        perr;

  always_comb begin
    sel    = playback ? pb_word : rx;
    masked = disable_ch ? {1'b1, {DW{1'b0}}} : sel;
    // Odd parity: the 1s in data plus parity must be odd.
    perr   = !disable_ch && !(^masked);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rec_word <= {2'b01, {DW{1'b0}}};
      alg_data <= '0;
      pe       <= 1'b0;
    end else begin
      rec_word <= {perr, masked};
      alg_data <= perr ? '0 : masked[DW-1:0];
      pe       <= perr;
    end
  end

endmodule
