// Scrolling dual-port memory for readout and playback.
//
// Every clock the write pointer advances and (when rec_en) the live word is
// written, so the memory holds the last DEPTH bunch crossings and is
// overwritten when the pointer wraps. The read pointer follows at a fixed
// distance: whenever the write pointer reaches zero it is loaded with the
// offset register, so the word at the read pointer was written
// DEPTH - offset clocks earlier. The readout logic copies slices from
// rd_word after a Level-1 Accept. The TTC synchronisation command sets the
// write pointer to zero and the read pointer to the offset, so that several
// modules scroll in step.
//
// Playback: pb_word is the word at the write pointer; in playback mode the
// caller feeds it into the real-time path and clears rec_en so it is not
// re-recorded. The host preloads the memory in 16-bit lanes through the
// host port (a host write takes precedence over the live write of that
// clock).
//
// Timing: rd_word and pb_word are registered reads, valid one clock after
// the pointers.
module scroll_dpr #(
  parameter int unsigned W     = 416,
  parameter int unsigned DEPTH = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          sync,
  input  logic [$clog2(DEPTH)-1:0]      offset,
  input  logic                          rec_en,
  input  logic [W-1:0]                  wr_word,
  input  logic                          host_we,
  input  logic [$clog2(DEPTH)-1:0]      host_addr,
  input  logic [$clog2((W+15)/16)-1:0]  host_lane,
  input  logic [15:0]                   host_wdata,
  output logic [W-1:0]                  rd_word,
  output logic [W-1:0]                  pb_word,
  output logic [$clog2(DEPTH)-1:0]      wr_ptr,
  output logic [$clog2(DEPTH)-1:0]      rd_ptr
);

  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned LANES = (W + 15) / 16;

  logic [LANES-1:0][15:0] mem [DEPTH];
  logic [LANES*16-1:0]    wr_ext;

  assign wr_ext = (LANES*16)'(wr_word);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= offset;
    end else if (sync) begin
      wr_ptr <= '0;
      rd_ptr <= offset;
    end else begin
      wr_ptr <= wr_ptr + AW'(1);
      rd_ptr <= (wr_ptr == AW'(DEPTH-1)) ? offset : rd_ptr + AW'(1);
    end
  end

  always_ff @(posedge clk) begin
    if (host_we)     mem[host_addr][host_lane] <= host_wdata;
    else if (rec_en) mem[wr_ptr] <= wr_ext;
  end

  logic [LANES*16-1:0] rd_ext, pb_ext;
  always_ff @(posedge clk) begin
    rd_ext <= mem[rd_ptr];
    pb_ext <= mem[wr_ptr];
  end
  assign rd_word = rd_ext[W-1:0];
  assign pb_word = pb_ext[W-1:0];

endmodule
