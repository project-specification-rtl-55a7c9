// Readout controller: Level-1 Accept to G-Link serial stream (DAQ or RoI).
//
// On a Level-1 Accept the controller copies nslices consecutive words from
// the scrolling memories (slice_in, the memories' read-pointer outputs) into
// the slice FIFO, one per clock starting with the L1A clock, and copies the
// current bunch-crossing number (BCN) into the BCN FIFO. The last slice of
// an event is tagged.
//
// When the G-Link is ready and an event is waiting, the oldest slice is
// offered to the caller on slice_head; the caller returns it formatted as
// 20 pin words of 35 bits (pins_fmt, one word per G-Link data pin). The
// controller adds the BCN (bit k of the BCN on pin k, k < 12, bit 26) and
// the FIFO-overflow flag FO (pin 14, bit 26), loads 20 shift registers and
// sends the 35 bits of each pin LSB first, followed by one longitudinal
// odd-parity bit per pin: 36 clocks per slice. Slices of one event follow
// each other without a pause with DAV held high; after the last slice DAV
// drops for DAV_GAP clocks (the "DAV gap" that marks the end of the event).
//
// An event is only accepted when all its slices fit in the slice FIFO, so
// the FIFO never holds a partial event. FO is set when an L1A is refused
// because the FIFO has no room for the whole event or a copy is still
// running (that event is lost), and also, as a safeguard, if either FIFO
// reports an overflow; it clears when the slice FIFO is empty. RFO is set
// with FO and cleared only by clear_errors.
module readout_ctrl
  import cmm_pkg::*;
#(
  parameter int unsigned DATA_W    = 622,
  parameter int unsigned FIFO_DEPTH = 256,
  parameter int unsigned DAV_GAP    = 8
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 l1a,
  input  logic [2:0]                           nslices,
  input  logic [BCN_W-1:0]                     bcn,
  input  logic [DATA_W-1:0]                   slice_in,
  input  logic                                 glink_ready,
  input  logic                                 clear_errors,
  output logic [DATA_W-1:0]                   slice_head,
  input  logic [GL_PINS-1:0][SER_BITS-1:0]     pins_fmt,
  output logic [GL_PINS-1:0]                   glink_d,
  output logic                                 dav,
  output logic                                 fo,
  output logic                                 rfo,
  output logic                                 fifo_empty,
  output logic                                 fifo_full,
  output logic [$clog2(FIFO_DEPTH)-1:0]        fifo_rd_ptr,
  output logic [$clog2(FIFO_DEPTH)-1:0]        fifo_wr_ptr
);

  // ---------------------------------------------------------------- copy
  localparam int unsigned OW = $clog2(FIFO_DEPTH) + 1;
  logic [2:0]    copy_rem;
  logic [OW-1:0] occ;       // slices in the FIFO (no copy is pending when an L1A is taken)
  logic          room;
  logic          l1a_ok, l1a_lost, push, last;
  logic          s_pop, s_ovf;

  assign room     = (occ + OW'(nslices)) <= OW'(FIFO_DEPTH);
  assign l1a_ok   = l1a && (copy_rem == 3'd0) && (nslices != 3'd0) && room;
  assign l1a_lost = l1a && (nslices != 3'd0) && ((copy_rem != 3'd0) || !room);
  assign push     = l1a_ok || (copy_rem != 3'd0);
  assign last     = (l1a_ok && nslices == 3'd1) || (copy_rem == 3'd1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              copy_rem <= '0;
    else if (l1a_ok)         copy_rem <= nslices - 3'd1;
    else if (copy_rem != '0) copy_rem <= copy_rem - 3'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) occ <= '0;
    else        occ <= occ + OW'(push) - OW'(s_pop && !fifo_empty);
  end

  // --------------------------------------------------------------- FIFOs
  logic [DATA_W:0] head;
  logic [BCN_W-1:0] bcn_head;
  logic             b_pop, b_empty, b_full, b_ovf;
  logic [$clog2(FIFO_DEPTH)-1:0] b_rp, b_wp;

  readout_fifo #(.W(DATA_W+1), .DEPTH(FIFO_DEPTH)) u_slice_fifo (
    .clk, .rst_n,
    .push    (push),
    .din     ({last, slice_in}),
    .pop     (s_pop),
    .dout    (head),
    .empty   (fifo_empty),
    .full    (fifo_full),
    .overflow(s_ovf),
    .rd_ptr  (fifo_rd_ptr),
    .wr_ptr  (fifo_wr_ptr)
  );

  readout_fifo #(.W(BCN_W), .DEPTH(FIFO_DEPTH)) u_bcn_fifo (
    .clk, .rst_n,
    .push    (l1a_ok),
    .din     (bcn),
    .pop     (b_pop),
    .dout    (bcn_head),
    .empty   (b_empty),
    .full    (b_full),
    .overflow(b_ovf),
    .rd_ptr  (b_rp),
    .wr_ptr  (b_wp)
  );

  assign slice_head = head[DATA_W-1:0];

  // ------------------------------------------------------- overflow flags
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fo  <= 1'b0;
      rfo <= 1'b0;
    end else begin
      if (s_ovf || b_ovf || l1a_lost) fo <= 1'b1;
      else if (fifo_empty)            fo <= 1'b0;
      if (s_ovf || b_ovf || l1a_lost) rfo <= 1'b1;
      else if (clear_errors)          rfo <= 1'b0;
    end
  end

  // ----------------------------------------------------------- serialiser
  typedef enum logic [2:0] {S_IDLE, S_SHIFT, S_PAR, S_WAIT, S_GAP} ser_state_e;
  ser_state_e state;

  logic [GL_PINS-1:0][SER_BITS-1:0] sr;
  logic [GL_PINS-1:0]               par;
  logic [$clog2(SER_BITS)-1:0]      bit_cnt;
  logic [$clog2(DAV_GAP+1)-1:0]     gap_cnt;
  logic                             last_q;

  logic [GL_PINS-1:0][SER_BITS-1:0] load_word;
  always_comb begin
    load_word = pins_fmt;
    for (int p = 0; p < BCN_W; p++) load_word[p][26] = bcn_head[p];
    load_word[14][26] = fo;
  end

  logic can_start, can_next;
  assign can_start = glink_ready && !fifo_empty && !b_empty;
  assign can_next  = !fifo_empty;

  assign s_pop = ((state == S_IDLE) && can_start) ||
                 ((state == S_PAR || state == S_WAIT) && !last_q && can_next);
  assign b_pop = (state == S_PAR) && last_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      sr      <= '0;
      par     <= '0;
      bit_cnt <= '0;
      gap_cnt <= '0;
      last_q  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE, S_WAIT: begin
          if ((state == S_IDLE && can_start) || (state == S_WAIT && can_next)) begin
            sr      <= load_word;
            par     <= '0;
            bit_cnt <= '0;
            last_q  <= head[DATA_W];
            state   <= S_SHIFT;
          end
        end
        S_SHIFT: begin
          for (int p = 0; p < GL_PINS; p++) begin
            par[p] <= par[p] ^ sr[p][0];
            sr[p]  <= sr[p] >> 1;
          end
          if (bit_cnt == ($clog2(SER_BITS))'(SER_BITS-1)) state <= S_PAR;
          else bit_cnt <= bit_cnt + 1'b1;
        end
        S_PAR: begin
          if (last_q) begin
            gap_cnt <= ($clog2(DAV_GAP+1))'(DAV_GAP);
            state   <= S_GAP;
          end else if (can_next) begin
            sr      <= load_word;
            par     <= '0;
            bit_cnt <= '0;
            last_q  <= head[DATA_W];
            state   <= S_SHIFT;
          end else begin
            state   <= S_WAIT;
          end
        end
        S_GAP: begin
          if (gap_cnt <= 1) state <= S_IDLE;
          else gap_cnt <= gap_cnt - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    dav = (state == S_SHIFT) || (state == S_PAR) || (state == S_WAIT);
    for (int p = 0; p < GL_PINS; p++) begin
      unique case (state)
        S_SHIFT: glink_d[p] = sr[p][0];
        S_PAR:   glink_d[p] = ~par[p];
        default: glink_d[p] = 1'b0;
      endcase
    end
  end

endmodule
