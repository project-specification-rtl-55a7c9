// Self-checking testbench for readout_ctrl, the L1A slice copy, FIFOs and
// G-Link serialiser. The slice input carries the clock-cycle number, so each
// serialised slice shows exactly which bunch crossing was copied. A simple
// formatter in the testbench spreads the slice over the 20 pins.
// Phase 1 issues random L1As with 1-5 slices and random G-Link not-ready
// periods. A monitor deserialises every pin (35 bits LSB first, then one odd
// parity bit, 36 clocks per slice), and checks:
//   - the slice copied at the L1A clock and the following slices, in order;
//   - the BCN at the L1A time on pins 0-11 bit 26;
//   - the parity bit on every pin;
//   - that DAV stays high for the whole event (36 x nslices clocks);
//   - that DAV stays low for at least DAV_GAP clocks between events.
// Phase 2 sends L1As faster than the link can drain, so the FIFO overflows
// and L1As arrive during a copy. FO and RFO must rise; FO must fall once the
// FIFO drains, and RFO only on clear_errors.
module tb_readout_ctrl;
  import cmm_pkg::*;
  localparam int DW = 622, GAP = 8;
  logic clk = 0, rst_n = 0;
  logic l1a = 0, glink_ready = 1, clear_errors = 0;
  logic [2:0] nslices = 3'd1;
  logic [BCN_W-1:0] bcn;
  logic [DW-1:0] slice_in, slice_head;
  logic [GL_PINS-1:0][SER_BITS-1:0] pins_fmt;
  logic [GL_PINS-1:0] glink_d;
  logic dav, fo, rfo, fifo_empty, fifo_full;
  logic [7:0] fifo_rd_ptr, fifo_wr_ptr;
  int checks = 0, failures = 0;

  readout_ctrl #(.DATA_W(DW), .DAV_GAP(GAP)) dut (.*);

  always #12.5 clk = ~clk;
  initial begin
    #20_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign slice_in = DW'({20{32'(cyc)}});
  assign bcn = 12'(cyc);
  always_comb
    for (int p = 0; p < GL_PINS; p++)
      for (int b = 0; b < SER_BITS; b++)
        pins_fmt[p][b] = slice_head[(35 * p + b) % DW];

  // Expected events: first copied cycle and number of slices.
  typedef struct { int c0; int n; } ev_t;
  ev_t evq [$];
  logic checking = 1;
  int n_events = 0, n_slices = 0, n_stall = 0;

  // Monitor.
  int run = 0, low = 100, bitn = 0, sl = 0;
  logic [GL_PINS-1:0][35:0] shreg;
  ev_t cur;
  logic [DW-1:0] pat;
  logic [SER_BITS-1:0] expw;
  always @(posedge clk) begin
    #1;
    if (!dav) begin
      if (run > 0 && checking) begin
        check(run == 36 * cur.n, "DAV high for the whole event");
        n_events++;
      end
      run = 0; bitn = 0; sl = 0;
      low++;
    end else begin
      if (run == 0) begin
        if (checking) check(low >= GAP, "DAV gap between events");
        low = 0;
        if (evq.size() > 0) cur = evq.pop_front();
        else if (checking) check(0, "unexpected event");
      end
      run++;
      for (int p = 0; p < GL_PINS; p++) shreg[p][bitn] = glink_d[p];
      bitn++;
      if (bitn == 36) begin
        if (checking) begin
          pat = DW'({20{32'(cur.c0 + sl)}});
          for (int p = 0; p < GL_PINS; p++) begin
            for (int b = 0; b < SER_BITS; b++) expw[b] = pat[(35 * p + b) % DW];
            if (p < 12) expw[26] = 1'(12'(cur.c0) >> p);
            if (p == 14) expw[26] = shreg[p][26];
            check(shreg[p][34:0] == expw, "serial slice data and BCN");
            check(^shreg[p] == 1'b1, "odd longitudinal parity");
          end
          n_slices++;
        end
        bitn = 0; sl++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // Phase 1: normal traffic.
    for (int k = 0; k < 120; k++) begin
      repeat ($urandom_range(0, 150)) @(negedge clk);
      nslices = 3'($urandom_range(1, 5));
      l1a = 1;
      evq.push_back('{c0: cyc, n: int'(nslices)});
      @(negedge clk);
      l1a = 0;
      repeat (5) @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        glink_ready = 0;
        n_stall++;
        repeat ($urandom_range(5, 60)) @(negedge clk);
        glink_ready = 1;
      end
    end
    wait (evq.size() == 0 && fifo_empty && !dav);
    repeat (20) @(negedge clk);
    check(n_events == 120, "all events read out");
    check(n_stall > 0, "link stalls exercised");
    check(!fo && !rfo, "no overflow in normal traffic");
    // Phase 2: overload.
    checking = 0;
    nslices = 3'd5;
    for (int k = 0; k < 400; k++) begin
      l1a = 1;
      @(negedge clk);
      l1a = (k % 2 == 0);
      @(negedge clk);
    end
    l1a = 0;
    check(fo && rfo, "FO and RFO set on overflow");
    wait (fifo_empty);
    repeat (2) @(negedge clk);
    check(!fo, "FO clears when FIFO empty");
    check(rfo, "RFO held");
    clear_errors = 1;
    @(negedge clk);
    clear_errors = 0;
    @(negedge clk);
    check(!rfo, "RFO cleared by clear errors");
    $display("events %0d slices %0d", n_events, n_slices);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
