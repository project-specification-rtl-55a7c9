// End-to-end, full-size testbench for cmm_top (no parameters to override).
//
// The module starts as a cluster (CP) crate CMM from its geographical
// address and is then switched, through the VME GEOADD bypass field and the
// reload command, to CP system, jet system, energy crate and energy system
// operation. In each mode random backplane and cable traffic is applied every
// clock and the cable or CTP outputs are compared, clock by clock, with a
// model of the summing rules at the module's exact latency:
//   crate level: backplane -> cable_out in 2 clocks;
//   system level: cable -> CTP in 2 (CP) or 4 (jet, energy) clocks, local
//   crate sums -> CTP in 4 + d or 6 + d clocks with pipeline delay d.
// Along the way it exercises and counts each mechanism: parity errors
// (zeroed data, error latch and counter read over VME), channel disables,
// playback from host-loaded memories, function switching, the pipeline delay
// setting (two values), energy overflow, Jet-ET, sum-ET and missing-ET
// lookups, TTC sync, L1A readout of several slices through the DAQ link
// (deserialised and matched to the recorded inputs, with the read-offset
// latency checked), RoI readout, G-Link not-ready stalls, FIFO overflow flags,
// rate counters with clear and inhibit, and the Reset Module command. The
// run fails if any mechanism was never seen.
module tb_cmm_top;
  import cmm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [3:0] geo_pins = 4'b1110;
  logic [7:0] serial_no = 8'h21;
  logic [3:0] rev_no = 4'h1;
  logic ttc_ready = 1;
  logic [N_SLOTS-1:0][BP_W-1:0] bp_in = '0;
  logic [N_CABLES-1:0][CABLE_W-1:0] cable_in = '0;
  logic [1:0][CABLE_W-1:0] cable_out;
  logic [1:0][CTP_W-1:0] ctp_out;
  logic l1a = 0, bcr = 0, brcst_str = 0;
  logic [7:0] brcst = '0;
  logic [23:0] vme_addr = '0;
  logic vme_ds = 0, vme_we = 0;
  logic [15:0] vme_wdata = '0, vme_rdata;
  logic vme_dtack;
  logic daq_link_ready = 1, roi_link_ready = 1;
  logic [GL_PINS-1:0] daq_d, roi_d;
  logic daq_dav, roi_dav, laser_dis_daq, laser_dis_roi, ttc_clk_en, ttc_protect;
  logic [31:0] bp_phase_sel;
  logic [5:0] cable_phase_sel;
  logic crate_hit, sys_hit;

  cmm_top dut (.*);

  always #12.5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 40) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200_000_000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_parity = 0, n_disable = 0, n_playback = 0, n_mode = 0, n_delay = 0;
  int n_ovf = 0, n_jet_et = 0, n_sum_et = 0, n_miss_et = 0, n_sync = 0;
  int n_events = 0, n_roi = 0, n_stall = 0, n_fifo_ovf = 0, n_rate = 0, n_reset = 0;

  // ------------------------------------------------------------ history
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  localparam int HM = 4096;
  logic [N_SLOTS-1:0][BP_W-1:0] bp_h [HM];
  logic [N_CABLES-1:0][CABLE_W-1:0] cab_h [HM];
  logic [15:0] dis_h [HM];

  function automatic logic [24:0] pw(input logic [23:0] d, input logic bad);
    return {~^d ^ bad, d};
  endfunction

  // Algorithm data of slot j at history index n (parity-checked, masked).
  function automatic logic [23:0] alg(int n, int j);
    logic [24:0] w;
    w = bp_h[n % HM][j];
    if (dis_h[n % HM][j]) return '0;
    if (!(^w)) return '0;
    return w[23:0];
  endfunction
  function automatic logic [23:0] cab_alg(int n, int c);
    logic [24:0] w;
    w = cab_h[n % HM][c];
    if (!(^w)) return '0;
    return w[23:0];
  endfunction

  function automatic int sat(int v, int m); return (v > m) ? m : v; endfunction

  // CP crate sums at index n.
  function automatic logic [23:0] cp_crate(int n);
    logic [23:0] r;
    int s;
    for (int t = 0; t < 8; t++) begin
      s = 0;
      for (int j = 1; j <= 14; j++) s += alg(n, j) >> (3 * t) & 7;
      r[3*t +: 3] = 3'(sat(s, 7));
    end
    return r;
  endfunction
  function automatic logic fwd_jem(int j); return j == 0 || j == 7 || j == 8 || j == 15; endfunction
  function automatic logic [23:0] jet_main(int n);
    logic [23:0] r;
    int s;
    for (int t = 0; t < 8; t++) begin
      s = 0;
      for (int j = 0; j < 16; j++)
        s += fwd_jem(j) ? (alg(n, j) >> (2 * t) & 3) : (alg(n, j) >> (3 * t) & 7);
      r[3*t +: 3] = 3'(sat(s, 7));
    end
    return r;
  endfunction
  function automatic logic [15:0] jet_fwd(int n);
    logic [15:0] r;
    for (int f = 0; f < 4; f++) begin
      r[2*f +: 2]     = 2'(sat((alg(n, 0) >> (16 + 2*f) & 3) + (alg(n, 8) >> (16 + 2*f) & 3), 3));
      r[8 + 2*f +: 2] = 2'(sat((alg(n, 7) >> (16 + 2*f) & 3) + (alg(n, 15) >> (16 + 2*f) & 3), 3));
    end
    return r;
  endfunction
  function automatic int lin(logic [7:0] c); return int'(c[5:0]) << (2 * c[7:6]); endfunction
  // Energy crate word at index n.
  function automatic energy_word_t en_crate(int n);
    energy_word_t e;
    int ha [3], hb [3], d;
    logic st [3];
    for (int k = 0; k < 3; k++) begin ha[k] = 0; hb[k] = 0; st[k] = 0; end
    for (int j = 0; j < 16; j++)
      for (int k = 0; k < 3; k++) begin
        if ((alg(n, j) >> (8 * k) & 255) == 255) st[k] = 1;
        if (j < 8) ha[k] += lin(8'(alg(n, j) >> (8 * k)));
        else       hb[k] += lin(8'(alg(n, j) >> (8 * k)));
      end
    d = ha[0] - hb[0]; e.ex = 15'(d); e.ox = st[0] || d > 16383 || d < -16383;
    d = ha[1] - hb[1]; e.ey = 15'(d); e.oy = st[1] || d > 16383 || d < -16383;
    d = ha[2] + hb[2]; e.et = 14'(d); e.ot = st[2] || d > 16383;
    e.px = ~^{e.ox, e.ex}; e.py = ~^{e.oy, e.ey}; e.pt = ~^{e.ot, e.et};
    return e;
  endfunction

  // Table patterns loaded over VME.
  function automatic logic [7:0] j_lo(int a);  return 8'((a * 13) % 97); endfunction
  function automatic logic [7:0] j_hi(int a);  return 8'((a * 29) % 151); endfunction
  function automatic logic [7:0] j_fwd(int a); return 8'((a * 7) % 83); endfunction
  function automatic logic [7:0] m_pat(int field, int a); return 8'((a * (4 * field + 1) + field * 17) % 256); endfunction

  // ---------------------------------------------------------------- VME
  task automatic vwr(input logic [23:0] a, input logic [15:0] d);
    @(negedge clk);
    vme_addr = a; vme_wdata = d; vme_we = 1; vme_ds = 1;
    @(negedge clk);
    vme_ds = 0; vme_we = 0;
  endtask
  task automatic vrd(input logic [23:0] a, output logic [15:0] d);
    @(negedge clk);
    vme_addr = a; vme_we = 0; vme_ds = 1;
    #1;
    d = vme_rdata;
    @(negedge clk);
    vme_ds = 0;
    check(vme_dtack, "VME acknowledge");
  endtask
  task automatic set_mode(input logic [3:0] geo);
    vwr(24'h4, 16'(geo) << 1);
    vwr(24'h6, 16'h0400);
    n_mode++;
  endtask

  // ------------------------------------------------- traffic generation
  // mode: 0 CP, 1 jet, 2 energy. pe_rate: 1 in N slot words gets bad parity.
  int tmode = 0, pe_rate = 0;
  logic [15:0] dis_now = '0;
  logic drive_on = 0;
  logic [N_CABLES-1:0][23:0] cab_d;
  energy_word_t rem;
  always @(negedge clk) begin
    if (drive_on) begin
      for (int j = 0; j < 16; j++) begin
        logic [23:0] d;
        logic bad;
        d = 24'($urandom);
        if (tmode == 0) d &= ($urandom_range(0, 1) ? 24'h249249 : 24'h000000);
        if (tmode == 1 && !fwd_jem(j)) d &= 24'h249249;
        if (tmode == 2) begin
          d &= 24'h3F3F3F;
          if ($urandom_range(0, 3) == 0) d[7:6] = 2'($urandom);
        end
        bad = (pe_rate != 0) && ($urandom_range(1, pe_rate) == 1);
        bp_in[j] = pw(d, bad);
      end
      if (tmode == 2) begin
        rem.ex = 15'($urandom_range(0, 1023) - 512);
        rem.ey = 15'($urandom_range(0, 1023) - 512);
        rem.et = 14'($urandom_range(0, 8191));
        rem.ox = 0; rem.oy = 0; rem.ot = 0;
        rem.px = ~^{rem.ox, rem.ex}; rem.py = ~^{rem.oy, rem.ey}; rem.pt = ~^{rem.ot, rem.et};
        {cable_in[1], cable_in[0]} = 50'(rem);
        cable_in[2] = pw(24'h0, 0);
      end else begin
        for (int c = 0; c < 3; c++) cab_d[c] = 24'($urandom) & 24'h249249;
        if (tmode == 1) begin
          cab_d[1] = 24'($urandom) & 24'h00FFFF;
          cab_d[2] = '0;
        end
        for (int c = 0; c < 3; c++) cable_in[c] = pw(cab_d[c], 0);
      end
    end
    bp_h[cyc % HM]  = bp_in;
    cab_h[cyc % HM] = cable_in;
    dis_h[cyc % HM] = dis_now;
  end

  // ------------------------------------------------------ output checkers
  // chk: 0 none, 1 CP crate, 2 CP system, 3 jet system, 4 energy crate,
  // 5 energy system. pdly: programmed pipeline delay.
  int chk = 0, pdly = 0, settle = 0;
  logic [3:0][15:0] thr_j = '{16'd500, 16'd400, 16'd300, 16'd200};
  logic [3:0][15:0] thr_s = '{16'd14000, 16'd9000, 16'd5000, 16'd2000};
  always @(posedge clk) begin
    #1;
    if (settle > 0) settle--;
    else if (chk != 0) begin
      int m;
      m = cyc;
      unique case (chk)
        1: begin
          logic [23:0] s;
          s = cp_crate(m - 2);
          check(cable_out[0] == {~^s, s}, "CP crate cable word");
          check(ctp_out == '0, "no CTP output at crate level");
        end
        2: begin
          logic [23:0] s, l, r;
          l = cp_crate(m - 4 - pdly);
          for (int t = 0; t < 8; t++) begin
            int v;
            v = l >> (3 * t) & 7;
            for (int c = 0; c < 3; c++) v += cab_alg(m - 2, c) >> (3 * t) & 7;
            r[3*t +: 3] = 3'(sat(v, 7));
          end
          check(ctp_out[0] == {~^r, 8'h00, r}, "CP system CTP word");
          check(cable_out == '0, "no cable output at system level");
        end
        3: begin
          logic [23:0] lm, rm;
          logic [15:0] lf, rf, ff;
          logic [11:0] afw;
          logic [3:0] h;
          int e;
          lm = jet_main(m - 6 - pdly);
          lf = jet_fwd(m - 6 - pdly);
          for (int t = 0; t < 8; t++)
            rm[3*t +: 3] = 3'(sat((lm >> (3 * t) & 7) + (cab_alg(m - 4, 0) >> (3 * t) & 7), 7));
          for (int f = 0; f < 8; f++)
            ff[2*f +: 2] = 2'(sat((lf >> (2 * f) & 3) + (cab_alg(m - 4, 1) >> (2 * f) & 3), 3));
          for (int f = 0; f < 4; f++) afw[3*f +: 3] = 3'(ff[2*f +: 2]) + 3'(ff[8 + 2*f +: 2]);
          e = j_lo(rm[11:0]) + j_hi(rm[23:12]) + j_fwd(afw);
          for (int k = 0; k < 4; k++) h[k] = e > thr_j[k];
          if (|h) n_jet_et++;
          check(ctp_out[0] == {~^{h, rm}, 4'h0, h, rm}, "jet system CTP main word");
          check(ctp_out[1] == {~^ff, 16'h0, ff}, "jet system CTP forward word");
        end
        4: begin
          energy_word_t e;
          e = en_crate(m - 2);
          check({cable_out[1], cable_out[0]} == 50'(e), "energy crate cable words");
          if (e.ox || e.oy || e.ot) n_ovf++;
        end
        5: begin
          energy_word_t l, r;
          int x, y, t, mx, my, mo, rng, sh, a;
          logic [3:0] sh4;
          logic [7:0] mh;
          l = en_crate(m - 6 - pdly);
          r = energy_word_t'({cab_h[(m - 4) % HM][1], cab_h[(m - 4) % HM][0]});
          x = int'(signed'(r.ex)) - int'(signed'(l.ex));
          y = int'(signed'(r.ey)) + int'(signed'(l.ey));
          t = int'(r.et) + int'(l.et);
          for (int k = 0; k < 4; k++) sh4[k] = (l.ot || r.ot) || t > int'(thr_s[k]);
          mx = (x < 0) ? -x : x; mx = sat(mx, 2047);
          my = (y < 0) ? -y : y; my = sat(my, 2047);
          mo = mx | my;
          rng = (mo >= 1024) ? 3 : (mo >= 256) ? 2 : (mo >= 64) ? 1 : 0;
          sh = (rng == 3) ? 5 : 2 * rng;
          a = (((my >> sh) & 63) << 6) | ((mx >> sh) & 63);
          mh = (l.ox || l.oy || r.ox || r.oy) ? 8'hFF : m_pat(rng, a);
          if (|sh4) n_sum_et++;
          if (|mh) n_miss_et++;
          check(ctp_out[0] == {~^{sh4, mh}, 20'h0, sh4, mh}, "energy system CTP word");
        end
        default: ;
      endcase
    end
  end

  // ---------------------------------------------------- DAQ link monitor
  int run = 0, low = 100, bitn = 0, sl = 0;
  logic [GL_PINS-1:0][35:0] shreg;
  logic [35:0][GL_PINS-1:0] dummy;
  int ev_c0 [$];        // recorded history index of first slice (filled by monitor)
  int ev_l1a [$];       // L1A cycle of each expected event
  int ev_n [$];
  logic [11:0] ev_bcn [$];
  int cur_l1a, cur_n, first_idx;
  logic [11:0] cur_bcn;
  logic ro_check = 0;
  int lat_seen [$];
  always @(posedge clk) begin
    #1;
    if (!daq_dav) begin
      if (run > 0 && ro_check) begin
        check(run == 36 * cur_n, "DAV high for whole event");
        n_events++;
      end
      run = 0; bitn = 0; sl = 0;
      low++;
    end else begin
      if (run == 0) begin
        if (ro_check) check(low >= 8, "DAV gap");
        low = 0;
        if (ev_l1a.size() > 0) begin
          cur_l1a = ev_l1a.pop_front(); cur_n = ev_n.pop_front(); cur_bcn = ev_bcn.pop_front();
        end
      end
      run++;
      for (int p = 0; p < GL_PINS; p++) shreg[p][bitn] = daq_d[p];
      bitn++;
      if (bitn == 36) begin
        if (ro_check) begin
          int found;
          for (int p = 0; p < GL_PINS; p++) check(^shreg[p] == 1'b1, "G-Link pin parity");
          for (int p = 0; p < 12; p++) check(shreg[p][26] == cur_bcn[p], "BCN on pins 0-11");
          // CP format: pins 0-13 = recorded slots 1-14. Find the bunch
          // crossing they came from.
          found = -1;
          for (int back = 0; back < 600 && found < 0; back++) begin
            int n;
            logic ok;
            n = cur_l1a - back;
            ok = 1;
            for (int p = 0; p < 14; p++)
              if (shreg[p][24:0] != (dis_h[n % HM][p+1] ? 25'h1000000 : bp_h[n % HM][p+1])) ok = 0;
            if (ok) found = n;
          end
          check(found >= 0, "readout slice matches a recorded crossing");
          if (sl == 0) first_idx = found;
          else check(found == first_idx + sl, "consecutive slices");
          if (sl == 0 && found >= 0) lat_seen.push_back(cur_l1a - found);
        end
        bitn = 0; sl++;
      end
    end
  end
  always @(posedge clk) if (roi_dav && !$past(roi_dav)) n_roi++;

  task automatic send_l1a(input int n);
    @(negedge clk);
    l1a = 1;
    ev_l1a.push_back(cyc); ev_n.push_back(n); ev_bcn.push_back(dut.bcn);
    @(negedge clk);
    l1a = 0;
  endtask
  task automatic ttc_sync;
    @(negedge clk);
    brcst = 8'h40 | 8'($urandom_range(0, 63)); brcst_str = 1;
    @(negedge clk);
    brcst_str = 0;
    n_sync++;
  endtask
  task automatic load_tables;
    for (int a = 0; a < 4096; a++) begin
      vwr(24'hE000 + 24'(2 * a), {j_hi(a), j_lo(a)});
      vwr(24'h10000 + 24'(2 * a), {8'h00, j_fwd(a)});
      vwr(24'h12000 + 24'(2 * a), {m_pat(1, a), m_pat(0, a)});
      vwr(24'h14000 + 24'(2 * a), {m_pat(3, a), m_pat(2, a)});
    end
  endtask

  logic [15:0] r16, r16b;
  int pe_cycles, hits5;
  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // ---------------------------------------------- CP crate, live data
    vrd(24'h0, r16); check(r16 == 16'd2417, "module ID");
    vrd(24'h50, r16); check(r16[3:0] == 4'h0, "firmware ID reports CP crate");
    for (int k = 0; k < 4; k++) begin
      vwr(24'h60 + 24'(2 * k), thr_s[k]);
      vwr(24'h68 + 24'(2 * k), thr_j[k]);
    end
    tmode = 0; drive_on = 1;
    repeat (5) @(negedge clk);
    settle = 3; chk = 1;
    repeat (500) @(negedge clk);
    // Parity errors.
    vwr(24'h6, 16'h0200);               // clear errors
    pe_rate = 40;
    repeat (300) @(negedge clk);
    pe_rate = 0;
    repeat (3) @(negedge clk);
    pe_cycles = 0;
    for (int n = cyc - 320; n < cyc; n++) begin
      logic any;
      any = 0;
      for (int j = 1; j <= 14; j++) if (!(^bp_h[n % HM][j])) any = 1;
      if (any) pe_cycles++;
    end
    vrd(24'h14, r16);
    check(r16 != 0 && r16 <= 16'(pe_cycles + 2) && r16 + 16'd2 >= 16'(pe_cycles), "parity error counter");
    vrd(24'hC, r16);
    check(r16[14:1] != 0 && r16[0] == 0 && r16[15] == 0, "backplane parity error latch (slots 0 and 15 unused in CP)");
    vrd(24'h8, r16); check(r16[0], "PE status bit");
    if (r16b == 0) ;
    n_parity += pe_cycles;
    vwr(24'h6, 16'h0200);
    vrd(24'h14, r16); check(r16 == 0, "clear errors resets counter");
    // Disable mask.
    settle = 8;
    vwr(24'h10, 16'b0000_0000_0010_0110);
    dis_now = 16'b0000_0000_0010_0110;
    n_disable++;
    repeat (300) @(negedge clk);
    $display("%0t: %s", $time, "Rate counters: clear");
    // Rate counters: clear, count, inhibit, read.
    vwr(24'h104, 16'h0000);
    vwr(24'h6, 16'h1000);
    repeat (400) @(negedge clk);
    vwr(24'h4, 16'h0200);               // inhibit
    vrd(24'h70 + 24'd4 * 24'd4, r16);   // slot 4 low half
    vrd(24'h70 + 24'd4 * 24'd1, r16b);  // slot 1 (disabled)
    check(r16 > 16'd50 && r16 < 16'd420, "slot rate counter counted");
    check(r16b == 0, "disabled slot does not count");
    vrd(24'h100, r16b);
    check(r16b >= r16, "normalisation counter");
    repeat (50) @(negedge clk);
    vrd(24'h70 + 24'd4 * 24'd4, r16b);
    check(r16b == r16, "inhibit freezes counters");
    vwr(24'h6, 16'h1000);
    vrd(24'h70 + 24'd4 * 24'd4, r16b);
    check(r16b == 0, "rate counters cleared");
    n_rate++;
    vwr(24'h4, 16'h0000);
    $display("%0t: %s", $time, "Readout: 3 slices");
    // Readout: 3 slices, two read offsets.
    vwr(24'h1E, 16'd3);
    for (int o = 0; o < 2; o++) begin
      vwr(24'h20, (o == 0) ? 16'd200 : 16'd150);
      ttc_sync();
      repeat (300) @(negedge clk);
      ro_check = 1;
      for (int k = 0; k < 6; k++) begin
        send_l1a(3);
        repeat ($urandom_range(40, 200)) @(negedge clk);
        if (k == 2) begin
          daq_link_ready = 0; n_stall++;
          repeat (300) @(negedge clk);
          daq_link_ready = 1;
        end
      end
      wait (ev_l1a.size() == 0 && !daq_dav);
      repeat (30) @(negedge clk);
    end
    check(lat_seen.size() == 12, "all readout events seen");
    if (lat_seen.size() == 12) begin
      check(lat_seen[0] == lat_seen[5], "fixed readout latency");
      check(lat_seen[6] - lat_seen[0] == 50, "read offset sets readout latency");
      $display("readout latency offset 200: %0d clocks, offset 150: %0d clocks", lat_seen[0], lat_seen[6]);
    end
    ro_check = 0;
    $display("%0t: %s", $time, "FIFO overflow:");
    // FIFO overflow: link not ready, L1As faster than the FIFO can hold.
    daq_link_ready = 0;
    vwr(24'h1E, 16'd5);
    for (int k = 0; k < 70; k++) begin
      @(negedge clk); l1a = 1;
      repeat (4) begin @(negedge clk); l1a = 0; end
    end
    vrd(24'h8, r16);
    check(r16[2] && r16[12], "FIFO overflow flags in status");
    vrd(24'hA, r16); check(!r16[0], "FIFO status shows events waiting");
    if (r16[2]) n_fifo_ovf++;
    daq_link_ready = 1;
    wait (dut.daq_empty && !daq_dav);
    repeat (20) @(negedge clk);
    vrd(24'h8, r16); check(!r16[2] && r16[12], "FO clears when drained, RFO held");
    vwr(24'h6, 16'h0200);
    vrd(24'h8, r16); check(!r16[12], "RFO cleared");
    ev_l1a.delete(); ev_n.delete(); ev_bcn.delete();
    $display("%0t: %s", $time, "Playback: only");
    // Playback: only slot 3 enabled, its memory loaded over VME.
    chk = 0;
    dis_now = 16'hFFF7;
    vwr(24'h10, dis_now);
    vwr(24'h4, 16'h0001);               // playback mode: recording stops
    for (int a = 0; a < 256; a++) begin
      logic [23:0] p;
      p = {8'(a), 8'(~a), 8'(a * 3)};
      vwr(24'h1000 + 24'h400 * 3 + 24'(2 * a), p[15:0]);
      vwr(24'h1000 + 24'h400 * 3 + 24'h200 + 24'(2 * a), {6'h0, 1'b0, ~^p, p[23:16]});
    end
    repeat (5) @(negedge clk);
    begin
      int a0, ok;
      logic [23:0] p;
      ok = 1;
      a0 = int'(cable_out[0][23:16]);
      for (int i = 0; i < 300; i++) begin
        @(posedge clk); #1;
        p = {8'(a0 + i + 1), 8'(~(a0 + i + 1)), 8'((a0 + i + 1) * 3)};
        if (cable_out[0] != {~^p, p}) ok = 0;
        @(negedge clk);
      end
      check(ok, "playback data drives the crate sum");
      if (ok) n_playback++;
    end
    vwr(24'h4, 16'h0000);
    dis_now = 16'h0000;
    vwr(24'h10, dis_now);
    $display("%0t: %s", $time, "CP system");
    // ------------------------------------------------------ CP system
    set_mode(4'b1000);
    vrd(24'h50, r16); check(r16[3:0] == 4'b0100, "firmware ID reports CP system");
    for (int d = 0; d < 2; d++) begin
      settle = 40;
      pdly = (d == 0) ? 0 : 5;
      vwr(24'h1C, 16'(pdly));
      chk = 2;
      repeat (600) @(negedge clk);
      n_delay++;
    end
    $display("%0t: %s", $time, "jet system");
    // ----------------------------------------------------- jet system
    chk = 0;
    set_mode(4'b0101);
    load_tables();
    tmode = 1;
    pdly = 3;
    vwr(24'h1C, 16'(pdly));
    settle = 30; chk = 3;
    repeat (1500) @(negedge clk);
    vwr(24'h1E, 16'd2);
    send_l1a(2);
    repeat (200) @(negedge clk);
    ev_l1a.delete(); ev_n.delete(); ev_bcn.delete();
    $display("%0t: %s", $time, "energy crate");
    // --------------------------------------------------- energy crate
    chk = 0;
    set_mode(4'b0110);
    tmode = 2;
    settle = 5; chk = 4;
    repeat (500) @(negedge clk);
    // Saturated inputs give overflow.
    drive_on = 0;
    @(negedge clk);
    bp_in[2] = pw(24'h0000FF, 0);
    bp_h[cyc % HM] = bp_in;
    repeat (5) @(negedge clk);
    drive_on = 1;
    repeat (100) @(negedge clk);
    $display("%0t: %s", $time, "energy system");
    // -------------------------------------------------- energy system
    chk = 0;
    set_mode(4'b0100);
    pdly = 2;
    vwr(24'h1C, 16'(pdly));
    settle = 30; chk = 5;
    repeat (2000) @(negedge clk);
    send_l1a(2);
    repeat (200) @(negedge clk);
    ev_l1a.delete(); ev_n.delete(); ev_bcn.delete();
    $display("%0t: %s", $time, "Reset Module");
    // ---------------------------------------------------- Reset Module
    chk = 0;
    vwr(24'h6, 16'h0001);
    repeat (3) @(negedge clk);
    vrd(24'h1C, r16);
    check(r16 == 0 && dut.func.ftype == FW_CP, "Reset Module restores power-on state");
    n_reset++;
    drive_on = 0;
    repeat (10) @(negedge clk);

    $display("mechanisms: parity=%0d disable=%0d playback=%0d mode=%0d delay=%0d ovf=%0d jetET=%0d sumET=%0d missET=%0d",
             n_parity, n_disable, n_playback, n_mode, n_delay, n_ovf, n_jet_et, n_sum_et, n_miss_et);
    $display("mechanisms: sync=%0d events=%0d roi=%0d stall=%0d fifo_ovf=%0d rate=%0d reset=%0d",
             n_sync, n_events, n_roi, n_stall, n_fifo_ovf, n_rate, n_reset);
    check(n_parity > 0, "parity errors happened");
    check(n_disable > 0, "disable happened");
    check(n_playback > 0, "playback happened");
    check(n_mode >= 4, "mode switches happened");
    check(n_delay >= 2, "pipeline delay settings used");
    check(n_ovf > 0, "energy overflow happened");
    check(n_jet_et > 0, "Jet-ET hits happened");
    check(n_sum_et > 0, "sum-ET hits happened");
    check(n_miss_et > 0, "missing-ET hits happened");
    check(n_sync > 0, "TTC sync happened");
    check(n_events >= 12, "DAQ events read out");
    check(n_roi > 0, "RoI readout happened");
    check(n_stall > 0, "link stall happened");
    check(n_fifo_ovf > 0, "FIFO overflow happened");
    check(n_rate > 0, "rate metering happened");
    check(n_reset > 0, "module reset happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
