// Common Merger Module (CMM): crate and system summation with readout.
//
// One CMM receives 16 backplane links (24 data bits + odd parity each, one
// per CPM or JEM slot) every 40 MHz clock, forms the crate sums and sends
// them by cable to a System CMM; a System CMM also receives the other
// crates' sums by cable, adds its own (delayed to match the cable) and sends
// the final result to the CTP. The same module runs one of three functions
// (CP hit counting, jet hit counting, energy summing) at crate or system
// level. Which one is decoded from the geographical address (Table 1), or
// from the VME bypass field after a reload command. All three algorithm
// sets are present here and the function selects which drives the outputs,
// as loading a different FPGA configuration would.
//
// Data path per clock:
//   backplane -> cmm_input_chan x16 (playback mux, disable mask, record,
//   parity check) -> crate sum (cp/jet/energy) -> cable_out (crate level)
//   and pipe_delay -> local input check -> system sum, together with the
//   remote cables' input checks -> ctp_out (system level).
// Readout: four groups of scrolling memories per readout path (backplane
// inputs, crate results, cable inputs, system results) feed readout_ctrl,
// which on L1A copies slices into a FIFO and serialises them onto the
// G-Link pins through slice_format. The DAQ path reads the programmed
// number of slices; the RoI path, active on jet and energy System CMMs,
// reads one slice. The DAQ backplane memory doubles as playback memory.
//
// Latency from backplane pins to cable_out: 2 clocks (input register and
// crate sum register). Crate level to CTP on a System CMM: pipe_delay
// setting + 2 clocks (local check + system sum) for CP, +4 for jet (Jet-ET
// path), +4 for energy (missing-ET table).
//
// Interfaces: plain arrays for backplane, cables, CTP; the VME-- bus of
// vme_regs; TTC inputs (L1A, BCReset, broadcast byte and strobe); two G-Link
// outputs (20 data pins + DAV each). The 160 MHz phase selection of the
// input sampling, the TTCrx, G-Link serialiser chips, CAN controller and
// FPGA configuration are outside this RTL.
module cmm_top
  import cmm_pkg::*;
(
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [3:0]                       geo_pins,
  input  logic [7:0]                       serial_no,
  input  logic [3:0]                       rev_no,
  input  logic                             ttc_ready,
  // real-time data
  input  logic [N_SLOTS-1:0][BP_W-1:0]     bp_in,
  input  logic [N_CABLES-1:0][CABLE_W-1:0] cable_in,
  output logic [1:0][CABLE_W-1:0]          cable_out,
  output logic [1:0][CTP_W-1:0]            ctp_out,
  // TTC
  input  logic                             l1a,
  input  logic                             bcr,
  input  logic [7:0]                       brcst,
  input  logic                             brcst_str,
  // VME--
  input  logic [23:0]                      vme_addr,
  input  logic                             vme_ds,
  input  logic                             vme_we,
  input  logic [15:0]                      vme_wdata,
  output logic [15:0]                      vme_rdata,
  output logic                             vme_dtack,
  // G-Links
  input  logic                             daq_link_ready,
  input  logic                             roi_link_ready,
  output logic [GL_PINS-1:0]               daq_d,
  output logic                             daq_dav,
  output logic [GL_PINS-1:0]               roi_d,
  output logic                             roi_dav,
  output logic                             laser_dis_daq,
  output logic                             laser_dis_roi,
  output logic                             ttc_clk_en,
  output logic                             ttc_protect,
  // sampling-phase selects for the input re-timing (2 bits per link)
  output logic [31:0]                      bp_phase_sel,
  output logic [5:0]                       cable_phase_sel,
  // front-panel indicators (unstretched)
  output logic                             crate_hit,
  output logic                             sys_hit
);

  // ------------------------------------------------------------ control
  cmm_func_t         func;
  logic              playback, rate_inhibit, soft_reset;
  logic              clear_errors, rate_clear;
  logic [15:0]       bp_dis;
  logic [2:0]        cable_dis;
  logic [3:0]        pipe_dly;
  logic [2:0]        daq_slices;
  logic [3:0][7:0]   daq_offset, roi_offset;
  logic [3:0][15:0]  sum_et_thr, jet_et_thr;
  logic [15:0]       mod_rate_mask, crate_rate_mask;
  logic              dpr_we, dpr_lane, jet_lut_we_main, jet_lut_we_fwd;
  logic              miss_lut_we, miss_lut_bank;
  logic [3:0]        dpr_chan;
  logic [7:0]        dpr_addr;
  logic [11:0]       lut_addr;
  logic [15:0]       mem_wdata;

  logic [15:0]       bp_err_latch;
  logic [3:0]        cable_err_latch;
  logic [15:0]       pec;
  logic              pe_status, pcr;
  logic              daq_fo, daq_rfo, roi_fo, roi_rfo;
  logic              daq_empty, daq_full, roi_empty, roi_full;
  logic [7:0]        daq_rp, daq_wp, roi_rp, roi_wp;
  logic [31:0][31:0] rate_count;
  logic [31:0]       rate_norm;
  logic [7:0]        brcst_last;

  vme_regs u_vme (
    .clk, .rst_n, .geo_pins, .serial_no, .rev_no,
    .addr(vme_addr), .ds(vme_ds), .we(vme_we), .wdata(vme_wdata),
    .rdata(vme_rdata), .dtack(vme_dtack),
    .ttc_ready, .daq_link_ready, .roi_link_ready,
    .bp_err(bp_err_latch), .cable_err(cable_err_latch), .pec, .pe_status,
    .fo(daq_fo | roi_fo), .rfo(daq_rfo | roi_rfo),
    .fifo_flags({roi_full, roi_full, daq_full, daq_full,
                 roi_empty, roi_empty, daq_empty, daq_empty}),
    .fifo_ptrs({{roi_wp, roi_rp}, {roi_wp, roi_rp}, {daq_wp, daq_rp}, {daq_wp, daq_rp}}),
    .rate_count, .rate_norm, .brcst_last,
    .func, .playback, .ttc_clk_en, .ttc_protect, .laser_dis_roi, .laser_dis_daq,
    .rate_inhibit, .soft_reset, .clear_errors, .rate_clear,
    .bp_dis, .cable_dis, .bp_timing(bp_phase_sel), .cable_timing(cable_phase_sel), .pipe_delay(pipe_dly),
    .daq_slices, .daq_offset, .roi_offset, .sum_et_thr, .jet_et_thr,
    .mod_rate_mask, .crate_rate_mask,
    .dpr_we, .dpr_chan, .dpr_lane, .dpr_addr,
    .jet_lut_we_main, .jet_lut_we_fwd, .miss_lut_we, .miss_lut_bank,
    .lut_addr, .mem_wdata
  );

  // The Reset Module command restarts the data path like a power-up.
  logic dp_rst_n;
  assign dp_rst_n = rst_n & ~soft_reset;

  logic is_sys, is_cp, is_jet, is_en;
  assign is_sys = (func.level == LVL_SYSTEM);
  assign is_cp  = (func.ftype == FW_CP);
  assign is_jet = (func.ftype == FW_JET);
  assign is_en  = (func.ftype == FW_ENERGY);

  // ---------------------------------------------------------------- TTC
  logic [BCN_W-1:0] bcn;
  logic             ttc_sync;

  ttc_decode u_ttc (
    .clk, .rst_n(dp_rst_n), .bcr, .brcst, .brcst_str,
    .bcn, .sync(ttc_sync), .brcst_last
  );

  // ------------------------------------------------- backplane inputs
  logic [N_SLOTS-1:0][REC_W-1:0] bp_rec;
  logic [N_SLOTS-1:0][BP_DW-1:0] bp_alg;
  logic [N_SLOTS-1:0]            bp_pe;
  logic [N_SLOTS-1:0][REC_W-1:0] bp_pb;    // playback words from the DAQ memory
  logic [N_SLOTS-1:0]            slot_dis;

  for (genvar j = 0; j < N_SLOTS; j++) begin : g_bp
    // CP firmware uses slots 1-14 only.
    assign slot_dis[j] = bp_dis[j] || (is_cp && (j == 0 || j == 15));
    cmm_input_chan #(.DW(BP_DW)) u_in (
      .clk, .rst_n(dp_rst_n),
      .rx        (bp_in[j]),
      .playback  (playback),
      .pb_word   (bp_pb[j][BP_W-1:0]),
      .disable_ch(slot_dis[j]),
      .rec_word  (bp_rec[j]),
      .alg_data  (bp_alg[j]),
      .pe        (bp_pe[j])
    );
  end

  // ------------------------------------------------------- crate sums
  logic [CABLE_W-1:0] cp_cable, jet_main_w, jet_fwd_w, en_c0, en_c1;
  energy_word_t       en_word;

  cp_crate_sum u_cp_crate (
    .clk, .rst_n(dp_rst_n), .slot_data(bp_alg), .cable_word(cp_cable)
  );
  jet_crate_sum u_jet_crate (
    .clk, .rst_n(dp_rst_n), .slot_data(bp_alg), .main_word(jet_main_w), .fwd_word(jet_fwd_w)
  );
  energy_crate_sum u_en_crate (
    .clk, .rst_n(dp_rst_n), .slot_data(bp_alg), .sum_word(en_word), .cable0(en_c0), .cable1(en_c1)
  );

  localparam logic [CABLE_W-1:0] IDLE_WORD = {1'b1, 24'h0};  // zero data, odd parity

  logic [1:0][CABLE_W-1:0] crate_word;
  always_comb begin
    unique case (func.ftype)
      FW_CP:     crate_word = {IDLE_WORD, cp_cable};
      FW_JET:    crate_word = {jet_fwd_w, jet_main_w};
      FW_ENERGY: crate_word = {en_c1, en_c0};
      default:   crate_word = {IDLE_WORD, IDLE_WORD};
    endcase
  end

  assign cable_out = (func.level == LVL_CRATE) ? crate_word : '0;

  // Local sums delayed to match the cable from the remote crates.
  logic [1:0][CABLE_W-1:0] local_word;
  pipe_delay #(.W(2*CABLE_W), .MAX_DELAY(15)) u_pipe (
    .clk, .rst_n(dp_rst_n), .delay(pipe_dly), .din(crate_word), .dout(local_word)
  );

  // ----------------------------------------------- system input checks
  // CP uses cables 0-2, jet cables 0 (main) and 1 (forward); these carry
  // one odd parity bit per cable word.
  logic [N_CABLES-1:0][25:0]     cab_rec;
  logic [N_CABLES-1:0][BP_DW-1:0] cab_alg;
  logic [N_CABLES-1:0]           cab_pe, cab_dis;
  for (genvar c = 0; c < N_CABLES; c++) begin : g_cab
    assign cab_dis[c] = cable_dis[c] || !is_sys || is_en || func.ftype == FW_RESERVED ||
                        (is_jet && c == 2);
    cmm_input_chan #(.DW(BP_DW)) u_in (
      .clk, .rst_n(dp_rst_n),
      .rx(cable_in[c]), .playback(1'b0), .pb_word('0), .disable_ch(cab_dis[c]),
      .rec_word(cab_rec[c]), .alg_data(cab_alg[c]), .pe(cab_pe[c])
    );
  end

  logic [1:0][25:0]      loc_rec;
  logic [1:0][BP_DW-1:0] loc_alg;
  logic [1:0]            loc_pe;
  for (genvar c = 0; c < 2; c++) begin : g_loc
    cmm_input_chan #(.DW(BP_DW)) u_in (
      .clk, .rst_n(dp_rst_n),
      .rx(local_word[c]), .playback(1'b0), .pb_word('0),
      .disable_ch(!is_sys || !(is_cp || is_jet) || (is_cp && c == 1)),
      .rec_word(loc_rec[c]), .alg_data(loc_alg[c]), .pe(loc_pe[c])
    );
  end

  // Energy: one parity bit per component (Ex, Ey, Et), spread over the
  // 50 bits of cables 0 and 1.
  energy_word_t rem_ew, loc_ew;
  assign rem_ew = energy_word_t'({cable_in[1], cable_in[0]});
  assign loc_ew = energy_word_t'({local_word[1], local_word[0]});

  logic                 en_rem_dis, en_loc_dis;
  logic [17:0]          rx_rec, ry_rec;
  logic [16:0]          rt_rec;
  logic [15:0]          rx_alg, ry_alg, lx_alg, ly_alg;
  logic [14:0]          rt_alg, lt_alg;
  logic [2:0]           ren_pe, len_pe;
  logic [17:0]          lx_rec, ly_rec;
  logic [16:0]          lt_rec;
  assign en_rem_dis = !(is_sys && is_en) || cable_dis[0];
  assign en_loc_dis = !(is_sys && is_en);

  cmm_input_chan #(.DW(16)) u_rx (.clk, .rst_n(dp_rst_n), .rx({rem_ew.px, rem_ew.ox, rem_ew.ex}),
    .playback(1'b0), .pb_word('0), .disable_ch(en_rem_dis), .rec_word(rx_rec), .alg_data(rx_alg), .pe(ren_pe[0]));
  cmm_input_chan #(.DW(16)) u_ry (.clk, .rst_n(dp_rst_n), .rx({rem_ew.py, rem_ew.oy, rem_ew.ey}),
    .playback(1'b0), .pb_word('0), .disable_ch(en_rem_dis), .rec_word(ry_rec), .alg_data(ry_alg), .pe(ren_pe[1]));
  cmm_input_chan #(.DW(15)) u_rt (.clk, .rst_n(dp_rst_n), .rx({rem_ew.pt, rem_ew.ot, rem_ew.et}),
    .playback(1'b0), .pb_word('0), .disable_ch(en_rem_dis), .rec_word(rt_rec), .alg_data(rt_alg), .pe(ren_pe[2]));
  cmm_input_chan #(.DW(16)) u_lx (.clk, .rst_n(dp_rst_n), .rx({loc_ew.px, loc_ew.ox, loc_ew.ex}),
    .playback(1'b0), .pb_word('0), .disable_ch(en_loc_dis), .rec_word(lx_rec), .alg_data(lx_alg), .pe(len_pe[0]));
  cmm_input_chan #(.DW(16)) u_ly (.clk, .rst_n(dp_rst_n), .rx({loc_ew.py, loc_ew.oy, loc_ew.ey}),
    .playback(1'b0), .pb_word('0), .disable_ch(en_loc_dis), .rec_word(ly_rec), .alg_data(ly_alg), .pe(len_pe[1]));
  cmm_input_chan #(.DW(15)) u_lt (.clk, .rst_n(dp_rst_n), .rx({loc_ew.pt, loc_ew.ot, loc_ew.et}),
    .playback(1'b0), .pb_word('0), .disable_ch(en_loc_dis), .rec_word(lt_rec), .alg_data(lt_alg), .pe(len_pe[2]));

  // --------------------------------------------------- parity monitor
  logic [19:0] pe_vec, pe_latch;
  assign pe_vec = {(|loc_pe) | (|len_pe),
                   cab_pe[2], cab_pe[1], cab_pe[0] | (|ren_pe),
                   bp_pe};
  parity_monitor #(.N(20)) u_pmon (
    .clk, .rst_n(dp_rst_n), .pe_vec, .clear(clear_errors),
    .err_latch(pe_latch), .pec, .pe_status, .pcr
  );
  assign bp_err_latch    = pe_latch[15:0];
  assign cable_err_latch = pe_latch[19:16];

  // ------------------------------------------------------ system sums
  logic [N_THR-1:0][HIT_W-1:0] cp_final;
  logic [CTP_W-1:0]            cp_ctp;
  cp_system_sum u_cp_sys (
    .clk, .rst_n(dp_rst_n), .remote(cab_alg), .local_sums(loc_alg[0]),
    .final_sums(cp_final), .ctp_word(cp_ctp)
  );

  logic [23:0]      jet_final_main;
  logic [15:0]      jet_final_fwd;
  logic [3:0]       etj_hits;
  logic [9:0]       etj_value;
  logic [CTP_W-1:0] jet_ctp_main, jet_ctp_fwd;
  jet_system_sum u_jet_sys (
    .clk, .rst_n(dp_rst_n),
    .remote_main(cab_alg[0]), .remote_fwd(cab_alg[1][15:0]),
    .local_main(loc_alg[0]),  .local_fwd(loc_alg[1][15:0]),
    .jet_et_thr,
    .lut_we_main(jet_lut_we_main), .lut_we_fwd(jet_lut_we_fwd),
    .lut_addr, .lut_wdata(mem_wdata),
    .final_main(jet_final_main), .final_fwd(jet_final_fwd),
    .etj_hits, .etj_value, .ctp_main(jet_ctp_main), .ctp_fwd(jet_ctp_fwd)
  );

  logic signed [16:0] tot_ex, tot_ey;
  logic [ET_W:0]      tot_et;
  logic [2:0]         tot_ovf;
  logic [3:0]         sum_et_hits;
  logic [7:0]         miss_et_hits;
  logic [CTP_W-1:0]   en_ctp;
  energy_system_sum u_en_sys (
    .clk, .rst_n(dp_rst_n),
    .rem_ex(rx_alg[14:0]), .rem_ey(ry_alg[14:0]), .rem_et(rt_alg[13:0]),
    .rem_ovf({rt_alg[14], ry_alg[15], rx_alg[15]}),
    .loc_ex(lx_alg[14:0]), .loc_ey(ly_alg[14:0]), .loc_et(lt_alg[13:0]),
    .loc_ovf({lt_alg[14], ly_alg[15], lx_alg[15]}),
    .sum_et_thr,
    .lut_we(miss_lut_we), .lut_bank(miss_lut_bank), .lut_addr, .lut_wdata(mem_wdata),
    .tot_ex, .tot_ey, .tot_et, .tot_ovf, .sum_et_hits, .miss_et_hits, .ctp_word(en_ctp)
  );

  always_comb begin
    ctp_out = '0;
    if (is_sys) begin
      unique case (func.ftype)
        FW_CP:     ctp_out[0] = cp_ctp;
        FW_JET:    ctp_out = {jet_ctp_fwd, jet_ctp_main};
        FW_ENERGY: ctp_out[0] = en_ctp;
        default:   ctp_out = '0;
      endcase
    end
  end

  // ----------------------------------------------- readout slice data
  slice_t live;
  always_comb begin
    live       = '0;
    live.bp    = bp_rec;
    live.crate = crate_word;
    if (is_en) begin
      live.cab[0] = 26'(rx_rec);
      live.cab[1] = 26'(ry_rec);
      live.cab[2] = 26'(rt_rec);
    end else begin
      live.cab = cab_rec;
    end
    unique case (func.ftype)
      FW_CP:     live.sys = 64'({~^cp_final, cp_final});
      FW_JET:    live.sys = 64'({etj_value, etj_hits, jet_final_fwd, jet_final_main});
      FW_ENERGY: live.sys = {tot_ex, tot_ey, tot_et, tot_ovf, sum_et_hits, miss_et_hits};
      default:   live.sys = '0;
    endcase
  end

  // Two readout paths: 0 = DAQ, 1 = RoI.
  logic [1:0]                             rp_l1a, rp_ready, rp_dav, rp_fo, rp_rfo;
  logic [1:0]                             rp_empty, rp_full;
  logic [1:0][7:0]                        rp_rdp, rp_wrp;
  logic [1:0][2:0]                        rp_nslices;
  logic [1:0][GL_PINS-1:0]                rp_d;
  logic [1:0][3:0][7:0]                   rp_offset;

  assign rp_l1a     = {l1a && is_sys && (is_jet || is_en), l1a};
  assign rp_ready   = {roi_link_ready, daq_link_ready};
  assign rp_nslices = {3'd1, daq_slices};
  assign rp_offset  = {roi_offset, daq_offset};

  for (genvar r = 0; r < 2; r++) begin : g_ro
    slice_t rd_slice, head;
    logic [GL_PINS-1:0][SER_BITS-1:0] pins;
    logic [N_SLOTS-1:0][REC_W-1:0]    pbw;

    // Backplane inputs: one memory per slot, two 16-bit host lanes each.
    for (genvar j = 0; j < N_SLOTS; j++) begin : g_bpm
      logic [7:0] wp, rp;
      scroll_dpr #(.W(REC_W), .DEPTH(256)) u_m (
        .clk, .rst_n(dp_rst_n), .sync(ttc_sync), .offset(rp_offset[r][0]),
        .rec_en(!(r == 0 && playback)), .wr_word(bp_rec[j]),
        .host_we(r == 0 && dpr_we && dpr_chan == 4'(j)), .host_addr(dpr_addr),
        .host_lane(dpr_lane), .host_wdata(mem_wdata),
        .rd_word(rd_slice.bp[j]), .pb_word(pbw[j]), .wr_ptr(wp), .rd_ptr(rp)
      );
    end

    logic [7:0] wp1, rp1, wp2, rp2, wp3, rp3;
    logic [2*CABLE_W-1:0] pb1;
    logic [N_CABLES*26-1:0] pb2;
    logic [63:0] pb3;
    scroll_dpr #(.W(2*CABLE_W), .DEPTH(256)) u_crate_m (
      .clk, .rst_n(dp_rst_n), .sync(ttc_sync), .offset(rp_offset[r][1]),
      .rec_en(1'b1), .wr_word(live.crate), .host_we(1'b0), .host_addr('0),
      .host_lane('0), .host_wdata('0), .rd_word(rd_slice.crate), .pb_word(pb1),
      .wr_ptr(wp1), .rd_ptr(rp1)
    );
    scroll_dpr #(.W(N_CABLES*26), .DEPTH(256)) u_cab_m (
      .clk, .rst_n(dp_rst_n), .sync(ttc_sync), .offset(rp_offset[r][2]),
      .rec_en(1'b1), .wr_word(live.cab), .host_we(1'b0), .host_addr('0),
      .host_lane('0), .host_wdata('0), .rd_word(rd_slice.cab), .pb_word(pb2),
      .wr_ptr(wp2), .rd_ptr(rp2)
    );
    scroll_dpr #(.W(64), .DEPTH(256)) u_sys_m (
      .clk, .rst_n(dp_rst_n), .sync(ttc_sync), .offset(rp_offset[r][3]),
      .rec_en(1'b1), .wr_word(live.sys), .host_we(1'b0), .host_addr('0),
      .host_lane('0), .host_wdata('0), .rd_word(rd_slice.sys), .pb_word(pb3),
      .wr_ptr(wp3), .rd_ptr(rp3)
    );

    if (r == 0) begin : g_pb
      assign bp_pb = pbw;
    end

    readout_ctrl #(.DATA_W(SLICE_W), .FIFO_DEPTH(256), .DAV_GAP(8)) u_ctrl (
      .clk, .rst_n(dp_rst_n),
      .l1a(rp_l1a[r]), .nslices(rp_nslices[r]), .bcn,
      .slice_in(rd_slice), .glink_ready(rp_ready[r]), .clear_errors,
      .slice_head(head), .pins_fmt(pins),
      .glink_d(rp_d[r]), .dav(rp_dav[r]), .fo(rp_fo[r]), .rfo(rp_rfo[r]),
      .fifo_empty(rp_empty[r]), .fifo_full(rp_full[r]),
      .fifo_rd_ptr(rp_rdp[r]), .fifo_wr_ptr(rp_wrp[r])
    );

    slice_format u_fmt (.ftype(func.ftype), .s(head), .pins(pins));
  end

  assign daq_d     = rp_d[0];
  assign daq_dav   = rp_dav[0];
  assign roi_d     = rp_d[1];
  assign roi_dav   = rp_dav[1];
  assign daq_fo    = rp_fo[0];
  assign daq_rfo   = rp_rfo[0];
  assign roi_fo    = rp_fo[1];
  assign roi_rfo   = rp_rfo[1];
  assign daq_empty = rp_empty[0];
  assign daq_full  = rp_full[0];
  assign roi_empty = rp_empty[1];
  assign roi_full  = rp_full[1];
  assign daq_rp    = rp_rdp[0];
  assign daq_wp    = rp_wrp[0];
  assign roi_rp    = rp_rdp[1];
  assign roi_wp    = rp_wrp[1];

  // -------------------------------------------------------- rate meter
  // Counters 0-15 module, 16-19 crate, 20-31 system.
  logic [31:0] rate_inc;
  always_comb begin
    rate_inc = '0;
    unique case (func.ftype)
      FW_CP: begin
        for (int j = 1; j <= 14; j++)
          for (int t = 0; t < N_THR; t++)
            if (!mod_rate_mask[t] && |bp_alg[j][3*t +: 3]) rate_inc[j] = 1'b1;
        for (int t = 0; t < N_THR; t++) begin
          if (!crate_rate_mask[t] && |loc_alg[0][3*t +: 3]) rate_inc[16] = 1'b1;
          for (int c = 0; c < N_CABLES; c++)
            if (!crate_rate_mask[t] && |cab_alg[c][3*t +: 3]) rate_inc[17+c] = 1'b1;
          rate_inc[20+t] = |cp_final[t];
        end
      end
      FW_JET: begin
        for (int j = 0; j < N_SLOTS; j++) begin
          if (j == 0 || j == 7 || j == 8 || j == 15) begin
            for (int t = 0; t < N_THR; t++)
              if (!mod_rate_mask[t] && |bp_alg[j][2*t +: 2]) rate_inc[j] = 1'b1;
            for (int f = 0; f < N_FWD_THR; f++)
              if (!mod_rate_mask[8+f] && |bp_alg[j][16+2*f +: 2]) rate_inc[j] = 1'b1;
          end else begin
            for (int t = 0; t < N_THR; t++)
              if (!mod_rate_mask[t] && |bp_alg[j][3*t +: 3]) rate_inc[j] = 1'b1;
          end
        end
        for (int t = 0; t < N_THR; t++) begin
          if (!crate_rate_mask[t] && |loc_alg[0][3*t +: 3]) rate_inc[16] = 1'b1;
          if (!crate_rate_mask[t] && |cab_alg[0][3*t +: 3]) rate_inc[17] = 1'b1;
          rate_inc[20+t] = |jet_final_main[3*t +: 3];
        end
        for (int f = 0; f < N_FWD_THR; f++) begin
          if (!crate_rate_mask[8+f] && (|loc_alg[1][2*f +: 2] || |loc_alg[1][8+2*f +: 2]))
            rate_inc[16] = 1'b1;
          if (!crate_rate_mask[8+f] && (|cab_alg[1][2*f +: 2] || |cab_alg[1][8+2*f +: 2]))
            rate_inc[17] = 1'b1;
          rate_inc[28+f] = |jet_final_fwd[2*f +: 2] || |jet_final_fwd[8+2*f +: 2];
        end
      end
      FW_ENERGY: begin
        rate_inc[27:20] = miss_et_hits;
        rate_inc[31:28] = sum_et_hits;
      end
      default: rate_inc = '0;
    endcase
  end

  rate_meter #(.N(32)) u_rate (
    .clk, .rst_n(dp_rst_n), .inc(rate_inc), .inhibit(rate_inhibit), .clear(rate_clear),
    .count(rate_count), .norm(rate_norm)
  );

  assign crate_hit = |rate_inc[19:16];
  assign sys_hit   = is_sys && (|rate_inc[31:20]);

endmodule
