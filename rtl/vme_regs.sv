// VME-- register file, module-function selection and memory write decode.
//
// The bus is a simplified A24/D16 slave: a one-clock strobe ds with we,
// byte address addr and wdata. rdata is the addressed register (zero for
// unused addresses) and dtack answers every access one clock later, so an
// access to the module's space never gives a bus error. Register addresses
// and bit fields follow the register map of the specification:
//   0x00/02 module ID A/B (RO), 0x04 control mode, 0x06 control pulse,
//   0x08 status, 0x0A FIFO status, 0x0C/0E backplane/cable parity errors,
//   0x10/12 backplane/cable disable, 0x14 parity count, 0x16..1A timing
//   selects, 0x1C pipeline delay, 0x1E DAQ slices, 0x20..2E DAQ and RoI
//   memory offsets, 0x30..36 FIFO pointers, 0x50..56 firmware versions,
//   0x60..6E sum-ET and jet-ET thresholds, 0x70..103 rate counters (16 LSBs
//   first), 0x104/106 rate masks, 0x1FC TTC broadcast.
// Memory windows decoded into write strobes: 0x1000-0x4FFF playback/input
// memory (per channel: 0x400 bytes, bits 15:0 then bits 25:16), 0xE000
// main jet-ET tables, 0x10000 forward jet-ET table, 0x12000 missing-ET table.
//
// Module function: at reset the geographical address pins are copied into
// the active address and into the GEOADD bypass field (control mode bits
// 4:1). A reload pulse (control pulse bit 10 or 11) makes the bypass field
// the active address, as if the FPGAs had been loaded for that address. The
// function follows Table 1 of the specification (decode_geoadd). The
// control pulse "Reset Module" bit returns the registers to the power-on
// state and asserts soft_reset for one clock.
//
// The TTCrx I2C, CAN and System ACE registers have no logic here and read 0.
module vme_regs
  import cmm_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [3:0]                  geo_pins,
  input  logic [7:0]                  serial_no,
  input  logic [3:0]                  rev_no,
  // bus
  input  logic [23:0]                 addr,
  input  logic                        ds,
  input  logic                        we,
  input  logic [15:0]                 wdata,
  output logic [15:0]                 rdata,
  output logic                        dtack,
  // status in
  input  logic                        ttc_ready,
  input  logic                        daq_link_ready,
  input  logic                        roi_link_ready,
  input  logic [15:0]                 bp_err,
  input  logic [3:0]                  cable_err,
  input  logic [15:0]                 pec,
  input  logic                        pe_status,
  input  logic                        fo,
  input  logic                        rfo,
  input  logic [7:0]                  fifo_flags,
  input  logic [3:0][15:0]            fifo_ptrs,
  input  logic [31:0][31:0]           rate_count,
  input  logic [31:0]                 rate_norm,
  input  logic [7:0]                  brcst_last,
  // control out
  output cmm_func_t                   func,
  output logic                        playback,
  output logic                        ttc_clk_en,
  output logic                        ttc_protect,
  output logic                        laser_dis_roi,
  output logic                        laser_dis_daq,
  output logic                        rate_inhibit,
  output logic                        soft_reset,
  output logic                        clear_errors,
  output logic                        rate_clear,
  output logic [15:0]                 bp_dis,
  output logic [2:0]                  cable_dis,
  output logic [31:0]                 bp_timing,
  output logic [5:0]                  cable_timing,
  output logic [3:0]                  pipe_delay,
  output logic [2:0]                  daq_slices,
  output logic [3:0][7:0]             daq_offset,
  output logic [3:0][7:0]             roi_offset,
  output logic [3:0][15:0]            sum_et_thr,
  output logic [3:0][15:0]            jet_et_thr,
  output logic [15:0]                 mod_rate_mask,
  output logic [15:0]                 crate_rate_mask,
  // memory writes
  output logic                        dpr_we,
  output logic [3:0]                  dpr_chan,
  output logic                        dpr_lane,
  output logic [7:0]                  dpr_addr,
  output logic                        jet_lut_we_main,
  output logic                        jet_lut_we_fwd,
  output logic                        miss_lut_we,
  output logic                        miss_lut_bank,
  output logic [11:0]                 lut_addr,
  output logic [15:0]                 mem_wdata
);

  localparam logic [15:0] MODULE_ID   = 16'd2417;
  localparam logic [7:0]  FW_REVISION = 8'd1;

  logic [3:0]  geo_active, geo_bypass;
  logic [15:0] ctrl_mode;
  logic        wr;

  assign wr = ds && we;

  // ------------------------------------------------------------ writes
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      geo_active      <= geo_pins;
      geo_bypass      <= geo_pins;
      ctrl_mode       <= '0;
      bp_dis          <= '0;
      cable_dis       <= '0;
      bp_timing       <= '0;
      cable_timing    <= '0;
      pipe_delay      <= '0;
      daq_slices      <= '0;
      daq_offset      <= '0;
      roi_offset      <= '0;
      sum_et_thr      <= '0;
      jet_et_thr      <= '0;
      mod_rate_mask   <= '0;
      crate_rate_mask <= '0;
      soft_reset      <= 1'b0;
      clear_errors    <= 1'b0;
      rate_clear      <= 1'b0;
      dtack           <= 1'b0;
    end else begin
      dtack        <= ds;
      soft_reset   <= 1'b0;
      clear_errors <= 1'b0;
      rate_clear   <= 1'b0;
      if (soft_reset) begin
        geo_active      <= geo_pins;
        geo_bypass      <= geo_pins;
        ctrl_mode       <= '0;
        bp_dis          <= '0;
        cable_dis       <= '0;
        bp_timing       <= '0;
        cable_timing    <= '0;
        pipe_delay      <= '0;
        daq_slices      <= '0;
        daq_offset      <= '0;
        roi_offset      <= '0;
        sum_et_thr      <= '0;
        jet_et_thr      <= '0;
        mod_rate_mask   <= '0;
        crate_rate_mask <= '0;
      end else if (wr) begin
        unique case (addr)
          24'h000004: begin
            ctrl_mode  <= {6'h0, wdata[9:6], wdata[5] & ttc_ready, 4'h0, wdata[0]};
            geo_bypass <= wdata[4:1];
          end
          24'h000006: begin
            soft_reset   <= wdata[0];
            clear_errors <= wdata[9];
            rate_clear   <= wdata[12];
            if (wdata[10] || wdata[11]) geo_active <= geo_bypass;
          end
          24'h000010: bp_dis          <= wdata;
          24'h000012: cable_dis       <= wdata[2:0];
          24'h000016: bp_timing[15:0] <= wdata;
          24'h000018: bp_timing[31:16] <= wdata;
          24'h00001A: cable_timing    <= wdata[5:0];
          24'h00001C: pipe_delay      <= wdata[3:0];
          24'h00001E: daq_slices      <= wdata[2:0];
          24'h000020: daq_offset[0]   <= wdata[7:0];
          24'h000022: daq_offset[1]   <= wdata[7:0];
          24'h000024: daq_offset[2]   <= wdata[7:0];
          24'h000026: daq_offset[3]   <= wdata[7:0];
          24'h000028: roi_offset[0]   <= wdata[7:0];
          24'h00002A: roi_offset[1]   <= wdata[7:0];
          24'h00002C: roi_offset[2]   <= wdata[7:0];
          24'h00002E: roi_offset[3]   <= wdata[7:0];
          24'h000060: sum_et_thr[0]   <= wdata;
          24'h000062: sum_et_thr[1]   <= wdata;
          24'h000064: sum_et_thr[2]   <= wdata;
          24'h000066: sum_et_thr[3]   <= wdata;
          24'h000068: jet_et_thr[0]   <= wdata;
          24'h00006A: jet_et_thr[1]   <= wdata;
          24'h00006C: jet_et_thr[2]   <= wdata;
          24'h00006E: jet_et_thr[3]   <= wdata;
          24'h000104: mod_rate_mask   <= wdata;
          24'h000106: crate_rate_mask <= wdata;
          default: ;
        endcase
      end
    end
  end

  assign func          = decode_geoadd(geo_active);
  assign playback      = ctrl_mode[0];
  assign ttc_clk_en    = ctrl_mode[5];
  assign ttc_protect   = ctrl_mode[6];
  assign laser_dis_roi = ctrl_mode[7];
  assign laser_dis_daq = ctrl_mode[8];
  assign rate_inhibit  = ctrl_mode[9];

  // ------------------------------------------------------ memory strobes
  assign mem_wdata       = wdata;
  assign dpr_we          = wr && addr >= 24'h001000 && addr < 24'h005000;
  assign dpr_chan        = 4'(addr[15:10] - 6'd4);
  assign dpr_lane        = addr[9];
  assign dpr_addr        = addr[8:1];
  assign jet_lut_we_main = wr && addr >= 24'h00E000 && addr < 24'h010000;
  assign jet_lut_we_fwd  = wr && addr >= 24'h010000 && addr < 24'h012000;
  assign miss_lut_we     = wr && addr >= 24'h012000 && addr < 24'h016000;
  assign miss_lut_bank   = addr[13] ^ 1'b1;   // 0x12000-0x13FFF bank 0, 0x14000-0x15FFF bank 1
  assign lut_addr        = addr[12:1];

  // ------------------------------------------------------------- reads
  logic [15:0] status, fw_id;
  assign status = {3'b000, rfo, roi_link_ready, daq_link_ready, 1'b1, 1'b1,
                   ttc_ready, 1'b1, 1'b1, 1'b1, 1'b0, fo, 1'b1, pe_status};
  assign fw_id  = {FW_REVISION, 4'h0, 2'(func.level), 2'(func.ftype)};

  // 32 rate counters (16 module, 4 crate, 12 system) then normalisation.
  logic [7:0] rate_idx;
  assign rate_idx = 8'((addr - 24'h70) >> 2);

  always_comb begin
    rdata = '0;
    if (addr >= 24'h000070 && addr < 24'h000104) begin
      if (rate_idx < 8'd32) rdata = addr[1] ? rate_count[rate_idx[4:0]][31:16] : rate_count[rate_idx[4:0]][15:0];
      else             rdata = addr[1] ? rate_norm[31:16] : rate_norm[15:0];
    end else begin
      unique case (addr)
        24'h000000: rdata = MODULE_ID;
        24'h000002: rdata = {4'h0, rev_no, serial_no};
        24'h000004: rdata = {ctrl_mode[15:5], geo_bypass, ctrl_mode[0]};
        24'h000008: rdata = status;
        24'h00000A: rdata = {8'h00, fifo_flags};
        24'h00000C: rdata = bp_err;
        24'h00000E: rdata = {12'h000, cable_err};
        24'h000010: rdata = bp_dis;
        24'h000012: rdata = {13'h0, cable_dis};
        24'h000014: rdata = pec;
        24'h000016: rdata = bp_timing[15:0];
        24'h000018: rdata = bp_timing[31:16];
        24'h00001A: rdata = {10'h0, cable_timing};
        24'h00001C: rdata = {12'h0, pipe_delay};
        24'h00001E: rdata = {13'h0, daq_slices};
        24'h000020: rdata = {8'h0, daq_offset[0]};
        24'h000022: rdata = {8'h0, daq_offset[1]};
        24'h000024: rdata = {8'h0, daq_offset[2]};
        24'h000026: rdata = {8'h0, daq_offset[3]};
        24'h000028: rdata = {8'h0, roi_offset[0]};
        24'h00002A: rdata = {8'h0, roi_offset[1]};
        24'h00002C: rdata = {8'h0, roi_offset[2]};
        24'h00002E: rdata = {8'h0, roi_offset[3]};
        24'h000030: rdata = fifo_ptrs[0];
        24'h000032: rdata = fifo_ptrs[1];
        24'h000034: rdata = fifo_ptrs[2];
        24'h000036: rdata = fifo_ptrs[3];
        24'h000050: rdata = fw_id;
        24'h000052: rdata = fw_id;
        24'h000054: rdata = 16'd1;
        24'h000056: rdata = 16'd1;
        24'h000060: rdata = sum_et_thr[0];
        24'h000062: rdata = sum_et_thr[1];
        24'h000064: rdata = sum_et_thr[2];
        24'h000066: rdata = sum_et_thr[3];
        24'h000068: rdata = jet_et_thr[0];
        24'h00006A: rdata = jet_et_thr[1];
        24'h00006C: rdata = jet_et_thr[2];
        24'h00006E: rdata = jet_et_thr[3];
        24'h000104: rdata = mod_rate_mask;
        24'h000106: rdata = crate_rate_mask;
        24'h0001FC: rdata = {8'h00, brcst_last[7:2], 2'b00};
        default:    rdata = '0;
      endcase
    end
  end

endmodule
