// Self-checking testbench for vme_regs, the VME register file. Using single
// bus cycles (strobe for one clock, acknowledge checked one clock later) it
// checks: the module ID (2417) and serial/revision word; write and read-back
// of every read/write register with random values; that the TTC clock enable
// bit cannot be set while the TTCrx is not ready; the one-clock Clear Errors,
// Reset Rate Counters and Reset Module pulses; that writing the GEOADD
// bypass field and pulsing "reload" switches the module function as in
// Table 1 (cluster crate -> jet system -> energy crate); the rate counter
// window (low then high half of each counter, normalisation last); and the
// memory write strobes and addresses for the input memories and the jet-ET
// and missing-ET tables.
module tb_vme_regs;
  import cmm_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [3:0] geo_pins = 4'b1110;
  logic [7:0] serial_no = 8'h5A;
  logic [3:0] rev_no = 4'h3;
  logic [23:0] addr = '0;
  logic ds = 0, we = 0;
  logic [15:0] wdata = '0, rdata;
  logic dtack;
  logic ttc_ready = 0, daq_link_ready = 1, roi_link_ready = 0;
  logic [15:0] bp_err = 16'h1234, pec = 16'h0042;
  logic [3:0] cable_err = 4'h5;
  logic pe_status = 1, fo = 0, rfo = 1;
  logic [7:0] fifo_flags = 8'h11;
  logic [3:0][15:0] fifo_ptrs = '0;
  logic [31:0][31:0] rate_count;
  logic [31:0] rate_norm = 32'hCAFE_0001;
  logic [7:0] brcst_last = 8'h6C;
  cmm_func_t func;
  logic playback, ttc_clk_en, ttc_protect, laser_dis_roi, laser_dis_daq, rate_inhibit;
  logic soft_reset, clear_errors, rate_clear;
  logic [15:0] bp_dis;
  logic [2:0] cable_dis;
  logic [31:0] bp_timing;
  logic [5:0] cable_timing;
  logic [3:0] pipe_delay;
  logic [2:0] daq_slices;
  logic [3:0][7:0] daq_offset, roi_offset;
  logic [3:0][15:0] sum_et_thr, jet_et_thr;
  logic [15:0] mod_rate_mask, crate_rate_mask;
  logic dpr_we, dpr_lane, jet_lut_we_main, jet_lut_we_fwd, miss_lut_we, miss_lut_bank;
  logic [3:0] dpr_chan;
  logic [7:0] dpr_addr;
  logic [11:0] lut_addr;
  logic [15:0] mem_wdata;
  int checks = 0, failures = 0;

  vme_regs dut (.*);

  always #12.5 clk = ~clk;
  initial begin
    #5_000_000;
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

  task automatic vwrite(input logic [23:0] a, input logic [15:0] d);
    @(negedge clk);
    addr = a; wdata = d; we = 1; ds = 1;
    @(negedge clk);
    ds = 0; we = 0;
    check(dtack, "dtack after write");
  endtask
  task automatic vread(input logic [23:0] a, output logic [15:0] d);
    @(negedge clk);
    addr = a; we = 0; ds = 1;
    #1;
    d = rdata;
    @(negedge clk);
    ds = 0;
    check(dtack, "dtack after read");
  endtask

  logic [15:0] r, v;
  logic [23:0] rw_regs [] = '{24'h10, 24'h16, 24'h18, 24'h60, 24'h62, 24'h64, 24'h66,
                              24'h68, 24'h6A, 24'h6C, 24'h6E, 24'h104, 24'h106};
  initial begin
    for (int i = 0; i < 32; i++) rate_count[i] = {16'(i + 100), 16'(i)};
    repeat (2) @(posedge clk);
    rst_n = 1;
    vread(24'h0, r);  check(r == 16'd2417, "module ID A");
    vread(24'h2, r);  check(r == 16'h035A, "module ID B");
    vread(24'hC, r);  check(r == 16'h1234, "backplane parity errors");
    vread(24'h14, r); check(r == 16'h0042, "parity error counter");
    vread(24'h1FC, r); check(r == 16'h006C, "TTC broadcast command");
    check(func.ftype == FW_CP && func.level == LVL_CRATE, "function from GEOADD pins");
    foreach (rw_regs[i]) begin
      v = 16'($urandom);
      vwrite(rw_regs[i], v);
      vread(rw_regs[i], r);
      check(r == v, "register read back");
    end
    vwrite(24'h1C, 16'hFFF7); check(pipe_delay == 4'h7, "pipeline delay");
    vwrite(24'h1E, 16'h0005); check(daq_slices == 3'd5, "DAQ slices");
    vwrite(24'h22, 16'h00A5); check(daq_offset[1] == 8'hA5, "DAQ offset");
    vwrite(24'h2E, 16'h003C); check(roi_offset[3] == 8'h3C, "RoI offset");
    vwrite(24'h12, 16'h0006); check(cable_dis == 3'b110, "cable disable");
    // Control mode: TTC clock enable needs ttc_ready.
    vwrite(24'h4, 16'h03E1);
    check(playback && !ttc_clk_en && ttc_protect && rate_inhibit, "control mode, TTC enable masked");
    ttc_ready = 1;
    vwrite(24'h4, 16'h0020 | (16'(4'b0101) << 1));
    check(ttc_clk_en && !playback, "TTC enable once ready");
    check(func.ftype == FW_CP, "bypass field alone does not switch function");
    // Reload: GEOADD bypass 0101 -> jet system.
    vwrite(24'h6, 16'h0400);
    check(func.ftype == FW_JET && func.level == LVL_SYSTEM, "reload switches to jet system");
    vwrite(24'h4, 16'(4'b0110) << 1);
    vwrite(24'h6, 16'h0800);
    check(func.ftype == FW_ENERGY && func.level == LVL_CRATE, "reload switches to energy crate");
    // Pulses are one clock long.
    @(negedge clk);
    addr = 24'h6; wdata = 16'h1200; we = 1; ds = 1;
    @(negedge clk);
    ds = 0; we = 0;
    check(clear_errors && rate_clear, "clear pulses");
    @(negedge clk);
    check(!clear_errors && !rate_clear, "pulses last one clock");
    // Rate counters.
    vread(24'h70 + 4 * 7, r);     check(r == 16'd7, "rate counter low half");
    vread(24'h70 + 4 * 7 + 2, r); check(r == 16'd107, "rate counter high half");
    vread(24'h100, r);            check(r == 16'h0001, "normalisation low");
    vread(24'h102, r);            check(r == 16'hCAFE, "normalisation high");
    // Memory strobes.
    @(negedge clk);
    addr = 24'h1000 + 24'h400 * 5 + 24'h200 + 24'd2 * 24'd77; wdata = 16'hBEEF; we = 1; ds = 1;
    #1;
    check(dpr_we && dpr_chan == 4'd5 && dpr_lane && dpr_addr == 8'd77 && mem_wdata == 16'hBEEF, "input memory strobe");
    addr = 24'hE000 + 24'd2 * 24'd300; #1;
    check(jet_lut_we_main && !jet_lut_we_fwd && !dpr_we && lut_addr == 12'd300, "jet-ET main table strobe");
    addr = 24'h10000 + 24'd2 * 24'd9; #1;
    check(jet_lut_we_fwd && lut_addr == 12'd9, "jet-ET forward table strobe");
    addr = 24'h14000 + 24'd2 * 24'd4095; #1;
    check(miss_lut_we && miss_lut_bank && lut_addr == 12'd4095, "missing-ET bank 1 strobe");
    addr = 24'h12000; #1;
    check(miss_lut_we && !miss_lut_bank, "missing-ET bank 0 strobe");
    @(negedge clk);
    ds = 0; we = 0;
    // Reset module.
    vwrite(24'h6, 16'h0001);
    @(negedge clk);
    check(bp_dis == '0 && pipe_delay == '0 && func.ftype == FW_CP, "reset module restores power-on state");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
