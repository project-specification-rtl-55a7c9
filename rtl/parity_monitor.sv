// Parity error bookkeeping for all input channels of the module.
//
// For each clock the per-channel parity-error flags from the input channels
// are collected. A set flag latches the channel's bit in the error latch
// (backplane and cable parity error registers), which holds until clear. The
// parity error counter (PEC) counts clocks with at least one error and
// stops at 16'hFFFF. The PE status bit is set while the counter is non-zero.
// The parity check result (PCR) is the OR of all checks of the current
// bunch crossing, registered with the counter.
//
// Timing: latch, counter and pcr update one clock after pe_vec. clear has
// priority over a simultaneous error.
module parity_monitor #(
  parameter int unsigned N = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] pe_vec,
  input  logic         clear,
  output logic [N-1:0] err_latch,
  output logic [15:0]  pec,
  output logic         pe_status,
  output logic         pcr
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_latch <= '0;
      pec       <= '0;
      pcr       <= 1'b0;
    end else begin
      pcr <= |pe_vec;
      if (clear) begin
        err_latch <= '0;
        pec       <= '0;
      end else begin
        err_latch <= err_latch | pe_vec;
        if (|pe_vec && pec != 16'hFFFF) pec <= pec + 16'd1;
      end
    end
  end

  assign pe_status = (pec != 16'd0);

endmodule
