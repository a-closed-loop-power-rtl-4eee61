// tb_winoc_pm_full: end-to-end test of the closed-loop power control with
// the top at its default sizes (8 hubs) and the reference configuration
// (2000-packet periods, 2000-cycle RP timer, 10-cycle reconfiguration state).
// 600,000 cycles of traffic let all 56 pairs walk down from the maximum step
// to their lowest clean step; the checks are those of winoc_pm_checker.
module tb_winoc_pm_full;
  import winoc_pm_pkg::*;
  localparam int unsigned N = 8, AW = 3, ERR_W = 8, BER_W = 20;

  logic clk, rst_n, stall;
  logic [BER_W-1:0] reference_ber;
  logic [11:0] rp_packets, rp_cycles;
  logic [5:0] rs_cycles;
  logic [N-1:0] tx_valid, tx_ready, pa_on, rx_valid;
  logic [N-1:0][AW-1:0] tx_dst, rx_src;
  logic [N-1:0][PSTEP_W-1:0] pa_step;
  logic [N-1:0][ERR_W-1:0] rx_err_bits;

  winoc_pm_top dut (.*);

  winoc_pm_checker #(.N_HUBS(N), .RP_PACKETS(2000), .RP_CYCLES(2000), .RS_CYCLES(10),
                     .ERR_W(ERR_W), .BER_W(BER_W), .RUN_CYCLES(600000), .QUIET_CYCLES(20000),
                     .NEED_LEFTOVER(1'b1)) chk (
    .*,
    .mon_rep_valid   (dut.rep_valid),
    .mon_rep_ack     (dut.rep_ack),
    .mon_rep_addr_rx (dut.rep_addr_rx),
    .mon_rep_addr_tx (dut.rep_addr_tx),
    .mon_rep_ber     (dut.rep_ber),
    .mon_ci_valid    (dut.ci_valid),
    .mon_ci_cmd      (dut.ci_cmd),
    .mon_ci_dst      (dut.ci_dst)
  );
endmodule
