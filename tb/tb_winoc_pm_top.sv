// tb_winoc_pm_top: end-to-end test of the closed-loop power control at
// reduced sizes: 4 hubs, 8-packet periods, 40-cycle RP timer and a 4-cycle
// reconfiguration state (short enough that reports must wait for a later
// one). Stimulus, channel model and checks are in winoc_pm_checker.
module tb_winoc_pm_top;
  import winoc_pm_pkg::*;
  localparam int unsigned N = 4, AW = 2, RPP = 8, RPC = 40, RS = 4, ERR_W = 8, BER_W = 20;

  logic clk, rst_n, stall;
  logic [BER_W-1:0] reference_ber;
  logic [11:0] rp_packets, rp_cycles;
  logic [5:0] rs_cycles;
  logic [N-1:0] tx_valid, tx_ready, pa_on, rx_valid;
  logic [N-1:0][AW-1:0] tx_dst, rx_src;
  logic [N-1:0][PSTEP_W-1:0] pa_step;
  logic [N-1:0][ERR_W-1:0] rx_err_bits;

  winoc_pm_top #(.N_HUBS(N), .ERR_W(ERR_W), .BER_W(BER_W)) dut (.*);

  winoc_pm_checker #(.N_HUBS(N), .RP_PACKETS(RPP), .RP_CYCLES(RPC), .RS_CYCLES(RS),
                     .ERR_W(ERR_W), .BER_W(BER_W), .RUN_CYCLES(20000), .QUIET_CYCLES(2000),
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
