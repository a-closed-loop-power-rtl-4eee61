// winoc_pm_top: closed-loop transmit power control for a wireless NoC with
// N_HUBS radio hubs and one centralized power manager.
//
// Each radio hub owns a power table (one 3-bit step per destination) that sets
// the transmit power of every packet, and error statistics per source that it
// reports to the manager. Every rp_cycles cycles, if some receiver has closed
// a period of rp_packets packets from some transmitter, the manager stalls the
// network for rs_cycles cycles and, one report per cycle, tells the
// transmitter of each reported pair to raise its power step (estimated BER
// above reference_ber) or lower it (otherwise). Starting from maximum power,
// every pair thus settles around the lowest step that meets the reference.
//
// The analog parts (oscillator, power amplifier, antennas, OOK receiver) and
// the bit-error detector are outside this module: pa_on / pa_step per hub go
// to the amplifiers, and rx_valid / rx_src / rx_err_bits per hub come from
// the receivers' error detectors. tx_ready is low while the network is
// stalled.
//
// Configuration inputs, to be held stable while running: reference_ber (error
// bits allowed per period), rp_packets, rp_cycles and rs_cycles. The values
// of the reference configuration are rp_packets = rp_cycles = 2000 and
// rs_cycles = 10; the RP_W = 12 and RS_W = 6 bit fields hold every period
// (1000 to 4000) and reconfiguration state (1 to 32 cycles) that was
// evaluated for this scheme.
//
// Following the design: the star wiring of point-to-point control links
// between the manager and each hub, and 8 radio hubs (4-hub systems use
// N_HUBS = 4). This design's own choices: the packet-level port interface and
// making the period and state lengths run-time inputs.
module winoc_pm_top
  import winoc_pm_pkg::*;
#(
  parameter int unsigned N_HUBS     = 8,
  parameter int unsigned RP_W       = 12,
  parameter int unsigned RS_W       = 6,
  parameter int unsigned ERR_W      = 8,
  parameter int unsigned BER_W      = 20,
  localparam int unsigned AW        = (N_HUBS > 1) ? $clog2(N_HUBS) : 1
) (
  input  logic                                    clk,
  input  logic                                    rst_n,
  input  logic [BER_W-1:0]                        reference_ber,
  input  logic [RP_W-1:0]                         rp_packets,
  input  logic [RP_W-1:0]                         rp_cycles,
  input  logic [RS_W-1:0]                         rs_cycles,
  input  logic [N_HUBS-1:0]                       tx_valid,
  input  logic [N_HUBS-1:0][AW-1:0]               tx_dst,
  output logic [N_HUBS-1:0]                       tx_ready,
  output logic [N_HUBS-1:0]                       pa_on,
  output logic [N_HUBS-1:0][PSTEP_W-1:0]          pa_step,
  input  logic [N_HUBS-1:0]                       rx_valid,
  input  logic [N_HUBS-1:0][AW-1:0]               rx_src,
  input  logic [N_HUBS-1:0][ERR_W-1:0]            rx_err_bits,
  output logic                                    stall
);

  logic [N_HUBS-1:0]            rep_valid, rep_ack, ci_valid;
  logic [N_HUBS-1:0][AW-1:0]    rep_addr_rx, rep_addr_tx, ci_dst;
  logic [N_HUBS-1:0][BER_W-1:0] rep_ber;
  cmd_e [N_HUBS-1:0]            ci_cmd;

  for (genvar h = 0; h < N_HUBS; h++) begin : g_hub
    radio_hub #(
      .N_HUBS(N_HUBS), .RP_W(RP_W), .ERR_W(ERR_W), .BER_W(BER_W)
    ) u_hub (
      .clk         (clk),
      .rst_n       (rst_n),
      .my_addr     (AW'(h)),
      .stall       (stall),
      .rp_packets  (rp_packets),
      .tx_valid    (tx_valid[h]),
      .tx_dst      (tx_dst[h]),
      .tx_ready    (tx_ready[h]),
      .pa_on       (pa_on[h]),
      .pa_step     (pa_step[h]),
      .rx_valid    (rx_valid[h]),
      .rx_src      (rx_src[h]),
      .rx_err_bits (rx_err_bits[h]),
      .rep_valid   (rep_valid[h]),
      .rep_addr_rx (rep_addr_rx[h]),
      .rep_addr_tx (rep_addr_tx[h]),
      .rep_ber     (rep_ber[h]),
      .rep_ack     (rep_ack[h]),
      .ci_valid    (ci_valid[h]),
      .ci_cmd      (ci_cmd[h]),
      .ci_dst      (ci_dst[h])
    );
  end

  power_manager #(
    .N_HUBS(N_HUBS), .RP_W(RP_W), .RS_W(RS_W), .BER_W(BER_W)
  ) u_pm (
    .clk           (clk),
    .rst_n         (rst_n),
    .rp_cycles     (rp_cycles),
    .rs_cycles     (rs_cycles),
    .reference_ber (reference_ber),
    .rep_valid     (rep_valid),
    .rep_addr_rx   (rep_addr_rx),
    .rep_addr_tx   (rep_addr_tx),
    .rep_ber       (rep_ber),
    .rep_ack       (rep_ack),
    .ci_valid      (ci_valid),
    .ci_cmd        (ci_cmd),
    .ci_dst        (ci_dst),
    .stall         (stall)
  );

endmodule
