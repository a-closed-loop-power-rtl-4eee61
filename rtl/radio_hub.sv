// radio_hub: digital control part of one wireless radio hub.
//
// The transmit side is a vga_ctrl: while the network runs, each packet that is
// sent (tx_valid and not stall) selects its destination's entry in the power
// table, and pa_on / pa_step tell the power amplifier to transmit at that
// step. The receive side is an error_control that gathers, per transmitting
// hub, the bit errors of received packets and offers CONTROL_OUT reports to
// the power manager.
//
// The single DST_ADDR input of the VGA controller is shared: during the
// reconfiguration state a CONTROL_IN command (ci_valid) sets UPDATE and points
// DST_ADDR at the entry named by ci_dst, with UPDOWN = (command is increase);
// otherwise DST_ADDR is the destination of the packet being sent. A no-change
// command leaves the table as it is.
//
// Timing: tx_ready = ~stall; pa_on and pa_step are combinational from tx_valid,
// tx_dst and the table; a command changes the table at the next clock edge.
//
// Following the design: the split into VGA controller and error control and
// the use of DST_ADDR for both reading and updating. This design's own choices:
// the tx_valid / tx_ready packet interface and the per-hub address input.
module radio_hub
  import winoc_pm_pkg::*;
#(
  parameter int unsigned N_HUBS     = 8,
  parameter int unsigned RP_W       = 12,
  parameter int unsigned ERR_W      = 8,
  parameter int unsigned BER_W      = 20,
  localparam int unsigned AW        = (N_HUBS > 1) ? $clog2(N_HUBS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [AW-1:0]      my_addr,
  input  logic               stall,
  input  logic [RP_W-1:0]    rp_packets,
  // packets to send
  input  logic               tx_valid,
  input  logic [AW-1:0]      tx_dst,
  output logic               tx_ready,
  // power amplifier drive
  output logic               pa_on,
  output logic [PSTEP_W-1:0] pa_step,
  // received packets with their bit-error counts
  input  logic               rx_valid,
  input  logic [AW-1:0]      rx_src,
  input  logic [ERR_W-1:0]   rx_err_bits,
  // CONTROL_OUT to the power manager
  output logic               rep_valid,
  output logic [AW-1:0]      rep_addr_rx,
  output logic [AW-1:0]      rep_addr_tx,
  output logic [BER_W-1:0]   rep_ber,
  input  logic               rep_ack,
  // CONTROL_IN from the power manager
  input  logic               ci_valid,
  input  cmd_e               ci_cmd,
  input  logic [AW-1:0]      ci_dst
);

  logic          upd, send;
  logic [AW-1:0] vga_dst;

  assign upd      = ci_valid && (ci_cmd != CMD_NOP);
  assign send     = tx_valid && !stall;
  assign tx_ready = !stall;
  assign vga_dst  = upd ? ci_dst : tx_dst;

  vga_ctrl #(.N_HUBS(N_HUBS)) u_vga (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (upd || send),
    .update   (upd),
    .updown   (ci_cmd == CMD_INC),
    .dst_addr (vga_dst),
    .pa_on    (pa_on),
    .pwr_step (pa_step)
  );

  error_control #(
    .N_HUBS(N_HUBS), .RP_W(RP_W), .ERR_W(ERR_W), .BER_W(BER_W)
  ) u_err (
    .clk         (clk),
    .rst_n       (rst_n),
    .my_addr     (my_addr),
    .rp_packets  (rp_packets),
    .rx_valid    (rx_valid),
    .rx_src      (rx_src),
    .rx_err_bits (rx_err_bits),
    .rep_valid   (rep_valid),
    .rep_addr_rx (rep_addr_rx),
    .rep_addr_tx (rep_addr_tx),
    .rep_ber     (rep_ber),
    .rep_ack     (rep_ack)
  );

endmodule
