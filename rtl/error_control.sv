// error_control: receiver-side error statistics of one radio hub.
//
// For every transmitting hub T this block keeps a packet counter PC[T] and an
// accumulator of bit errors. PC[T] starts at rp_packets (the reconfiguration
// period in packets, a configuration input of RP_W bits) and counts down by one
// for every packet received from T; rx_err_bits (the number of wrong bits the
// error detector found in that packet) is added to T's accumulator, which
// saturates at its maximum. The packet that brings PC[T] to zero closes T's
// reconfiguration period: the accumulated count becomes T's estimated BER
// (bit errors per rp_packets packets), a report for T is marked pending, and
// the counter and accumulator restart for the next period.
//
// Pending reports are offered to the power manager as CONTROL_OUT
// (rep_addr_rx = my_addr, rep_addr_tx = T, rep_ber), one at a time with
// rep_valid high, chosen round-robin over the pending transmitters (the one
// after the last report taken comes first). rep_ack (from the manager, during
// reconfiguration) removes the offered report at the clock edge. If a period of T closes again before
// its report was taken, the newer count replaces the older one. rep_valid is
// also the end-of-period notification to the manager.
//
// Timing: a report appears one clock edge after the packet that closed its
// period; rep_* are driven from registers through a selector. A new
// rp_packets value applies from the next reload of each counter (rp_packets
// = 0 acts as 1).
//
// Following the design: the per-transmitter packet counter PC[T] reloaded
// with RP, and the three-field CONTROL_OUT report. This design's own choices:
// measuring the BER as a count of bit errors per period, the widths ERR_W,
// BER_W and RP_W (sized so that 4000 packets of 255 errors cannot overflow), the round-robin order of reports, and ignoring packets whose
// source is this hub itself or out of range.
module error_control #(
  parameter int unsigned N_HUBS     = 8,
  parameter int unsigned RP_W       = 12,
  parameter int unsigned ERR_W      = 8,
  parameter int unsigned BER_W      = 20,
  localparam int unsigned AW        = (N_HUBS > 1) ? $clog2(N_HUBS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [AW-1:0]    my_addr,
  input  logic [RP_W-1:0]  rp_packets,
  // received packet, from the OOK receiver and its error detector
  input  logic             rx_valid,
  input  logic [AW-1:0]    rx_src,
  input  logic [ERR_W-1:0] rx_err_bits,
  // CONTROL_OUT towards the power manager
  output logic             rep_valid,
  output logic [AW-1:0]    rep_addr_rx,
  output logic [AW-1:0]    rep_addr_tx,
  output logic [BER_W-1:0] rep_ber,
  input  logic             rep_ack
);

  logic [RP_W-1:0]  pc       [N_HUBS];
  logic [BER_W-1:0] acc      [N_HUBS];
  logic [BER_W-1:0] pend_ber [N_HUBS];
  logic [N_HUBS-1:0] pend;

  // saturating sum of the running count and this packet's errors
  logic [BER_W:0]   sum_full;
  logic [BER_W-1:0] sum_sat;
  logic             rx_ok;

  assign rx_ok    = rx_valid && (int'(rx_src) < N_HUBS) && (rx_src != my_addr);
  assign sum_full = {1'b0, acc[rx_src]} + (BER_W+1)'(rx_err_bits);
  assign sum_sat  = sum_full[BER_W] ? '1 : sum_full[BER_W-1:0];

  // pending transmitters are offered round-robin, starting at rr_ptr, so
  // that a busy low-numbered source cannot starve the others
  logic [AW-1:0] sel, rr_ptr;
  always_comb begin
    logic [AW-1:0] idx;
    logic          found;
    sel   = '0;
    found = 1'b0;
    for (int unsigned k = 0; k < N_HUBS; k++) begin
      idx = AW'((int'(rr_ptr) + k) % N_HUBS);
      if (!found && pend[idx]) begin
        found = 1'b1;
        sel   = idx;
      end
    end
  end

  assign rep_valid   = |pend;
  assign rep_addr_rx = my_addr;
  assign rep_addr_tx = sel;
  assign rep_ber     = pend_ber[sel];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend   <= '0;
      rr_ptr <= '0;
      for (int t = 0; t < N_HUBS; t++) begin
        pc[t]       <= rp_packets;
        acc[t]      <= '0;
        pend_ber[t] <= '0;
      end
    end else begin
      if (rep_ack && rep_valid) begin
        pend[sel] <= 1'b0;
        rr_ptr    <= AW'((int'(sel) + 1) % N_HUBS);
      end
      if (rx_ok) begin
        if (pc[rx_src] <= RP_W'(1)) begin
          // this packet closes the period of transmitter rx_src
          pend[rx_src]     <= 1'b1;
          pend_ber[rx_src] <= sum_sat;
          acc[rx_src]      <= '0;
          pc[rx_src]       <= rp_packets;
        end else begin
          acc[rx_src] <= sum_sat;
          pc[rx_src]  <= pc[rx_src] - 1'b1;
        end
      end
    end
  end

  // The manager may only take a report that is offered.
  a_ack_offered: assert property (@(posedge clk) disable iff (!rst_n) rep_ack |-> rep_valid);

endmodule
