// power_manager: centralized closed-loop transmit power manager.
//
// A two-state machine alternates between the reconfiguration period (RP,
// state IDLE) and the reconfiguration state (RS, state RECONF).
//
//  * IDLE: the network runs and the manager only counts down RP_counter, one
//    per clock cycle (one packet slot per cycle), from rp_cycles. When
//    RP_counter has run out and at least one receiver has announced the end
//    of its period (a pending CONTROL_OUT report), the manager enters RECONF;
//    with no report pending it starts another period.
//  * RECONF: stall is high, so the network holds all traffic. RS_counter
//    counts rs_cycles cycles. In each cycle the manager takes one report
//    (rep_ack), chosen round-robin over the hubs that offer one, compares its
//    estimated BER with reference_ber and sends CONTROL_IN to the transmitting
//    hub rep_addr_tx: CMD_INC if estimated BER > reference_ber, otherwise
//    CMD_DEC (a clean period means the pair is over-powered). One command
//    per RS cycle; reports not served before RS_counter expires wait for the
//    next RS. Then the manager returns to IDLE and reloads RP_counter.
//
// Interface and timing: reports are inputs from registers in the hubs; the
// grant, rep_ack and CONTROL_IN (ci_valid, ci_cmd, ci_dst) are combinational
// in the same RS cycle, so the transmitter's table is updated at the end of
// that cycle. ci_dst carries the reporting receiver's address, which is the
// table entry the transmitter must change. stall is high for exactly
// rs_cycles cycles per reconfiguration; IDLE lasts a multiple of rp_cycles
// cycles. rp_cycles and rs_cycles are configuration inputs read when a
// counter is loaded; 0 acts as 1. Widths RP_W = 12 and RS_W = 6 hold the
// largest period (4000) and reconfiguration state (32) that were evaluated.
//
// Following the design: the IDLE/RECONFIGURE machine with RP_counter and
// RS_counter, the network stall during RS, the comparison with a reference
// BER and the increase/decrease commands, one command per RS cycle. This
// design's own choices: RP_counter counted in clock cycles with RS entered
// only when a report is pending, round-robin service, the extra ci_dst
// field, the command encoding, and the reset into IDLE.
module power_manager
  import winoc_pm_pkg::*;
#(
  parameter int unsigned N_HUBS    = 8,
  parameter int unsigned RP_W      = 12,
  parameter int unsigned RS_W      = 6,
  parameter int unsigned BER_W     = 20,
  localparam int unsigned AW       = (N_HUBS > 1) ? $clog2(N_HUBS) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [RP_W-1:0]               rp_cycles,
  input  logic [RS_W-1:0]               rs_cycles,
  input  logic [BER_W-1:0]              reference_ber,
  // CONTROL_OUT from every receiving hub
  input  logic [N_HUBS-1:0]             rep_valid,
  input  logic [N_HUBS-1:0][AW-1:0]     rep_addr_rx,
  input  logic [N_HUBS-1:0][AW-1:0]     rep_addr_tx,
  input  logic [N_HUBS-1:0][BER_W-1:0]  rep_ber,
  output logic [N_HUBS-1:0]             rep_ack,
  // CONTROL_IN to every transmitting hub
  output logic [N_HUBS-1:0]             ci_valid,
  output cmd_e [N_HUBS-1:0]             ci_cmd,
  output logic [N_HUBS-1:0][AW-1:0]     ci_dst,
  // network stall during the reconfiguration state
  output logic                          stall
);

  typedef enum logic {S_IDLE = 1'b0, S_RECONF = 1'b1} state_e;

  state_e         state;
  logic [RP_W-1:0] rp_counter;
  logic [RS_W-1:0] rs_counter;
  logic [AW-1:0]  rr_ptr;
  logic [RP_W-1:0] rp_load;
  logic [RS_W-1:0] rs_load;

  assign rp_load = (rp_cycles == '0) ? '0 : rp_cycles - 1'b1;
  assign rs_load = (rs_cycles == '0) ? '0 : rs_cycles - 1'b1;

  // round-robin choice of one offering hub, starting at rr_ptr
  logic          gnt_valid;
  logic [AW-1:0] gnt;
  always_comb begin
    int unsigned idx;
    gnt_valid = 1'b0;
    gnt       = '0;
    for (int unsigned k = 0; k < N_HUBS; k++) begin
      idx = (int'(rr_ptr) + k) % N_HUBS;
      if (!gnt_valid && rep_valid[idx] && (int'(rep_addr_tx[idx]) < N_HUBS)) begin
        gnt_valid = 1'b1;
        gnt       = AW'(idx);
      end
    end
  end

  logic serve;
  cmd_e decision;
  assign serve    = (state == S_RECONF) && gnt_valid;
  assign decision = (rep_ber[gnt] > reference_ber) ? CMD_INC : CMD_DEC;
  assign stall    = (state == S_RECONF);

  always_comb begin
    rep_ack  = '0;
    ci_valid = '0;
    for (int h = 0; h < N_HUBS; h++) begin
      ci_cmd[h] = CMD_NOP;
      ci_dst[h] = '0;
    end
    if (serve) begin
      rep_ack[gnt]                  = 1'b1;
      ci_valid[rep_addr_tx[gnt]]    = 1'b1;
      ci_cmd[rep_addr_tx[gnt]]      = decision;
      ci_dst[rep_addr_tx[gnt]]      = rep_addr_rx[gnt];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      rp_counter <= rp_load;
      rs_counter <= '0;
      rr_ptr     <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (rp_counter != '0) begin
            rp_counter <= rp_counter - 1'b1;
          end else if (|rep_valid) begin
            state      <= S_RECONF;
            rs_counter <= rs_load;
          end else begin
            rp_counter <= rp_load;
          end
        end
        S_RECONF: begin
          if (serve) rr_ptr <= AW'((int'(gnt) + 1) % N_HUBS);
          if (rs_counter != '0) begin
            rs_counter <= rs_counter - 1'b1;
          end else begin
            state      <= S_IDLE;
            rp_counter <= rp_load;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // At most one command leaves the manager per cycle, and only during RS.
  a_one_cmd: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ci_valid));
  a_cmd_in_rs: assert property (@(posedge clk) disable iff (!rst_n) (|ci_valid) |-> stall);

endmodule
