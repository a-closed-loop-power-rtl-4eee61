// winoc_pm_checker: stimulus, wireless-channel model and checks for the whole
// closed-loop power control system (winoc_pm_top).
//
// Channel model (a test abstraction, not part of the design): every ordered
// hub pair <t,d> has a required power step req[t][d], the lowest step at
// which its link is clean; it stands for the attenuation Ga of the pair. A packet sent at pa_step >= req arrives at d
// one cycle later with an occasional single bit error; below req it arrives
// with 1 + 2*(req - step) errors and more. reference_ber is RP_PACKETS/2 error
// bits per period, so clean links read as over-powered and weak links as
// under-powered.
//
// Traffic: in cycle c hub t sends, with probability 7/8, to hub
// (t + 1 + c mod (N-1)) mod N, so no two packets reach the same receiver in
// one cycle. A final quiet phase sends nothing.
//
// Checks: nothing is sent while stalled; tx_ready = not stall; every stall
// lasts RS_CYCLES cycles; every command follows the rule "increase if the
// report's BER > reference, else decrease" and goes to the report's
// transmitter; after the run, the power table (read through pa_step by
// presenting each destination in turn) holds, for every pair, a step between
// req-1 and req+1: the loop oscillates around the lowest clean step, and a
// report gathered partly before a command was applied can push it one step
// past req.
// Mechanisms counted, each of which must occur: stall (reconfiguration),
// increase, decrease, decrease at the lowest step, a period that ends with no
// report pending, and (when NEED_LEFTOVER) reports left for a later RS.
module winoc_pm_checker
  import winoc_pm_pkg::*;
#(
  parameter int unsigned N_HUBS        = 8,
  parameter int unsigned RP_PACKETS    = 2000,
  parameter int unsigned RP_CYCLES     = 2000,
  parameter int unsigned RS_CYCLES     = 10,
  parameter int unsigned ERR_W         = 8,
  parameter int unsigned BER_W         = 20,
  parameter int unsigned RUN_CYCLES    = 100000,
  parameter int unsigned QUIET_CYCLES  = 10000,
  parameter bit          NEED_LEFTOVER = 1'b1,
  localparam int unsigned AW           = (N_HUBS > 1) ? $clog2(N_HUBS) : 1
) (
  output logic                             clk,
  output logic                             rst_n,
  output logic [BER_W-1:0]                 reference_ber,
  output logic [11:0]                      rp_packets,
  output logic [11:0]                      rp_cycles,
  output logic [5:0]                       rs_cycles,
  output logic [N_HUBS-1:0]                tx_valid,
  output logic [N_HUBS-1:0][AW-1:0]        tx_dst,
  input  logic [N_HUBS-1:0]                tx_ready,
  input  logic [N_HUBS-1:0]                pa_on,
  input  logic [N_HUBS-1:0][PSTEP_W-1:0]   pa_step,
  output logic [N_HUBS-1:0]                rx_valid,
  output logic [N_HUBS-1:0][AW-1:0]        rx_src,
  output logic [N_HUBS-1:0][ERR_W-1:0]     rx_err_bits,
  input  logic                             stall,
  // internal traffic between hubs and manager, observed only
  input  logic [N_HUBS-1:0]                mon_rep_valid,
  input  logic [N_HUBS-1:0]                mon_rep_ack,
  input  logic [N_HUBS-1:0][AW-1:0]        mon_rep_addr_rx,
  input  logic [N_HUBS-1:0][AW-1:0]        mon_rep_addr_tx,
  input  logic [N_HUBS-1:0][BER_W-1:0]     mon_rep_ber,
  input  logic [N_HUBS-1:0]                mon_ci_valid,
  input  cmd_e [N_HUBS-1:0]                mon_ci_cmd,
  input  logic [N_HUBS-1:0][AW-1:0]        mon_ci_dst
);

  int checks = 0, failures = 0;
  int n_rs = 0, n_inc = 0, n_dec = 0, n_floor = 0, n_empty = 0, n_leftover = 0, n_sent = 0;
  int req [N_HUBS][N_HUBS];
  int tbl [N_HUBS][N_HUBS];      // commands applied so far, tracked from the commands seen
  real energy_uw, base_uw;

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic fail(string m);
    failures++;
    if (failures < 20) $display("FAIL t=%0t %s", $time, m);
  endtask

  initial begin
    repeat (RUN_CYCLES + QUIET_CYCLES + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // power in microwatts of a step: 8 uW at step 0 to 794 uW at step 7,
  // equally spaced in dB
  function automatic real step_uw(int s);
    return 8.0 * (10.0 ** ((20.0 * s / 7.0) / 10.0));
  endfunction

  initial begin
    automatic int idle_len = 0, rs_len = 0;
    automatic bit prev_stall = 1'b0;
    rst_n = 1'b0;
    reference_ber = BER_W'(RP_PACKETS / 2);
    rp_packets    = 12'(RP_PACKETS);
    rp_cycles     = 12'(RP_CYCLES);
    rs_cycles     = 6'(RS_CYCLES);
    tx_valid = '0; tx_dst = '0; rx_valid = '0; rx_src = '0; rx_err_bits = '0;
    energy_uw = 0.0; base_uw = 0.0;
    for (int t = 0; t < N_HUBS; t++)
      for (int d = 0; d < N_HUBS; d++) begin
        req[t][d] = $urandom % (MAX_STEP + 1);
        tbl[t][d] = MAX_STEP;
      end
    req[0][1] = 0;                 // a very close pair: must reach the floor
    req[1][0] = MAX_STEP;          // a far pair: must stay at the top
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    for (int c = 0; c < RUN_CYCLES + QUIET_CYCLES; c++) begin
      automatic bit quiet = (c >= RUN_CYCLES);
      // drive this cycle's transmissions
      for (int t = 0; t < N_HUBS; t++) begin
        tx_valid[t] = !quiet && (($urandom % 8) != 0);
        tx_dst[t]   = AW'((t + 1 + (c % (N_HUBS - 1))) % N_HUBS);
      end
      #1;
      // checks in the middle of the cycle
      checks++;
      for (int t = 0; t < N_HUBS; t++) begin
        if (tx_ready[t] !== !stall) fail("tx_ready");
        if (pa_on[t] !== (tx_valid[t] && !stall)) fail($sformatf("pa_on hub %0d", t));
      end
      for (int h = 0; h < N_HUBS; h++) begin
        if (mon_rep_ack[h]) begin
          automatic int tt = int'(mon_rep_addr_tx[h]);
          automatic cmd_e ec = (mon_rep_ber[h] > reference_ber) ? CMD_INC : CMD_DEC;
          checks++;
          if (!stall) fail("report taken outside RS");
          if (!mon_ci_valid[tt] || mon_ci_cmd[tt] !== ec || mon_ci_dst[tt] !== mon_rep_addr_rx[h])
            fail($sformatf("command to hub %0d for report of hub %0d", tt, h));
          if (ec == CMD_INC) begin
            n_inc++;
            if (tbl[tt][h] < MAX_STEP) tbl[tt][h]++;
          end else begin
            n_dec++;
            if (tbl[tt][h] == 0) n_floor++;
            else tbl[tt][h]--;
          end
        end
      end
      if (stall) begin
        if (!prev_stall) n_rs++;
        rs_len++; idle_len = 0;
      end else begin
        if (prev_stall) begin
          checks++;
          if (rs_len != RS_CYCLES) fail($sformatf("RS lasted %0d", rs_len));
          if (mon_rep_valid != '0) n_leftover++;
        end
        rs_len = 0; idle_len++;
        if (idle_len == RP_CYCLES + 2) n_empty++;
      end
      prev_stall = stall;
      // channel: packets on air now reach their receivers next cycle
      begin
        automatic logic [N_HUBS-1:0]                 nv = '0;
        automatic logic [N_HUBS-1:0][AW-1:0]         ns = '0;
        automatic logic [N_HUBS-1:0][ERR_W-1:0]      ne = '0;
        for (int t = 0; t < N_HUBS; t++) begin
          if (pa_on[t]) begin
            automatic int d = int'(tx_dst[t]);
            automatic int s = int'(pa_step[t]);
            automatic int e;
            checks++;
            if (s != tbl[t][d]) fail($sformatf("pair %0d->%0d sent at %0d, table %0d", t, d, s, tbl[t][d]));
            if (s >= req[t][d]) e = (($urandom % 8) == 0) ? 1 : 0;
            else e = 1 + 2 * (req[t][d] - s) + ($urandom % 3);
            nv[d] = 1'b1; ns[d] = AW'(t); ne[d] = ERR_W'(e);
            n_sent++;
            energy_uw += step_uw(s);
            base_uw   += step_uw(MAX_STEP);
          end
        end
        @(posedge clk);
        #2;
        rx_valid = nv; rx_src = ns; rx_err_bits = ne;
      end
    end

    // read the final tables through pa_step, within one clock phase
    tx_valid = '0;
    rx_valid = '0;
    while (stall) @(posedge clk);
    @(negedge clk);
    for (int d = 0; d < N_HUBS; d++) begin
      for (int t = 0; t < N_HUBS; t++) begin tx_valid[t] = 1'b1; tx_dst[t] = AW'(d); end
      #0.1;
      for (int t = 0; t < N_HUBS; t++) begin
        if (t != d) begin
          automatic int lo = (req[t][d] > 0) ? req[t][d] - 1 : 0;
          checks++;
          if (int'(pa_step[t]) < lo || int'(pa_step[t]) > req[t][d] + 1)
            fail($sformatf("pair %0d->%0d settled at %0d, needs %0d", t, d, pa_step[t], req[t][d]));
        end
      end
    end
    tx_valid = '0;

    $display("packets=%0d RS entries=%0d inc=%0d dec=%0d dec at floor=%0d empty periods=%0d leftover RS=%0d",
             n_sent, n_rs, n_inc, n_dec, n_floor, n_empty, n_leftover);
    $display("transmit energy relative to fixed maximum power: %0.1f%%", 100.0 * energy_uw / base_uw);
    checks++;
    if (n_rs == 0)  fail("no reconfiguration happened");
    if (n_inc == 0) fail("no increase command");
    if (n_dec == 0) fail("no decrease command");
    if (n_floor == 0) fail("no decrease at the lowest step");
    if (n_empty == 0) fail("no period ended without reports");
    if (NEED_LEFTOVER && n_leftover == 0) fail("no report carried to a later RS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
