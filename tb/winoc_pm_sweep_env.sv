// winoc_pm_sweep_env: runs an N-hub power control system over the evaluated
// settings of the reconfiguration period (1000, 2000, 3000, 4000 packets,
// with a 10-cycle reconfiguration state) and of the reconfiguration state
// (1, 4, 8, 16, 24, 32 cycles, with a 2000-packet period), resetting the
// system between runs.
//
// Each run sends uniform traffic (every hub sends to a rotating destination
// with probability 7/8 per cycle) through the same channel model as
// winoc_pm_checker: a pair <t,d> is clean at steps >= req[t][d] and sees
// 1 + 2*(req - step) errors per packet below it. Per run the testbench prints
// the fraction of cycles the network was stalled and the transmit energy
// relative to always sending at the maximum step. The channel model and the
// traffic are test abstractions, so these figures only show the loop at work.
//
// Checks per run: the stalled fraction is above 0 and at most
// rs / (rp + rs) (one state of rs cycles per period of at least rp cycles);
// no packet is sent while stalled; energy ends below the fixed-maximum
// figure; every stall lasts exactly rs cycles.
//
// Interface: done rises when all runs are over; checks and failures are then
// final. The caller prints the result.
module winoc_pm_sweep_env
  import winoc_pm_pkg::*;
#(
  parameter int unsigned N   = 8,
  parameter int unsigned RUN = 120000,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned ERR_W = 8, BER_W = 20;

  logic clk = 1'b0, rst_n = 1'b0, stall;
  logic [BER_W-1:0] reference_ber;
  logic [11:0] rp_packets, rp_cycles;
  logic [5:0] rs_cycles;
  logic [N-1:0] tx_valid, tx_ready, pa_on, rx_valid;
  logic [N-1:0][AW-1:0] tx_dst, rx_src;
  logic [N-1:0][PSTEP_W-1:0] pa_step;
  logic [N-1:0][ERR_W-1:0] rx_err_bits;
  int req [N][N];

  winoc_pm_top #(.N_HUBS(N)) dut (.*);

  always #5 clk = ~clk;


  task automatic fail(string m);
    failures++;
    $display("FAIL t=%0t %s", $time, m);
  endtask

  function automatic real step_uw(int s);
    return 8.0 * (10.0 ** ((20.0 * s / 7.0) / 10.0));
  endfunction

  // one run; returns the stalled fraction
  task automatic run(input int rp, input int rs, output real stall_frac);
    automatic int n_stall = 0, run_len = 0;
    automatic real e = 0.0, e0 = 0.0;
    rp_packets = 12'(rp); rp_cycles = 12'(rp); rs_cycles = 6'(rs);
    reference_ber = BER_W'(rp / 2);
    tx_valid = '0; rx_valid = '0; rx_src = '0; rx_err_bits = '0; tx_dst = '0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int c = 0; c < RUN; c++) begin
      automatic logic [N-1:0] nv = '0;
      automatic logic [N-1:0][AW-1:0] ns = '0;
      automatic logic [N-1:0][ERR_W-1:0] ne = '0;
      for (int t = 0; t < N; t++) begin
        tx_valid[t] = ($urandom % 8) != 0;
        tx_dst[t]   = AW'((t + 1 + (c % (N - 1))) % N);
      end
      #1;
      if (stall) begin
        n_stall++; run_len++;
      end else if (run_len != 0) begin
        checks++;
        if (run_len != rs) fail($sformatf("stall lasted %0d, rs=%0d", run_len, rs));
        run_len = 0;
      end
      for (int t = 0; t < N; t++) begin
        if (stall && pa_on[t]) fail("sent while stalled");
        if (pa_on[t]) begin
          automatic int d = int'(tx_dst[t]);
          automatic int s = int'(pa_step[t]);
          nv[d] = 1'b1; ns[d] = AW'(t);
          ne[d] = ERR_W'((s >= req[t][d]) ? ((($urandom % 8) == 0) ? 1 : 0) : 1 + 2 * (req[t][d] - s));
          e  += step_uw(s);
          e0 += step_uw(MAX_STEP);
        end
      end
      @(posedge clk);
      #2;
      rx_valid = nv; rx_src = ns; rx_err_bits = ne;
    end
    stall_frac = real'(n_stall) / real'(RUN);
    $display("%0d hubs, RP=%0d RS=%0d: stalled %0.3f%% of cycles, transmit energy %0.1f%% of fixed maximum",
             N, rp, rs, 100.0 * stall_frac, 100.0 * e / e0);
    checks++;
    if (n_stall == 0) fail("never reconfigured");
    if (stall_frac > real'(rs) / real'(rp + rs) + 1e-9) fail("stalled more than one RS per RP");
    if (e >= e0) fail("no energy saved");
  endtask

  initial begin
    automatic real f;
    done = 1'b0; checks = 0; failures = 0;
    for (int t = 0; t < N; t++)
      for (int d = 0; d < N; d++) req[t][d] = $urandom % (MAX_STEP + 1);
    for (int i = 1; i <= 4; i++) run(1000 * i, 10, f);
    for (int i = 0; i < 6; i++) begin
      automatic int rs_list [6] = '{1, 4, 8, 16, 24, 32};
      run(2000, rs_list[i], f);
    end
    done = 1'b1;
  end
endmodule
