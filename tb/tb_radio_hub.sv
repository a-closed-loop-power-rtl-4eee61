// tb_radio_hub: self-checking testbench of one radio hub (address 2 of 4).
//
// Random cycles mix packet transmission, packet reception with error counts,
// and (while stall is high) CONTROL_IN commands, including no-change ones.
// A reference model keeps the power table and the per-source packet and
// error counts. Checked every cycle: tx_ready = not stall; pa_on only for a
// packet sent while not stalled and with no command; pa_step equals the model
// table entry of the packet's destination; the CONTROL_OUT report (valid,
// addresses, error total) equals the model's. Reports are acked at random.
module tb_radio_hub;
  import winoc_pm_pkg::*;
  localparam int unsigned N = 4, AW = 2, RP = 4, ERR_W = 8, BER_W = 20, ME = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [AW-1:0] my_addr = AW'(ME);
  logic [11:0] rp_packets = 12'(RP);
  logic stall, tx_valid, tx_ready, pa_on, rx_valid, rep_valid, rep_ack, ci_valid;
  logic [AW-1:0] tx_dst, rx_src, rep_addr_rx, rep_addr_tx, ci_dst;
  logic [PSTEP_W-1:0] pa_step;
  logic [ERR_W-1:0] rx_err_bits;
  logic [BER_W-1:0] rep_ber;
  cmd_e ci_cmd;
  int rr = 0;
  int checks = 0, failures = 0, n_upd = 0, n_tx = 0, n_rep = 0;
  int lut [N], cnt [N], sum [N], pval [N];
  bit pend [N];

  radio_hub #(.N_HUBS(N), .ERR_W(ERR_W), .BER_W(BER_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string m);
    failures++;
    $display("FAIL t=%0t %s", $time, m);
  endtask

  initial begin
    automatic int lo;
    stall = 0; tx_valid = 0; tx_dst = '0; rx_valid = 0; rx_src = '0; rx_err_bits = '0;
    rep_ack = 0; ci_valid = 0; ci_cmd = CMD_NOP; ci_dst = '0;
    for (int i = 0; i < N; i++) begin lut[i] = 7; cnt[i] = 0; sum[i] = 0; pend[i] = 0; pval[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 20000; k++) begin
      // stall in bursts: high for about a fifth of the time
      stall       = ((k / 7) % 5) == 0;
      tx_valid    = ($urandom % 2) == 0;
      tx_dst      = AW'($urandom % N);
      rx_valid    = !stall && ($urandom % 2) == 0;
      rx_src      = AW'($urandom % N);
      rx_err_bits = ERR_W'($urandom % 5);
      rep_ack     = stall && rep_valid && (($urandom % 2) == 0);
      ci_valid    = stall && ($urandom % 2) == 0;
      case ($urandom % 5)
        0:       ci_cmd = CMD_NOP;
        1, 2:    ci_cmd = CMD_INC;
        default: ci_cmd = CMD_DEC;
      endcase
      ci_dst      = AW'($urandom % N);
      #1;
      checks++;
      if (tx_ready !== !stall) fail("tx_ready");
      if (ci_valid && ci_cmd != CMD_NOP) begin
        if (pa_on !== 1'b0) fail("pa_on during update");
      end else begin
        if (pa_on !== (tx_valid && !stall)) fail("pa_on");
        if (tx_valid && !stall) begin
          checks++; n_tx++;
          if (pa_step !== PSTEP_W'(lut[tx_dst])) fail($sformatf("pa_step %0d exp %0d", pa_step, lut[tx_dst]));
        end
      end
      lo = -1;
      for (int k = N - 1; k >= 0; k--) if (pend[(rr + k) % N]) lo = (rr + k) % N;
      checks++;
      if (rep_valid !== (lo >= 0)) fail("rep_valid");
      else if (lo >= 0 && (rep_addr_tx !== AW'(lo) || rep_addr_rx !== AW'(ME) || rep_ber !== BER_W'(pval[lo])))
        fail($sformatf("report tx=%0d ber=%0d exp tx=%0d ber=%0d", rep_addr_tx, rep_ber, lo, pval[lo]));
      @(posedge clk);
      if (ci_valid && ci_cmd == CMD_INC && lut[ci_dst] < 7) begin lut[ci_dst]++; n_upd++; end
      if (ci_valid && ci_cmd == CMD_DEC && lut[ci_dst] > 0) begin lut[ci_dst]--; n_upd++; end
      if (rep_ack && lo >= 0) begin pend[lo] = 0; rr = (lo + 1) % N; n_rep++; end
      if (rx_valid && int'(rx_src) != ME) begin
        cnt[rx_src]++; sum[rx_src] += int'(rx_err_bits);
        if (cnt[rx_src] == RP) begin
          pend[rx_src] = 1; pval[rx_src] = sum[rx_src]; cnt[rx_src] = 0; sum[rx_src] = 0;
        end
      end
      #1;
    end
    checks++;
    if (n_upd < 100 || n_tx < 100 || n_rep < 100) fail("coverage");
    $display("updates=%0d packets sent=%0d reports=%0d", n_upd, n_tx, n_rep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
