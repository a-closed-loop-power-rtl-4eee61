// tb_error_control: self-checking testbench of the receiver error statistics.
//
// A receiver at address 1 among 4 hubs gets random packets (random source,
// including its own address, which must be ignored, and random error counts)
// and the testbench acks offered reports at random. A reference model counts
// packets and error bits per source with plain integers: after every
// RP_PACKETS packets from a source, a report with the error total (clipped to
// the BER_W range) is due. Every cycle rep_valid, rep_addr_rx, rep_addr_tx
// (the next pending source in round-robin order after the last one taken) and rep_ber are compared with the model. The small
// BER_W makes the saturation of the count happen.
module tb_error_control;
  localparam int unsigned N     = 4;
  localparam int unsigned AW    = 2;
  localparam int unsigned RP    = 5;
  localparam int unsigned ERR_W = 8;
  localparam int unsigned BER_W = 9;
  localparam int unsigned ME    = 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [AW-1:0] my_addr = AW'(ME);
  logic [11:0] rp_packets = 12'(RP);
  logic rx_valid, rep_valid, rep_ack;
  logic [AW-1:0] rx_src, rep_addr_rx, rep_addr_tx;
  logic [ERR_W-1:0] rx_err_bits;
  logic [BER_W-1:0] rep_ber;
  int checks = 0, failures = 0, reports = 0, saturated = 0;

  int cnt [N], sum [N], pval [N];
  bit pend [N];

  error_control #(.N_HUBS(N), .ERR_W(ERR_W), .BER_W(BER_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rr = 0;
  function automatic int next_pending();
    for (int k = 0; k < N; k++) if (pend[(rr + k) % N]) return (rr + k) % N;
    return -1;
  endfunction

  initial begin
    rx_valid = 0; rx_src = '0; rx_err_bits = '0; rep_ack = 0;
    for (int t = 0; t < N; t++) begin cnt[t] = 0; sum[t] = 0; pend[t] = 0; pval[t] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 20000; k++) begin
      int lo, s;
      rx_valid    = ($urandom % 3) != 0;
      rx_src      = AW'($urandom % N);
      // mostly small error counts, sometimes large ones to reach saturation
      rx_err_bits = (($urandom % 3) == 0) ? ERR_W'($urandom) : ERR_W'($urandom % 4);
      rep_ack     = rep_valid && (($urandom % 4) == 0);
      #1;
      lo = next_pending();
      checks++;
      if (rep_valid !== (lo >= 0)) begin
        failures++; $display("FAIL rep_valid=%0b exp %0d", rep_valid, lo);
      end else if (lo >= 0) begin
        checks++;
        if (rep_addr_tx !== AW'(lo) || rep_addr_rx !== AW'(ME) || rep_ber !== BER_W'(pval[lo])) begin
          failures++;
          $display("FAIL report tx=%0d rx=%0d ber=%0d exp tx=%0d ber=%0d", rep_addr_tx, rep_addr_rx, rep_ber, lo, pval[lo]);
        end
      end
      @(posedge clk);
      // reference model update
      if (rep_ack && lo >= 0) begin pend[lo] = 0; rr = (lo + 1) % N; reports++; end
      s = int'(rx_src);
      if (rx_valid && s != ME) begin
        cnt[s]++;
        sum[s] += int'(rx_err_bits);
        if (cnt[s] == RP) begin
          pend[s] = 1;
          if (sum[s] > (1 << BER_W) - 1) begin pval[s] = (1 << BER_W) - 1; saturated++; end
          else pval[s] = sum[s];
          cnt[s] = 0; sum[s] = 0;
        end
      end
      #1;
    end
    checks++;
    if (reports < 100 || saturated == 0) begin
      failures++; $display("FAIL coverage reports=%0d saturated=%0d", reports, saturated);
    end
    $display("reports taken=%0d saturated=%0d", reports, saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
