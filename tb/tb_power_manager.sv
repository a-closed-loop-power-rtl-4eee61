// tb_power_manager: self-checking testbench of the centralized power manager.
//
// Four simulated receiving hubs raise CONTROL_OUT reports at random (random
// transmitter, random estimated BER around the reference) and keep each one
// until it is acknowledged. The testbench checks:
//  * the stall (reconfiguration state) lasts exactly RS_CYCLES cycles and is
//    entered only at a multiple of RP_CYCLES idle cycles with a report pending;
//  * at most one report is taken per cycle, only while stalled, and hubs are
//    served round-robin;
//  * each taken report yields CONTROL_IN at hub addr_tx only, with the command
//    increase if BER > reference, else decrease, and ci_dst = addr_rx;
//  * reports left over when RS ends are served in a later RS.
module tb_power_manager;
  import winoc_pm_pkg::*;
  localparam int unsigned N     = 4;
  localparam int unsigned AW    = 2;
  localparam int unsigned RP    = 20;
  localparam int unsigned RS    = 3;
  localparam int unsigned BER_W = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [BER_W-1:0] reference_ber = BER_W'(100);
  logic [11:0] rp_cycles = 12'(RP);
  logic [5:0] rs_cycles = 6'(RS);
  logic [N-1:0] rep_valid, rep_ack, ci_valid;
  logic [N-1:0][AW-1:0] rep_addr_rx, rep_addr_tx, ci_dst;
  logic [N-1:0][BER_W-1:0] rep_ber;
  cmd_e [N-1:0] ci_cmd;
  logic stall;
  int checks = 0, failures = 0;
  int n_inc = 0, n_dec = 0, n_rs = 0, n_leftover = 0, n_empty_rp = 0;

  power_manager #(.N_HUBS(N), .BER_W(BER_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(string m);
    failures++;
    $display("FAIL t=%0t %s", $time, m);
  endtask

  int idle_len, rs_len, rr;
  bit prev_stall;

  initial begin
    rep_valid = '0; rep_addr_rx = '0; rep_addr_tx = '0; rep_ber = '0;
    for (int h = 0; h < N; h++) rep_addr_rx[h] = AW'(h);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    idle_len = 0; rs_len = 0; rr = 0; prev_stall = 0;
    for (int k = 0; k < 30000; k++) begin
      int exp_g;
      logic [N-1:0] ack_s;
      #1;
      ack_s = rep_ack;
      // expected round-robin grant
      exp_g = -1;
      for (int j = 0; j < N; j++) begin
        automatic int idx = (rr + j) % N;
        if (exp_g < 0 && rep_valid[idx]) exp_g = idx;
      end
      checks++;
      if (!stall) begin
        if (rep_ack != '0 || ci_valid != '0) fail("ack or command outside RS");
      end else if (exp_g < 0) begin
        if (rep_ack != '0 || ci_valid != '0) fail("ack with nothing offered");
      end else begin
        automatic int t = int'(rep_addr_tx[exp_g]);
        automatic cmd_e ec = (rep_ber[exp_g] > reference_ber) ? CMD_INC : CMD_DEC;
        automatic logic [N-1:0] exp_ci = '0;
        exp_ci[t] = 1'b1;
        if (rep_ack !== (N'(1) << exp_g)) fail($sformatf("ack %b exp hub %0d", rep_ack, exp_g));
        if (ci_valid !== exp_ci) fail($sformatf("ci_valid %b exp %b", ci_valid, exp_ci));
        if (ci_cmd[t] !== ec || ci_dst[t] !== AW'(exp_g)) fail("command content");
        if (ec == CMD_INC) n_inc++; else n_dec++;
        rr = (exp_g + 1) % N;
      end
      // stall run lengths
      if (stall) begin
        if (!prev_stall) begin
          checks++;
          if (idle_len == 0 || (idle_len % RP) != 0) fail($sformatf("idle run %0d", idle_len));
          if (idle_len > RP) n_empty_rp++;
          n_rs++;
        end
        rs_len++;
        idle_len = 0;
      end else begin
        if (prev_stall) begin
          checks++;
          if (rs_len != RS) fail($sformatf("RS run %0d", rs_len));
          if (rep_valid != '0) n_leftover++;
        end
        rs_len = 0;
        idle_len++;
      end
      prev_stall = stall;
      @(posedge clk);
      #2;
      // hubs: drop acked reports, raise new ones now and then
      for (int h = 0; h < N; h++) begin
        if (ack_s[h]) rep_valid[h] = 0;
        if (!rep_valid[h] && ($urandom % 60) == 0) begin
          rep_valid[h]   = 1;
          rep_addr_tx[h] = AW'((h + 1 + $urandom % (N - 1)) % N);
          rep_ber[h]     = BER_W'(50 + $urandom % 101);
        end
      end
    end
    checks++;
    if (n_inc == 0 || n_dec == 0 || n_rs < 10 || n_leftover == 0 || n_empty_rp == 0) fail("coverage");
    $display("RS entries=%0d inc=%0d dec=%0d leftover=%0d empty periods=%0d", n_rs, n_inc, n_dec, n_leftover, n_empty_rp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
