// tb_vga_ctrl: self-checking testbench of the VGA controller power table.
//
// After reset every entry must read the highest step. Then 3000 random cycles
// of reads and increase / decrease updates are applied, and pwr_step and
// pa_on are compared every cycle with a reference table kept in the
// testbench (steps saturate at 0 and 7). Directed sequences drive one entry
// to each end of the range to exercise saturation, and check that an update
// is visible on the cycle after it is applied.
module tb_vga_ctrl;
  import winoc_pm_pkg::*;
  localparam int unsigned N  = 8;
  localparam int unsigned AW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic en, update, updown, pa_on;
  logic [AW-1:0] dst_addr;
  logic [PSTEP_W-1:0] pwr_step;
  int checks = 0, failures = 0;
  int model [N];

  vga_ctrl #(.N_HUBS(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_now(string what);
    checks++;
    if (pwr_step !== PSTEP_W'(model[dst_addr]) || pa_on !== (en & ~update)) begin
      failures++;
      $display("FAIL %s: dst=%0d step=%0d exp=%0d pa_on=%0b", what, dst_addr, pwr_step, model[dst_addr], pa_on);
    end
  endtask

  task automatic apply(logic e, logic u, logic ud, int d);
    en = e; update = u; updown = ud; dst_addr = AW'(d);
    #1 check_now("comb");
    @(posedge clk);
    if (e && u) begin
      if (ud && model[d] < 7) model[d]++;
      if (!ud && model[d] > 0) model[d]--;
    end
    #1;
  endtask

  initial begin
    en = 0; update = 0; updown = 0; dst_addr = '0;
    for (int i = 0; i < N; i++) model[i] = 7;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1;
    for (int i = 0; i < N; i++) apply(1, 0, 0, i);   // reset value = max step
    // saturation at the top
    apply(1, 1, 1, 3); apply(1, 0, 0, 3);
    // walk entry 2 down to 0 and below
    for (int k = 0; k < 10; k++) apply(1, 1, 0, 2);
    apply(1, 0, 0, 2);
    checks++; if (pwr_step !== 0) begin failures++; $display("FAIL floor"); end
    // walk it back up by exactly 3
    for (int k = 0; k < 3; k++) apply(1, 1, 1, 2);
    apply(1, 0, 0, 2);
    checks++; if (pwr_step !== 3) begin failures++; $display("FAIL up3"); end
    // update with en low must not change anything
    apply(0, 1, 0, 5); apply(1, 0, 0, 5);
    checks++; if (pwr_step !== 7) begin failures++; $display("FAIL en gate"); end
    // random traffic
    for (int k = 0; k < 3000; k++)
      apply(($urandom % 8) != 0, ($urandom % 3) == 0, 1'($urandom % 2), $urandom % N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
