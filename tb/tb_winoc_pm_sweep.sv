// tb_winoc_pm_sweep: the evaluated settings (periods of 1000 to 4000 packets
// with a 10-cycle reconfiguration state; reconfiguration states of 1 to 32
// cycles with a 2000-packet period), run on a 4-hub system (the 16-core
// systems) and on an 8-hub system (the 64-core systems).
// Each system runs in its own winoc_pm_sweep_env, side by side; this module
// waits for both, adds up their checks and prints the result.
module tb_winoc_pm_sweep;
  logic done4, done8;
  int checks4, failures4, checks8, failures8;

  winoc_pm_sweep_env #(.N(4)) env4 (.done(done4), .checks(checks4), .failures(failures4));
  winoc_pm_sweep_env #(.N(8)) env8 (.done(done8), .checks(checks8), .failures(failures8));

  initial begin
    fork
      begin
        wait (done4 === 1'b1 && done8 === 1'b1);
        #1;
        $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks8, failures4 + failures8);
      end
      begin
        #20ms;
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks8, failures4 + failures8 + 1);
      end
    join_any
    $finish;
  end
endmodule
