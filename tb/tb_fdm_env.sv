// tb_fdm_env: runs the class-based environment of fdm_env_pkg against the
// transmitter (default size) through the fdm_if bundle and fdm_tx_wrap.
module tb_fdm_env;
  import fdm_env_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  fdm_if      bus (clk);
  fdm_tx_wrap dut (bus);

  fdm_env env;

  initial begin
    repeat (300000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", (env == null) ? 0 : env.sb.checks,
             (env == null) ? 1 : env.sb.failures + 1);
    $finish;
  end

  initial begin
    bus.rst     = 1;
    bus.mode    = '0;
    bus.pushin  = 0;
    bus.firstin = 0;
    bus.datain  = '0;
    bus.stopout = 0;
    env = new(bus, 20);
    repeat (3) @(negedge clk);
    bus.rst = 0;
    env.run();
    env.report();
    $display("TB_RESULT checks=%0d failures=%0d", env.sb.checks, env.sb.failures);
    $finish;
  end
endmodule
