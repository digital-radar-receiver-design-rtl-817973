// tb_watchdog: checks the timeout length for several settings (exactly
// 2**(sel+1) clocks to the PROG_B pulse), the PROM switch and mode pins on
// each timeout, alternation on repeated timeouts, that wd_disable stops it,
// that a reload request pulses PROG_B without switching and re-arms it, the
// power-up default jumper, and the enable jumper.
module tb_watchdog;
  logic clk = 1'b0, por, en, defp, dis, preq;
  logic [4:0] sel;
  logic prog_b, selp, to;
  logic [2:0] mode;
  int checks = 0, failures = 0;

  watchdog dut (.clk(clk), .por(por), .wd_enable(en), .default_parallel(defp),
    .timeout_sel(sel), .wd_disable(dis), .fpga_prog_req(preq), .prog_b(prog_b),
    .sel_parallel(selp), .mode(mode), .timed_out(to));

  always #15259ns clk = ~clk;   // 32.768 kHz

  initial begin
    #2s; failures++; $display("watchdog of the testbench expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // Count clocks from now until PROG_B goes low (limit: give up).
  task automatic clocks_to_prog(output int n, input int limit);
    n = 0;
    while (prog_b && n < limit) begin @(posedge clk); #1ns; n++; end
  endtask

  initial begin
    int n;
    logic prev_sel;
    por = 1'b1; en = 1'b1; defp = 1'b0; dis = 1'b0; preq = 1'b0; sel = 5'd3;
    repeat (2) @(posedge clk); #1ns;
    check(prog_b == 1'b1 && selp == 1'b0 && mode == 3'b001, "power-up state, serial PROM");
    por = 1'b0;
    for (int s = 0; s < 6; s++) begin
      sel = 5'(s);
      prev_sel = selp;
      clocks_to_prog(n, 1000);
      check(n == (1 << (s + 1)), $sformatf("sel=%0d: %0d clocks, expected %0d", s, n, 1 << (s + 1)));
      check(selp == !prev_sel, "PROM switched on timeout");
      check(mode == (selp ? 3'b010 : 3'b001), "mode pins follow PROM");
      @(posedge clk); #1ns;   // PROG_B back high after one clock
      check(prog_b == 1'b1, "PROG_B pulse is one clock");
    end
    // Disabled by software: no timeout.
    sel = 5'd2;
    @(posedge clk); #1ns; dis = 1'b1; @(posedge clk); #1ns; dis = 1'b0;
    clocks_to_prog(n, 100);
    check(n == 100, "no timeout after wd_disable");
    // Reload request: PROG_B pulse, no switch, watchdog re-armed.
    prev_sel = selp;
    preq = 1'b1; @(posedge clk); #1ns; preq = 1'b0;
    check(prog_b == 1'b0 && selp == prev_sel, "reload pulses PROG_B without switching");
    @(posedge clk); #1ns;
    clocks_to_prog(n, 100);
    check(n == 8, $sformatf("re-armed after reload: %0d clocks", n));
    // Jumpers: default parallel PROM, watchdog disabled.
    por = 1'b1; defp = 1'b1; en = 1'b0;
    repeat (2) @(posedge clk); #1ns; por = 1'b0;
    check(selp == 1'b1 && mode == 3'b010, "power-up default parallel PROM");
    clocks_to_prog(n, 100);
    check(n == 100, "no timeout with the enable jumper off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
