// tb_trig_debounce: a trigger line with a clean edge followed by ringing
// (pulses shorter than the lockout). Checks that the output changes once,
// 3 clocks after the clean edge, ignores the ringing, and takes a level
// change that lasts beyond the lockout. A reference model of
// "follow, then ignore for LOCKOUT clocks" runs alongside on the
// synchronised input.
module tb_trig_debounce;
  localparam int LO = 400;   // the module's default (5 us at 80 MHz)
  logic clk = 1'b0, rst, trig_in, trig_out;
  int checks = 0, failures = 0;
  int edges = 0;
  logic prev_out;

  trig_debounce dut (.clk(clk), .rst(rst), .trig_in(trig_in), .trig_out(trig_out));

  always #5ns clk = ~clk;

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model: two-stage synchroniser, then follow-and-hold.
  logic s1, s2, ref_out;
  int   hold;
  always @(posedge clk) begin
    if (rst) begin s1 <= 0; s2 <= 0; ref_out <= 0; hold <= 0; end
    else begin
      s1 <= trig_in; s2 <= s1;
      if (hold != 0) hold <= hold - 1;
      else if (s2 != ref_out) begin ref_out <= s2; hold <= LO; end
    end
  end

  always @(negedge clk) if (!rst) begin
    checks++;
    if (trig_out !== ref_out) begin failures++; $display("%0t out=%b ref=%b", $time, trig_out, ref_out); end
    if (trig_out !== prev_out) edges++;
    prev_out = trig_out;
  end

  task automatic ring(input int n);
    for (int i = 0; i < n; i++) begin
      #(($urandom % 30 + 3) * 1ns) trig_in = ~trig_in;
    end
  endtask

  initial begin
    int t_edge;
    rst = 1'b1; trig_in = 1'b1; prev_out = 1'b0;
    repeat (3) @(posedge clk); #1ns;
    rst = 1'b0;
    repeat (LO + 20) @(posedge clk); // output goes to 1 (quiescent high), then lockout
    #2ns;
    // Sharp falling edge, then ringing within the lockout, settling low.
    trig_in = 1'b0;
    ring(6);
    trig_in = 1'b0;
    repeat (LO + 60) @(posedge clk);
    checks++;
    if (trig_out !== 1'b0) begin failures++; $display("output did not settle low"); end
    // Rising back with ringing.
    #3ns trig_in = 1'b1; ring(8); trig_in = 1'b1;
    repeat (LO + 60) @(posedge clk);
    checks++;
    if (trig_out !== 1'b1) begin failures++; $display("output did not settle high"); end
    // Edges: reset 0 -> 1, falling, rising: 3 transitions only.
    checks++;
    if (edges != 3) begin failures++; $display("%0d output edges, expected 3", edges); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
