// tb_trig_delay: random trigger levels with a sample-rate enable every
// other clock; checks the output equals the input of DELAY enables earlier
// (26, the default), with a reference queue kept here.
module tb_trig_delay;
  logic clk = 1'b0, rst, ce, tin, tout;
  int checks = 0, failures = 0;
  bit q [$];

  trig_delay dut (.clk(clk), .rst(rst), .ce(ce), .trig_in(tin), .trig_out(tout));

  always #5ns clk = ~clk;

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; ce = 1'b0; tin = 1'b0;
    for (int i = 0; i < 26; i++) q.push_back(1'b0);
    repeat (3) @(posedge clk); #1ns;
    rst = 1'b0;
    for (int n = 0; n < 600; n++) begin
      ce = 1'b1;
      tin = (n % 37 < 9) ^ ($urandom % 16 == 0);   // pulses plus noise
      q.push_back(tin);
      void'(q.pop_front());
      @(posedge clk); #1ns;
      ce = 1'b0;
      tin = 1'($urandom);                            // ignored without ce
      checks++;
      if (tout !== q[0]) begin failures++; $display("n=%0d out=%b expected %b", n, tout, q[0]); end
      @(posedge clk); #1ns;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
