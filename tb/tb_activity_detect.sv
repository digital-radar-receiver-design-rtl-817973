// tb_activity_detect: random samples, mostly below the threshold, and a
// reference 8-sample window computed here; active must be 1 exactly when
// one of the last eight samples had |x| >= THRESHOLD.
module tb_activity_detect;
  import rx_pkg::*;
  logic clk = 1'b0, rst, in_valid, active;
  sample_t in_data;
  int checks = 0, failures = 0;
  bit win [$];

  activity_detect dut (.clk(clk), .rst(rst), .in_valid(in_valid),
    .in_data(in_data), .active(active));

  always #5ns clk = ~clk;

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits;
    rst = 1'b1; in_valid = 1'b0; in_data = '0;
    repeat (3) @(posedge clk); #1ns;
    rst = 1'b0;
    for (int k = 0; k < 2000; k++) begin
      int v;
      // small values around the threshold, occasional large ones
      v = ($urandom % 20 == 0) ? int'($urandom % 16384) - 8192 : int'($urandom % 19) - 9;
      in_data = sample_t'(v); in_valid = 1'b1;
      win.push_back(v >= 8 || v <= -8);
      if (win.size() > 8) void'(win.pop_front());
      @(posedge clk); #1ns;
      in_valid = ($urandom % 2 == 0);
      if (!in_valid) begin @(posedge clk); #1ns; end
      hits = 0;
      foreach (win[i]) hits += int'(win[i]);
      checks++;
      if (active !== (hits > 0)) begin failures++; $display("k=%0d active=%0b hits=%0d", k, active, hits); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
