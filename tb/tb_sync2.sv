// tb_sync2: checks that the two-stage synchroniser delays each bit by
// exactly two clock edges (one full clock period after the edge that first samples it) and resets to zero.
module tb_sync2;
  logic clk = 1'b0;
  logic rst;
  logic [3:0] d, q;
  int checks = 0, failures = 0;
  logic [3:0] hist [3];

  sync2 #(.WIDTH(4)) dut (.clk(clk), .rst(rst), .d_async(d), .q(q));

  always #5ns clk = ~clk;

  initial begin
    #100us;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; d = 4'hF;
    repeat (3) @(posedge clk);
    #1ns;
    checks++; if (q !== 4'h0) begin failures++; $display("reset value %h", q); end
    rst = 1'b0;
    for (int i = 0; i < 200; i++) begin
      d = 4'($urandom);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d;
      @(posedge clk); #1ns;
      if (i >= 1) begin
        checks++;
        if (q !== hist[1]) begin failures++; $display("i=%0d q=%h expected %h", i, q, hist[1]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
