// tb_ddr_capture: drives a random DDR bit stream (a new bit after every
// clock edge) and checks that each rising edge delivers the pair
// (bit launched after the earlier falling edge, bit launched after the
// rising edge in between) two rising edges after the first bit.
module tb_ddr_capture;
  logic clk = 1'b0;
  logic d;
  logic first, second;
  int checks = 0, failures = 0;
  logic bits [$];

  ddr_capture dut (.clk(clk), .d(d), .first(first), .second(second));

  always #2ns clk = ~clk;

  initial begin
    #100us; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // A new bit after every edge; remember it.
  always @(clk) begin
    logic b;
    #500ps;
    b = 1'($urandom);
    d = b;
    bits.push_back(b);
  end

  initial begin
    d = 1'b0;
    // Align: wait for a falling edge, the bit after it is bits[k].
    repeat (4) @(posedge clk);
    @(negedge clk); #600ps;
    begin
      int k;
      k = bits.size() - 1;   // index of the bit launched after this falling edge
      for (int n = 0; n < 300; n++) begin
        @(posedge clk); // captures bits[k] into rise_q
        @(posedge clk); #100ps; // pair (bits[k], bits[k+1]) appears, but so does the next: check every other step
        checks++;
        if (first !== bits[k] || second !== bits[k+1]) begin
          failures++;
          $display("n=%0d pair %b%b expected %b%b", n, first, second, bits[k], bits[k+1]);
        end
        k += 4;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
