// tb_iq_mixer: feeds random samples (with gaps in in_valid) and checks I/Q
// against x*cos(pi/2*n) and x*sin(pi/2*n) computed here, including the
// saturation of -(-8192), then checks the bypass mode (I = Q = x).
module tb_iq_mixer;
  import rx_pkg::*;
  logic clk = 1'b0, rst, iq_active, in_valid, out_valid;
  sample_t in_data, out_i, out_q;
  logic [1:0] phase;
  int checks = 0, failures = 0;
  int n;  // index of samples given to the mixer

  iq_mixer dut (.clk(clk), .rst(rst), .iq_active(iq_active), .in_valid(in_valid),
    .in_data(in_data), .out_valid(out_valid), .out_i(out_i), .out_q(out_q), .phase(phase));

  always #5ns clk = ~clk;

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(int v);
    return (v > 8191) ? 8191 : (v < -8192 ? -8192 : v);
  endfunction

  task automatic step(input sample_t x, input logic act);
    int ei, eq, c, s;
    in_valid = 1'b1; in_data = x; iq_active = act;
    // cos/sin at fs/4, sample index n
    c = (n % 4 == 0) ? 1 : (n % 4 == 2) ? -1 : 0;
    s = (n % 4 == 1) ? 1 : (n % 4 == 3) ? -1 : 0;
    if (act) begin ei = sat(int'(x) * c); eq = sat(int'(x) * s); end
    else     begin ei = int'(x); eq = int'(x); end
    @(posedge clk); #1ns;
    in_valid = 1'b0;
    n++;
    checks++;
    if (!out_valid || int'(out_i) != ei || int'(out_q) != eq) begin
      failures++;
      $display("n=%0d x=%0d act=%0b got I=%0d Q=%0d v=%0b, expected I=%0d Q=%0d", n-1, x, act, out_i, out_q, out_valid, ei, eq);
    end
    // optional idle cycle: output must not be flagged valid again
    if ($urandom % 3 == 0) begin
      @(posedge clk); #1ns;
      checks++;
      if (out_valid) begin failures++; $display("spurious out_valid"); end
    end
  endtask

  initial begin
    rst = 1'b1; in_valid = 1'b0; in_data = '0; iq_active = 1'b1; n = 0;
    repeat (3) @(posedge clk); #1ns;
    rst = 1'b0;
    for (int k = 0; k < 400; k++) step(sample_t'($urandom), 1'b1);
    for (int k = 0; k < 8; k++) step(sample_t'(-8192), 1'b1);
    for (int k = 0; k < 40; k++) step(sample_t'($urandom), 1'b0);
    for (int k = 0; k < 40; k++) step(sample_t'($urandom), 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
