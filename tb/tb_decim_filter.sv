// tb_decim_filter: four random input streams through the 4-stream filter.
// The expected outputs are computed here by direct convolution,
//   y[m] = round(sum_k h_set(n)[k] * x[8m-k] / 2**17), saturated to 14 bits,
// with the coefficient set switched part way through. While one set is in
// use the other is rewritten through the coefficient write port (set 1
// with a 1.2 MHz cutoff, later set 0 with 1.8 MHz), so the outputs after
// each switch check run-time coefficient loading. Also checks a DC
// input settles to the DC value (unity gain), a tone near fs/2 is strongly
// attenuated, the output order of the streams, and that the first output of
// each group comes 2 clocks after the phase-0 input.
module tb_decim_filter;
  import rx_pkg::*;
  localparam int NS = 4;
  logic clk = 1'b0, rst, sel, in_valid, in_ready, out_valid;
  coef_wr_t cw;
  sample_t in_data [NS];
  logic [1:0] out_chan;
  sample_t out_data;
  int checks = 0, failures = 0;

  decim_filter dut (.clk(clk), .rst(rst), .coef_sel(sel), .coef_wr(cw),
    .in_valid(in_valid), .in_data(in_data), .in_ready(in_ready), .out_valid(out_valid),
    .out_chan(out_chan), .out_data(out_data));

  always #5ns clk = ~clk;

  localparam int N = 1600;
  int xs [NS][N];
  int sets [N];       // coefficient version: 0 built-in set 0, 1 new set 1, 2 new set 0
  int nin = 0;        // samples given
  int nout [NS];      // outputs seen per stream
  int cyc = 0, cyc_phase0 = -100;
  int expect_chan = 0;
  longint h [3][NTAPS];
  int writes = 0;

  // Load all taps of one set, one per clock.
  task automatic load_set(input bit set, input int ver);
    for (int k = 0; k < NTAPS; k++) begin
      cw.we = 1'b1; cw.set = set; cw.addr = 7'(k); cw.data = coef_t'(h[ver][k]);
      @(posedge clk); #1ns;
      writes++;
    end
    cw = '0;
  endtask

  function automatic int ref_out(int s, int m);
    longint acc = 0;
    longint r;
    for (int k = 0; k < NTAPS; k++) begin
      int n = 8 * m - k;
      if (n >= 0) acc += h[sets[n]][k] * longint'(xs[s][n]);
    end
    r = (acc + (longint'(1) <<< 16)) >>> 17;
    if (r > 8191) r = 8191;
    if (r < -8192) r = -8192;
    return int'(r);
  endfunction

  initial begin
    #10ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (!rst && out_valid) begin
      int s, e;
      s = int'(out_chan);
      checks++;
      if (s != expect_chan) begin failures++; $display("stream order: got %0d expected %0d", s, expect_chan); end
      if (s == 0) begin
        checks++;
        if (cyc - cyc_phase0 != 2) begin failures++; $display("latency %0d", cyc - cyc_phase0); end
      end
      expect_chan = (s + 1) % NS;
      e = ref_out(s, nout[s]);
      checks++;
      if (int'(out_data) != e) begin
        failures++;
        if (failures < 10) $display("stream %0d out %0d: got %0d expected %0d", s, nout[s], out_data, e);
      end
      nout[s]++;
    end
  end

  initial begin
    for (int k = 0; k < NTAPS; k++) begin
      h[0][k] = longint'(lp_coef(k, 0.0625));   // built-in set 0
      h[1][k] = longint'(lp_coef(k, 0.03));     // loaded into set 1
      h[2][k] = longint'(lp_coef(k, 0.045));    // loaded into set 0
    end
    for (int n = 0; n < N; n++) begin
      sets[n] = (n < 600) ? 0 : (n < 1000) ? 1 : 2;
      for (int s = 0; s < NS; s++) begin
        if (n < 1000)       xs[s][n] = int'($urandom % 12000) - 6000;   // random
        else if (s == 0)    xs[s][n] = 3000;                            // DC
        else if (s == 1)    xs[s][n] = (n % 2) ? -6000 : 6000;          // fs/2 tone
        else                xs[s][n] = int'($urandom % 16384) - 8192;
      end
    end
    for (int s = 0; s < NS; s++) nout[s] = 0;
    rst = 1'b1; sel = 1'b0; in_valid = 1'b0; cw = '0;
    for (int s = 0; s < NS; s++) in_data[s] = '0;
    repeat (3) @(posedge clk); #1ns;
    rst = 1'b0;
    for (int n = 0; n < N; n++) begin
      for (int s = 0; s < NS; s++) in_data[s] = sample_t'(xs[s][n]);
      sel = (sets[n] == 1);
      if (n == 100) fork load_set(1'b1, 1); join_none
      if (n == 700) fork load_set(1'b0, 2); join_none
      in_valid = 1'b1;
      checks++;
      if (!in_ready) begin failures++; $display("not ready at n=%0d", n); end
      @(posedge clk); #1ns;
      if (n % 8 == 0) cyc_phase0 = cyc;
      in_valid = 1'b0;
      repeat (NS - 1) @(posedge clk); #1ns;
    end
    repeat (10) @(posedge clk);
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (nout[s] != N / 8) begin failures++; $display("stream %0d: %0d outputs", s, nout[s]); end
    end
    checks++;
    if (writes != 2 * NTAPS) begin failures++; $display("%0d coefficient writes", writes); end
    // DC gain and stop band, independent of the reference model.
    checks++;
    if (ref_out(0, N / 8 - 1) < 2990 || ref_out(0, N / 8 - 1) > 3010) begin
      failures++; $display("DC output %0d", ref_out(0, N / 8 - 1));
    end
    checks++;
    if (ref_out(1, N / 8 - 1) > 5 || ref_out(1, N / 8 - 1) < -5) begin
      failures++; $display("fs/2 output %0d", ref_out(1, N / 8 - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
