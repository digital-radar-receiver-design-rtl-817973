// tb_iq_out_if: gives I/Q pairs every 16 clocks (the single-channel filter
// rate) and samples the bus on each rising edge of iq_clk, like the host.
// Checks the words arrive in order I0 Q0 I1 Q1 ..., iq_sel marks I, the
// trigger goes with the I word, iq_clk has one 8-clock period per word,
// and no overrun occurs.
module tb_iq_out_if;
  import rx_pkg::*;
  logic clk = 1'b0, rst, in_valid, in_chan, trig, iq_clk, iq_sel, trig_out, overrun;
  sample_t in_data, iq_data;
  int checks = 0, failures = 0;
  int exp_data [$];
  bit exp_sel [$];
  bit exp_trig [$];
  int words = 0, last_rise = -1, cyc = 0;

  iq_out_if dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_chan(in_chan),
    .in_data(in_data), .trig(trig), .iq_clk(iq_clk), .iq_sel(iq_sel), .iq_data(iq_data),
    .trig_out(trig_out), .overrun(overrun));

  always #6250ps clk = ~clk;   // 80 MHz
  always @(posedge clk) cyc++;

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Host side: sample on rising iq_clk.
  logic started = 1'b0;
  always @(posedge iq_clk) begin
    if (last_rise >= 0) begin
      checks++;
      if (cyc - last_rise != 8) begin failures++; $display("iq_clk period %0d", cyc - last_rise); end
    end
    last_rise = cyc;
    if (!started && exp_data.size() > 0 && iq_sel && int'(iq_data) == exp_data[0]) started = 1'b1;
    if (started && exp_data.size() > 0) begin
      checks++;
      if (int'(iq_data) != exp_data[0] || iq_sel != exp_sel[0] || (iq_sel && trig_out != exp_trig[0])) begin
        failures++;
        $display("word %0d: got %0d sel=%b trig=%b, expected %0d sel=%b trig=%b", words, iq_data, iq_sel, trig_out, exp_data[0], exp_sel[0], exp_trig[0]);
      end
      void'(exp_data.pop_front()); void'(exp_sel.pop_front()); void'(exp_trig.pop_front());
      words++;
    end
  end

  initial begin
    rst = 1'b1; in_valid = 1'b0; in_chan = 1'b0; in_data = '0; trig = 1'b0;
    repeat (3) @(posedge clk); #1ns;
    rst = 1'b0;
    repeat (5) @(posedge clk); #1ns;
    for (int p = 0; p < 200; p++) begin
      int vi, vq;
      bit tr;
      vi = int'($urandom % 16384) - 8192; vq = int'($urandom % 16384) - 8192; tr = 1'($urandom);
      in_valid = 1'b1; in_chan = 1'b0; in_data = sample_t'(vi); trig = tr;
      @(posedge clk); #1ns;
      in_chan = 1'b1; in_data = sample_t'(vq); trig = 1'b0;
      @(posedge clk); #1ns;
      in_valid = 1'b0;
      exp_data.push_back(vi); exp_sel.push_back(1'b1); exp_trig.push_back(tr);
      exp_data.push_back(vq); exp_sel.push_back(1'b0); exp_trig.push_back(1'b0);
      repeat (14) @(posedge clk); #1ns;
    end
    repeat (40) @(posedge clk);
    checks++;
    if (words < 390) begin failures++; $display("only %0d words seen", words); end
    checks++;
    if (overrun) begin failures++; $display("overrun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
