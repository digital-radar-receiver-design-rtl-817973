// tb_rx1ch: single-channel receiver with a parallel ADC model (8-clock
// pipeline, output 5 ns after the ADC clock edge) digitising an fs/4 tone
// plus noise. The host side samples the IQ bus on rising iq_clk. Checks:
//   - the ADC clock is the 80 MHz reference divided by two;
//   - the I and Q words equal the reference mixing and 637 kHz decimation
//     filtering of the samples taken in, in I/Q order, one word per 100 ns;
//   - a ringing trigger edge gives exactly one output trigger edge, delayed
//     by at least the 26-sample alignment delay and by no more than that
//     plus one output pair;
//   - the out-of-range flag is caught.
module tb_rx1ch;
  import rx_pkg::*;
  import rx_ref_pkg::*;
  logic clk = 1'b0, rst, adc_clk, adc_otr, sys_trig, iq_clk, iq_sel, trig_out, otr_seen, overrun;
  sample_t adc_data, iq_data;
  int checks = 0, failures = 0;

  rx1ch dut (.clk(clk), .rst(rst), .adc_clk(adc_clk), .adc_data(adc_data), .adc_otr(adc_otr),
    .sys_trig(sys_trig), .iq_clk(iq_clk), .iq_sel(iq_sel), .iq_data(iq_data),
    .trig_out(trig_out), .otr_seen(otr_seen), .overrun(overrun));

  always #6250ps clk = ~clk;    // 80 MHz reference
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    #3ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ADC model: 8-stage pipeline, data valid 5 ns after the rising edge.
  int pipe [8];
  int k_adc = 0;
  int adc_rises = 0, last_adc_rise = -1, bad_adc_period = 0;
  int sent [$];
  always @(posedge adc_clk) begin
    int x;
    if (last_adc_rise >= 0 && cyc - last_adc_rise != 2) bad_adc_period++;
    last_adc_rise = cyc;
    adc_rises++;
    x = int'(2500.0 * $cos(3.141592653589793 / 2.0 * k_adc + 0.7)) + int'($urandom % 400) - 200;
    k_adc++;
    for (int i = 7; i > 0; i--) pipe[i] = pipe[i-1];
    pipe[0] = x;
    #5ns;
    adc_data = sample_t'(pipe[7]);
    sent.push_back(pipe[7]);
  end

  // Samples taken in by the receiver (read back to align with the list above).
  int v [2][$];
  bit sets [$];
  int nin = 0;
  bit matched = 0;
  always @(posedge clk) begin
    if (!rst && dut.adc_v) begin
      int x;
      x = int'(dut.adc_q);
      if (!matched) begin
        while (sent.size() > 0 && sent[0] != x) void'(sent.pop_front());
        matched = 1;
      end
      checks++;
      if (sent.size() == 0 || sent[0] != x) begin
        failures++; if (failures < 10) $display("sample %0d: took %0d", nin, x);
      end else void'(sent.pop_front());
      v[0].push_back(mix_i(x, nin, 1'b1));
      v[1].push_back(mix_q(x, nin, 1'b1));
      sets.push_back(1'b0);
      nin++;
    end
  end

  // Host: sample on rising iq_clk. Outputs start with an I word.
  int nout [2];
  int last_rise = -1, words = 0;
  bit started = 0;
  always @(posedge iq_clk) begin
    if (last_rise >= 0) begin
      checks++;
      if (cyc - last_rise != 8) begin failures++; $display("iq_clk period %0d", cyc - last_rise); end
    end
    last_rise = cyc;
    if (!started && iq_sel) started = 1;
    if (started) begin
      int s, e;
      s = iq_sel ? 0 : 1;
      e = filt(v[s], sets, nout[s]);
      checks++;
      if (int'(iq_data) != e) begin
        failures++;
        if (failures < 10) $display("%s word %0d: got %0d expected %0d", iq_sel ? "I" : "Q", nout[s], iq_data, e);
      end
      nout[s]++;
      words++;
    end
  end

  // Trigger edges at the output.
  int trig_edges = 0, trig_edge_cyc = -1;
  logic trig_q = 1'b0;
  always @(posedge clk) begin
    if (!rst && trig_out != trig_q) begin trig_edges++; trig_edge_cyc = cyc; end
    trig_q <= trig_out;
  end

  initial begin
    int t0, dly;
    nout[0] = 0; nout[1] = 0;
    init_coefs(0.0159, 0.0159);
    for (int i = 0; i < 8; i++) pipe[i] = 0;
    rst = 1'b1; adc_data = '0; adc_otr = 1'b0; sys_trig = 1'b0;
    repeat (4) @(posedge clk); #1ns;
    rst = 1'b0;
    wait (nin == 300);
    // Trigger: sharp rising edge, ringing, settles high.
    @(posedge clk); #2ns;
    t0 = cyc; trig_edges = 0;
    sys_trig = 1'b1;
    for (int i = 0; i < 6; i++) #(($urandom % 40 + 5) * 1ns) sys_trig = ~sys_trig;
    sys_trig = 1'b1;
    // Out of range for one sample.
    @(posedge adc_clk); #5ns adc_otr = 1'b1; @(posedge adc_clk); #5ns adc_otr = 1'b0;
    wait (nin == 900);
    repeat (40) @(posedge clk);
    checks++;
    if (bad_adc_period != 0 || adc_rises < 900) begin failures++; $display("ADC clock not ref/2"); end
    checks++;
    if (trig_edges != 1) begin failures++; $display("%0d trigger edges at the output", trig_edges); end
    dly = trig_edge_cyc - t0;
    checks++;
    if (dly < 2 * 26 + 3 || dly > 2 * 26 + 3 + 2 + 16 + 8) begin failures++; $display("trigger delay %0d clocks", dly); end
    checks++;
    if (!otr_seen) begin failures++; $display("out-of-range not flagged"); end
    checks++;
    if (words < 200 || overrun) begin failures++; $display("%0d words, overrun %b", words, overrun); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
