// tb_chan_pair: a serial ADC model sends two channels (an fs/4 tone plus
// noise, different per channel) into a channel pair. Checks:
//   - the words entering the mixers are the words the ADC sent, in order,
//     one per frame, for both channels;
//   - every filter output equals the reference mixing + filtering of those
//     words (the mixing/bypass mode and coefficient set of each sample are
//     read back as they were applied; both are switched during the run);
//   - the activity flags: on for the active channel, off for a silent one.
module tb_chan_pair;
  import rx_pkg::*;
  import rx_ref_pkg::*;
  logic ser_clk = 1'b0, clk = 1'b0, ser_rst, rst, iq_active, filter_sel;
  sample_t samples [2];
  logic run, frm, word_start, out_valid, tick;
  logic [1:0] din, out_chan, chan_active;
  sample_t out_data;
  int checks = 0, failures = 0;

  adc_serial_model #(.NCH(2)) adc (.ser_clk(ser_clk), .samples(samples), .run(run),
    .frm(frm), .din(din), .word_start(word_start));

  chan_pair dut (.ser_clk(ser_clk), .ser_rst(ser_rst), .frm(frm), .din(din), .clk(clk), .coef_wr(coef_wr_t'(0)),
    .rst(rst), .iq_active(iq_active), .filter_sel(filter_sel), .out_valid(out_valid),
    .out_chan(out_chan), .out_data(out_data), .chan_active(chan_active), .sample_tick(tick));

  always #1786ps ser_clk = ~ser_clk;  // 280 MHz bit clock
  always #3125ps clk = ~clk;          // 160 MHz filter clock

  initial begin
    #2ms; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sent [2][$];
  int v [4][$];          // mixer outputs, reference: I0 Q0 I1 Q1
  bit sets [$];
  int nin = 0, nout [4], silent_k = 0;
  bit silent;            // channel 1 silent
  bit matched = 0;

  function automatic int gen(int c, int k);
    real a;
    a = (c == 0) ? 3000.0 : 1200.0;
    if (c == 1 && silent) return int'($urandom % 7) - 3;
    return int'(a * $cos(3.141592653589793 / 2.0 * k + 0.3 * c)) + int'($urandom % 200) - 100;
  endfunction

  int kword = 0;
  always @(posedge word_start) begin
    for (int c = 0; c < 2; c++) begin
      sent[c].push_back(int'(samples[c]));
      samples[c] = sample_t'(gen(c, kword));
    end
    kword++;
  end

  // Words entering the mixers, with the mode in force for them.
  always @(posedge clk) begin
    if (!rst && tick) begin
      int x0, x1;
      bit act;
      x0 = int'(dut.adcdata[0]); x1 = int'(dut.adcdata[1]);
      act = dut.ctl_s[0];
      if (!matched) begin
        // Align with the ADC's word list once, on the first word.
        while (sent[0].size() > 0 && (sent[0][0] != x0 || sent[1][0] != x1)) begin
          void'(sent[0].pop_front()); void'(sent[1].pop_front());
        end
        matched = 1;
      end
      checks++;
      if (sent[0].size() == 0 || sent[0][0] != x0 || sent[1][0] != x1) begin
        failures++;
        if (failures < 10) $display("word %0d: got %0d/%0d, ADC sent %0d/%0d", nin, x0, x1,
          sent[0].size() ? sent[0][0] : 0, sent[1].size() ? sent[1][0] : 0);
      end else begin
        void'(sent[0].pop_front()); void'(sent[1].pop_front());
      end
      v[0].push_back(mix_i(x0, nin, act)); v[1].push_back(mix_q(x0, nin, act));
      v[2].push_back(mix_i(x1, nin, act)); v[3].push_back(mix_q(x1, nin, act));
      sets.push_back(dut.ctl_s[1]);
      nin++;
    end
    if (!rst && out_valid) begin
      int s, e;
      s = int'(out_chan);
      e = filt(v[s], sets, nout[s]);
      checks++;
      if (int'(out_data) != e) begin
        failures++;
        if (failures < 10) $display("stream %0d out %0d: got %0d expected %0d", s, nout[s], out_data, e);
      end
      nout[s]++;
    end
  end

  initial begin
    init_coefs(0.0625, 0.0159);
    for (int s = 0; s < 4; s++) nout[s] = 0;
    silent = 0;
    ser_rst = 1'b1; rst = 1'b1; run = 1'b0; iq_active = 1'b1; filter_sel = 1'b0;
    samples[0] = '0; samples[1] = '0;
    repeat (4) @(posedge ser_clk); ser_rst = 1'b0;
    repeat (4) @(posedge clk); rst = 1'b0;
    run = 1'b1;
    wait (nin == 400);
    checks++;
    if (chan_active != 2'b11) begin failures++; $display("activity %b, expected 11", chan_active); end
    filter_sel = 1'b1;              // switch coefficient set
    wait (nin == 700);
    iq_active = 1'b0;               // bypass
    silent = 1;                     // channel 1 goes quiet
    wait (nin == 900);
    checks++;
    if (chan_active != 2'b01) begin failures++; $display("activity %b, expected 01", chan_active); end
    iq_active = 1'b1;
    wait (nin == 1200);
    repeat (40) @(posedge clk);
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (nout[s] < 148) begin failures++; $display("stream %0d: %0d outputs", s, nout[s]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
