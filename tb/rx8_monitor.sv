// rx8_monitor: checker for the eight-channel receiver, for simulation only.
//
// It records the words the ADC model sends, the words that enter the
// mixers of each channel pair (with the mixing mode and coefficient set in
// force for them, read back from the pairs), and samples the output bus on
// the rising edge of bus_clk. It checks that
//   - the words entering the mixers are the ADC's words, in order;
//   - every bus word has the expected channel number (0..7 in turn) and the
//     reference I and Q of its channel (rx_ref_pkg mixing and filtering);
// and counts the words sent with mixing on and off and with each
// coefficient set, and the trigger bit's rising edges on the bus.
module rx8_monitor
  import rx_pkg::*;
  import rx_ref_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      word_start,
  input  sample_t   adc_samples [8],
  input  logic [3:0] tick,
  input  sample_t   adcdata [8],
  input  logic [3:0] act,
  input  logic [3:0] set,
  input  logic      bus_clk,
  input  out_word_t bus_data,
  input  logic      bus_valid,
  output int        checks,
  output int        failures,
  output int        words,
  output int        words_mix,
  output int        words_bypass,
  output int        words_set0,
  output int        words_set1,
  output int        trig_rises,
  output int        first_trig_word
);
  int  sent [8][$];
  int  v [16][$];        // per channel c: v[2c] = I, v[2c+1] = Q reference inputs
  bit  sets [4][$];
  bit  acts [4][$];
  int  nin [4];
  int  nout [8];
  bit  matched [4];
  int  next_chan;
  bit  trig_q;
  bit  started;

  initial begin
    checks = 0; failures = 0; words = 0; words_mix = 0; words_bypass = 0;
    words_set0 = 0; words_set1 = 0; trig_rises = 0; first_trig_word = -1;
    next_chan = 0; trig_q = 0; started = 0;
    for (int p = 0; p < 4; p++) begin nin[p] = 0; matched[p] = 0; end
    for (int c = 0; c < 8; c++) nout[c] = 0;
    init_coefs(0.0625, 0.0159);
  end

  always @(posedge word_start)
    for (int c = 0; c < 8; c++) sent[c].push_back(int'(adc_samples[c]));

  always @(posedge clk) begin
    if (!rst) begin
      for (int p = 0; p < 4; p++) begin
        if (tick[p]) begin
          int x0, x1;
          x0 = int'(adcdata[2*p]); x1 = int'(adcdata[2*p+1]);
          if (!matched[p]) begin
            while (sent[2*p].size() > 0 && (sent[2*p][0] != x0 || sent[2*p+1][0] != x1)) begin
              void'(sent[2*p].pop_front()); void'(sent[2*p+1].pop_front());
            end
            matched[p] = 1;
          end
          checks++;
          if (sent[2*p].size() == 0 || sent[2*p][0] != x0 || sent[2*p+1][0] != x1) begin
            failures++;
            if (failures < 10) $display("pair %0d word %0d: got %0d/%0d", p, nin[p], x0, x1);
          end else begin
            void'(sent[2*p].pop_front()); void'(sent[2*p+1].pop_front());
          end
          v[4*p].push_back(mix_i(x0, nin[p], act[p]));
          v[4*p+1].push_back(mix_q(x0, nin[p], act[p]));
          v[4*p+2].push_back(mix_i(x1, nin[p], act[p]));
          v[4*p+3].push_back(mix_q(x1, nin[p], act[p]));
          sets[p].push_back(set[p]);
          acts[p].push_back(act[p]);
          nin[p]++;
        end
      end
    end
  end

  always @(posedge bus_clk) begin
    if (bus_valid) begin
      int c, p, ei, eq, last_n;
      c = int'(bus_data.chan);
      p = c / 2;
      checks++;
      if (c != next_chan) begin
        failures++; if (failures < 10) $display("bus: channel %0d, expected %0d", c, next_chan);
      end
      next_chan = (c + 1) % 8;
      ei = filt(v[2*c], sets[p], nout[c]);
      eq = filt(v[2*c+1], sets[p], nout[c]);
      checks++;
      if (int'(bus_data.i) != ei || int'(bus_data.q) != eq) begin
        failures++;
        if (failures < 10) $display("bus: ch %0d out %0d: got I=%0d Q=%0d expected I=%0d Q=%0d",
                                    c, nout[c], bus_data.i, bus_data.q, ei, eq);
      end
      // Mode of the newest sample in this output's window.
      last_n = 8 * nout[c];
      if (last_n < acts[p].size()) begin
        if (acts[p][last_n]) words_mix++; else words_bypass++;
        if (sets[p][last_n]) words_set1++; else words_set0++;
      end
      nout[c]++;
      words++;
      if (bus_data.trig && !trig_q) begin
        trig_rises++;
        if (first_trig_word < 0) first_trig_word = nout[0];
      end
      trig_q = bus_data.trig;
    end
  end
endmodule
