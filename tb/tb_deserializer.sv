// tb_deserializer: a serial ADC model sends random 14-bit words through
// ddr_capture into the deserializer. Checks that every word comes out
// unchanged and in order, that data_tog toggles once per word, and that
// words come exactly 7 bit-clock periods apart.
module tb_deserializer;
  import rx_pkg::*;
  logic ser_clk = 1'b0;
  logic rst;
  sample_t samples [1];
  logic run, frm, word_start;
  logic [0:0] din;
  logic [1:0] f, s;
  sample_t dataout;
  logic tog, pulse, tog_q;
  int checks = 0, failures = 0;
  sample_t sent [$];
  int last_cycle = -1, cycle = 0, words = 0;

  adc_serial_model #(.NCH(1)) adc (.ser_clk(ser_clk), .samples(samples), .run(run),
    .frm(frm), .din(din), .word_start(word_start));
  ddr_capture #(.WIDTH(2)) cap (.clk(ser_clk), .d({frm, din[0]}), .first(f), .second(s));
  deserializer dut (.clk(ser_clk), .rst(rst), .data_first(f[0]), .data_second(s[0]),
    .frm_first(f[1]), .frm_second(s[1]), .dataout(dataout), .data_tog(tog), .data_pulse(pulse));

  always #1786ps ser_clk = ~ser_clk;

  initial begin
    #200us; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Next sample as soon as the model has taken the current one.
  always @(posedge word_start) begin
    sent.push_back(samples[0]);
    samples[0] = sample_t'($urandom);
  end

  always @(posedge ser_clk) begin
    cycle++;
    tog_q <= tog;
    if (!rst && pulse) begin
      words++;
      checks++;
      if (tog == tog_q) begin failures++; $display("data_tog did not toggle"); end
      if (last_cycle >= 0) begin
        checks++;
        if (cycle - last_cycle != 7) begin failures++; $display("word spacing %0d", cycle - last_cycle); end
      end
      last_cycle = cycle;
      // The first word after arming is the one sent second or later; find it.
      while (sent.size() > 0 && sent[0] !== dataout && words == 1) void'(sent.pop_front());
      checks++;
      if (sent.size() == 0 || sent[0] !== dataout) begin
        failures++; $display("word %0d: got %h expected %h", words, dataout, (sent.size() > 0) ? sent[0] : sample_t'(0));
      end else void'(sent.pop_front());
    end
  end

  initial begin
    rst = 1'b1; run = 1'b0; samples[0] = 14'h2ABC; tog_q = 1'b0;
    repeat (5) @(posedge ser_clk);
    rst = 1'b0;
    @(posedge ser_clk); run = 1'b1;
    samples[0] = 14'h1FFF;
    wait (words == 300);
    checks++;
    if (words != 300) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
