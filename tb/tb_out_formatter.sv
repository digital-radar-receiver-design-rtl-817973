// tb_out_formatter: four filters deliver their four words per instant every
// 32 clocks (the 160 MHz / 5 MSPS rate), with random data and trigger.
// The bus is sampled on each rising edge of bus_clk. Checks: words come as
// channels 0..7 in order, one per 4 clocks, with the right I, Q and trigger
// of their instant, in the Fig.-45 bit layout, with no overrun and no gaps
// once running.
module tb_out_formatter;
  import rx_pkg::*;
  localparam int NF = 4;
  logic clk = 1'b0, rst, trig, bus_clk, bus_valid, overrun;
  logic f_valid [NF];
  logic [1:0] f_chan [NF];
  sample_t f_data [NF];
  out_word_t bus_data;
  int checks = 0, failures = 0;
  logic [31:0] expq [$];
  int words = 0, cyc = 0, last = -1;

  out_formatter dut (.clk(clk), .rst(rst), .f_valid(f_valid), .f_chan(f_chan),
    .f_data(f_data), .trig(trig), .bus_clk(bus_clk), .bus_data(bus_data),
    .bus_valid(bus_valid), .overrun(overrun));

  always #3125ps clk = ~clk;   // 160 MHz
  always @(posedge clk) cyc++;

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge bus_clk) begin
    if (bus_valid) begin
      logic [31:0] w;
      w = bus_data;
      checks++;
      if (expq.size() == 0 || w !== expq[0]) begin
        failures++;
        $display("word %0d: got %h expected %h", words, w, expq.size() ? expq[0] : 32'h0);
      end
      if (expq.size() > 0) void'(expq.pop_front());
      if (last >= 0) begin
        checks++;
        if (cyc - last != 4) begin failures++; $display("word spacing %0d", cyc - last); end
      end
      last = cyc;
      words++;
    end
  end

  initial begin
    rst = 1'b1; trig = 1'b0;
    for (int f = 0; f < NF; f++) begin f_valid[f] = 1'b0; f_chan[f] = '0; f_data[f] = '0; end
    repeat (3) @(posedge clk); #1ns;
    rst = 1'b0;
    repeat (7) @(posedge clk); #1ns;
    for (int inst = 0; inst < 60; inst++) begin
      int iv [8], qv [8];
      bit tr;
      tr = 1'($urandom);
      for (int c = 0; c < 8; c++) begin
        iv[c] = int'($urandom % 16384) - 8192; qv[c] = int'($urandom % 16384) - 8192;
      end
      for (int s = 0; s < 4; s++) begin
        for (int f = 0; f < NF; f++) begin
          int c;
          c = 2 * f + s / 2;
          f_valid[f] = 1'b1; f_chan[f] = 2'(s);
          f_data[f] = sample_t'((s % 2) ? qv[c] : iv[c]);
        end
        if (s == 3) trig = tr;
        @(posedge clk); #1ns;
      end
      for (int f = 0; f < NF; f++) f_valid[f] = 1'b0;
      for (int c = 0; c < 8; c++)
        expq.push_back({tr, 3'(c), 14'(iv[c]), 14'(qv[c])});
      repeat (28) @(posedge clk); #1ns;
    end
    repeat (60) @(posedge clk);
    checks++;
    if (words != 480) begin failures++; $display("%0d words", words); end
    checks++;
    if (overrun) begin failures++; $display("overrun"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
