// tb_rx8ch: eight-channel receiver at its default parameters, fed by the
// serial ADC model with a different fs/4 tone on each channel (channel 5
// silent). rx8_monitor checks every bus word against the reference
// mixing + filtering. The testbench switches the coefficient set and the
// mixing mode during the run, gives a ringing trigger edge, and checks the
// status register (activity flags, mode bits), the number of words, and
// that the trigger bit rises once on the bus.
module tb_rx8ch;
  import rx_pkg::*;
  logic ser_clk = 1'b0, clk = 1'b0, ser_rst, rst, iq_active, filter_sel, sys_trig;
  coef_wr_t coef_wr;
  sample_t samples [8];
  logic run, frm, word_start, bus_clk, bus_valid;
  logic [7:0] din;
  out_word_t bus_data;
  logic [31:0] status;
  int checks, failures, words, words_mix, words_bypass, words_set0, words_set1, trig_rises, first_trig_word;
  int lchecks = 0, lfail = 0;

  adc_serial_model #(.NCH(8)) adc (.ser_clk(ser_clk), .samples(samples), .run(run),
    .frm(frm), .din(din), .word_start(word_start));

  rx8ch dut (.ser_clk(ser_clk), .ser_rst(ser_rst), .frm(frm), .din(din), .clk(clk), .rst(rst),
    .iq_active(iq_active), .filter_sel(filter_sel), .coef_wr(coef_wr), .sys_trig(sys_trig), .bus_clk(bus_clk),
    .bus_data(bus_data), .bus_valid(bus_valid), .status(status));

  sample_t    adcdata [8];
  logic [3:0] tick, act, set;
  assign tick = dut.tick;
  assign adcdata[0] = dut.g_pair[0].u_pair.adcdata[0];
  assign adcdata[1] = dut.g_pair[0].u_pair.adcdata[1];
  assign adcdata[2] = dut.g_pair[1].u_pair.adcdata[0];
  assign adcdata[3] = dut.g_pair[1].u_pair.adcdata[1];
  assign adcdata[4] = dut.g_pair[2].u_pair.adcdata[0];
  assign adcdata[5] = dut.g_pair[2].u_pair.adcdata[1];
  assign adcdata[6] = dut.g_pair[3].u_pair.adcdata[0];
  assign adcdata[7] = dut.g_pair[3].u_pair.adcdata[1];
  assign act = {dut.g_pair[3].u_pair.ctl_s[0], dut.g_pair[2].u_pair.ctl_s[0],
                dut.g_pair[1].u_pair.ctl_s[0], dut.g_pair[0].u_pair.ctl_s[0]};
  assign set = {dut.g_pair[3].u_pair.ctl_s[1], dut.g_pair[2].u_pair.ctl_s[1],
                dut.g_pair[1].u_pair.ctl_s[1], dut.g_pair[0].u_pair.ctl_s[1]};

  rx8_monitor mon (.clk(clk), .rst(rst), .word_start(word_start), .adc_samples(samples),
    .tick(tick), .adcdata(adcdata), .act(act), .set(set), .bus_clk(bus_clk),
    .bus_data(bus_data), .bus_valid(bus_valid), .checks(checks), .failures(failures),
    .words(words), .words_mix(words_mix), .words_bypass(words_bypass), .words_set0(words_set0),
    .words_set1(words_set1), .trig_rises(trig_rises), .first_trig_word(first_trig_word));

  always #1786ps ser_clk = ~ser_clk;
  always #3125ps clk = ~clk;

  initial begin
    #5ms; lfail++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + lchecks, failures + lfail);
    $finish;
  end

  int kword = 0;
  always @(posedge word_start) begin
    #1ps;
    for (int c = 0; c < 8; c++) begin
      if (c == 5) samples[c] = sample_t'(int'($urandom % 7) - 3);
      else samples[c] = sample_t'(int'((800.0 + 700.0 * c) * $cos(3.141592653589793 / 2.0 * kword + 0.4 * c))
                                  + int'($urandom % 100) - 50);
    end
    kword++;
  end


  // Load a new set 1 (1.2 MHz cutoff) through the coefficient write port,
  // one tap per filter clock, and put the same taps in the reference.
  int coef_writes = 0;
  task automatic load_set1(ref coef_wr_t wr, ref logic wclk);
    for (int k = 0; k < NTAPS; k++) begin
      @(posedge wclk); #1ns;
      wr.we = 1'b1; wr.set = 1'b1; wr.addr = 7'(k); wr.data = lp_coef(k, 0.03);
      rx_ref_pkg::h[1][k] = longint'(lp_coef(k, 0.03));
      coef_writes++;
    end
    @(posedge wclk); #1ns;
    wr = '0;
  endtask

  task automatic lcheck(input bit ok, input string msg);
    lchecks++;
    if (!ok) begin lfail++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    ser_rst = 1'b1; rst = 1'b1; run = 1'b0; iq_active = 1'b1; filter_sel = 1'b0; sys_trig = 1'b0; coef_wr = '0;
    for (int c = 0; c < 8; c++) samples[c] = '0;
    repeat (4) @(posedge ser_clk); ser_rst = 1'b0;
    repeat (4) @(posedge clk); rst = 1'b0;
    run = 1'b1;
    wait (kword == 300);
    lcheck(status[7:0] == 8'b1101_1111, $sformatf("activity flags %b", status[7:0]));
    lcheck(status[9:8] == 2'b01, "status mode bits, mixing on, set 0");
    // Ringing trigger edge.
    sys_trig = 1'b1;
    for (int i = 0; i < 6; i++) #(($urandom % 40 + 5) * 1ns) sys_trig = ~sys_trig;
    sys_trig = 1'b1;
    wait (kword == 450);
    load_set1(coef_wr, clk);
    wait (kword == 500);
    filter_sel = 1'b1;
    wait (kword == 800);
    iq_active = 1'b0;
    wait (kword == 900);
    lcheck(status[9:8] == 2'b10, "status mode bits, bypass, set 1");
    iq_active = 1'b1;
    wait (kword == 1100);
    repeat (100) @(posedge clk);
    lcheck(coef_writes == NTAPS, "set 1 loaded at run time");
    lcheck(words >= 8 * 130, $sformatf("%0d bus words", words));
    lcheck(trig_rises == 1, $sformatf("%0d trigger rises on the bus", trig_rises));
    lcheck(words_mix > 0 && words_bypass > 0 && words_set0 > 0 && words_set1 > 0, "all modes seen");
    lcheck(status[10] == 1'b0, "no output overrun");
    $display("words %0d mix %0d bypass %0d set0 %0d set1 %0d", words, words_mix, words_bypass, words_set0, words_set1);
    $display("TB_RESULT checks=%0d failures=%0d", checks + lchecks, failures + lfail);
    $finish;
  end
endmodule
