// tb_radar_rx_top: end-to-end test of the whole design at its default
// parameters, all three parts running at once.
//   Eight-channel receiver: serial ADC model, different tones per channel
//   (channel 5 silent), new taps loaded into coefficient set 1 at run
//   time and the set switched, mixing turned off and on,
//   a ringing trigger edge; every bus word checked by rx8_monitor.
//   Single-channel receiver: parallel ADC model with an 8-clock pipeline,
//   ringing trigger, one out-of-range sample; every I/Q word checked against
//   the reference mixing and filtering.
//   Watchdog: timeouts with PROM switching, disable by software, reload
//   request.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_radar_rx_top;
  import rx_pkg::*;
  import rx_ref_pkg::*;

  // ---------------- eight-channel side ----------------
  logic r8_ser_clk = 1'b0, r8_clk = 1'b0, r8_ser_rst, r8_rst, r8_iq_active, r8_filter_sel, r8_sys_trig;
  coef_wr_t r8_coef_wr;
  sample_t r8_samples [8];
  logic r8_run, r8_frm, r8_word_start, r8_bus_clk, r8_bus_valid;
  logic [7:0] r8_din;
  out_word_t r8_bus_data;
  logic [31:0] r8_status;

  // ---------------- single-channel side ----------------
  logic r1_clk = 1'b0, r1_rst, r1_adc_clk, r1_adc_otr, r1_sys_trig, r1_iq_clk, r1_iq_sel;
  logic r1_trig_out, r1_otr_seen, r1_overrun;
  sample_t r1_adc_data, r1_iq_data;

  // ---------------- watchdog ----------------
  logic wd_clk = 1'b0, wd_por, wd_enable, wd_default_parallel, wd_disable, wd_prog_req;
  logic [4:0] wd_timeout_sel;
  logic wd_prog_b, wd_sel_parallel, wd_timed_out;
  logic [2:0] wd_mode;

  radar_rx_top dut (.*);

  adc_serial_model #(.NCH(8)) adc8 (.ser_clk(r8_ser_clk), .samples(r8_samples), .run(r8_run),
    .frm(r8_frm), .din(r8_din), .word_start(r8_word_start));

  always #1786ps  r8_ser_clk = ~r8_ser_clk;  // 280 MHz
  always #3125ps  r8_clk     = ~r8_clk;      // 160 MHz
  always #6250ps  r1_clk     = ~r1_clk;      // 80 MHz
  always #15259ns wd_clk     = ~wd_clk;      // 32.768 kHz

  int lchecks = 0, lfail = 0;
  task automatic lcheck(input bit ok, input string msg);
    lchecks++;
    if (!ok) begin lfail++; $display("FAIL: %s", msg); end
  endtask

  // ---- eight-channel checking ----
  sample_t    adcdata [8];
  logic [3:0] tick, act, set;
  int checks8, failures8, words8, mix8, byp8, set0_8, set1_8, trig8, first_trig8;
  assign tick = dut.u_rx8.tick;
  assign adcdata[0] = dut.u_rx8.g_pair[0].u_pair.adcdata[0];
  assign adcdata[1] = dut.u_rx8.g_pair[0].u_pair.adcdata[1];
  assign adcdata[2] = dut.u_rx8.g_pair[1].u_pair.adcdata[0];
  assign adcdata[3] = dut.u_rx8.g_pair[1].u_pair.adcdata[1];
  assign adcdata[4] = dut.u_rx8.g_pair[2].u_pair.adcdata[0];
  assign adcdata[5] = dut.u_rx8.g_pair[2].u_pair.adcdata[1];
  assign adcdata[6] = dut.u_rx8.g_pair[3].u_pair.adcdata[0];
  assign adcdata[7] = dut.u_rx8.g_pair[3].u_pair.adcdata[1];
  assign act = {dut.u_rx8.g_pair[3].u_pair.ctl_s[0], dut.u_rx8.g_pair[2].u_pair.ctl_s[0],
                dut.u_rx8.g_pair[1].u_pair.ctl_s[0], dut.u_rx8.g_pair[0].u_pair.ctl_s[0]};
  assign set = {dut.u_rx8.g_pair[3].u_pair.ctl_s[1], dut.u_rx8.g_pair[2].u_pair.ctl_s[1],
                dut.u_rx8.g_pair[1].u_pair.ctl_s[1], dut.u_rx8.g_pair[0].u_pair.ctl_s[1]};

  rx8_monitor mon (.clk(r8_clk), .rst(r8_rst), .word_start(r8_word_start), .adc_samples(r8_samples),
    .tick(tick), .adcdata(adcdata), .act(act), .set(set), .bus_clk(r8_bus_clk),
    .bus_data(r8_bus_data), .bus_valid(r8_bus_valid), .checks(checks8), .failures(failures8),
    .words(words8), .words_mix(mix8), .words_bypass(byp8), .words_set0(set0_8),
    .words_set1(set1_8), .trig_rises(trig8), .first_trig_word(first_trig8));

  int kword = 0;
  always @(posedge r8_word_start) begin
    #1ps;
    for (int c = 0; c < 8; c++) begin
      if (c == 5) r8_samples[c] = sample_t'(int'($urandom % 7) - 3);
      else r8_samples[c] = sample_t'(int'((800.0 + 700.0 * c) * $cos(3.141592653589793 / 2.0 * kword + 0.4 * c))
                                     + int'($urandom % 100) - 50);
    end
    kword++;
  end

  // ---- single-channel ADC model and checking ----
  int r1cyc = 0;
  always @(posedge r1_clk) r1cyc++;
  int pipe [8];
  int k1 = 0;
  int sent1 [$];
  always @(posedge r1_adc_clk) begin
    int x;
    x = int'(2500.0 * $cos(3.141592653589793 / 2.0 * k1 + 0.7)) + int'($urandom % 400) - 200;
    k1++;
    for (int i = 7; i > 0; i--) pipe[i] = pipe[i-1];
    pipe[0] = x;
    #5ns;
    r1_adc_data = sample_t'(pipe[7]);
    sent1.push_back(pipe[7]);
  end

  int v1 [2][$];
  bit sets1 [$];
  int nin1 = 0, checks1 = 0, failures1 = 0;
  bit matched1 = 0;
  always @(posedge r1_clk) begin
    if (!r1_rst && dut.u_rx1.adc_v) begin
      int x;
      x = int'(dut.u_rx1.adc_q);
      if (!matched1) begin
        while (sent1.size() > 0 && sent1[0] != x) void'(sent1.pop_front());
        matched1 = 1;
      end
      checks1++;
      if (sent1.size() == 0 || sent1[0] != x) failures1++;
      else void'(sent1.pop_front());
      v1[0].push_back(mix_i(x, nin1, 1'b1));
      v1[1].push_back(mix_q(x, nin1, 1'b1));
      sets1.push_back(1'b0);
      nin1++;
    end
  end

  int nout1 [2];
  bit started1 = 0;
  int words1 = 0;
  always @(posedge r1_iq_clk) begin
    if (!started1 && r1_iq_sel) started1 = 1;
    if (started1) begin
      int s, e;
      s = r1_iq_sel ? 0 : 1;
      e = filt1(s, nout1[s]);
      checks1++;
      if (int'(r1_iq_data) != e) begin
        failures1++;
        if (failures1 < 10) $display("rx1 %s word %0d: got %0d expected %0d", r1_iq_sel ? "I" : "Q", nout1[s], r1_iq_data, e);
      end
      nout1[s]++;
      words1++;
    end
  end

  // The single-channel filter has its own cutoff (637 kHz) and table.
  function automatic int filt1(int s, int m);
    longint acc = 0;
    for (int k = 0; k < NTAPS; k++) begin
      int n = 8 * m - k;
      if (n >= 0 && n < v1[s].size()) acc += longint'(lp_coef(k, 0.0159)) * longint'(v1[s][n]);
    end
    return sat14((acc + (longint'(1) <<< 16)) >>> 17);
  endfunction

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


  int trig1_edges = 0;
  logic trig1_q = 1'b0;
  always @(posedge r1_clk) begin
    if (!r1_rst && r1_trig_out != trig1_q) trig1_edges++;
    trig1_q <= r1_trig_out;
  end

  // ---- watchdog counting ----
  int wd_timeouts = 0, wd_switches = 0, wd_prog_pulses = 0;
  logic wd_selp_q = 1'b0, wd_prog_q = 1'b1;
  always @(posedge wd_clk) begin
    if (!wd_por) begin
      if (wd_timed_out) wd_timeouts++;
      if (wd_sel_parallel != wd_selp_q) wd_switches++;
      if (!wd_prog_b && wd_prog_q) wd_prog_pulses++;
    end
    wd_selp_q <= wd_sel_parallel;
    wd_prog_q <= wd_prog_b;
  end

  initial begin
    #6ms; lfail++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks8 + checks1 + lchecks, failures8 + failures1 + lfail);
    $finish;
  end

  // ---- watchdog stimulus ----
  bit wd_done = 1'b0;
  initial begin
    int timeouts_before;
    wd_por = 1'b1; wd_enable = 1'b1; wd_default_parallel = 1'b0; wd_disable = 1'b0;
    wd_prog_req = 1'b0; wd_timeout_sel = 5'd2;   // 8 clocks, 244 us
    repeat (2) @(posedge wd_clk); #1ns; wd_por = 1'b0;
    wait (wd_timeouts == 2);                      // image "broken" twice
    @(posedge wd_clk); #1ns;
    lcheck(wd_sel_parallel == 1'b0 && wd_mode == 3'b001, "two timeouts return to the serial PROM");
    wd_disable = 1'b1; @(posedge wd_clk); #1ns; wd_disable = 1'b0;   // image good
    timeouts_before = wd_timeouts;
    repeat (30) @(posedge wd_clk);
    lcheck(wd_timeouts == timeouts_before, "no timeout once disabled");
    wd_prog_req = 1'b1; @(posedge wd_clk); #1ns; wd_prog_req = 1'b0;  // reload request
    repeat (12) @(posedge wd_clk); #1ns;
    lcheck(wd_timeouts == timeouts_before + 1, "re-armed after a reload");
    wd_done = 1'b1;
  end

  // ---- receivers stimulus ----
  initial begin
    nout1[0] = 0; nout1[1] = 0;
    for (int i = 0; i < 8; i++) pipe[i] = 0;
    r8_ser_rst = 1'b1; r8_rst = 1'b1; r8_run = 1'b0; r8_iq_active = 1'b1; r8_filter_sel = 1'b0;
    r8_sys_trig = 1'b0; r8_coef_wr = '0;
    for (int c = 0; c < 8; c++) r8_samples[c] = '0;
    r1_rst = 1'b1; r1_adc_data = '0; r1_adc_otr = 1'b0; r1_sys_trig = 1'b0;
    repeat (4) @(posedge r8_ser_clk); r8_ser_rst = 1'b0;
    repeat (4) @(posedge r8_clk); r8_rst = 1'b0;
    r1_rst = 1'b0;
    r8_run = 1'b1;
    wait (kword == 300);
    lcheck(r8_status[7:0] == 8'b1101_1111, $sformatf("activity flags %b", r8_status[7:0]));
    // Ringing trigger edges on both receivers.
    r8_sys_trig = 1'b1; r1_sys_trig = 1'b1;
    for (int i = 0; i < 6; i++) #(($urandom % 40 + 5) * 1ns) begin
      r8_sys_trig = ~r8_sys_trig; r1_sys_trig = ~r1_sys_trig;
    end
    r8_sys_trig = 1'b1; r1_sys_trig = 1'b1;
    @(posedge r1_adc_clk); #5ns r1_adc_otr = 1'b1; @(posedge r1_adc_clk); #5ns r1_adc_otr = 1'b0;
    wait (kword == 450);
    load_set1(r8_coef_wr, r8_clk);
    wait (kword == 500);
    r8_filter_sel = 1'b1;
    wait (kword == 800);
    r8_iq_active = 1'b0;
    wait (kword == 900);
    r8_iq_active = 1'b1;
    wait (kword == 1100);
    repeat (100) @(posedge r8_clk);
    wait (wd_done);
    // Mechanism counts.
    $display("rx8: words %0d, mixing %0d, bypass %0d, set0 %0d, set1 %0d, trigger rises %0d, coefficient writes %0d",
             words8, mix8, byp8, set0_8, set1_8, trig8, coef_writes);
    $display("rx1: words %0d, trigger edges %0d, otr %b; watchdog: timeouts %0d, switches %0d, PROG_B pulses %0d",
             words1, trig1_edges, r1_otr_seen, wd_timeouts, wd_switches, wd_prog_pulses);
    lcheck(words8 >= 8 * 130, "rx8 words");
    lcheck(mix8 > 0, "rx8 mixing used");
    lcheck(byp8 > 0, "rx8 bypass used");
    lcheck(set0_8 > 0 && set1_8 > 0, "rx8 both coefficient sets used");
    lcheck(coef_writes == NTAPS, "rx8 set 1 loaded at run time");
    lcheck(trig8 == 1, "rx8 trigger de-bounced to one edge and carried on the bus");
    lcheck(r8_status[10] == 1'b0, "rx8 no overrun");
    lcheck(words1 >= 200 && !r1_overrun, "rx1 words");
    lcheck(trig1_edges == 1, "rx1 trigger de-bounced to one edge");
    lcheck(r1_otr_seen, "rx1 out-of-range flagged");
    lcheck(wd_switches >= 2, "watchdog PROM switch");
    lcheck(wd_prog_pulses >= 4, "watchdog PROG_B pulses (timeouts and reload)");
    $display("TB_RESULT checks=%0d failures=%0d", checks8 + checks1 + lchecks, failures8 + failures1 + lfail);
    $finish;
  end
endmodule
