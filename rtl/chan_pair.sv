// chan_pair: front end and filter for two ADC channels.
//
// Two serial ADC channels share one decimation filter. Per channel:
//   serial clock domain:  ddr_capture -> deserializer (14-bit words, toggle)
//   filter clock domain:  two-stage synchroniser on the toggle, edge detect,
//                         capture of the (by then stable) word,
//                         activity detection, fs/4 I/Q mixer.
// When the words of both channels of a frame are in, the two mixers run and
// their outputs I0, Q0, I1, Q1 go to a 4-stream decimation filter (stream
// numbers 0..3 in that order). The deserialised word is held for a whole
// frame (25 ns at 40 MSPS), longer than the synchroniser latency, which is
// what makes it safe to read it in the filter domain after the flag.
// iq_active and filter_sel come from the control logic in another clock
// domain and are synchronised here; coef_wr (coefficient loading) is
// synchronous to the filter clock.
//
// Timing: out_* follow the filter's timing (one result per stream every 8
// frames). sample_tick pulses once per frame, in the filter domain, when the
// pair's samples enter the mixers.
// The split into deserialisers, synchroniser-based crossing, mixing or
// bypass, activity detection and one shared 4-stream filter follows the
// original; waiting for both channels of a frame is this design's choice.
module chan_pair
  import rx_pkg::*;
#(
  parameter int THRESHOLD = 8
) (
  // serial clock domain
  input  logic       ser_clk,
  input  logic       ser_rst,
  input  logic       frm,          // frame clock line (shared by all channels)
  input  logic [1:0] din,          // serial data lines of the two channels
  // filter clock domain
  input  logic       clk,
  input  logic       rst,
  input  logic       iq_active,    // asynchronous: 1 mix, 0 bypass
  input  logic       filter_sel,   // asynchronous: coefficient set
  input  coef_wr_t   coef_wr,      // coefficient write, filter clock domain
  output logic       out_valid,
  output logic [1:0] out_chan,     // 0 I(ch0), 1 Q(ch0), 2 I(ch1), 3 Q(ch1)
  output sample_t    out_data,
  output logic [1:0] chan_active,
  output logic       sample_tick
);
  // ---------------- serial domain ----------------
  logic [2:0] cap_first, cap_second;  // bit 2: frame, bits 1..0: data
  sample_t    deser_data [2];
  logic [1:0] deser_tog;
  logic [1:0] deser_pulse_unused;

  ddr_capture #(.WIDTH(3)) u_cap (
    .clk(ser_clk), .d({frm, din}), .first(cap_first), .second(cap_second));

  for (genvar c = 0; c < 2; c++) begin : g_deser
    deserializer u_deser (
      .clk        (ser_clk),
      .rst        (ser_rst),
      .data_first (cap_first[c]),
      .data_second(cap_second[c]),
      .frm_first  (cap_first[2]),
      .frm_second (cap_second[2]),
      .dataout    (deser_data[c]),
      .data_tog   (deser_tog[c]),
      .data_pulse (deser_pulse_unused[c])
    );
  end

  // ---------------- filter domain ----------------
  logic [1:0] tog_s, tog_q;
  logic [1:0] ctl_s;            // {filter_sel, iq_active} synchronised
  sample_t    adcdata [2];
  logic [1:0] have;
  logic       go;

  sync2 #(.WIDTH(2)) u_sync_tog (.clk(clk), .rst(rst), .d_async(deser_tog), .q(tog_s));
  sync2 #(.WIDTH(2)) u_sync_ctl (.clk(clk), .rst(rst), .d_async({filter_sel, iq_active}), .q(ctl_s));

  always_ff @(posedge clk) begin
    if (rst) begin
      tog_q      <= '0;
      have       <= '0;
      go         <= 1'b0;
      adcdata[0] <= '0;
      adcdata[1] <= '0;
    end else begin
      tog_q <= tog_s;
      go    <= 1'b0;
      for (int c = 0; c < 2; c++)
        if (tog_s[c] != tog_q[c]) adcdata[c] <= deser_data[c];
      if (&(have | (tog_s ^ tog_q))) begin
        have <= '0;
        go   <= 1'b1;
      end else begin
        have <= have | (tog_s ^ tog_q);
      end
    end
  end

  assign sample_tick = go;

  sample_t    mix_i [2], mix_q [2];
  logic [1:0] mix_valid;
  logic [1:0] mix_phase_unused [2];

  for (genvar c = 0; c < 2; c++) begin : g_mix
    iq_mixer u_mix (
      .clk(clk), .rst(rst), .iq_active(ctl_s[0]),
      .in_valid(go), .in_data(adcdata[c]),
      .out_valid(mix_valid[c]), .out_i(mix_i[c]), .out_q(mix_q[c]),
      .phase(mix_phase_unused[c]));

    activity_detect #(.THRESHOLD(THRESHOLD)) u_act (
      .clk(clk), .rst(rst), .in_valid(go), .in_data(adcdata[c]),
      .active(chan_active[c]));
  end

  sample_t filt_in [4];
  logic    filt_ready_unused;
  assign filt_in[0] = mix_i[0];
  assign filt_in[1] = mix_q[0];
  assign filt_in[2] = mix_i[1];
  assign filt_in[3] = mix_q[1];

  decim_filter #(.NSTREAM(4), .NSETS(2)) u_filt (
    .clk(clk), .rst(rst), .coef_sel(ctl_s[1]), .coef_wr(coef_wr),
    .in_valid(&mix_valid), .in_data(filt_in), .in_ready(filt_ready_unused),
    .out_valid(out_valid), .out_chan(out_chan), .out_data(out_data));
endmodule
