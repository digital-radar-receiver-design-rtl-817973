// rx8ch: eight-channel bandpass-sampling receiver datapath.
//
// Eight IF inputs are sampled at 40 MSPS by one eight-channel ADC that
// sends each channel as a 560 Mbit/s DDR serial stream with a shared 280 MHz
// bit clock and a 40 MHz frame clock. Four chan_pair units (channels 0-1,
// 2-3, 4-5, 6-7) deserialise the streams, mix each channel to baseband I/Q
// with the fs/4 sequences and run one 4-stream 128-tap decimate-by-8 filter
// each on the 160 MHz filter clock. out_formatter collects the 16 results
// of each 5 MHz sample instant and sends one 32-bit word per channel,
// channels 0..7 in turn, every 25 ns: trigger, channel, I, Q.
//
// The system trigger is de-bounced (5 us recovery, 800 filter clocks) and
// delayed by TRIG_DELAY sample instants before it is put into the words.
// iq_active (I/Q mixing on/off) and filter_sel (coefficient set) come from
// the control processor, which can also rewrite filter taps through coef_wr
// (filter clock domain, shared by the four filters); status collects the
// activity flags and the control state for it.
//
// Clocks: ser_clk (serial bit clock) for the deserialisers, clk (filter
// clock, at least 4x the sample rate) for everything else; bus_clk is
// clk/4. Resets are synchronous and active high, one per domain.
// Channel grouping, clock rates, filter sharing and the output word follow
// the original. The trigger path is carried over from the single-channel
// receiver, and the status register layout is this design's choice:
//   status[7:0] channel activity, [8] I/Q mixing on, [9] filter set,
//   [10] output overrun (sticky), [31:11] zero.
module rx8ch
  import rx_pkg::*;
#(
  parameter int unsigned LOCKOUT    = 800,  // trigger recovery, filter clocks
  parameter int unsigned TRIG_DELAY = 26,   // trigger alignment, sample clocks
  parameter int          THRESHOLD  = 8     // activity threshold
) (
  input  logic              ser_clk,
  input  logic              ser_rst,
  input  logic              frm,
  input  logic [NCHAN8-1:0] din,
  input  logic              clk,
  input  logic              rst,
  input  logic              iq_active,
  input  logic              filter_sel,
  input  coef_wr_t          coef_wr,     // coefficient write to all four filters
  input  logic              sys_trig,
  output logic              bus_clk,
  output out_word_t         bus_data,
  output logic              bus_valid,
  output logic [31:0]       status
);
  localparam int unsigned NP = NCHAN8 / 2;

  logic       f_valid [NP];
  logic [1:0] f_chan  [NP];
  sample_t    f_data  [NP];
  logic [1:0] act     [NP];
  logic [NP-1:0] tick;

  for (genvar p = 0; p < NP; p++) begin : g_pair
    chan_pair #(.THRESHOLD(THRESHOLD)) u_pair (
      .ser_clk(ser_clk), .ser_rst(ser_rst), .frm(frm), .din(din[2*p+1:2*p]),
      .clk(clk), .rst(rst), .iq_active(iq_active), .filter_sel(filter_sel),
      .coef_wr(coef_wr), .out_valid(f_valid[p]), .out_chan(f_chan[p]), .out_data(f_data[p]),
      .chan_active(act[p]), .sample_tick(tick[p]));
  end

  logic trig_db, trig_al, overrun;

  trig_debounce #(.LOCKOUT(LOCKOUT)) u_db (
    .clk(clk), .rst(rst), .trig_in(sys_trig), .trig_out(trig_db));

  trig_delay #(.DELAY(TRIG_DELAY)) u_dly (
    .clk(clk), .rst(rst), .ce(tick[0]), .trig_in(trig_db), .trig_out(trig_al));

  out_formatter #(.NFILT(NP)) u_fmt (
    .clk(clk), .rst(rst), .f_valid(f_valid), .f_chan(f_chan), .f_data(f_data),
    .trig(trig_al), .bus_clk(bus_clk), .bus_data(bus_data), .bus_valid(bus_valid),
    .overrun(overrun));

  // Status register, in the filter clock domain.
  logic [1:0] ctl_s;
  sync2 #(.WIDTH(2)) u_sync_ctl (.clk(clk), .rst(rst), .d_async({filter_sel, iq_active}), .q(ctl_s));

  always_ff @(posedge clk) begin
    if (rst) status <= '0;
    else begin
      status <= '0;
      for (int p = 0; p < NP; p++) status[2*p +: 2] <= act[p];
      status[9:8] <= ctl_s;
      status[10]  <= overrun;
    end
  end

  logic unused_ticks;
  assign unused_ticks = ^tick[NP-1:1];
endmodule
