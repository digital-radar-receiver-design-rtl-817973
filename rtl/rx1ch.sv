// rx1ch: single-channel bandpass-sampling receiver firmware.
//
// One 14-bit parallel ADC samples a 50 MHz IF (5 MHz wide) at 40 MSPS, so
// the signal lands at fs/4 = 10 MHz. Everything runs on the 80 MHz reference
// clock:
//   - the 40 MHz ADC clock is the reference divided by two (adc_clk), and
//     an ADC word is taken on every second reference edge, the one on which
//     adc_clk falls, half an ADC period after the edge that launched it;
//   - iq_mixer turns each sample into I and Q with the {1,0,-1,0} and
//     {0,1,0,-1} sequences;
//   - one decim_filter processes I and Q in turn (2 streams at 80 MHz, one
//     sample pair per 40 MHz period), 128 taps, decimation by 8, cutoff at
//     the 637 kHz equivalent of the 1.57 us radar pulse;
//   - the system trigger is de-bounced (5 us = 400 clocks) and delayed by
//     TRIG_DELAY ADC clocks (26, the receiver's pipeline delay) so it lines
//     up with the data;
//   - iq_out_if sends I and Q words with a 10 MHz IQ clock and IQ select.
//
// Interface: adc_data/adc_otr from the ADC, sys_trig from the radar; IQ bus
// to the host digital I/O card. rst is synchronous and active high.
// adc_otr (ADC out of range, 1-2 samples invalid after it) is counted in the
// sticky otr_seen flag only; the original does not say what the firmware does
// with it.
// Clock division, mixing, the shared 2-stream filter at twice the sample
// rate, the trigger de-bouncing and delay and the output signals follow the
// original; the coefficient values and the exact output timing are this
// design's choice.
module rx1ch
  import rx_pkg::*;
#(
  parameter int unsigned LOCKOUT    = 400,     // trigger recovery, reference clocks
  parameter int unsigned TRIG_DELAY = 26,      // trigger alignment, ADC clocks
  parameter real         FC         = 0.0159   // filter cutoff, cycles per sample
) (
  input  logic    clk,        // 80 MHz reference clock
  input  logic    rst,
  output logic    adc_clk,    // 40 MHz sampling clock to the ADC
  input  sample_t adc_data,
  input  logic    adc_otr,
  input  logic    sys_trig,
  output logic    iq_clk,
  output logic    iq_sel,
  output sample_t iq_data,
  output logic    trig_out,
  output logic    otr_seen,
  output logic    overrun
);
  sample_t adc_q;
  logic    adc_v;

  // Divide by two and capture.
  always_ff @(posedge clk) begin
    if (rst) begin
      adc_clk  <= 1'b0;
      adc_q    <= '0;
      adc_v    <= 1'b0;
      otr_seen <= 1'b0;
    end else begin
      adc_clk <= !adc_clk;
      adc_v   <= adc_clk;
      if (adc_clk) begin
        adc_q <= adc_data;
        if (adc_otr) otr_seen <= 1'b1;
      end
    end
  end

  logic    mix_v;
  sample_t mix_i, mix_q;
  logic [1:0] mix_phase_unused;

  iq_mixer u_mix (
    .clk(clk), .rst(rst), .iq_active(1'b1), .in_valid(adc_v), .in_data(adc_q),
    .out_valid(mix_v), .out_i(mix_i), .out_q(mix_q), .phase(mix_phase_unused));

  sample_t filt_in [2];
  assign filt_in[0] = mix_i;
  assign filt_in[1] = mix_q;

  logic    f_valid, f_ready_unused;
  logic [0:0] f_chan;
  sample_t f_data;

  decim_filter #(.NSTREAM(2), .NSETS(1), .FC0(FC)) u_filt (
    .clk(clk), .rst(rst), .coef_sel(1'b0), .coef_wr('0), .in_valid(mix_v), .in_data(filt_in),
    .in_ready(f_ready_unused), .out_valid(f_valid), .out_chan(f_chan), .out_data(f_data));

  logic trig_db, trig_al;

  trig_debounce #(.LOCKOUT(LOCKOUT)) u_db (
    .clk(clk), .rst(rst), .trig_in(sys_trig), .trig_out(trig_db));

  trig_delay #(.DELAY(TRIG_DELAY)) u_dly (
    .clk(clk), .rst(rst), .ce(adc_v), .trig_in(trig_db), .trig_out(trig_al));

  iq_out_if #(.HOLD(8)) u_out (
    .clk(clk), .rst(rst), .in_valid(f_valid), .in_chan(f_chan[0]), .in_data(f_data),
    .trig(trig_al), .iq_clk(iq_clk), .iq_sel(iq_sel), .iq_data(iq_data),
    .trig_out(trig_out), .overrun(overrun));
endmodule
