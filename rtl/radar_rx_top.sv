// radar_rx_top: the two bandpass-sampling radar receivers and the
// configuration watchdog, side by side.
//
//   r8_*  eight-channel receiver (rx8ch): eight 560 Mbit/s serial ADC lines
//         in, 32-bit I/Q word bus out (one word per channel every 25 ns).
//   r1_*  single-channel receiver (rx1ch): 14-bit parallel ADC in at
//         40 MSPS, multiplexed 14-bit I/Q bus with IQ clock and select out.
//   wd_*  external watchdog of the eight-channel board (watchdog): switches
//         the configuration PROM and pulses PROG_B if the loaded image does
//         not disable it in time.
//
// The three parts share nothing and run on their own clocks. Parts of the
// original system that are not logic (ADCs, clock conditioner, PROMs,
// Ethernet PHY, the embedded control processor) connect through these
// ports: the control processor drives r8_iq_active, r8_filter_sel, r8_coef_wr,
// wd_disable and wd_prog_req and reads r8_status.
module radar_rx_top
  import rx_pkg::*;
(
  // eight-channel receiver
  input  logic              r8_ser_clk,
  input  logic              r8_ser_rst,
  input  logic              r8_frm,
  input  logic [NCHAN8-1:0] r8_din,
  input  logic              r8_clk,
  input  logic              r8_rst,
  input  logic              r8_iq_active,
  input  logic              r8_filter_sel,
  input  coef_wr_t          r8_coef_wr,
  input  logic              r8_sys_trig,
  output logic              r8_bus_clk,
  output out_word_t         r8_bus_data,
  output logic              r8_bus_valid,
  output logic [31:0]       r8_status,
  // single-channel receiver
  input  logic              r1_clk,
  input  logic              r1_rst,
  output logic              r1_adc_clk,
  input  sample_t           r1_adc_data,
  input  logic              r1_adc_otr,
  input  logic              r1_sys_trig,
  output logic              r1_iq_clk,
  output logic              r1_iq_sel,
  output sample_t           r1_iq_data,
  output logic              r1_trig_out,
  output logic              r1_otr_seen,
  output logic              r1_overrun,
  // configuration watchdog
  input  logic              wd_clk,
  input  logic              wd_por,
  input  logic              wd_enable,
  input  logic              wd_default_parallel,
  input  logic [4:0]        wd_timeout_sel,
  input  logic              wd_disable,
  input  logic              wd_prog_req,
  output logic              wd_prog_b,
  output logic              wd_sel_parallel,
  output logic [2:0]        wd_mode,
  output logic              wd_timed_out
);
  rx8ch u_rx8 (
    .ser_clk(r8_ser_clk), .ser_rst(r8_ser_rst), .frm(r8_frm), .din(r8_din),
    .clk(r8_clk), .rst(r8_rst), .iq_active(r8_iq_active), .filter_sel(r8_filter_sel), .coef_wr(r8_coef_wr),
    .sys_trig(r8_sys_trig), .bus_clk(r8_bus_clk), .bus_data(r8_bus_data),
    .bus_valid(r8_bus_valid), .status(r8_status));

  rx1ch u_rx1 (
    .clk(r1_clk), .rst(r1_rst), .adc_clk(r1_adc_clk), .adc_data(r1_adc_data),
    .adc_otr(r1_adc_otr), .sys_trig(r1_sys_trig), .iq_clk(r1_iq_clk), .iq_sel(r1_iq_sel),
    .iq_data(r1_iq_data), .trig_out(r1_trig_out), .otr_seen(r1_otr_seen),
    .overrun(r1_overrun));

  watchdog u_wd (
    .clk(wd_clk), .por(wd_por), .wd_enable(wd_enable),
    .default_parallel(wd_default_parallel), .timeout_sel(wd_timeout_sel),
    .wd_disable(wd_disable), .fpga_prog_req(wd_prog_req), .prog_b(wd_prog_b),
    .sel_parallel(wd_sel_parallel), .mode(wd_mode), .timed_out(wd_timed_out));
endmodule
