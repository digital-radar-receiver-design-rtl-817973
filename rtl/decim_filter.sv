// decim_filter: time-multiplexed 128-tap low-pass FIR, decimation by 8.
//
// One filter serves NSTREAM independent real streams (for example I0, Q0,
// I1, Q1 of a channel pair). All streams advance together: the source
// presents one new sample per stream with in_valid, and the filter works
// through the streams one per clock cycle, so its clock must run at least
// NSTREAM times the input sample rate (160 MHz for 4 streams at 40 MSPS,
// 80 MHz for 2 streams in the single-channel receiver).
//
// Structure (polyphase, transposed): output m of a stream is
//     y[m] = sum_{k=0}^{127} h[k] * x[8m - k].
// Every input sample contributes to 16 pending outputs, so each stream keeps
// 16 partial sums A[0..15], A[0] being the one that completes next. For an
// input with phase p = n mod 8 the 16 branch multipliers use the taps
//     k(i) = 8*i + ((8 - p) mod 8),   i = 0..15,
// and add h[k(i)]*x into A[i]. On phase 0 the sum A[0] + h[0]*x is the
// finished output; the partial sums then move down one place and A[15]
// starts from zero. Sixteen multipliers per filter match one decimated
// output every 8 inputs for each stream.
//
// Coefficient sets: NSETS sets (1 or 2) are held in a coefficient register
// table and coef_sel picks one at run time; a change takes effect on the
// next sample. Reset loads the built-in sets: Blackman-windowed sincs with
// the cutoff FC0 / FC1 given in cycles per input sample, scaled to a DC gain
// of 2**(COEF_W-1). A control processor can overwrite any tap through the
// write port coef_wr (we, set, addr = tap index k, data), one tap per
// clock. A write is seen by the next sample, so new taps should
// go into the set that coef_sel does not select, followed by a switch. The
// output is rounded, shifted right by COEF_W-1 and saturated to SAMPLE_W
// bits.
//
// Timing: in_valid may be given when in_ready is high; out_valid pulses once
// per stream every 8 input samples, NSTREAM consecutive clocks in stream
// order, the first one 2 clocks after the in_valid of a phase-0 sample.
// Tap count, decimation, the multi-stream sharing, the run-time set
// selection and coefficient loading follow the original; the polyphase
// arrangement, coefficient values, widths, the write port and rounding are
// this design's choice.
module decim_filter
  import rx_pkg::*;
#(
  parameter int unsigned NSTREAM = 4,
  parameter int unsigned NSETS   = 2,
  parameter real         FC0     = 0.0625,  // 2.5 MHz at 40 MSPS
  parameter real         FC1     = 0.0159   // 637 kHz at 40 MSPS
) (
  input  logic    clk,
  input  logic    rst,                    // synchronous, active high
  input  logic    coef_sel,               // coefficient set (ignored if NSETS = 1)
  input  coef_wr_t coef_wr,               // coefficient write (set ignored if NSETS = 1)
  input  logic    in_valid,
  input  sample_t in_data [NSTREAM],
  output logic    in_ready,
  output logic    out_valid,
  output logic [$clog2(NSTREAM > 1 ? NSTREAM : 2)-1:0] out_chan,
  output sample_t out_data
);
  localparam int unsigned BR    = NTAPS / DECIM;            // 16 branches
  localparam int unsigned ACC_W = SAMPLE_W + COEF_W + $clog2(NTAPS);
  localparam int unsigned SH    = COEF_W - 1;
  localparam int unsigned CW    = $clog2(NSTREAM > 1 ? NSTREAM : 2);

  typedef logic signed [ACC_W-1:0] acc_t;

  // Built-in coefficient sets, computed at elaboration, and the writable
  // table that the multipliers read.
  coef_t coef_init [NSETS][NTAPS];
  for (genvar s = 0; s < NSETS; s++) begin : g_set
    for (genvar k = 0; k < NTAPS; k++) begin : g_tap
      localparam coef_t C = lp_coef(k, (s == 0) ? FC0 : FC1);
      assign coef_init[s][k] = C;
    end
  end

  coef_t coef_rom [NSETS][NTAPS];
  always_ff @(posedge clk) begin
    if (rst)
      coef_rom <= coef_init;
    else if (coef_wr.we)
      coef_rom[(NSETS > 1) ? int'(coef_wr.set) : 0][coef_wr.addr] <= coef_wr.data;
  end

  sample_t        samples [NSTREAM];
  logic           busy;
  logic [CW-1:0]  cur;          // stream being processed
  logic [2:0]     phase;        // input phase of the samples being processed
  logic           sel_q;
  acc_t           acc [NSTREAM][BR];

  assign in_ready = !busy || (cur == CW'(NSTREAM - 1));

  // Branch products for the current stream.
  sample_t x;
  acc_t    prod [BR];
  logic [2:0] off;
  assign x   = samples[cur];
  assign off = 3'(DECIM) - phase;   // (8 - p) mod 8

  always_comb begin
    for (int i = 0; i < BR; i++) begin
      coef_t c;
      c = coef_rom[(NSETS > 1) ? int'(sel_q) : 0][DECIM * i + int'(off)];
      prod[i] = acc_t'(x) * acc_t'(c);
    end
  end

  acc_t full;
  assign full = acc[cur][0] + prod[0];

  // Round half up, shift, saturate.
  acc_t rnd;
  assign rnd = (full + (acc_t'(1) <<< (SH - 1))) >>> SH;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy      <= 1'b0;
      cur       <= '0;
      phase     <= '0;
      sel_q     <= 1'b0;
      out_valid <= 1'b0;
      out_chan  <= '0;
      out_data  <= '0;
      for (int s = 0; s < NSTREAM; s++) begin
        samples[s] <= '0;
        for (int i = 0; i < BR; i++) acc[s][i] <= '0;
      end
    end else begin
      out_valid <= 1'b0;
      if (busy) begin
        if (phase == 3'd0) begin
          for (int i = 0; i < BR - 1; i++) acc[cur][i] <= acc[cur][i+1] + prod[i+1];
          acc[cur][BR-1] <= '0;
          out_valid <= 1'b1;
          out_chan  <= cur;
          if (rnd > acc_t'(2 ** (SAMPLE_W - 1) - 1))
            out_data <= {1'b0, {(SAMPLE_W-1){1'b1}}};
          else if (rnd < -acc_t'(2 ** (SAMPLE_W - 1)))
            out_data <= {1'b1, {(SAMPLE_W-1){1'b0}}};
          else
            out_data <= sample_t'(rnd);
        end else begin
          for (int i = 0; i < BR; i++) acc[cur][i] <= acc[cur][i] + prod[i];
        end
        if (cur == CW'(NSTREAM - 1)) begin
          cur   <= '0;
          phase <= phase + 3'd1;
          busy  <= 1'b0;
        end else begin
          cur <= cur + 1'b1;
        end
      end
      if (in_valid && in_ready) begin
        samples <= in_data;
        busy    <= 1'b1;
        sel_q   <= coef_sel;
      end
    end
  end

  // The source must not present samples faster than the filter can take them.
  always_ff @(posedge clk) begin
    if (!rst && in_valid)
      assert (in_ready) else $error("decim_filter: input sample dropped (in_valid while busy)");
  end
endmodule
