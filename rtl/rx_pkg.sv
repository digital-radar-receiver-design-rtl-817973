// rx_pkg: types and constants shared by the bandpass-sampling radar receivers.
//
// Both receivers digitise a 50 MHz IF at 40 MSPS (third Nyquist zone, the IF
// aliases to fs/4 = 10 MHz), mix it to baseband with the {1,0,-1,0} /
// {0,1,0,-1} sequences, and low-pass / decimate by eight with a 128-tap FIR.
// The sample width (14 bits), tap count (128), decimation (8), channel count
// (8) and output word layout (Fig. 45 of the design description: trigger in
// bit 31, channel number in bits 30..28, I in 27..14, Q in 13..0) follow the
// original design. The coefficient width (18 bits, one DSP multiplier input)
// and the window-design coefficient generator are this design's own choice:
// the original coefficient values are not published.
package rx_pkg;

  localparam int unsigned SAMPLE_W = 14;   // ADC resolution (AD9244 / AD9252)
  localparam int unsigned COEF_W   = 18;   // FIR coefficient width (assumed)
  localparam int unsigned NTAPS    = 128;  // FIR length
  localparam int unsigned DECIM    = 8;    // decimation factor
  localparam int unsigned NCHAN8   = 8;    // channels of the eight-channel receiver

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0]   coef_t;
  typedef logic [$clog2(NCHAN8)-1:0] chan_t;   // channel number
  typedef logic [$clog2(DECIM)-1:0]  phase_t;  // input phase within a decimation period

  // Write of one filter coefficient by the control processor (filter clock
  // domain): tap k = addr of set 'set' becomes 'data' when we is high.
  typedef struct packed {
    logic                     we;
    logic                     set;
    logic [$clog2(NTAPS)-1:0] addr;
    coef_t                    data;
  } coef_wr_t;

  // One word of the eight-channel output bus (MSB first).
  typedef struct packed {
    logic    trig;     // bit 31: system trigger
    chan_t   chan;     // bits 30..28: channel number 0..7
    sample_t i;        // bits 27..14: in-phase sample
    sample_t q;        // bits 13..0: quadrature sample
  } out_word_t;

  localparam real PI = 3.141592653589793;

  // Default FIR coefficients: Blackman-windowed sinc low-pass of NTAPS taps,
  // cutoff fc (cycles per input sample, -6 dB point), DC gain 2**(COEF_W-1).
  // h[k] = 2*fc*sinc(2*fc*(k-(N-1)/2)) * w[k],
  // w[k] = 0.42 - 0.5*cos(2*pi*k/(N-1)) + 0.08*cos(4*pi*k/(N-1)).
  function automatic real lp_tap(int k, int n, real fc);
    real x, w, s;
    x = real'(k) - real'(n - 1) / 2.0;
    w = 0.42 - 0.5 * $cos(2.0 * PI * k / (n - 1)) + 0.08 * $cos(4.0 * PI * k / (n - 1));
    s = (x == 0.0) ? 2.0 * fc : $sin(2.0 * PI * fc * x) / (PI * x);
    return s * w;
  endfunction

  // Integer tap k of a filter with cutoff fc, normalised so the taps sum to
  // 2**(COEF_W-1) (unity DC gain after the output shift of COEF_W-1 bits).
  function automatic coef_t lp_coef(int k, real fc);
    real sum, v;
    sum = 0.0;
    for (int j = 0; j < NTAPS; j++) sum += lp_tap(j, NTAPS, fc);
    v = lp_tap(k, NTAPS, fc) / sum * real'(2 ** (COEF_W - 1));
    return coef_t'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
  endfunction

endpackage
