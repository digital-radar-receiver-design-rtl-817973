// deserializer: 14-bit word assembly for one serial ADC channel.
//
// The ADC (AD9252) sends each 14-bit sample MSB first over one DDR line,
// together with a frame clock that runs at the sample rate and is high for
// the first half of each word. Both the data line and the frame clock are
// first split by ddr_capture into bit pairs, one pair per serial-clock
// period, so a word occupies exactly seven pairs and always starts on the
// first bit of a pair.
//
// Operation: the first and second bits of every pair are shifted into two
// 7-deep shift registers (the even and odd bit streams). A word boundary is
// the pair whose first frame bit is 1 while the second frame bit of the
// pair before was 0. At a boundary the shift registers hold the complete
// previous word, which is loaded into dataout (oldest pair = MSBs) and the
// data_tog flag toggles. A toggle rather than a pulse is the flag the
// original uses, so that a receiving clock domain can synchronise it with a
// two-stage synchroniser. The first boundary after reset only arms the
// block (no word is output for the partial word before it).
//
// Timing: dataout changes once per frame (every 7 serial clocks) and then
// stays stable for 7 serial clocks. data_pulse is a one-cycle strobe in the
// serial-clock domain that accompanies each new word.
// The even/odd shift registers, the frame-clock alignment and the toggling
// data-valid flag follow the original; the register depth of 7 (the
// original keeps 9 and taps bits 2..8) and the rising-edge clocking are this
// design's choice.
module deserializer
  import rx_pkg::*;
(
  input  logic    clk,        // serial bit clock (280 MHz in the original)
  input  logic    rst,        // synchronous, active high
  input  logic    data_first, // earlier bit of the data pair
  input  logic    data_second,// later bit of the data pair
  input  logic    frm_first,  // frame clock, earlier sample of the pair
  input  logic    frm_second, // frame clock, later sample of the pair
  output sample_t dataout,    // deserialised word (two's complement)
  output logic    data_tog,   // toggles once per new word
  output logic    data_pulse  // one-cycle strobe per new word
);
  localparam int unsigned PAIRS = SAMPLE_W / 2;  // 7 pairs per word

  logic [PAIRS-1:0] sr_first, sr_second;  // bit 0 = newest pair
  logic             frm_second_q;
  logic             armed;
  logic             boundary;
  logic [SAMPLE_W-1:0] word;

  assign boundary = frm_first && !frm_second_q;

  // Oldest pair carries the two MSBs.
  always_comb begin
    for (int p = 0; p < PAIRS; p++) begin
      word[2*p+1] = sr_first[p];
      word[2*p]   = sr_second[p];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sr_first     <= '0;
      sr_second    <= '0;
      frm_second_q <= 1'b1;
      armed        <= 1'b0;
      dataout      <= '0;
      data_tog     <= 1'b0;
      data_pulse   <= 1'b0;
    end else begin
      sr_first     <= {sr_first[PAIRS-2:0], data_first};
      sr_second    <= {sr_second[PAIRS-2:0], data_second};
      frm_second_q <= frm_second;
      data_pulse   <= 1'b0;
      if (boundary) begin
        armed <= 1'b1;
        if (armed) begin
          dataout    <= sample_t'(word);
          data_tog   <= !data_tog;
          data_pulse <= 1'b1;
        end
      end
    end
  end
endmodule
