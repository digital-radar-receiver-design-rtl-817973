// adc_serial_model: behavioural model of the serial output of an
// eight-channel 14-bit ADC (AD9252 style), for simulation only.
//
// Each channel sends its sample MSB first at two bits per bit-clock period.
// A frame clock, high for the first 7 bits of each word, marks the words.
// Bits change BIT_DLY after a clock edge and are sampled by the receiver on
// the next edge; the MSB is launched after a falling edge so that it is
// sampled on a rising edge, as the receiver's pair alignment expects.
// The sample of every channel is taken from `samples` at the start of each
// word; `word_start` pulses (for one bit time) when that happens, so the
// testbench can put the next samples in place.
module adc_serial_model
  import rx_pkg::*;
#(
  parameter int unsigned NCH = 8
) (
  input  logic           ser_clk,
  input  sample_t        samples [NCH],
  input  logic           run,
  output logic           frm,
  output logic [NCH-1:0] din,
  output logic           word_start
);
  sample_t   cur [NCH];
  int        pos;    // bit position 0..13 of the bit being driven

  initial begin
    frm = 1'b0; din = '0; word_start = 1'b0; pos = 0;
    for (int c = 0; c < NCH; c++) cur[c] = '0;
  end

  always @(ser_clk) begin
    if (run && (pos != 0 || ser_clk == 1'b0)) begin
      #(200ps);
      if (pos == 0) begin
        for (int c = 0; c < NCH; c++) cur[c] = samples[c];
        word_start = 1'b1;
      end else begin
        word_start = 1'b0;
      end
      frm = (pos < SAMPLE_W / 2);
      for (int c = 0; c < NCH; c++) din[c] = cur[c][SAMPLE_W - 1 - pos];
      pos = (pos == SAMPLE_W - 1) ? 0 : pos + 1;
    end
  end
endmodule
