// activity_detect: per-channel signal activity flag.
//
// Each new sample is compared with a threshold in magnitude
// (x >= THRESHOLD or x <= -THRESHOLD). The result is shifted into an
// 8-bit history register, and the channel is reported active while any of
// the last eight samples crossed the threshold. This lets control software
// see which ADC inputs carry signal.
//
// Timing: active is registered; it reflects a sample one clock after the
// sample's valid strobe. The threshold default (8), the 8-sample window and
// the magnitude test follow the original.
module activity_detect
  import rx_pkg::*;
#(
  parameter int THRESHOLD = 8
) (
  input  logic    clk,
  input  logic    rst,       // synchronous, active high
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    active
);
  logic [6:0] hist;   // previous seven results; with hit, the 8-sample window
  logic       hit;

  assign hit = (int'(in_data) >= THRESHOLD) || (int'(in_data) <= -THRESHOLD);

  always_ff @(posedge clk) begin
    if (rst) begin
      hist   <= '0;
      active <= 1'b0;
    end else if (in_valid) begin
      hist   <= {hist[5:0], hit};
      active <= |{hist[6:0], hit};
    end
  end
endmodule
