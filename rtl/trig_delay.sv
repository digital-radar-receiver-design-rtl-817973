// trig_delay: aligns the de-bounced trigger with the sample data.
//
// The ADC and the FPGA pipeline delay the data with respect to the trigger
// (the ADC alone by 8 sample clocks). Passing the trigger through a shift
// register clocked by the same sample-rate enable puts it back in step with
// the samples it belongs to. DELAY is the total pipeline delay in sample
// clocks, 26 for the single-channel receiver in the original.
//
// Timing: trig_out equals trig_in as it was DELAY ce-ticks earlier
// (DELAY >= 1).
module trig_delay #(
  parameter int unsigned DELAY = 26
) (
  input  logic clk,
  input  logic rst,       // synchronous, active high
  input  logic ce,        // one pulse per sample clock
  input  logic trig_in,
  output logic trig_out
);
  logic [DELAY:0] sr;   // sr[0] is the input, sr[DELAY] the delayed copy

  assign sr[0] = trig_in;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 1; i <= DELAY; i++) sr[i] <= 1'b0;
    end else if (ce) begin
      for (int i = 1; i <= DELAY; i++) sr[i] <= sr[i-1];
    end
  end

  assign trig_out = sr[DELAY];
endmodule
