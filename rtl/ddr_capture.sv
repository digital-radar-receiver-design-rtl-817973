// ddr_capture: input register pair for one DDR LVDS line.
//
// The ADC sends each serial line at two bits per serial-clock period (560
// Mbit/s on a 280 MHz clock that is shifted 90 degrees, so bit centres fall
// on both clock edges). The line is sampled on the rising and on the falling
// edge into two bit streams. Both streams are then re-registered on the
// rising edge, so that each rising edge delivers one aligned pair:
//   first  = the bit sampled on the previous rising edge,
//   second = the bit sampled on the falling edge that followed it.
// Latency: the pair is valid two rising edges after the first bit's edge.
// Sampling on both edges follows the original; presenting the pair in the
// rising-edge domain (the original works on the falling edge) is this
// design's choice.
module ddr_capture #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,     // serial bit clock
  input  logic [WIDTH-1:0] d,       // serial data
  output logic [WIDTH-1:0] first,   // earlier bit of the pair
  output logic [WIDTH-1:0] second   // later bit of the pair
);
  logic [WIDTH-1:0] rise_q, fall_q;

  always_ff @(posedge clk) rise_q <= d;
  always_ff @(negedge clk) fall_q <= d;

  always_ff @(posedge clk) begin
    first  <= rise_q;
    second <= fall_q;
  end
endmodule
