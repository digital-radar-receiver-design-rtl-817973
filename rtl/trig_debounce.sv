// trig_debounce: de-bouncer for the radar system trigger.
//
// The system trigger arrives as an asynchronous TTL line with a very sharp
// first edge followed by ringing that can cross the logic threshold several
// more times. The line is first brought into the clock domain with a
// two-stage synchroniser. The output then follows the first change of the
// synchronised level at once and ignores the input for LOCKOUT clock cycles
// afterwards (the recovery time, 5 us in the original: 400 cycles of the
// 80 MHz reference clock). After the lockout the output takes the input
// level again, so a level that changed during the lockout is picked up then.
//
// Timing: 3 clocks from an input edge to the output edge (2 synchroniser
// stages, 1 output register). The polarity is passed through unchanged.
// The recovery time follows the original; the edge-then-lockout scheme is
// this design's choice, the original only states the recovery time.
module trig_debounce #(
  parameter int unsigned LOCKOUT = 400
) (
  input  logic clk,
  input  logic rst,       // synchronous, active high
  input  logic trig_in,   // asynchronous trigger line
  output logic trig_out   // de-bounced level
);
  localparam int unsigned CW = $clog2(LOCKOUT + 1);

  logic          trig_s;
  logic [CW-1:0] hold;

  sync2 #(.WIDTH(1)) u_sync (.clk(clk), .rst(rst), .d_async(trig_in), .q(trig_s));

  always_ff @(posedge clk) begin
    if (rst) begin
      trig_out <= 1'b0;
      hold     <= '0;
    end else if (hold != '0) begin
      hold <= hold - 1'b1;
    end else if (trig_s != trig_out) begin
      trig_out <= trig_s;
      hold     <= CW'(LOCKOUT);
    end
  end
endmodule
