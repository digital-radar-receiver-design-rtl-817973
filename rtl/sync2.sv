// sync2: second-order synchronizer.
//
// Two flip-flops in series in the destination clock domain, as in the
// two-stage synchroniser of the design description: the first stage may go
// metastable, the second gives it a full clock period to resolve. Each bit is
// synchronised on its own, so only use it for single-bit flags (or buses that
// change one bit at a time, such as toggles). Latency: two destination clock
// edges. The reset value (0) is this design's choice.
module sync2 #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst,      // synchronous, active high
  input  logic [WIDTH-1:0] d_async,  // from another clock domain
  output logic [WIDTH-1:0] q         // synchronised
);
  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d_async;
      q    <= meta;
    end
  end
endmodule
