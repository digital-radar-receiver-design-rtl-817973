// iq_out_if: single-channel receiver output interface to the host.
//
// The decimation filter delivers one I and one Q result (stream 0 = I,
// stream 1 = Q) for every 8 input samples, i.e. at 5 MHz each. This block
// puts them on a 14-bit IQ data bus one after the other, I first, each word
// held for HOLD clocks (8 clocks of 80 MHz = 100 ns, a 10 MHz word rate),
// together with:
//   iq_clk   a square wave with one period per word; the word changes when
//            iq_clk falls and is stable at its rising edge,
//   iq_sel   1 while the word on the bus is I, 0 while it is Q,
//   trig_out the aligned system trigger, updated with each I word.
// Words are taken from a one-pair holding register; a pair arriving while
// the previous one is still being sent replaces the part not yet sent and
// sets the sticky overrun flag (cannot happen at the nominal rates).
//
// The 14-bit data word, the 10 MHz IQ clock and the IQ select line follow the
// original; the I-before-Q order, the select polarity and the clock phase
// are this design's choice.
module iq_out_if
  import rx_pkg::*;
#(
  parameter int unsigned HOLD = 8          // clocks per word, power of two
) (
  input  logic    clk,
  input  logic    rst,                     // synchronous, active high
  input  logic    in_valid,
  input  logic    in_chan,                 // 0: I, 1: Q
  input  sample_t in_data,
  input  logic    trig,
  output logic    iq_clk,
  output logic    iq_sel,
  output sample_t iq_data,
  output logic    trig_out,
  output logic    overrun
);
  localparam int unsigned CW = $clog2(HOLD);

  logic [CW-1:0] cnt;
  sample_t hold_i, hold_q;
  logic    hold_trig;
  logic    i_pend, q_pend;

  assign iq_clk = cnt[CW-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt       <= '0;
      hold_i    <= '0;
      hold_q    <= '0;
      hold_trig <= 1'b0;
      i_pend    <= 1'b0;
      q_pend    <= 1'b0;
      iq_sel    <= 1'b0;
      iq_data   <= '0;
      trig_out  <= 1'b0;
      overrun   <= 1'b0;
    end else begin
      cnt <= cnt + 1'b1;
      if (cnt == CW'(HOLD - 1)) begin
        if (i_pend) begin
          iq_data  <= hold_i;
          iq_sel   <= 1'b1;
          trig_out <= hold_trig;
          i_pend   <= 1'b0;
        end else if (q_pend) begin
          iq_data <= hold_q;
          iq_sel  <= 1'b0;
          q_pend  <= 1'b0;
        end
      end
      if (in_valid) begin
        if (!in_chan) begin
          hold_i    <= in_data;
          hold_trig <= trig;
        end else begin
          hold_q <= in_data;
          if (i_pend || q_pend) overrun <= 1'b1;
          i_pend <= 1'b1;
          q_pend <= 1'b1;
        end
      end
    end
  end
endmodule
