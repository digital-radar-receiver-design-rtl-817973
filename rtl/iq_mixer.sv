// iq_mixer: fs/4 quadrature mixer without multipliers.
//
// With the IF aliased to exactly a quarter of the sample rate, cos and sin
// of the local oscillator reduce to the sequences {1,0,-1,0} and
// {0,1,0,-1}. Mixing is therefore a four-way multiplexer over
// {x, 0, -x, 0} driven by a 2-bit phase counter that advances with every
// input sample:
//     phase 0: I =  x, Q =  0
//     phase 1: I =  0, Q =  x
//     phase 2: I = -x, Q =  0
//     phase 3: I =  0, Q = -x
// When iq_active is low the mixer is bypassed and the raw sample goes to both
// I and Q (the "I/Q modulation off" mode of the eight-channel receiver).
// The phase counter keeps counting in bypass so that mixing resumes in step.
//
// Timing: one register stage; out_valid follows in_valid by one clock.
// The mixing table and the bypass follow the original. Negating the most
// negative sample saturates to the most positive one instead of wrapping;
// that is this design's choice.
module iq_mixer
  import rx_pkg::*;
(
  input  logic    clk,
  input  logic    rst,        // synchronous, active high
  input  logic    iq_active,  // 1: mix to baseband, 0: bypass
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    out_valid,
  output sample_t out_i,
  output sample_t out_q,
  output logic [1:0] phase    // phase of the next sample
);
  sample_t neg;

  always_comb begin
    if (in_data == {1'b1, {(SAMPLE_W-1){1'b0}}}) neg = {1'b0, {(SAMPLE_W-1){1'b1}}};
    else                                          neg = -in_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      phase     <= 2'd0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        phase <= phase + 2'd1;
        if (!iq_active) begin
          out_i <= in_data;
          out_q <= in_data;
        end else begin
          unique case (phase)
            2'd0: begin out_i <= in_data; out_q <= '0;      end
            2'd1: begin out_i <= '0;      out_q <= in_data; end
            2'd2: begin out_i <= neg;     out_q <= '0;      end
            2'd3: begin out_i <= '0;      out_q <= neg;     end
          endcase
        end
      end
    end
  end
endmodule
