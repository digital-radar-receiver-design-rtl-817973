// out_formatter: eight-channel output word bus.
//
// The four decimation filters each deliver, per decimated sample instant,
// four words in the order I(2f), Q(2f), I(2f+1), Q(2f+1) (filter f serves
// channels 2f and 2f+1). The words are collected in a write bank of eight
// I/Q pairs. When all 16 values of one instant are in, the bank is copied to
// a read bank together with the current trigger level, and the eight
// channels are put on the 32-bit bus in order 0..7, one word per bus period.
// Word layout (MSB first): trigger, 3-bit channel, 14-bit I, 14-bit Q.
//
// Bus timing: the bus runs at a quarter of the filter clock (40 MHz from
// 160 MHz, one word every 25 ns). bus_clk is generated here from a 2-bit
// counter; bus_data and bus_valid change while bus_clk is low and are stable
// around its rising edge, where the receiving side samples them. With 5 MSPS
// per channel the eight words of an instant exactly fill the 200 ns until
// the next instant. bus_valid marks real words (low before the first
// instant and whenever no bank is waiting).
// The word layout, the channel order and the 25 ns word period follow the
// original; bus_clk phase, bus_valid and the double-buffered banks are this
// design's choice.
module out_formatter
  import rx_pkg::*;
#(
  parameter int unsigned NFILT = 4
) (
  input  logic      clk,                 // filter clock
  input  logic      rst,                 // synchronous, active high
  input  logic      f_valid [NFILT],
  input  logic [1:0] f_chan [NFILT],     // stream: 0 I(2f), 1 Q(2f), 2 I(2f+1), 3 Q(2f+1)
  input  sample_t   f_data  [NFILT],
  input  logic      trig,                // aligned trigger level
  output logic      bus_clk,
  output out_word_t bus_data,
  output logic      bus_valid,
  output logic      overrun              // sticky: a bank was overwritten before it was sent
);
  localparam int unsigned NCH = 2 * NFILT;

  sample_t  wr_i [NCH], wr_q [NCH];
  sample_t  rd_i [NCH], rd_q [NCH];
  logic [2*NCH-1:0] got;          // which of the 16 values of this instant are in
  logic [2*NCH-1:0] got_next;
  logic     rd_full;              // read bank holds an instant not yet started
  logic     rd_trig;
  logic     sending;
  logic [2:0] ch;                 // channel being sent
  logic [1:0] div;

  always_comb begin
    got_next = got;
    for (int f = 0; f < NFILT; f++)
      if (f_valid[f]) got_next[4*f + int'(f_chan[f])] = 1'b1;
  end

  assign bus_clk = div[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      got       <= '0;
      rd_full   <= 1'b0;
      rd_trig   <= 1'b0;
      sending   <= 1'b0;
      ch        <= '0;
      div       <= '0;
      bus_data  <= '0;
      bus_valid <= 1'b0;
      overrun   <= 1'b0;
      for (int c = 0; c < NCH; c++) begin
        wr_i[c] <= '0; wr_q[c] <= '0; rd_i[c] <= '0; rd_q[c] <= '0;
      end
    end else begin
      div <= div + 2'd1;

      // Collect filter outputs.
      for (int f = 0; f < NFILT; f++) begin
        if (f_valid[f]) begin
          unique case (f_chan[f])
            2'd0: wr_i[2*f]   <= f_data[f];
            2'd1: wr_q[2*f]   <= f_data[f];
            2'd2: wr_i[2*f+1] <= f_data[f];
            2'd3: wr_q[2*f+1] <= f_data[f];
          endcase
        end
      end

      if (&got_next) begin
        // Instant complete: hand the bank over (the last values bypass wr_*).
        got <= '0;
        for (int c = 0; c < NCH; c++) begin
          rd_i[c] <= wr_i[c];
          rd_q[c] <= wr_q[c];
        end
        for (int f = 0; f < NFILT; f++) begin
          if (f_valid[f]) begin
            unique case (f_chan[f])
              2'd0: rd_i[2*f]   <= f_data[f];
              2'd1: rd_q[2*f]   <= f_data[f];
              2'd2: rd_i[2*f+1] <= f_data[f];
              2'd3: rd_q[2*f+1] <= f_data[f];
            endcase
          end
        end
        rd_trig <= trig;
        if (rd_full) overrun <= 1'b1;
        rd_full <= 1'b1;
      end else begin
        got <= got_next;
      end

      // One bus word per four filter clocks, updated while bus_clk is low.
      if (div == 2'd3) begin
        if (sending && ch != 3'(NCH - 1)) begin
          ch        <= ch + 3'd1;
          bus_data  <= '{trig: rd_trig, chan: ch + 3'd1, i: rd_i[ch + 3'd1], q: rd_q[ch + 3'd1]};
          bus_valid <= 1'b1;
        end else if (rd_full && !(&got_next)) begin
          sending   <= 1'b1;
          rd_full   <= 1'b0;
          ch        <= 3'd0;
          bus_data  <= '{trig: rd_trig, chan: 3'd0, i: rd_i[0], q: rd_q[0]};
          bus_valid <= 1'b1;
        end else begin
          sending   <= 1'b0;
          bus_valid <= 1'b0;
        end
      end
    end
  end
endmodule
