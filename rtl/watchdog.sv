// watchdog: external configuration watchdog of the eight-channel receiver.
//
// The FPGA boots from a serial PROM that can be rewritten in the field, with
// a parallel PROM as the second image. After every configuration the
// watchdog counts clocks of its own 32.768 kHz oscillator. Software in the
// freshly loaded image must assert wd_disable before 2**(timeout_sel+1)
// cycles have passed (61 us up to 131,072 s). If it does not, the image is
// taken as broken: the watchdog switches the configuration source to the
// other PROM (sel_parallel and the mode pins) and drives PROG_B low for
// PROG_LEN cycles, which makes the FPGA reconfigure. Counting then starts
// again, so two broken images make it alternate between the PROMs.
// default_parallel (a jumper) chooses the PROM used after power-up and
// wd_enable (a jumper) turns the watchdog off altogether. fpga_prog_req lets
// the FPGA request a reload from the current PROM (PROG_B pulse without a
// switch), which also re-arms the watchdog.
//
// Timing: all in the watchdog clock domain; wd_disable and fpga_prog_req are
// sampled on its rising edge. The timeout is exact: PROG_B goes low on the
// 2**(timeout_sel+1)-th clock edge after counting starts.
// The power-of-two timeout range, the PROM switch, the PROG_B pulse and the
// jumper for the default PROM follow the original. The disable latch, the
// reload request and the mode-pin codes (Spartan-3A: 001 master serial SPI,
// 010 BPI up) are this design's choice.
module watchdog #(
  parameter int unsigned PROG_LEN = 1,          // PROG_B low time, clocks
  parameter logic [2:0]  MODE_SPI = 3'b001,     // mode pins for the serial PROM
  parameter logic [2:0]  MODE_BPI = 3'b010      // mode pins for the parallel PROM
) (
  input  logic       clk,              // 32.768 kHz watchdog oscillator
  input  logic       por,              // power-on reset, active high
  input  logic       wd_enable,        // jumper: 1 = watchdog active
  input  logic       default_parallel, // jumper: PROM used after power-up
  input  logic [4:0] timeout_sel,      // timeout = 2**(timeout_sel+1) clocks
  input  logic       wd_disable,       // from FPGA software: image is good
  input  logic       fpga_prog_req,    // from FPGA: reload from current PROM
  output logic       prog_b,           // to FPGA PROG_B, active low
  output logic       sel_parallel,     // 1: parallel PROM, 0: serial PROM
  output logic [2:0] mode,             // to FPGA configuration mode pins
  output logic       timed_out         // one-cycle strobe on a timeout
);
  localparam int unsigned PW = $clog2(PROG_LEN + 1);

  logic [32:0]   count;
  logic [32:0]   limit;
  logic          disabled;
  logic [PW-1:0] prog_cnt;

  assign limit = 33'(1) << (timeout_sel + 5'd1);
  assign prog_b = (prog_cnt == '0);
  assign mode   = sel_parallel ? MODE_BPI : MODE_SPI;

  always_ff @(posedge clk) begin
    if (por) begin
      count        <= '0;
      disabled     <= 1'b0;
      prog_cnt     <= '0;
      sel_parallel <= default_parallel;
      timed_out    <= 1'b0;
    end else begin
      timed_out <= 1'b0;
      if (prog_cnt != '0) begin
        // FPGA being reset: hold the counter until PROG_B is released.
        prog_cnt <= prog_cnt - 1'b1;
        count    <= '0;
      end else if (fpga_prog_req) begin
        prog_cnt <= PW'(PROG_LEN);
        count    <= '0;
        disabled <= 1'b0;
      end else if (wd_disable) begin
        disabled <= 1'b1;
      end else if (wd_enable && !disabled) begin
        if (count + 33'd1 == limit) begin
          count        <= '0;
          sel_parallel <= !sel_parallel;
          prog_cnt     <= PW'(PROG_LEN);
          timed_out    <= 1'b1;
        end else begin
          count <= count + 33'd1;
        end
      end
    end
  end
endmodule
