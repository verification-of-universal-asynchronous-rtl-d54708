// baud_gen: baud-rate generator, a frequency divider on the system clock.
//
// A counter runs from 0 to DIV-1 and wraps, so one bit period lasts DIV
// system clocks. `tick` is high for the one clock in which the counter holds
// DIV-1 (the last clock of a bit period); the transmitter shifts out its next
// bit on that edge. `mid_tick` is high for the clock in which the counter
// holds DIV/2-1, which the receiver uses to sample a bit at its centre.
// `clr` restarts the count at 0 on the next edge; the receiver uses it to
// align its own generator to the falling edge of a start bit.
//
// The default DIV = 8 follows the 3-bit count (000..111) and the one
// baud-clock pulse per wrap of the counter in the transmitter waveform of the
// original design, with a 10 MHz system clock: a 1.25 Mbit/s line. For a
// standard rate pick DIV = f_clk / baud, e.g. 1042 for 9600 baud at 10 MHz.
// Here the divider gives a one-clock enable rather than a derived clock, so
// all logic stays in the single system clock domain.
//
// Reset: rst_n low (asynchronous) clears the counter.
module baud_gen #(
  parameter int unsigned DIV = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        clr,
  output logic [$clog2(DIV > 1 ? DIV : 2)-1:0] count,
  output logic                        tick,
  output logic                        mid_tick
);

  localparam int unsigned CW = $clog2(DIV > 1 ? DIV : 2);
  localparam logic [CW-1:0] LAST = CW'(DIV - 1);
  localparam logic [CW-1:0] MID  = CW'((DIV / 2 > 0) ? DIV / 2 - 1 : 0);

  initial begin
    assert (DIV >= 2) else $error("baud_gen: DIV must be at least 2");
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             count <= '0;
    else if (clr)           count <= '0;
    else if (count == LAST) count <= '0;
    else                    count <= count + 1'b1;
  end

  assign tick     = (count == LAST);
  assign mid_tick = (count == MID);

endmodule
