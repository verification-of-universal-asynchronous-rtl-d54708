// uart_tx: UART transmitter (transmit hold register, transmit shift register
// and their control logic).
//
// While wr_n is low and the shift register is empty, the byte on `data` is
// framed and taken: the hold register `df` keeps the frame as
// {start, data[7:0], parity, stop} (written the way it reads on a waveform,
// start bit on the left), and the shift register `data_frame` is loaded with
// the same bits in send order, start bit in bit 0. On every baud tick the
// shift register drives its bit 0 onto `tx` and shifts right, filling with 0.
// After the eleventh tick the register is all zeros, which marks it empty:
// the stop bit then stays on the line until the next tick, and a new byte can
// be loaded on the next clock. With wr_n held low the transmitter therefore
// sends frames back to back, one every 11 bit periods, each carrying the
// value of `data` at the clock it was loaded. `loaded` pulses for one clock
// when a byte is taken, so a host can step to the next byte.
//
// Interface: wr_n is the active-low write request of the original design
// ("WR=0: transmit"), rst_n its active-low reset ("RST=0: off"); the
// parity is even (the XOR of the data bits), the data bits leave LSB first.
// `tx` idles at 1. Timing: the first bit appears on `tx` at the first baud
// tick after loading; every bit lasts one tick period.
// Own choices: the enable-style baud tick instead of a baud clock, the zero
// fill marking the empty register (as in the original waveform), and the
// `loaded` and `busy` status outputs.
module uart_tx
  import uart_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   wr_n,
  input  byte_t  data,
  input  logic   baud_tick,
  output logic   tx,
  output logic   busy,
  output logic   loaded,
  output frame_t df,
  output frame_t data_frame
);

  logic empty;
  assign empty = (data_frame == '0);
  assign busy  = !empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      df         <= '0;
      data_frame <= '0;
      tx         <= IDLE_LVL;
      loaded     <= 1'b0;
    end else begin
      loaded <= 1'b0;
      if (empty && !wr_n) begin
        df         <= {START_BIT, data, parity_of(data), STOP_BIT};
        data_frame <= build_frame(data);
        loaded     <= 1'b1;
      end else if (baud_tick) begin
        if (empty) begin
          tx <= IDLE_LVL;
        end else begin
          tx         <= data_frame[0];
          data_frame <= data_frame >> 1;
        end
      end
    end
  end

endmodule
