// uart_lcd_top: the UART application system. Characters typed on a PC
// terminal arrive over an RS232 serial line, the UART receiver turns them
// into bytes and the LCD controller writes them to an HD44780 16x2 display.
// The UART transmitter is kept and brought out, so the same serial link can
// send bytes back to the PC, or, with loop_en high, into the core's own
// receiver for a self test.
//
// The receive hold register is read by the LCD controller: while it holds a
// byte (rx_full) the byte is offered to the display, and `rd` clears it when
// the controller takes it. A byte that arrived with a parity or framing
// error is dropped instead of displayed. If a second byte arrives while the
// display is still busy with the first (a write takes 40 us, a clear
// 1.64 ms), the receiver flags overrun_err and the newer byte replaces the
// older one. The receive status flags and data are also outputs.
//
// Parameters: DIV, system clocks per bit (8 by default, a 1.25 Mbit/s line
// at 10 MHz; 1042 gives 9600 baud), and CLK_HZ for the display's timing.
// The RS232 level shifter, the PC and the display are outside this design.
module uart_lcd_top
  import uart_pkg::*;
#(
  parameter int unsigned DIV    = 8,
  parameter int unsigned CLK_HZ = 10_000_000
) (
  input  logic       clk,
  input  logic       rst_n,
  // serial line
  input  logic       rx,
  output logic       tx,
  // transmit request
  input  logic       wr_n,
  input  byte_t      data_in,
  output logic       tx_busy,
  output logic       tx_loaded,
  // receive control and status
  input  logic       rx_en,
  input  logic       loop_en,
  output byte_t      data_out,
  output logic       rx_valid,
  output logic       rx_full,
  output logic       parity_err,
  output logic       frame_err,
  output logic       overrun_err,
  // HD44780 bus
  output logic       lcd_rs,
  output logic       lcd_rw,
  output logic       lcd_e,
  output logic [7:0] lcd_db,
  output logic       lcd_ready
);

  logic bad_byte, lcd_take, rd;

  uart_tx_rx #(.DIV(DIV)) u_uart (
    .clk         (clk),
    .rst_n       (rst_n),
    .wr_n        (wr_n),
    .data_in     (data_in),
    .tx_out      (tx),
    .tx_busy     (tx_busy),
    .tx_loaded   (tx_loaded),
    .rx_en       (rx_en),
    .loop_en     (loop_en),
    .rx          (rx),
    .rd          (rd),
    .data_out    (data_out),
    .rx_valid    (rx_valid),
    .rx_full     (rx_full),
    .parity_err  (parity_err),
    .frame_err   (frame_err),
    .overrun_err (overrun_err)
  );

  assign bad_byte = parity_err || frame_err;
  assign lcd_take = rx_full && !bad_byte && lcd_ready;
  assign rd       = lcd_take || (rx_full && bad_byte);

  lcd_ctrl #(.CLK_HZ(CLK_HZ)) u_lcd (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (rx_full && !bad_byte),
    .in_data  (data_out),
    .in_ready (lcd_ready),
    .lcd_rs   (lcd_rs),
    .lcd_rw   (lcd_rw),
    .lcd_e    (lcd_e),
    .lcd_db   (lcd_db)
  );

endmodule
