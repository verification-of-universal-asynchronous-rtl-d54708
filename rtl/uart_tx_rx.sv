// uart_tx_rx: UART core, a baud-rate generator shared by a transmitter and a
// receiver.
//
// The free-running baud_gen paces the transmitter; the receiver keeps its own
// copy of the divider, restarted on each start edge, so that it samples bits
// at their centres whatever the phase of the incoming line. Both run at the
// same rate, DIV system clocks per bit.
//
// The receiver listens either to the `rx` pin or, with loop_en high, to the
// core's own `tx_out`: the loopback that sends a byte from `data_in` through
// the serial line and back to `data_out`, which is how the core is checked
// end to end. wr_n (active low) asks the transmitter to send `data_in`;
// rx_en enables reception; `rd` acknowledges the byte in the receive hold
// register. Timing: a frame is 11 bit periods (88 clocks at DIV = 8); in
// loopback a byte written while the line is idle reaches `data_out` about
// 11 bit periods after it is loaded.
// Own choices: the loop_en switch and the status outputs brought out.
module uart_tx_rx
  import uart_pkg::*;
#(
  parameter int unsigned DIV = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  // transmit side
  input  logic  wr_n,
  input  byte_t data_in,
  output logic  tx_out,
  output logic  tx_busy,
  output logic  tx_loaded,
  // receive side
  input  logic  rx_en,
  input  logic  loop_en,
  input  logic  rx,
  input  logic  rd,
  output byte_t data_out,
  output logic  rx_valid,
  output logic  rx_full,
  output logic  parity_err,
  output logic  frame_err,
  output logic  overrun_err
);

  logic   baud_tick, unused_mid;
  logic [$clog2(DIV > 1 ? DIV : 2)-1:0] unused_count;
  logic   rx_line, unused_rx_busy;
  frame_t unused_df, unused_tx_frame, unused_rx_frame;

  baud_gen #(.DIV(DIV)) u_baud (
    .clk      (clk),
    .rst_n    (rst_n),
    .clr      (1'b0),
    .count    (unused_count),
    .tick     (baud_tick),
    .mid_tick (unused_mid)
  );

  uart_tx u_tx (
    .clk        (clk),
    .rst_n      (rst_n),
    .wr_n       (wr_n),
    .data       (data_in),
    .baud_tick  (baud_tick),
    .tx         (tx_out),
    .busy       (tx_busy),
    .loaded     (tx_loaded),
    .df         (unused_df),
    .data_frame (unused_tx_frame)
  );

  assign rx_line = loop_en ? tx_out : rx;

  uart_rx #(.DIV(DIV)) u_rx (
    .clk         (clk),
    .rst_n       (rst_n),
    .rx_en       (rx_en),
    .rx          (rx_line),
    .rd          (rd),
    .data_out    (data_out),
    .rx_valid    (rx_valid),
    .rx_full     (rx_full),
    .parity_err  (parity_err),
    .frame_err   (frame_err),
    .overrun_err (overrun_err),
    .busy        (unused_rx_busy),
    .data_frame  (unused_rx_frame)
  );

endmodule
