// uart_pkg: constants and helper functions shared by the UART transmitter,
// receiver and their testbenches.
//
// A character travels in an 11-bit frame: a start bit (0), eight data bits
// with the least significant bit first, an even-parity bit (the XOR of the
// data bits, so it is 1 when the byte holds an odd number of ones) and one
// stop bit (1). The line idles at 1.
//
// frame_t keeps the bits in the order they are sent: bit 0 is the start bit
// and leaves first, bit 10 is the stop bit and leaves last. That is the
// layout of both shift registers, which shift right.
package uart_pkg;

  localparam int unsigned DATA_BITS  = 8;
  localparam int unsigned FRAME_BITS = DATA_BITS + 3;  // start + data + parity + stop

  typedef logic [DATA_BITS-1:0]  byte_t;
  typedef logic [FRAME_BITS-1:0] frame_t;

  localparam logic START_BIT = 1'b0;
  localparam logic STOP_BIT  = 1'b1;
  localparam logic IDLE_LVL  = 1'b1;

  // Even parity: 1 when the byte holds an odd number of ones.
  function automatic logic parity_of(input byte_t d);
    return ^d;
  endfunction

  // Frame in send order (bit 0 first): {stop, parity, data, start}.
  function automatic frame_t build_frame(input byte_t d);
    return {STOP_BIT, parity_of(d), d, START_BIT};
  endfunction

endpackage
