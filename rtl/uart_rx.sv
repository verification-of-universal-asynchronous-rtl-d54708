// uart_rx: UART receiver (receive shift register, receive hold register and
// their control logic, with parity, framing and overrun detection).
//
// The serial input is asynchronous to the clock, so it first passes a
// two-flop synchroniser. While idle and enabled (rx_en high, the original
// design's "WR=1: receive"), a falling edge of the line marks the start of a
// frame: the receiver restarts its own baud_gen so that its `mid_tick` falls
// in the centre of every bit, and from then on it samples the line once per
// bit period. It resynchronises only on the start edge, so the sender's rate
// must match to within a fraction of a bit over the frame. If the start bit
// is no longer low at its centre the edge is taken as a glitch and the
// receiver returns to idle. Each sample enters the 11-bit shift register
// `data_frame` from the top and moves right, so after eleven samples bit 0
// holds the start bit, bits 8..1 the byte (LSB received first), bit 9 the
// parity bit and bit 10 the stop bit.
//
// At the centre of the stop bit the byte is copied into the hold register
// `data_out`, `rx_valid` pulses for one clock and `rx_full` is set; a
// one-clock `rd` pulse from the reader clears `rx_full`. With the byte come
// three flags: parity_err (the parity bit is not the XOR of the data bits),
// frame_err (the stop bit is 0) and overrun_err (the previous byte had not
// been read and has been overwritten). parity_err and frame_err describe the
// byte in the hold register; overrun_err stays set until the next `rd`.
// The receiver is ready for the next start edge right after the stop-bit
// sample, so back-to-back frames are received.
//
// Timing: the stop bit is sampled 10.5 bit periods after the start edge on
// the pin (the synchroniser and edge detector add about three clocks), and
// `rx_valid` follows one clock after that sample.
// Own choices: the synchroniser, centre sampling with a restarted divider,
// glitch rejection, the rd/rx_full handshake and the flag semantics.
module uart_rx
  import uart_pkg::*;
#(
  parameter int unsigned DIV = 8
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   rx_en,
  input  logic   rx,
  input  logic   rd,
  output byte_t  data_out,
  output logic   rx_valid,
  output logic   rx_full,
  output logic   parity_err,
  output logic   frame_err,
  output logic   overrun_err,
  output logic   busy,
  output frame_t data_frame
);

  typedef enum logic [0:0] {RX_IDLE, RX_RECV} rx_state_t;

  rx_state_t state;
  logic [1:0] sync;
  logic       rx_s, rx_prev;
  logic [3:0] nbits;
  logic       start_edge, sample;
  logic       mid_tick, unused_tick;
  logic [$clog2(DIV > 1 ? DIV : 2)-1:0] unused_count;
  frame_t     next_frame;

  assign rx_s       = sync[1];
  assign start_edge = (state == RX_IDLE) && rx_en && rx_prev && !rx_s;
  assign busy       = (state == RX_RECV);
  assign sample     = (state == RX_RECV) && mid_tick;
  assign next_frame = {rx_s, data_frame[FRAME_BITS-1:1]};

  baud_gen #(.DIV(DIV)) u_baud (
    .clk      (clk),
    .rst_n    (rst_n),
    .clr      (start_edge),
    .count    (unused_count),
    .tick     (unused_tick),
    .mid_tick (mid_tick)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync    <= {2{IDLE_LVL}};
      rx_prev <= IDLE_LVL;
    end else begin
      sync    <= {sync[0], rx};
      rx_prev <= rx_s;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= RX_IDLE;
      nbits       <= '0;
      data_frame  <= '0;
      data_out    <= '0;
      rx_valid    <= 1'b0;
      rx_full     <= 1'b0;
      parity_err  <= 1'b0;
      frame_err   <= 1'b0;
      overrun_err <= 1'b0;
    end else begin
      rx_valid <= 1'b0;
      if (rd) begin
        rx_full     <= 1'b0;
        overrun_err <= 1'b0;
      end
      unique case (state)
        RX_IDLE: begin
          nbits <= '0;
          if (start_edge) state <= RX_RECV;
        end
        RX_RECV: begin
          if (sample) begin
            data_frame <= next_frame;
            nbits      <= nbits + 1'b1;
            if (nbits == 4'd0 && rx_s != START_BIT) begin
              state <= RX_IDLE;            // glitch, not a start bit
            end else if (nbits == 4'(FRAME_BITS - 1)) begin
              state       <= RX_IDLE;
              data_out    <= next_frame[DATA_BITS:1];
              parity_err  <= parity_of(next_frame[DATA_BITS:1]) != next_frame[DATA_BITS+1];
              frame_err   <= next_frame[FRAME_BITS-1] != STOP_BIT;
              rx_valid    <= 1'b1;
              rx_full     <= 1'b1;
              if (rx_full && !rd) overrun_err <= 1'b1;
            end
          end
        end
        default: state <= RX_IDLE;
      endcase
    end
  end

  // The reader may only acknowledge a byte that is there.
  a_rd_when_full: assert property (@(posedge clk) disable iff (!rst_n) rd |-> rx_full)
    else $error("uart_rx: rd without a byte in the hold register");

endmodule
