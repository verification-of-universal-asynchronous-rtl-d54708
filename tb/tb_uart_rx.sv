// tb_uart_rx: checks the receiver with frames generated by the testbench.
// Each frame starts at a random clock phase and every bit lasts DIV = 8
// clocks; a few frames are sent 1 clock per bit too slow or too fast over
// the frame to show the centre sampling tolerates it. Checked: the byte and
// the parity/framing flags for good frames (including the three bytes of
// the original loopback run: 11100100, 11110000, 10101010), for frames with
// a wrong parity bit and with a stop bit of 0, overrun when a byte is not
// read before the next one arrives, that a short low glitch is not taken as
// a start bit, that nothing is received while rx_en is low, and that
// rx_valid comes 10.5 bit periods (plus synchroniser delay) after the start
// edge.
module tb_uart_rx;
  timeunit 1ns; timeprecision 1ps;
  import uart_pkg::*;
  localparam int DIV = 8;
  localparam int BIT_NS = 100 * DIV;  // 10 MHz clock
  logic clk = 1'b0, rst_n = 1'b0, rx_en = 1'b1, rx = 1'b1, rd = 1'b0;
  byte_t data_out;
  logic rx_valid, rx_full, parity_err, frame_err, overrun_err, busy;
  frame_t data_frame;
  int checks = 0, failures = 0, cyc = 0;
  int valid_cnt = 0, last_valid_cyc = -1;

  always #50 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && rx_valid) begin valid_cnt++; last_valid_cyc = cyc; end
  end

  uart_rx #(.DIV(DIV)) dut (.clk, .rst_n, .rx_en, .rx, .rd, .data_out, .rx_valid, .rx_full,
                            .parity_err, .frame_err, .overrun_err, .busy, .data_frame);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic bit par(input byte_t d);
    int ones = 0;
    for (int i = 0; i < 8; i++) ones += d[i];
    return ones % 2;
  endfunction

  int start_cyc;
  // Drive one frame; bit_ns per bit; flip parity / stop on request.
  task automatic send(input byte_t d, input bit bad_par, input bit bad_stop, input int bit_ns);
    bit [10:0] b;
    b[0] = 0;
    for (int i = 0; i < 8; i++) b[i+1] = d[i];
    b[9] = par(d) ^ bad_par;
    b[10] = !bad_stop;
    repeat ($urandom_range(0, 7)) @(posedge clk);
    #($urandom_range(1, 99));  // asynchronous phase
    start_cyc = cyc;
    for (int i = 0; i < 11; i++) begin rx = b[i]; #(bit_ns); end
    rx = 1'b1;
  endtask

  task automatic do_read();
    @(negedge clk); rd = 1'b1; @(negedge clk); rd = 1'b0;
  endtask

  task automatic expect_byte(input byte_t d, input bit pe, input bit fe, input bit oe, input string tag);
    repeat (3 * DIV) @(posedge clk);
    #1;
    check(rx_full, {tag, ": rx_full"});
    check(data_out == d, $sformatf("%s: data_out=%b expected %b", tag, data_out, d));
    check(parity_err == pe, $sformatf("%s: parity_err=%b", tag, parity_err));
    check(frame_err == fe, $sformatf("%s: frame_err=%b", tag, frame_err));
    check(overrun_err == oe, $sformatf("%s: overrun_err=%b", tag, overrun_err));
  endtask

  initial begin
    byte_t d;
    int v0, lat;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (20) @(posedge clk);
    // transcript bytes and random bytes
    for (int k = 0; k < 23; k++) begin
      d = (k == 0) ? 8'b11100100 : (k == 1) ? 8'b11110000 : (k == 2) ? 8'b10101010 : byte_t'($urandom);
      v0 = valid_cnt;
      send(d, 0, 0, BIT_NS);
      // stop bit: last 8 clocks; rx_valid should already have come
      check(valid_cnt == v0 + 1, $sformatf("one rx_valid for frame %0d", k));
      lat = last_valid_cyc - start_cyc;
      check(lat >= (21 * DIV) / 2 && lat <= (21 * DIV) / 2 + 5,
            $sformatf("rx_valid %0d clocks after start edge", lat));
      expect_byte(d, 0, 0, 0, $sformatf("good %0d", k));
      do_read();
      #1 check(!rx_full, "rd clears rx_full");
    end
    // rate mismatch: sender 3 % fast and 3 % slow over a whole frame
    send(8'h3C, 0, 0, BIT_NS * 97 / 100); expect_byte(8'h3C, 0, 0, 0, "fast sender"); do_read();
    send(8'hC3, 0, 0, BIT_NS * 103 / 100); expect_byte(8'hC3, 0, 0, 0, "slow sender"); do_read();
    // parity error
    send(8'h5A, 1, 0, BIT_NS); expect_byte(8'h5A, 1, 0, 0, "bad parity"); do_read();
    // framing error, then let the line recover
    send(8'hA7, 0, 1, BIT_NS); expect_byte(8'hA7, 0, 1, 0, "bad stop"); do_read();
    repeat (2 * DIV) @(posedge clk);
    send(8'h12, 0, 0, BIT_NS); expect_byte(8'h12, 0, 0, 0, "after framing error"); do_read();
    // overrun: two bytes without a read in between
    send(8'h21, 0, 0, BIT_NS); expect_byte(8'h21, 0, 0, 0, "first of two");
    send(8'h43, 0, 0, BIT_NS); expect_byte(8'h43, 0, 0, 1, "overrun");
    do_read();
    #1 check(!overrun_err && !rx_full, "rd clears overrun");
    // glitch of 2 clocks: no frame
    v0 = valid_cnt;
    @(negedge clk); rx = 1'b0; repeat (2) @(negedge clk); rx = 1'b1;
    repeat (15 * DIV) @(posedge clk);
    check(valid_cnt == v0 && !busy, "glitch rejected");
    // disabled receiver
    rx_en = 1'b0;
    send(8'h99, 0, 0, BIT_NS);
    repeat (3 * DIV) @(posedge clk);
    check(valid_cnt == v0, "nothing received with rx_en low");
    rx_en = 1'b1;
    repeat (2 * DIV) @(posedge clk);
    send(8'h66, 0, 0, BIT_NS); expect_byte(8'h66, 0, 0, 0, "enabled again"); do_read();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
