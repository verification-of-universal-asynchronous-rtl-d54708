// tb_uart_tx_rx: end-to-end check of the UART core at its default rate
// (DIV = 8). In loopback (loop_en high) it writes the three bytes of the
// original verification run (11100100, 11110000, 10101010) and 20 random
// bytes, each written once the transmitter is idle, and compares every byte
// coming out of the receiver with the one written; the time from the load
// pulse to rx_valid must be about 11 bit periods (the start bit leaves at
// the first tick, the stop bit is sampled at its centre). Then, with
// loop_en low, it sends a stream of back-to-back frames (wr_n held low) and
// reads them from the tx pin into the rx pin through the testbench, checks
// that reception ignores the tx line in that mode, and that an unread byte
// raises overrun_err.
module tb_uart_tx_rx;
  timeunit 1ns; timeprecision 1ps;
  import uart_pkg::*;
  localparam int DIV = 8;
  logic clk = 1'b0, rst_n = 1'b0, wr_n = 1'b1, rx_en = 1'b1, loop_en = 1'b1, rd = 1'b0;
  logic rx_pin, ext_connect = 1'b0;
  byte_t data_in = '0, data_out;
  logic tx_out, tx_busy, tx_loaded, rx_valid, rx_full, parity_err, frame_err, overrun_err;
  int checks = 0, failures = 0, cyc = 0, load_cyc = 0;
  byte_t got[$];
  int lat[$];

  always #50 clk = ~clk;
  assign rx_pin = ext_connect ? tx_out : 1'b1;

  uart_tx_rx dut (.clk, .rst_n, .wr_n, .data_in, .tx_out, .tx_busy, .tx_loaded,
                  .rx_en, .loop_en, .rx(rx_pin), .rd, .data_out, .rx_valid, .rx_full,
                  .parity_err, .frame_err, .overrun_err);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (tx_loaded) load_cyc = cyc;
    if (rst_n && rx_valid) begin got.push_back(data_out); lat.push_back(cyc - load_cyc); end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic read_byte();
    @(negedge clk); rd = 1'b1; @(negedge clk); rd = 1'b0;
  endtask

  initial begin
    byte_t sent[$];
    byte_t d;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (10) @(posedge clk);
    // loopback, one byte at a time
    for (int k = 0; k < 23; k++) begin
      d = (k == 0) ? 8'b11100100 : (k == 1) ? 8'b11110000 : (k == 2) ? 8'b10101010 : byte_t'($urandom);
      sent.push_back(d);
      @(negedge clk); data_in = d; wr_n = 1'b0;
      @(negedge clk); wr_n = 1'b1;
      wait (rx_valid); @(posedge clk); #1;
      check(got.size() == k + 1, "one byte per frame");
      check(got[k] == d, $sformatf("loopback byte %0d: got %b expected %b", k, got[k], d));
      check(!parity_err && !frame_err && !overrun_err, "no error flags");
      // load -> rx_valid: 10 ticks + half a bit + up to one bit of tick phase
      check(lat[k] >= 10 * DIV + DIV / 2 && lat[k] <= 11 * DIV + DIV / 2 + 4,
            $sformatf("latency %0d clocks", lat[k]));
      read_byte();
      wait (!tx_busy);
    end
    // external line: tx pin -> rx pin, back-to-back frames
    loop_en = 1'b0;
    ext_connect = 1'b0;
    @(negedge clk); data_in = 8'h77; wr_n = 1'b0;
    @(negedge clk); wr_n = 1'b1;
    repeat (14 * DIV) @(posedge clk);
    check(got.size() == 23, "receiver ignores tx when loop_en is low");
    ext_connect = 1'b1;
    repeat (2 * DIV) @(posedge clk);
    got.delete();
    fork
      begin
        @(negedge clk); data_in = 8'h3A; wr_n = 1'b0;
        for (int f = 1; f < 6; f++) begin
          do @(posedge clk); while (!tx_loaded);
          @(negedge clk); data_in = 8'h3A + 8'(f * 17);
        end
        do @(posedge clk); while (!tx_loaded);
        @(negedge clk); wr_n = 1'b1;
      end
      begin
        for (int f = 0; f < 6; f++) begin
          wait (rx_valid); @(posedge clk); #1; read_byte();
        end
      end
    join
    check(got.size() == 6, $sformatf("six back-to-back frames received (%0d)", got.size()));
    for (int f = 0; f < 6 && f < got.size(); f++)
      check(got[f] == 8'h3A + 8'(f * 17), $sformatf("stream byte %0d = %h", f, got[f]));
    // overrun: two frames, no read
    wait (!tx_busy);
    repeat (2 * DIV) @(posedge clk);
    @(negedge clk); data_in = 8'h01; wr_n = 1'b0;
    do @(posedge clk); while (!tx_loaded);
    @(negedge clk); data_in = 8'h02;
    do @(posedge clk); while (!tx_loaded);
    @(negedge clk); wr_n = 1'b1;
    wait (!tx_busy);
    repeat (2 * DIV) @(posedge clk);
    check(overrun_err && data_out == 8'h02, "overrun flagged, newest byte kept");
    read_byte();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
