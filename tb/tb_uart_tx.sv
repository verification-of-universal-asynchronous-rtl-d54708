// tb_uart_tx: checks the transmitter against an independently built frame.
// The testbench makes its own baud tick (one clock in every DIV = 8) and,
// after every tick, reads `tx`. For each byte it expects the start bit 0,
// the eight data bits LSB first, an even-parity bit computed here by
// counting ones, and the stop bit 1, each for exactly one bit period; the
// line must idle at 1 between frames. It also checks the hold register `df`
// against the value printed for byte 10111011 in the original waveform
// (01011101101), the load pulse, and that with wr_n held low frames follow
// each other back to back, one every 11 bit periods.

module tb_uart_tx;
  timeunit 1ns; timeprecision 1ps;
  import uart_pkg::*;
  localparam int DIV = 8;
  logic clk = 1'b0, rst_n = 1'b0, wr_n = 1'b1, tick;
  byte_t data = '0;
  logic tx, busy, loaded;
  frame_t df, data_frame;
  int checks = 0, failures = 0;
  int cyc = 0, last_load = -1;

  always #50 clk = ~clk;

  uart_tx dut (.clk, .rst_n, .wr_n, .data, .baud_tick(tick), .tx, .busy, .loaded, .df, .data_frame);

  // baud tick: high on the last clock of every DIV-clock period
  int bc = 0;
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    bc  <= (bc == DIV - 1) ? 0 : bc + 1;
  end
  assign tick = (bc == DIV - 1);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic bit [10:0] ref_bits(input byte_t d);  // index = send order
    bit [10:0] b; int ones = 0;
    b[0] = 1'b0;
    for (int i = 0; i < 8; i++) begin b[i+1] = d[i]; ones += d[i]; end
    b[9] = (ones % 2 == 1);
    b[10] = 1'b1;
    return b;
  endfunction

  // Wait for the next baud tick edge and return tx just after it.
  task automatic next_bit(output logic v);
    do @(posedge clk); while (!tick);
    @(posedge clk); #1;
    v = tx;
  endtask

  // Send one byte with a one-clock write and check it on the line.
  task automatic send_check(input byte_t d);
    logic v; bit [10:0] r;
    r = ref_bits(d);
    @(negedge clk); data = d; wr_n = 1'b0;
    @(posedge clk); #1;
    check(loaded, "loaded pulse after write");
    @(negedge clk); wr_n = 1'b1;
    for (int i = 0; i < 11; i++) begin
      next_bit(v);
      check(v == r[i], $sformatf("byte %b bit %0d: tx=%b expected %b", d, i, v, r[i]));
    end
    next_bit(v);
    check(v == 1'b1 && !busy, "line idles at 1 after the stop bit");
  endtask

  logic v;
  int load_times[$];
  always @(posedge clk) if (loaded) load_times.push_back(cyc);

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(tx == 1'b1 && !busy, "idle after reset");
    // paper examples: 10101011 (parity 1) and 10111011 (parity 0)
    send_check(8'b10101011);
    check(df == 11'b0_10101011_1_1, "df for 10101011");
    send_check(8'b10111011);
    check(df == 11'b01011101101, "df for 10111011 matches waveform value");
    for (int k = 0; k < 10; k++) send_check(byte_t'($urandom));
    // back-to-back with wr_n held low: 4 frames, expected continuous bits
    begin
      bit [43:0] exp_bits; byte_t d0, d1, d2, d3;
      d0 = 8'h55; d1 = 8'h0F; d2 = 8'hE4; d3 = 8'h81;
      exp_bits = {ref_bits(d3), ref_bits(d2), ref_bits(d1), ref_bits(d0)};
      load_times.delete();
      @(negedge clk); data = d0; wr_n = 1'b0;
      fork
        begin
          for (int i = 0; i < 44; i++) begin
            next_bit(v);
            check(v == exp_bits[i], $sformatf("back-to-back bit %0d", i));
          end
        end
        begin
          // change the byte after each load
          for (int f = 1; f < 4; f++) begin
            do @(posedge clk); while (!loaded);
            @(negedge clk); data = (f == 1) ? d1 : (f == 2) ? d2 : d3;
          end
          do @(posedge clk); while (!loaded);
          @(negedge clk); wr_n = 1'b1;
        end
      join
      check(load_times.size() >= 4, "four loads");
      // the first load follows the write, the later ones the 11th tick
      for (int f = 2; f < 4; f++)
        check(load_times[f] - load_times[f-1] == 11 * DIV,
              $sformatf("frame spacing %0d clocks, expected %0d", load_times[f] - load_times[f-1], 11 * DIV));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
