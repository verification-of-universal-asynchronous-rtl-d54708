// tb_uart_baud_rates: runs the UART core in loopback at the standard rates
// the design is meant to cover, with a 10 MHz clock: 110, 9600, 115200 and
// 230400 bit/s, i.e. DIV = round(10 MHz / rate) = 90909, 1042, 87 and 43.
// For each rate three bytes are sent back to back (wr_n held low) and
// received; the testbench checks every byte and that successive frames are
// exactly 11 bit periods apart (11 * DIV clocks; 1.146 ms at 9600 baud,
// about 873 frames per second),
// and reports the rate error of the integer divider.
module tb_uart_baud_rates;
  timeunit 1ns; timeprecision 1ps;
  import uart_pkg::*;
  localparam int N = 4;
  localparam int RATE [N] = '{110, 9600, 115200, 230400};
  localparam int DIVS [N] = '{90909, 1042, 87, 43};
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, done = 0, cyc = 0;

  always #50 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  for (genvar g = 0; g < N; g++) begin : g_rate
    localparam int DIV = DIVS[g];
    logic wr_n = 1'b1, tx_out, tx_busy, tx_loaded, rx_valid, rx_full, pe, fe, oe, rd = 1'b0;
    byte_t data_in = '0, data_out;
    byte_t bytes [3] = '{8'b11100100, 8'b11110000, 8'b10101010};
    int rx_cyc[$];
    byte_t got[$];

    uart_tx_rx #(.DIV(DIV)) dut (.clk, .rst_n, .wr_n, .data_in, .tx_out, .tx_busy, .tx_loaded,
      .rx_en(1'b1), .loop_en(1'b1), .rx(1'b1), .rd, .data_out, .rx_valid, .rx_full,
      .parity_err(pe), .frame_err(fe), .overrun_err(oe));

    always @(posedge clk) if (rst_n && rx_valid) begin
      rx_cyc.push_back(cyc); got.push_back(data_out);
    end
    always @(posedge clk) rd <= rst_n && rx_valid;

    initial begin
      wait (rst_n);
      @(negedge clk); data_in = bytes[0]; wr_n = 1'b0;
      for (int f = 1; f < 3; f++) begin
        do @(posedge clk); while (!tx_loaded);
        @(negedge clk); data_in = bytes[f];
      end
      do @(posedge clk); while (!tx_loaded);
      @(negedge clk); wr_n = 1'b1;
      wait (got.size() == 3);
      for (int f = 0; f < 3; f++)
        check(got[f] == bytes[f], $sformatf("%0d baud: byte %0d = %b", RATE[g], f, got[f]));
      for (int f = 1; f < 3; f++)
        check(rx_cyc[f] - rx_cyc[f-1] == 11 * DIV,
              $sformatf("%0d baud: frame spacing %0d clocks, expected %0d", RATE[g], rx_cyc[f] - rx_cyc[f-1], 11 * DIV));
      check(!pe && !fe && !oe, $sformatf("%0d baud: no error flags", RATE[g]));
      $display("%0d baud: DIV=%0d, actual %0d bit/s, frame %0d ns", RATE[g], DIV, 10_000_000 / DIV, 11 * DIV * 100);
      done++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done == N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
