// tb_uart_lcd_top: end-to-end test of the whole system with every parameter
// at its default (10 MHz clock, DIV = 8, full HD44780 power-up and command
// times). The testbench plays the PC on the serial line and watches the
// display bus, recording each write at the falling edge of E.
//
// Scenario: the display initialises (38 0C 01 06); 20 characters go round
// the loopback (wr_n -> tx -> receiver -> display); 10 characters come in on
// the rx pin from the testbench's own transmitter; a frame with a wrong
// parity bit and one with a 0 stop bit are rejected (flags set, nothing
// displayed); a burst of three back-to-back frames arrives while the
// display is still busy, so the middle byte is overwritten (overrun) and
// only the first and last are shown; finally two bytes are sent out on the
// tx pin and decoded by the testbench. Each of these mechanisms is counted
// and must happen at least once; the display must also have moved to line 2
// after the 16th character and back to line 1 after the 32nd. The full
// list of display writes is compared with the expected one.
module tb_uart_lcd_top;
  timeunit 1ns; timeprecision 1ps;
  import uart_pkg::*;
  localparam int DIV = 8;            // the top's default
  localparam int BIT_NS = 100 * DIV; // 10 MHz clock
  logic clk = 1'b0, rst_n = 1'b0, rx = 1'b1, wr_n = 1'b1, rx_en = 1'b1, loop_en = 1'b1;
  byte_t data_in = '0, data_out;
  logic tx, tx_busy, tx_loaded, rx_valid, rx_full, parity_err, frame_err, overrun_err;
  logic lcd_rs, lcd_rw, lcd_e, lcd_ready;
  logic [7:0] lcd_db;
  int checks = 0, failures = 0;
  logic e_q = 1'b0;
  logic [8:0] writes[$], exp[$];
  int n_chars = 0;
  int m_init = 0, m_loop = 0, m_ext = 0, m_par = 0, m_frm = 0, m_ovr = 0, m_line2 = 0, m_line1 = 0, m_txpin = 0;

  always #50 clk = ~clk;

  uart_lcd_top dut (
    .clk, .rst_n, .rx, .tx, .wr_n, .data_in, .tx_busy, .tx_loaded, .rx_en, .loop_en,
    .data_out, .rx_valid, .rx_full, .parity_err, .frame_err, .overrun_err,
    .lcd_rs, .lcd_rw, .lcd_e, .lcd_db, .lcd_ready);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (!lcd_e && e_q) writes.push_back({lcd_rs, lcd_db});
    e_q <= lcd_e;
    if (rx_valid && parity_err) m_par++;
    if (rx_valid && frame_err) m_frm++;
    if (rx_valid && overrun_err) m_ovr++;
  end

  function automatic bit par(input byte_t d);
    int ones = 0;
    for (int i = 0; i < 8; i++) ones += d[i];
    return ones % 2;
  endfunction

  // expected display write for a shown character, with the cursor moves
  function automatic void expect_char(input byte_t ch);
    exp.push_back({1'b1, ch});
    n_chars++;
    if (n_chars % 32 == 16) exp.push_back(9'h0C0);
    if (n_chars % 32 == 0)  exp.push_back(9'h080);
  endfunction

  // the PC's transmitter on the rx pin
  task automatic pc_send(input byte_t d, input bit bad_par, input bit bad_stop);
    bit [10:0] b;
    b[0] = 0;
    for (int i = 0; i < 8; i++) b[i+1] = d[i];
    b[9] = par(d) ^ bad_par;
    b[10] = !bad_stop;
    #($urandom_range(1, 99));
    for (int i = 0; i < 11; i++) begin rx = b[i]; #(BIT_NS); end
    rx = 1'b1;
  endtask

  task automatic wait_display_idle();
    repeat (2) @(posedge clk);
    while (rx_full || !lcd_ready) @(posedge clk);
  endtask

  initial begin
    byte_t d;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    exp = '{9'h038, 9'h00C, 9'h001, 9'h006};
    wait (lcd_ready);
    if (writes.size() == 4) m_init++;
    // 1. loopback
    for (int k = 0; k < 20; k++) begin
      d = 8'h61 + 8'(k);
      expect_char(d);
      @(negedge clk); data_in = d; wr_n = 1'b0;
      @(negedge clk); wr_n = 1'b1;
      wait (rx_valid); @(posedge clk); #1;
      if (data_out == d) m_loop++;
      wait_display_idle();
    end
    // 2. characters from the PC on the rx pin
    loop_en = 1'b0;
    for (int k = 0; k < 10; k++) begin
      d = 8'h30 + 8'(k);
      expect_char(d);
      pc_send(d, 0, 0);   // the byte is in the hold register by the stop bit's end
      if (data_out == d) m_ext++;
      wait_display_idle();
    end
    // 3. rejected frames
    pc_send(8'h45, 1, 0);
    wait_display_idle();
    pc_send(8'h46, 0, 1);
    #(2 * BIT_NS);
    wait_display_idle();
    d = 8'h47; expect_char(d); pc_send(d, 0, 0); wait_display_idle();
    // 4. overrun: three frames back to back while the display is busy
    expect_char(8'h48);
    expect_char(8'h4A);
    pc_send(8'h48, 0, 0);
    pc_send(8'h49, 0, 0);
    pc_send(8'h4A, 0, 0);
    wait_display_idle();
    // 5. two bytes out on the tx pin, decoded here
    for (int k = 0; k < 2; k++) begin
      byte_t got; bit [10:0] b;
      d = (k == 0) ? 8'hA5 : 8'h3C;
      @(negedge clk); data_in = d; wr_n = 1'b0;
      @(negedge clk); wr_n = 1'b1;
      wait (tx == 1'b0);
      #(BIT_NS / 2);
      for (int i = 0; i < 11; i++) begin b[i] = tx; #(BIT_NS); end
      got = b[8:1];
      if (b[0] == 0 && got == d && b[9] == par(d) && b[10] == 1) m_txpin++;
      else check(0, $sformatf("tx pin frame %b for %h", b, d));
    end
    repeat (100) @(posedge clk);
    // compare
    check(writes.size() == exp.size(), $sformatf("%0d display writes, expected %0d", writes.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < writes.size(); i++)
      check(writes[i] == exp[i], $sformatf("display write %0d: %h expected %h", i, writes[i], exp[i]));
    foreach (writes[i]) begin
      if (writes[i] == 9'h0C0) m_line2++;
      if (writes[i] == 9'h080) m_line1++;
    end
    $display("mechanisms: init=%0d loopback=%0d rx_pin=%0d parity_err=%0d frame_err=%0d overrun=%0d line2=%0d line1=%0d tx_pin=%0d",
             m_init, m_loop, m_ext, m_par, m_frm, m_ovr, m_line2, m_line1, m_txpin);
    check(m_init == 1, "display initialised");
    check(m_loop == 20, "loopback characters");
    check(m_ext == 10, "rx pin characters");
    check(m_par >= 1, "parity error seen");
    check(m_frm >= 1, "framing error seen");
    check(m_ovr >= 1, "overrun seen");
    check(m_line2 >= 1, "move to line 2");
    check(m_line1 >= 1, "move back to line 1");
    check(m_txpin == 2, "tx pin frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
