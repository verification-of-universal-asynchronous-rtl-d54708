// tb_lcd_ctrl: checks the HD44780 driver from its bus pins. The testbench
// runs the controller with a 1 MHz clock (one clock per microsecond, so the
// data-sheet times are easy to count) and a shortened 200 us power-up wait.
// It records every write (RS and DB at the falling edge of E) and checks:
// the power-up wait, the init commands 38 0C 01 06 in order, 34 characters
// written as data in order, the cursor moves 0xC0 after the 16th and 0x80
// after the 32nd character, E high for at least 250 ns, RS/DB stable while E
// is high, R/W always 0, and at least 40 us (1.64 ms after clear) between
// the falling edge of E and the next rising edge.
module tb_lcd_ctrl;
  timeunit 1ns; timeprecision 1ps;
  localparam int CLK_HZ = 1_000_000, PWR_US = 200;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, in_ready;
  logic [7:0] in_data = '0;
  logic lcd_rs, lcd_rw, lcd_e;
  logic [7:0] lcd_db;
  int checks = 0, failures = 0, cyc = 0;
  logic e_q = 1'b0, rs_h; logic [7:0] db_h;
  int rise_cyc = 0, fall_cyc = -1;
  logic [8:0] writes[$];   // {rs, db}
  logic [7:0] last_cmd = '0;
  bit started = 0;

  always #500 clk = ~clk;  // 1 MHz

  lcd_ctrl #(.CLK_HZ(CLK_HZ), .POWERUP_US(PWR_US)) dut (
    .clk, .rst_n, .in_valid, .in_data, .in_ready, .lcd_rs, .lcd_rw, .lcd_e, .lcd_db);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (lcd_rw !== 1'b0) check(0, "R/W must stay 0");
    if (lcd_e && !e_q) begin   // rising
      rise_cyc = cyc; rs_h = lcd_rs; db_h = lcd_db;
      if (!started) begin check(cyc >= PWR_US, $sformatf("power-up wait %0d us", cyc)); started = 1; end
      if (fall_cyc >= 0) begin
        int need;
        need = (last_cmd == 8'h01) ? 1640 : 40;
        check(cyc - fall_cyc >= need, $sformatf("gap %0d us after %h, need %0d", cyc - fall_cyc, last_cmd, need));
      end
    end
    if (lcd_e && e_q) check(lcd_rs == rs_h && lcd_db == db_h, "RS/DB stable while E high");
    if (!lcd_e && e_q) begin   // falling: write happens
      check(cyc - rise_cyc >= 1, "E high >= 250 ns");
      writes.push_back({lcd_rs, lcd_db});
      last_cmd = lcd_rs ? 8'h00 : lcd_db;
      fall_cyc = cyc;
    end
    e_q <= lcd_e;
  end

  initial begin
    logic [8:0] exp[$];
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    exp = '{9'h038, 9'h00C, 9'h001, 9'h006};
    for (int k = 0; k < 34; k++) begin
      logic [7:0] ch;
      ch = 8'h41 + 8'(k % 26);
      exp.push_back({1'b1, ch});
      if (k == 15) exp.push_back(9'h0C0);
      if (k == 31) exp.push_back(9'h080);
      @(negedge clk); in_valid = 1'b1; in_data = ch;
      do @(posedge clk); while (!in_ready);
      @(negedge clk); in_valid = 1'b0;
      repeat ($urandom_range(0, 30)) @(posedge clk);
    end
    wait (in_ready);
    repeat (5) @(posedge clk);
    check(writes.size() == exp.size(), $sformatf("%0d writes, expected %0d", writes.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < writes.size(); i++)
      check(writes[i] == exp[i], $sformatf("write %0d: rs=%b db=%h expected rs=%b db=%h",
                                           i, writes[i][8], writes[i][7:0], exp[i][8], exp[i][7:0]));
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
