// tb_baud_gen: checks the baud-rate generator at DIV = 8 (the default) and
// DIV = 5. For each it measures the distance between successive ticks (must
// be DIV clocks), the position of mid_tick inside the period (DIV/2 clocks
// after the wrap) and that clr restarts the count so that the next mid_tick
// comes DIV/2 clocks after clr and the next tick DIV clocks after it.

module tb_baud_gen;
  timeunit 1ns; timeprecision 1ps;
  logic clk = 1'b0, rst_n = 1'b0, clr8 = 1'b0, clr5 = 1'b0;
  logic [2:0] cnt8;
  logic [2:0] cnt5;
  logic tick8, mid8, tick5, mid5;
  int checks = 0, failures = 0;

  always #50 clk = ~clk;  // 10 MHz

  baud_gen u8 (.clk, .rst_n, .clr(clr8), .count(cnt8), .tick(tick8), .mid_tick(mid8));
  baud_gen #(.DIV(5)) u5 (.clk, .rst_n, .clr(clr5), .count(cnt5), .tick(tick5), .mid_tick(mid5));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Measure tick and mid spacing for n periods.
  task automatic measure(input int div, input int periods);
    int last_tick, last_mid, cyc;
    bit t, m;
    last_tick = -1; last_mid = -1; cyc = 0;
    repeat (periods * div) begin
      @(posedge clk); #1;
      t = (div == 8) ? tick8 : tick5;
      m = (div == 8) ? mid8 : mid5;
      if (t) begin
        if (last_tick >= 0) check(cyc - last_tick == div, $sformatf("DIV=%0d tick spacing %0d", div, cyc - last_tick));
        last_tick = cyc;
      end
      if (m) begin
        if (last_tick >= 0) check(cyc - last_tick == div / 2, $sformatf("DIV=%0d mid after tick %0d", div, cyc - last_tick));
        last_mid = cyc;
      end
      cyc++;
    end
    check(last_tick >= 0 && last_mid >= 0, "ticks seen");
  endtask

  task automatic check_clr(input int div);
    int cyc;
    bit got_mid, got_tick;
    @(posedge clk); #1;
    if (div == 8) clr8 = 1'b1; else clr5 = 1'b1;
    @(posedge clk); #1;
    clr8 = 1'b0; clr5 = 1'b0;
    // count is now 0; cycle 0 is this clock
    got_mid = 0; got_tick = 0;
    for (cyc = 0; cyc < div; cyc++) begin
      if (((div == 8) ? mid8 : mid5) && !got_mid) begin
        check(cyc == div / 2 - 1, $sformatf("DIV=%0d mid %0d clocks after clr", div, cyc)); got_mid = 1;
      end
      if (((div == 8) ? tick8 : tick5) && !got_tick) begin
        check(cyc == div - 1, $sformatf("DIV=%0d tick %0d clocks after clr", div, cyc)); got_tick = 1;
      end
      @(posedge clk); #1;
    end
    check(got_mid && got_tick, "after clr both ticks seen");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    check(cnt8 == 0 && cnt5 == 0, "count zero after reset");
    measure(8, 20);
    measure(5, 20);
    repeat (3) @(posedge clk);
    check_clr(8);
    repeat (2) @(posedge clk);
    check_clr(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
