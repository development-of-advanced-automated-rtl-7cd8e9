`timescale 1ns/1ps
// tb_uart_baud_gen: checks that the default baud generator divides 100 MHz by
// 326 (16 x 19200 baud, rounded), that ticks are single-cycle and exactly
// 326 cycles apart, and that a 16-tick bit lasts 52.16 us (0.15 % slow).
module tb_uart_baud_gen;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic tick;
  uart_baud_gen dut (.clk, .rst, .tick);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int last = -1, cyc = 0, nt = 0, t16 = 0;
    check(dut.DIVISOR == 326, "divisor for 19200 baud at 100 MHz");
    repeat (3) @(posedge clk); rst = 0;
    while (nt < 40) begin
      @(posedge clk); #1; cyc++;
      if (tick) begin
        if (last >= 0) check(cyc - last == 326, $sformatf("tick spacing %0d", cyc - last));
        last = cyc; nt++;
        if (nt == 1) t16 = cyc;
        if (nt == 17) check(cyc - t16 == 16 * 326, "bit time of 16 ticks");
        @(posedge clk); #1; cyc++;
        check(!tick, "tick lasts one cycle");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
