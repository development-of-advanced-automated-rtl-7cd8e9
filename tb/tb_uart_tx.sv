`timescale 1ns/1ps
// tb_uart_tx: sends bytes through uart_tx (tick every 4 cycles, 64 cycles per
// bit) and decodes the line independently: start bit low, eight data bits
// LSB first, stop bit high, each exactly 64 cycles long; busy covers the
// whole frame; the line idles high.
module tb_uart_tx;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic tick, start = 0, busy, tx;
  logic [7:0] data = '0;

  uart_baud_gen #(.DIVISOR(4)) u_b (.clk, .rst, .tick);
  uart_tx dut (.clk, .rst, .tick, .start, .data, .busy, .tx);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    repeat (20) @(negedge clk);
    check(tx == 1, "idle high");
    // exact bit-centre decode of a few frames
    for (int n = 0; n < 20; n++) begin
      logic [7:0] v, r;
      v = 8'($urandom);
      wait (!busy); @(negedge clk); data = v; start = 1;
      @(negedge clk); start = 0;
      while (tx) @(negedge clk);           // start edge
      repeat (32) @(negedge clk);
      check(tx == 0, "start bit centre");
      for (int i = 0; i < 8; i++) begin repeat (64) @(negedge clk); r[i] = tx; end
      repeat (64) @(negedge clk);
      check(tx == 1 && busy, "stop bit centre, still busy");
      check(r == v, $sformatf("sent %h decoded %h", v, r));
      repeat (40) @(negedge clk);
      check(!busy && tx, "frame over, idle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
