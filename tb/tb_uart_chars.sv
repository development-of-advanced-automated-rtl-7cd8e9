`timescale 1ns/1ps
// tb_uart_chars: the UART experiment at full speed: characters 0 to 255 are
// sent five times at 19200 baud (100 MHz clock, default divisor) through
// uart_system with its serial output looped back to its input; every
// character must come back in order (1280 of 1280). The time per character
// must be 10 bit times of 16 x 326 cycles.
module tb_uart_chars;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, ok = 0;
  logic line, rd = 0, wr = 0, rx_empty, tx_full;
  logic [7:0] r_data = '0, w_data;
  logic [7:0] got [$];

  uart_system dut (.clk, .rst, .rs_232_rx(line), .rs_232_tx(line),
    .sys_r_data(r_data), .sys_w_data(w_data), .sys_rd_uart(rd), .sys_wr_uart(wr),
    .sys_rx_empty(rx_empty), .sys_tx_full(tx_full));

  always @(negedge clk) begin
    rd = !rst && !rx_empty;
    if (rd) got.push_back(w_data);
  end

  initial begin
    longint t0, t1;
    repeat (3) @(negedge clk); rst = 0;
    repeat (10) @(negedge clk);
    t0 = $time;
    fork
      for (int n = 0; n < 5 * 256; n++) begin
        while (tx_full) @(negedge clk);
        r_data = 8'(n); wr = 1;
        @(negedge clk); wr = 0;
      end
    join_none
    wait (got.size() == 5 * 256);
    t1 = $time;
    foreach (got[i]) if (got[i] == 8'(i)) ok++;
    checks++; if (ok != 5 * 256) begin failures++; $display("FAIL: %0d of 1280 correct", ok); end
    checks++;
    if ((t1 - t0) / 10 > 1280 * 10 * 16 * 326 || (t1 - t0) / 10 < 1279 * 10 * 16 * 326) begin
      failures++; $display("FAIL: took %0d cycles", (t1 - t0) / 10);
    end
    $display("success rate %0d/1280", ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (70_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
