`timescale 1ns/1ps
// tb_uart_system: uart_system with rs_232_tx looped back to rs_232_rx
// (divisor 4, 64 cycles per bit). A burst of 40 bytes written as fast as
// sys_tx_full allows must come back in order through the receive FIFO;
// the transmit FIFO must fill up at least once (sys_tx_full), and the
// transmitter must send back-to-back frames (10 bit times per byte).
module tb_uart_system;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic line, rd = 0, wr = 0, rx_empty, tx_full;
  logic [7:0] r_data = '0, w_data;
  logic [7:0] sent [$], got [$];
  int n_full = 0;

  uart_system #(.DIVISOR(4)) dut (.clk, .rst, .rs_232_rx(line), .rs_232_tx(line),
    .sys_r_data(r_data), .sys_w_data(w_data), .sys_rd_uart(rd), .sys_wr_uart(wr),
    .sys_rx_empty(rx_empty), .sys_tx_full(tx_full));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reader: pop whenever data is present
  always @(negedge clk) begin
    rd = !rst && !rx_empty;
    if (rd) got.push_back(w_data);
  end

  initial begin
    int t0, t1;
    repeat (3) @(negedge clk); rst = 0;
    repeat (10) @(negedge clk);
    t0 = $time;
    for (int i = 0; i < 40; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      while (tx_full) begin n_full++; @(negedge clk); end
      r_data = v; wr = 1; sent.push_back(v);
      @(negedge clk); wr = 0;
    end
    wait (got.size() == 40);
    t1 = $time;
    for (int i = 0; i < 40; i++) check(got[i] == sent[i], $sformatf("byte %0d", i));
    check(n_full > 0, "transmit FIFO filled up");
    // 40 frames of 640 cycles back to back; the last byte is taken at the
    // centre of its stop bit
    check((t1 - t0) / 10 >= 40 * 640 - 64 && (t1 - t0) / 10 < 41 * 640,
          $sformatf("40 bytes took %0d cycles", (t1 - t0) / 10));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
