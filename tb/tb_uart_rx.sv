`timescale 1ns/1ps
// tb_uart_rx: drives serial 8N1 frames into uart_rx (tick every 4 cycles,
// so one bit is 64 cycles) and checks every received byte, including all
// 256 values, frames sent 2 % fast and slow, a short glitch (no byte), and a
// frame with a low stop bit (dropped, frame_err).
module tb_uart_rx;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic tick, rx = 1, valid, ferr;
  logic [7:0] data;
  logic [7:0] got [$];
  int n_ferr = 0;

  uart_baud_gen #(.DIVISOR(4)) u_b (.clk, .rst, .tick);
  uart_rx dut (.clk, .rst, .tick, .rx, .data, .valid, .frame_err(ferr));

  always @(posedge clk) if (!rst) begin
    if (valid) got.push_back(data);
    if (ferr) n_ferr++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input logic [7:0] b, input int bitc, input bit stop);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin rx = f[i]; repeat (bitc) @(negedge clk); end
    rx = 1; repeat (bitc) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    repeat (100) @(negedge clk);
    for (int v = 0; v < 256; v++) send(8'(v), 64, 1);
    check(got.size() == 256, $sformatf("%0d bytes received", got.size()));
    for (int v = 0; v < 256 && v < got.size(); v++) check(got[v] == 8'(v), "byte value");
    got.delete();
    for (int i = 0; i < 20; i++) send(8'(i * 37), (i % 2) ? 63 : 65, 1);
    check(got.size() == 20, "bytes at +-2 % rate");
    for (int i = 0; i < 20 && i < got.size(); i++) check(got[i] == 8'(i * 37), "byte at +-2 % rate");
    got.delete();
    rx = 0; repeat (10) @(negedge clk); rx = 1; repeat (200) @(negedge clk);
    check(got.size() == 0, "glitch gives no byte");
    send(8'h5A, 64, 0);
    repeat (100) @(negedge clk);
    check(got.size() == 0 && n_ferr == 1, "bad stop bit drops the byte");
    send(8'hC3, 64, 1);
    check(got.size() == 1 && got[0] == 8'hC3, "receiver recovers after a framing error");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
