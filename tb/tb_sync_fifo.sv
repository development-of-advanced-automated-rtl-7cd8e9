`timescale 1ns/1ps
// tb_sync_fifo: self-checking test of sync_fifo. Random pushes and pops
// (including pushes when full and pops when empty, which must be ignored)
// are compared with a queue model: head data, empty, full and count every
// cycle.
module tb_sync_fifo;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic wr_en = 0, rd_en = 0, empty, full;
  logic [7:0] wr_data = '0, rd_data;
  logic [4:0] count;
  logic [7:0] q [$];
  int n_full = 0, n_empty = 0;

  sync_fifo #(.WIDTH(8), .AW(4)) dut (.clk, .rst, .wr_en, .wr_data, .rd_en,
    .rd_data, .empty, .full, .count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst = 0;
    for (int i = 0; i < 3000; i++) begin
      int bias;
      bias = (i / 300) % 2 ? 70 : 30;    // alternate towards full and empty
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == 16), "full flag");
      check(count == 5'(q.size()), "count");
      if (q.size() > 0) check(rd_data == q[0], "head data");
      if (full) n_full++;
      if (empty) n_empty++;
      wr_en = ($urandom_range(0, 99) < bias); wr_data = 8'($urandom);
      rd_en = ($urandom_range(0, 99) < 100 - bias);
      begin
        bit was_full, was_empty;
        was_full = (q.size() == 16); was_empty = (q.size() == 0);
        @(posedge clk); #1;
        if (rd_en && !was_empty) void'(q.pop_front());
        if (wr_en && !was_full) q.push_back(wr_data);
      end
    end
    check(n_full > 0 && n_empty > 0, "both full and empty reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
