`timescale 1ns/1ps
// tb_ad5308_controller: self-checking test of ad5308_controller. A serial
// monitor captures DIN on every falling SCLK edge while SYNC is low and
// records each frame's bit count, value and length in clock cycles. Checks:
// the two control words after sys_init_start and sys_init_done; for random
// load voltages, one DAC write word per channel with the right address and
// data, sys_prepare_done only after the last word, 16 bits per frame and
// 512 cycles (5.12 us at 100 MHz) of SYNC low per word.
module tb_ad5308_controller;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NCH = 4;

  logic [7:0] sys_data = '0; logic sys_data_en = 0, sys_init_start = 0;
  logic sys_init_done, sys_prepare_done, sync, sclk, din;

  ad5308_controller #(.NCH(NCH)) dut (.clk, .rst, .sys_data, .sys_data_en,
    .sys_init_start, .sys_init_done, .sys_prepare_done,
    .ad5308_sync(sync), .ad5308_sclk(sclk), .ad5308_din(din));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // serial monitor
  logic [15:0] frames [$];
  int lens [$];
  logic [31:0] sh; int nb, t0, cyc = 0;
  logic sclk_q = 1, sync_q = 1;
  always @(posedge clk) if (rst) begin sclk_q = 1; sync_q = 1; end else begin
    cyc++;
    if (sync_q && !sync) begin nb = 0; sh = 0; t0 = cyc; end
    if (!sync && sclk_q && !sclk) begin sh = {sh[30:0], din}; nb++; end
    if (!sync_q && sync) begin
      check(nb == 16, $sformatf("frame of %0d bits", nb));
      frames.push_back(sh[15:0]); lens.push_back(cyc - t0);
    end
    sclk_q = sclk; sync_q = sync;
  end

  initial begin
    logic [7:0] v [NCH];
    repeat (5) @(posedge clk); rst = 0;
    @(negedge clk); sys_init_start = 1; @(negedge clk); sys_init_start = 0;
    wait (sys_init_done);
    repeat (3) @(posedge clk);
    check(frames.size() == 2, "two init words");
    if (frames.size() == 2) begin
      check(frames[0] == 16'h8000, $sformatf("GAIN/BUF word %h", frames[0]));
      check(frames[1] == 16'hA000, $sformatf("LDAC word %h", frames[1]));
    end
    frames.delete(); lens.delete();
    for (int round = 0; round < 3; round++) begin
      for (int c = 0; c < NCH; c++) begin
        v[c] = 8'($urandom);
        @(negedge clk); sys_data = v[c]; sys_data_en = 1;
        @(negedge clk); sys_data_en = 0;
        if (c == 0) check(!sys_prepare_done, "prepare_done cleared by new data");
      end
      wait (sys_prepare_done);
      repeat (3) @(posedge clk);
      check(frames.size() == NCH, $sformatf("%0d data words", frames.size()));
      for (int c = 0; c < NCH && c < frames.size(); c++) begin
        check(frames[c] == {1'b0, 3'(c), v[c], 4'b0}, $sformatf("word %0d = %h", c, frames[c]));
        check(lens[c] == 512, $sformatf("word time %0d cycles, expected 512", lens[c]));
      end
      frames.delete(); lens.delete();
    end
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
