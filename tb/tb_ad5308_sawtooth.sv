`timescale 1ns/1ps
// tb_ad5308_sawtooth: the AD5308 experiment: values 0 to 255 are given to
// every channel in turn (a sawtooth on each DAC output). A DAC model decodes
// each 16-bit word (channel in bits 14:12, value in bits 11:4) into its
// output registers; after every step all four outputs must equal the step
// value, and every word must take 512 cycles (5.12 us).
module tb_ad5308_sawtooth;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] sys_data = '0; logic sys_data_en = 0, sys_init_start = 0;
  logic sys_init_done, sys_prepare_done, sync, sclk, din;

  ad5308_controller dut (.clk, .rst, .sys_data, .sys_data_en, .sys_init_start,
    .sys_init_done, .sys_prepare_done, .ad5308_sync(sync), .ad5308_sclk(sclk),
    .ad5308_din(din));

  logic [7:0] dac [8];
  logic [15:0] sh; int nb, t0, cyc = 0, bad_len = 0, words = 0;
  logic sclk_q = 1, sync_q = 1;
  always @(posedge clk) if (rst) begin sclk_q = 1; sync_q = 1; end else begin
    cyc++;
    if (sync_q && !sync) begin nb = 0; t0 = cyc; end
    if (!sync && sclk_q && !sclk) begin sh = {sh[14:0], din}; nb++; end
    if (!sync_q && sync) begin
      words++;
      if (cyc - t0 != 512 || nb != 16) bad_len++;
      if (!sh[15]) dac[sh[14:12]] = sh[11:4];
    end
    sclk_q = sclk; sync_q = sync;
  end

  initial begin
    repeat (5) @(posedge clk); rst = 0;
    @(negedge clk); sys_init_start = 1; @(negedge clk); sys_init_start = 0;
    wait (sys_init_done);
    for (int v = 0; v < 256; v++) begin
      for (int c = 0; c < 4; c++) begin
        @(negedge clk); sys_data = 8'(v); sys_data_en = 1;
        @(negedge clk); sys_data_en = 0;
      end
      wait (sys_prepare_done); @(negedge clk); @(negedge clk);
      checks++;
      if (!(dac[0] == 8'(v) && dac[1] == 8'(v) && dac[2] == 8'(v) && dac[3] == 8'(v))) begin
        failures++; $display("FAIL: step %0d", v);
      end
    end
    checks++; if (bad_len != 0 || words != 2 + 1024) begin failures++; $display("FAIL: %0d words, %0d bad lengths", words, bad_len); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
