`timescale 1ns/1ps
// tb_ad5676_sawtooth: the AD5676 experiment: values 0 to 255 (scaled to the
// 16-bit range, v * 257) on every used channel of all four daisy-chained
// DACs. A chain model of four AD5676 (24-bit shift register each, passing
// bits on once DCEN is set, executing its command when SYNC rises) keeps
// every DAC's output registers; after each step all 16 outputs must hold
// the step value, and each 96-bit packet must take 3072 cycles.
module tb_ad5676_sawtooth;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [15:0] sys_data = '0; logic sys_data_en = 0, sys_init_start = 0;
  logic sys_init_done, sys_prepare_done, sync, sclk, sdi, ldac;

  ad5676_controller dut (.clk, .rst, .sys_data, .sys_data_en, .sys_init_start,
    .sys_init_done, .sys_prepare_done, .ad5676_sync(sync), .ad5676_sclk(sclk),
    .ad5676_sdi(sdi), .ad5676_ldac(ldac));

  logic [23:0] sr [4];
  logic        dcen [4];
  logic [15:0] out [4][8];
  int nb, t0, cyc = 0, bad_len = 0, pk = 0;
  logic sclk_q = 1, sync_q = 1;
  initial for (int k = 0; k < 4; k++) begin dcen[k] = 0; sr[k] = '0; end
  always @(posedge clk) if (rst) begin sclk_q = 1; sync_q = 1; end else begin
    cyc++;
    if (sync_q && !sync) begin nb = 0; t0 = cyc; end
    if (!sync && sclk_q && !sclk) begin
      // a chip forwards its shift register's MSB only when DCEN is set
      for (int k = 3; k > 0; k--) sr[k] = {sr[k][22:0], dcen[k-1] ? sr[k-1][23] : 1'b0};
      sr[0] = {sr[0][22:0], sdi};
      nb++;
    end
    if (!sync_q && sync) begin
      if (nb == 96) begin pk++; if (cyc - t0 != 3072) bad_len++; end
      for (int k = 0; k < 4; k++) begin
        if (sr[k][23:20] == 4'b1000) dcen[k] = sr[k][0];
        if (sr[k][23:20] == 4'b0011 && !ldac) out[k][sr[k][18:16]] = sr[k][15:0];
      end
    end
    sclk_q = sclk; sync_q = sync;
  end

  initial begin
    repeat (5) @(posedge clk); rst = 0;
    @(negedge clk); sys_init_start = 1; @(negedge clk); sys_init_start = 0;
    wait (sys_init_done);
    checks++; if (!(dcen[0] && dcen[1] && dcen[2] && dcen[3])) begin failures++; $display("FAIL: daisy chain not enabled"); end
    for (int v = 0; v < 256; v++) begin
      for (int i = 0; i < 16; i++) begin
        @(negedge clk); sys_data = 16'(v * 257); sys_data_en = 1;
        @(negedge clk); sys_data_en = 0;
      end
      wait (sys_prepare_done); @(negedge clk); @(negedge clk);
      for (int k = 0; k < 4; k++)
        for (int c = 0; c < 4; c++) begin
          checks++;
          if (out[k][c] != 16'(v * 257)) begin failures++; $display("FAIL: step %0d chip %0d ch %0d = %h", v, k, c, out[k][c]); end
        end
    end
    checks++; if (bad_len != 0 || pk != 1024 + 1) begin failures++; $display("FAIL: %0d packets, %0d bad lengths", pk, bad_len); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
