`timescale 1ns/1ps
// tb_ad5676_controller: self-checking test of ad5676_controller with four
// daisy-chained DACs. A serial monitor records every SYNC-low frame (bits
// sampled on falling SCLK). Checks: initialisation frames of 24, 48, 72 and
// 96 bits made of DCEN-enable commands; for random levels, one 96-bit packet
// per channel whose four 24-bit commands are "write and update channel n"
// with chip 3's value first and chip 0's last; 3072 cycles of SYNC low per
// packet (96 bits x 32 cycles); LDAC low; sys_prepare_done after the last
// packet only. A chain model (four 24-bit shift registers, one per chip)
// also checks that each chip ends up holding its own command.
module tb_ad5676_controller;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NIC = 4, CHU = 4;

  logic [15:0] sys_data = '0; logic sys_data_en = 0, sys_init_start = 0;
  logic sys_init_done, sys_prepare_done, sync, sclk, sdi, ldac;

  ad5676_controller #(.NUM_IC(NIC), .CH_USED(CHU)) dut (.clk, .rst, .sys_data,
    .sys_data_en, .sys_init_start, .sys_init_done, .sys_prepare_done,
    .ad5676_sync(sync), .ad5676_sclk(sclk), .ad5676_sdi(sdi), .ad5676_ldac(ldac));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [95:0] frames [$];
  int nbits [$], lens [$];
  logic [95:0] sh; int nb, t0, cyc = 0;
  logic [23:0] chain [NIC];   // chip 0 is nearest the FPGA
  logic [23:0] latched [NIC];
  logic sclk_q = 1, sync_q = 1;
  always @(posedge clk) if (rst) begin sclk_q = 1; sync_q = 1; end else begin
    cyc++;
    if (sync_q && !sync) begin nb = 0; sh = 0; t0 = cyc; end
    if (!sync && sclk_q && !sclk) begin
      sh = {sh[94:0], sdi}; nb++;
      for (int k = NIC-1; k > 0; k--) chain[k] = {chain[k][22:0], chain[k-1][23]};
      chain[0] = {chain[0][22:0], sdi};
    end
    if (!sync_q && sync) begin
      frames.push_back(sh); nbits.push_back(nb); lens.push_back(cyc - t0);
      for (int k = 0; k < NIC; k++) latched[k] = chain[k];
    end
    sclk_q = sclk; sync_q = sync;
  end

  initial begin
    logic [15:0] v [CHU][NIC];
    repeat (5) @(posedge clk); rst = 0;
    @(negedge clk); sys_init_start = 1; @(negedge clk); sys_init_start = 0;
    wait (sys_init_done);
    repeat (3) @(posedge clk);
    check(frames.size() == NIC, "one init frame per chip");
    for (int k = 0; k < NIC && k < frames.size(); k++) begin
      check(nbits[k] == 24*(k+1), $sformatf("init frame %0d has %0d bits", k, nbits[k]));
      for (int j = 0; j <= k; j++)
        check(frames[k][24*j +: 24] == 24'h800001, "DCEN enable command");
    end
    frames.delete(); nbits.delete(); lens.delete();
    check(ldac == 0, "LDAC held low");
    for (int round = 0; round < 2; round++) begin
      for (int c = 0; c < CHU; c++)
        for (int k = 0; k < NIC; k++) begin
          v[c][k] = 16'($urandom);
          @(negedge clk); sys_data = v[c][k]; sys_data_en = 1;
          @(negedge clk); sys_data_en = 0;
        end
      wait (sys_prepare_done);
      repeat (3) @(posedge clk);
      check(frames.size() == CHU, $sformatf("%0d packets", frames.size()));
      for (int c = 0; c < CHU && c < frames.size(); c++) begin
        check(nbits[c] == 96, "96-bit packet");
        check(lens[c] == 3072, $sformatf("packet time %0d cycles, expected 3072", lens[c]));
        for (int k = 0; k < NIC; k++)
          check(frames[c][24*k +: 24] == {4'b0011, 4'(c), v[c][k]},
                $sformatf("packet %0d chip %0d: %h", c, k, frames[c][24*k +: 24]));
      end
      for (int k = 0; k < NIC; k++)
        check(latched[k] == {4'b0011, 4'(CHU-1), v[CHU-1][k]}, "chip holds its own command");
      frames.delete(); nbits.delete(); lens.delete();
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
