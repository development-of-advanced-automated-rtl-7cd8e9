// tb_sdram_controller: self-checking test of sdram_controller against the
// sdram_model. Checks that nothing happens before sys_delay, the power-up
// sequence, writes and reads of random words at random addresses (all four
// banks), the access lengths (write 9 cycles, read 8 cycles, from ACTIVE to
// sys_cyc_end inclusive), the read-data position, and that refresh requests
// are acknowledged and issued with all banks closed. Then five words are
// written and read back after 1 ms of refresh-only activity.
`timescale 1ns/1ps
module tb_sdram_controller;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic sys_delay = 0, sys_init_done, sys_rd_wr_en = 0, sys_ads_en = 0;
  logic sys_ref_req = 0, sys_ref_ack, sys_cyc_end, sys_data_valid;
  logic [23:0] sys_address = '0;
  logic [15:0] sys_wdata = '0, sys_rdata;
  logic sdr_clk, sdr_cke, cs_n, ras_n, cas_n, we_n, sdr_dqm, dq_oe;
  logic [1:0] ba; logic [12:0] a; logic [15:0] dq_o, dq_i;

  sdram_controller dut (.clk, .rst, .sys_delay, .sys_init_done, .sys_rd_wr_en,
    .sys_ads_en, .sys_ref_req, .sys_ref_ack, .sys_cyc_end, .sys_address,
    .sys_wdata, .sys_rdata, .sys_data_valid, .sdr_clk, .sdr_cke,
    .sdr_cs_en(cs_n), .sdr_ras_en(ras_n), .sdr_cas_en(cas_n), .sdr_we_en(we_n),
    .sdr_dqm, .sdr_ba(ba), .sdr_address(a), .sdr_dq_o(dq_o), .sdr_dq_oe(dq_oe),
    .sdr_dq_i(dq_i));

  sdram_model mdl (.clk, .cke(sdr_cke), .cs_n, .ras_n, .cas_n, .we_n, .ba, .a,
    .dq_in(dq_o), .dq_oe, .dq_out(dq_i));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one access; returns cycles from the first ACTIVE cycle to cyc_end, inclusive
  task automatic access(input bit rd, input logic [23:0] addr, input logic [15:0] wd,
                        output int cyc, output logic [15:0] rdata, output int valid_at);
    int n = 0;
    valid_at = -1; rdata = '0;
    @(negedge clk);
    sys_rd_wr_en = rd; sys_address = addr; sys_wdata = wd; sys_ads_en = 1;
    // wait for ACTIVE on the bus
    do @(negedge clk); while (!({cs_n, ras_n, cas_n, we_n} == 4'b0011));
    forever begin
      n++;
      if (sys_data_valid) begin valid_at = n; rdata = sys_rdata; end
      if (sys_cyc_end) break;
      @(negedge clk);
    end
    @(posedge clk); #1 sys_ads_en = 0;
    @(negedge clk);
    if (sys_data_valid) begin valid_at = n + 1; rdata = sys_rdata; end
    cyc = n;
  endtask

  logic [23:0] addrs [32];
  logic [15:0] datas [32];

  initial begin
    int cyc, va; logic [15:0] rd;
    repeat (5) @(posedge clk);
    rst = 0;
    repeat (50) @(posedge clk);
    check(mdl.init_step == 0 && !sys_init_done, "no SDRAM command before sys_delay");
    sys_delay = 1;
    wait (sys_init_done);
    check(mdl.init_step == 4, "power-up sequence PRE, REF, REF, MRS");
    check(sdr_dqm == 0 && sdr_cke == 1, "DQM low and CKE high after init");
    for (int i = 0; i < 32; i++) begin
      addrs[i] = {i[1:0], 13'($urandom), 9'($urandom)};
      datas[i] = 16'($urandom);
      access(0, addrs[i], datas[i], cyc, rd, va);
      check(cyc == 9, $sformatf("write cycle length %0d, expected 9", cyc));
    end
    for (int i = 0; i < 32; i++) check(mdl.peek(addrs[i]) == datas[i], "word stored in SDRAM");
    for (int i = 31; i >= 0; i--) begin
      access(1, addrs[i], 16'h0, cyc, rd, va);
      check(cyc == 8, $sformatf("read cycle length %0d, expected 8", cyc));
      check(va == 6, $sformatf("read data valid in cycle %0d, expected 6", va));
      check(rd == datas[i], $sformatf("read %h expected %h", rd, datas[i]));
    end
    // refresh request
    begin
      int r0; r0 = mdl.n_ref;
      @(negedge clk); sys_ref_req = 1;
      wait (sys_ref_ack); @(negedge clk); sys_ref_req = 0;
      repeat (10) @(negedge clk);
      check(mdl.n_ref == r0 + 1, $sformatf("one AUTO REFRESH per request (%0d -> %0d)", r0, mdl.n_ref));
    end
    // refresh requested while an access is requested: refresh goes first
    begin
      int r0; r0 = mdl.n_ref;
      @(negedge clk); sys_ref_req = 1; sys_rd_wr_en = 1; sys_address = addrs[3]; sys_ads_en = 1;
      wait (sys_ref_ack); @(negedge clk); sys_ref_req = 0;
      check(mdl.n_act == 0 || {cs_n, ras_n, cas_n, we_n} != 4'b0011, "no ACTIVE right after refresh");
      access(1, addrs[3], 16'h0, cyc, rd, va);
      check(mdl.n_ref >= r0 + 1 && rd == datas[3], "refresh before access, data intact");
    end
    // the document's memory experiment: five words written, read back after
    // 1 ms, with a refresh requested every 7.8 us in between
    begin
      int r0; r0 = mdl.n_ref;
      for (int i = 0; i < 5; i++) begin
        addrs[i] = {2'(i), 13'($urandom), 9'($urandom)}; datas[i] = 16'($urandom);
        access(0, addrs[i], datas[i], cyc, rd, va);
      end
      for (int t = 0; t < 128; t++) begin
        repeat (780) @(negedge clk);
        sys_ref_req = 1; wait (sys_ref_ack); @(negedge clk); sys_ref_req = 0;
      end
      for (int i = 0; i < 5; i++) begin
        access(1, addrs[i], 16'h0, cyc, rd, va);
        check(rd == datas[i], "word read back after 1 ms");
      end
      check(mdl.n_ref - r0 == 128, "128 refreshes in 1 ms");
    end
    check(mdl.errors == 0, $sformatf("SDRAM protocol errors: %0d", mdl.errors));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
