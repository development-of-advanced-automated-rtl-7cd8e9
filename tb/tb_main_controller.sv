`timescale 1ns/1ps
// tb_main_controller: test of main_controller working with the SDRAM,
// pin-electronics and DAC controllers (and sdram_model for the memory chip),
// with the UART system replaced by byte queues so that the host's bytes
// arrive at once and sys_tx_full is driven at random.
//
// The same device-under-test model and sequence as the end-to-end test:
// initialisation; time set A (period 6 cycles, so the vector buffer runs dry
// and the tester stalls); write 64 vectors, some with wrong expected values;
// run; time set B (period 40) and run again. Checks: the words sent to the
// MAX19005, AD5308 and AD5676 carry the time-set values; the SDRAM holds the
// vectors; each run reports first fail, second fail and fail count as worked
// out here; no report byte is written while sys_tx_full is high. Each
// mechanism (initialisation, time set, prepare, pattern write, stop
// indicator, run, start on a full buffer, stall on an empty one, refresh in
// idle and during a run, fail recording) must happen at least once.
module tb_main_controller;
  import ate_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NV = 64;

  logic sdr_clk, cke, cs_n, ras_n, cas_n, we_n, dqm, dq_oe;
  logic [1:0] ba; logic [12:0] a; logic [15:0] dq_o, dq_i;
  logic swen, force_o, sense, msclk, mdin, mcs;
  logic [3:0] mdata, rcv, cmph, cmpl;
  logic a8_sync, a8_sclk, a8_din, a16_sync, a16_sclk, a16_sdi, a16_ldac;

  // UART side of the main controller, driven at byte level
  logic [7:0] u_r_data, u_w_data; logic u_rd, u_wr, u_rx_empty, u_tx_full;
  logic [7:0] host_q [$];
  assign u_rx_empty = (host_q.size() == 0);
  assign u_w_data   = host_q.size() ? host_q[0] : 8'h00;
  logic [7:0] host_rx [$];
  int n_tx_full = 0;
  always @(posedge clk) if (!rst) begin
    if (u_rd) void'(host_q.pop_front());
    if (u_wr) begin check(!u_tx_full, "no write while the transmit FIFO is full"); host_rx.push_back(u_r_data); end
    if (u_tx_full) n_tx_full++;
    u_tx_full <= ($urandom_range(0, 3) == 0);
  end

  logic sd_delay, sd_init_done, sd_rd_wr_en, sd_ads_en, sd_ref_req, sd_ref_ack;
  logic sd_cyc_end, sd_data_valid; logic [23:0] sd_address; logic [15:0] sd_wdata, sd_rdata;
  logic [7:0] a8_data; logic a8_data_en, a8_init_start, a8_init_done, a8_prepare_done;
  logic [15:0] a16_data; logic a16_data_en, a16_init_start, a16_init_done, a16_prepare_done;
  logic [2:0] pe_data; logic pe_data_en, pe_prepare_done;
  logic [15:0] time_set_data; logic en_data, start_test_sig, empty_data, strobe_pulse, period_pulse;
  logic [3:0][2:0] pattern_data, form_wave; logic [3:0] data_1, data_2, fail;

  main_controller u_main (.clk, .rst,
    .sys_r_data(u_r_data), .sys_w_data(u_w_data), .sys_rd_uart(u_rd),
    .sys_wr_uart(u_wr), .sys_rx_empty(u_rx_empty), .sys_tx_full(u_tx_full),
    .sd_delay, .sd_init_done, .sd_rd_wr_en, .sd_ads_en, .sd_ref_req, .sd_ref_ack,
    .sd_cyc_end, .sd_address, .sd_wdata, .sd_rdata, .sd_data_valid,
    .a8_data, .a8_data_en, .a8_init_start, .a8_init_done, .a8_prepare_done,
    .a16_data, .a16_data_en, .a16_init_start, .a16_init_done, .a16_prepare_done,
    .pe_data, .pe_data_en, .pe_prepare_done, .time_set_data, .en_data,
    .start_test_sig, .empty_data, .strobe_pulse, .period_pulse,
    .pattern_data, .form_wave, .data_1, .data_2, .fail);

  sdram_controller u_sdram (.clk, .rst, .sys_delay(sd_delay), .sys_init_done(sd_init_done),
    .sys_rd_wr_en(sd_rd_wr_en), .sys_ads_en(sd_ads_en), .sys_ref_req(sd_ref_req),
    .sys_ref_ack(sd_ref_ack), .sys_cyc_end(sd_cyc_end), .sys_address(sd_address),
    .sys_wdata(sd_wdata), .sys_rdata(sd_rdata), .sys_data_valid(sd_data_valid),
    .sdr_clk, .sdr_cke(cke), .sdr_cs_en(cs_n), .sdr_ras_en(ras_n), .sdr_cas_en(cas_n),
    .sdr_we_en(we_n), .sdr_dqm(dqm), .sdr_ba(ba), .sdr_address(a), .sdr_dq_o(dq_o),
    .sdr_dq_oe(dq_oe), .sdr_dq_i(dq_i));

  pe_controller u_pe (.clk, .rst, .sys_data(pe_data), .sys_data_en(pe_data_en),
    .sys_prepare_done(pe_prepare_done), .time_set_data, .en_data, .start_test_sig,
    .empty_data, .strobe_pulse, .period_pulse, .pattern_data, .form_wave, .data_1,
    .data_2, .fail, .max19005_swen(swen), .max19005_force(force_o),
    .max19005_sense(sense), .max19005_sclk(msclk), .max19005_din(mdin),
    .max19005_cs(mcs), .max19005_data(mdata), .max19005_rcv(rcv),
    .max19005_cmph(cmph), .max19005_cmpl(cmpl));

  ad5308_controller u_ad5308 (.clk, .rst, .sys_data(a8_data), .sys_data_en(a8_data_en),
    .sys_init_start(a8_init_start), .sys_init_done(a8_init_done),
    .sys_prepare_done(a8_prepare_done), .ad5308_sync(a8_sync), .ad5308_sclk(a8_sclk),
    .ad5308_din(a8_din));

  ad5676_controller u_ad5676 (.clk, .rst, .sys_data(a16_data), .sys_data_en(a16_data_en),
    .sys_init_start(a16_init_start), .sys_init_done(a16_init_done),
    .sys_prepare_done(a16_prepare_done), .ad5676_sync(a16_sync), .ad5676_sclk(a16_sclk),
    .ad5676_sdi(a16_sdi), .ad5676_ldac(a16_ldac));

  sdram_model mem (.clk, .cke, .cs_n, .ras_n, .cas_n, .we_n, .ba, .a,
    .dq_in(dq_o), .dq_oe, .dq_out(dq_i));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- device under test and comparators ----------------
  // pin levels: 0 low, 1 mid (nothing drives the pin), 2 high
  int lv [4];
  always_comb begin
    lv[0] = rcv[0] ? 1 : (mdata[0] ? 2 : 0);
    lv[1] = rcv[1] ? 1 : (mdata[1] ? 2 : 0);
    lv[2] = rcv[2] ? ((lv[0] == 2 && lv[1] == 2) ? 2 : 0) : (mdata[2] ? 2 : 0);
    lv[3] = rcv[3] ? ((lv[0] == 2) ? 0 : 2) : (mdata[3] ? 2 : 0);
    for (int c = 0; c < 4; c++) begin
      cmph[c] = (lv[c] == 2);
      cmpl[c] = (lv[c] != 0);
    end
  end

  // ---------------- host: bytes go straight into the receive queue ----------------
  task automatic host_send(input logic [7:0] b);
    host_q.push_back(b);
    repeat (2) @(negedge clk);
  endtask

  // ---------------- serial monitors ----------------
  logic [95:0] f16 [$]; logic [15:0] f8 [$]; logic [15:0] fpe [$];
  logic [95:0] s16; logic [15:0] s8, spe;
  logic q16c = 1, q16s = 1, q8c = 1, q8s = 1, qpc = 1, qps = 1;
  always @(posedge clk) if (!rst) begin
    if (!a16_sync && q16c && !a16_sclk) s16 = {s16[94:0], a16_sdi};
    if (!q16s && a16_sync) f16.push_back(s16);
    if (q16s && !a16_sync) s16 = '0;
    if (!a8_sync && q8c && !a8_sclk) s8 = {s8[14:0], a8_din};
    if (!q8s && a8_sync) f8.push_back(s8);
    if (!mcs && qpc && !msclk) spe = {spe[14:0], mdin};
    if (!qps && mcs) fpe.push_back(spe);
    q16c = a16_sclk; q16s = a16_sync; q8c = a8_sclk; q8s = a8_sync; qpc = msclk; qps = mcs;
  end

  // ---------------- mechanism counters ----------------
  int n_idle_ref = 0, n_test_ref = 0, n_stall = 0, n_full_start = 0, n_strobe = 0;
  logic st_q = 0;
  always @(posedge clk) if (!rst) begin
    if (sd_ref_ack) begin
      if (u_main.state == 3'd5) n_test_ref++; else n_idle_ref++;
    end
    if (u_pe.tstate == 2'd1 && start_test_sig && empty_data) n_stall++;
    if (start_test_sig && !st_q && !u_main.all_read) n_full_start++;
    if (strobe_pulse) n_strobe++;
    st_q = start_test_sig;
  end

  // ---------------- test data ----------------
  logic [2:0]  setting [4];
  logic [2:0]  fmt [4];
  logic [7:0]  ldv [4];
  logic [15:0] dac [16];
  logic [NV-1:0][11:0] vec;

  task automatic time_set(input int per, t1, t2, stb);
    for (int c = 0; c < 4; c++) host_send({5'b0, setting[c]});
    for (int c = 0; c < 4; c++) host_send({5'b0, fmt[c]});
    host_send(8'(per >> 8)); host_send(8'(per));
    host_send(8'(t1 >> 8));  host_send(8'(t1));
    host_send(8'(t2 >> 8));  host_send(8'(t2));
    host_send(8'(stb >> 8)); host_send(8'(stb));
    for (int c = 0; c < 4; c++) host_send(ldv[c]);
    for (int k = 0; k < 16; k++) begin host_send(dac[k][15:8]); host_send(dac[k][7:0]); end
  endtask

  task automatic wait_idle();
    repeat (20) @(negedge clk);
    while (u_main.state != 3'd1) @(negedge clk);
  endtask

  // expected result of a run, from the DUT's logic
  task automatic expect_run(output logic [23:0] ff, sf, nf);
    ff = NO_FAIL; sf = NO_FAIL; nf = 0;
    for (int i = 0; i < NV; i++) begin
      bit d0, d1, bad;
      d0 = (vec[i][2:0] == PAT_D1); d1 = (vec[i][5:3] == PAT_D1);
      bad = 0;
      if (vec[i][8:6] == PAT_EH && !(d0 && d1)) bad = 1;
      if (vec[i][8:6] == PAT_EL &&  (d0 && d1)) bad = 1;
      if (vec[i][11:9] == PAT_EH && d0) bad = 1;
      if (vec[i][11:9] == PAT_EL && !d0) bad = 1;
      if (bad) begin
        if (ff == NO_FAIL) ff = 24'(i); else if (sf == NO_FAIL) sf = 24'(i);
        nf++;
      end
    end
  endtask

  task automatic run_and_check(input string tag);
    logic [23:0] ff, sf, nf, gf, gs, gn;
    int s0;
    s0 = n_strobe;
    host_rx.delete();
    host_send(CMD_RUN);
    wait (host_rx.size() == 9);
    expect_run(ff, sf, nf);
    gf = {host_rx[0], host_rx[1], host_rx[2]};
    gs = {host_rx[3], host_rx[4], host_rx[5]};
    gn = {host_rx[6], host_rx[7], host_rx[8]};
    check(gf == ff, $sformatf("%s first fail %0d expected %0d", tag, gf, ff));
    check(gs == sf, $sformatf("%s second fail %0d expected %0d", tag, gs, sf));
    check(gn == nf, $sformatf("%s fail count %0d expected %0d", tag, gn, nf));
    check(n_strobe - s0 == NV, $sformatf("%s: %0d strobes", tag, n_strobe - s0));
    wait_idle();
  endtask

  task automatic check_prepare();
    check(fpe.size() == 4, "four MAX19005 setting words");
    for (int c = 0; c < 4 && c < fpe.size(); c++)
      check(fpe[c] == {2'(c), setting[c], 11'b0}, "MAX19005 setting word");
    check(f8.size() == 4, "four AD5308 words");
    for (int c = 0; c < 4 && c < f8.size(); c++)
      check(f8[c] == {1'b0, 3'(c), ldv[c], 4'b0}, "AD5308 load-voltage word");
    check(f16.size() == 4, "four AD5676 packets");
    for (int c = 0; c < 4 && c < f16.size(); c++)
      for (int k = 0; k < 4; k++)
        check(f16[c][24*k +: 24] == {4'b0011, 4'(c), dac[4*c + k]}, "AD5676 level command");
    fpe.delete(); f8.delete(); f16.delete();
  endtask

  int n_init = 0, n_timeset = 0, n_prepare = 0, n_pattern = 0, n_stop = 0, n_run = 0;

  initial begin
    logic [23:0] ff, sf, nf;
    for (int c = 0; c < 4; c++) begin
      setting[c] = {2'($urandom), 1'b1};
      ldv[c] = 8'($urandom);
    end
    fmt[0] = WF_NRZ; fmt[1] = WF_RZ; fmt[2] = WF_NRZ; fmt[3] = WF_NRZ;
    for (int k = 0; k < 16; k++) dac[k] = 16'($urandom);
    for (int i = 0; i < NV; i++) begin
      bit d0, d1, e2, e3;
      d0 = 1'($urandom); d1 = 1'($urandom);
      e2 = ($urandom_range(0, 9) < 8) ? (d0 && d1) : !(d0 && d1);
      e3 = ($urandom_range(0, 9) < 8) ? !d0 : d0;
      vec[i][2:0]  = d0 ? PAT_D1 : PAT_D0;
      vec[i][5:3]  = d1 ? PAT_D1 : PAT_D0;
      vec[i][8:6]  = e2 ? PAT_EH : PAT_EL;
      vec[i][11:9] = (i % 5 == 4) ? PAT_X : (e3 ? PAT_EH : PAT_EL);
    end
    vec[3][8:6] = (vec[3][2:0] == PAT_D1 && vec[3][5:3] == PAT_D1) ? PAT_EL : PAT_EH;  // make sure of
    vec[9][8:6] = (vec[9][2:0] == PAT_D1 && vec[9][5:3] == PAT_D1) ? PAT_EL : PAT_EH;  // two failures

    repeat (10) @(negedge clk); rst = 0;
    // -------- initialisation --------
    wait_idle();
    n_init++;
    check(mem.init_step == 4, "SDRAM initialised");
    check(f8.size() == 2 && f16.size() == 4, "DAC initialisation frames");
    check(swen == 1 && force_o == 0 && sense == 0 && a16_ldac == 0, "static control pins");
    f8.delete(); f16.delete();
    // -------- time set A and prepare --------
    host_send(CMD_TIMESET); n_timeset++;
    time_set(6, 1, 5, 4);
    wait (u_main.state == 3'd3); n_prepare++;
    wait_idle();
    check_prepare();
    // -------- write pattern --------
    host_send(CMD_PATTERN); n_pattern++;
    for (int i = 0; i < NV; i++) begin host_send({4'b0, vec[i][11:8]}); host_send(vec[i][7:0]); end
    host_send(8'h80); n_stop++;
    wait_idle();
    check(u_main.n_vec == NV, "vector count after stop indicator");
    for (int i = 0; i < NV; i++)
      check(mem.peek(24'(i)) == {4'b0, vec[i]}, $sformatf("vector %0d in SDRAM", i));
    // -------- run A (stalls) --------
    n_run++;
    run_and_check("run A");
    // -------- time set B and run B --------
    host_send(CMD_TIMESET); n_timeset++;
    time_set(40, 10, 30, 25);
    wait_idle(); n_prepare++;
    check_prepare();
    begin int st0; st0 = n_stall; n_run++;
      run_and_check("run B");
      check(n_stall == st0, "no stall with a 40-cycle period");
    end
    // -------- mechanisms --------
    check(n_init > 0 && n_timeset > 0 && n_prepare > 0 && n_pattern > 0 && n_stop > 0 && n_run > 0,
          "states visited");
    check(n_full_start > 0, $sformatf("start on full vector buffer: %0d", n_full_start));
    check(n_stall > 0, $sformatf("stall cycles on empty vector buffer: %0d", n_stall));
    check(n_idle_ref > 0 && n_test_ref > 0 && n_tx_full > 0, $sformatf("refresh idle %0d, during test %0d", n_idle_ref, n_test_ref));
    expect_run(ff, sf, nf);
    check(sf != NO_FAIL, "first and second fail both recorded");
    check(mem.errors == 0, $sformatf("SDRAM protocol errors %0d", mem.errors));
    $display("mechanisms: init %0d timeset %0d prepare %0d pattern %0d stop %0d run %0d full-start %0d stall-cycles %0d refresh idle %0d test %0d fails %0d",
             n_init, n_timeset, n_prepare, n_pattern, n_stop, n_run, n_full_start, n_stall, n_idle_ref, n_test_ref, nf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
