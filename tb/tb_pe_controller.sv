`timescale 1ns/1ps
// tb_pe_controller: self-checking test of pe_controller (MAX19005 control).
//
// Prepare: four random channel settings (channel 3 switched off) must give
// four 16-bit serial words {channel, setting, 0}, each 400 cycles of CS low
// (16 bits x 25 cycles), then sys_prepare_done.
// Test: 60 random vectors are fed from a queue that answers period_pulse;
// the queue is held empty for a while once to force a stall. A DUT model
// sets each channel's comparator outputs per vector (above high threshold,
// below low threshold, or in between). Checks, worked out from the time set
// (period 20, window [5,12), strobe 15; formats rotated at the stall): the spacing of period pulses, the
// drive level and receive flag of every channel in every cycle for the
// NRZ, RZ, RO and SBC formats, and the fail / data_1 / data_2 outputs at
// each strobe. The number of strobes and of stalls is counted.
module tb_pe_controller;
  import ate_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NCH = 4;
  localparam int P = 20, T1 = 5, T2 = 12, STB = 15, NV = 60;

  logic [2:0] sys_data = '0; logic sys_data_en = 0, sys_prepare_done;
  logic [15:0] time_set_data = '0; logic en_data = 0, start_test_sig = 0;
  logic empty_data, strobe_pulse, period_pulse;
  logic [NCH-1:0][2:0] pattern_data, form_wave;
  logic [NCH-1:0] data_1, data_2, fail;
  logic swen, force_o, sense, sclk, din, cs;
  logic [NCH-1:0] mdata, rcv, cmph, cmpl;

  pe_controller #(.NCH(NCH)) dut (.clk, .rst, .sys_data, .sys_data_en,
    .sys_prepare_done, .time_set_data, .en_data, .start_test_sig, .empty_data,
    .strobe_pulse, .period_pulse, .pattern_data, .form_wave, .data_1, .data_2,
    .fail, .max19005_swen(swen), .max19005_force(force_o), .max19005_sense(sense),
    .max19005_sclk(sclk), .max19005_din(din), .max19005_cs(cs),
    .max19005_data(mdata), .max19005_rcv(rcv), .max19005_cmph(cmph),
    .max19005_cmpl(cmpl));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- serial monitor ----
  logic [15:0] frames [$]; int lens [$];
  logic [15:0] sh; int nb, t0, cyc = 0;
  logic sclk_q = 1, cs_q = 1;
  always @(posedge clk) if (rst) begin sclk_q = 1; cs_q = 1; end else begin
    cyc++;
    if (cs_q && !cs) begin nb = 0; sh = 0; t0 = cyc; end
    if (!cs && sclk_q && !sclk) begin sh = {sh[14:0], din}; nb++; end
    if (!cs_q && cs) begin frames.push_back(sh); lens.push_back(cyc - t0);
      check(nb == 16, "16-bit setting word"); end
    sclk_q = sclk; cs_q = cs;
  end

  // ---- vector source and DUT model ----
  logic [NCH-1:0][2:0] vecs [NV];
  logic [1:0] resp [NV][NCH];      // 0: low, 1: mid, 2: high
  int qhead = 0, qavail = 0;       // vectors made available so far
  assign empty_data = (qhead >= qavail);
  assign pattern_data = vecs[qhead < NV ? qhead : NV-1];
  logic [2:0] setting [NCH];
  logic [NCH-1:0][2:0] fmt;
  assign form_wave = fmt;

  int cur = -1;                    // index of vector being applied
  int k = 0;                       // tcnt of the current cycle, as seen by the TB
  int kq = -1, curq = -1;          // previous cycle's values (outputs are registered)
  int last_pp = -1, n_pp = 0, n_stb = 0, n_stall = 0, n_gap = 0;
  int fmt_seen [4];
  always @(posedge clk) if (!rst) begin
    // outputs now visible belong to the previous cycle's tcnt
    if (curq >= 0 && kq >= 0) begin
      for (int c = 0; c < NCH; c++) begin
        logic drv, d, win, exp_d;
        d   = (vecs[curq][c] == PAT_D1);
        drv = setting[c][0] && (vecs[curq][c] == PAT_D0 || vecs[curq][c] == PAT_D1);
        win = (kq >= T1) && (kq < T2);
        case (fmt[c])
          WF_RZ:   exp_d = win ? d : 1'b0;
          WF_RO:   exp_d = win ? d : 1'b1;
          WF_SBC:  exp_d = win ? d : !d;
          default: exp_d = d;
        endcase
        if (!drv) exp_d = 0;
        check(rcv[c] == !drv, $sformatf("rcv ch%0d vec %0d t %0d", c, curq, kq));
        check(mdata[c] == exp_d, $sformatf("data ch%0d vec %0d t %0d fmt %0d", c, curq, kq, fmt[c]));
        if (drv) fmt_seen[fmt[c][1:0]]++;
      end
    end
    kq = -1;
    if (period_pulse) begin
      if (last_pp >= 0 && cyc - last_pp != P) n_gap++;

      last_pp = cyc; n_pp++;
      cur = qhead; qhead++; k = 0;
    end else if (cur >= 0 && k >= 0) begin
      k++;
      if (k >= P) k = -1;          // waiting for a vector
    end
    if (cur >= 0 && k >= 0) begin kq = k; curq = cur; end
    if (strobe_pulse) begin
      n_stb++;
      for (int c = 0; c < NCH; c++) begin
        logic eh, ef;
        eh = (resp[cur][c] == 2); ef = (resp[cur][c] != 0);
        check(data_1[c] == eh && data_2[c] == ef, $sformatf("comparator capture ch%0d vec %0d", c, cur));
        case (vecs[cur][c])
          PAT_EH: ef = (resp[cur][c] != 2);
          PAT_EL: ef = (resp[cur][c] != 0);
          PAT_EZ: ef = (resp[cur][c] != 1);
          default: ef = 0;
        endcase
        if (!setting[c][0]) ef = 0;
        check(fail[c] == ef, $sformatf("fail ch%0d vec %0d sym %0d resp %0d", c, cur, vecs[cur][c], resp[cur][c]));
      end
    end
  end
  // DUT model: comparator outputs follow the current vector's response
  always_comb
    for (int c = 0; c < NCH; c++) begin
      logic [1:0] r;
      r = (cur >= 0) ? resp[cur][c] : 2'd0;
      cmph[c] = (r == 2);
      cmpl[c] = (r != 0);
    end

  initial begin
    int cyc0;
    for (int i = 0; i < NV; i++)
      for (int c = 0; c < NCH; c++) begin
        vecs[i][c] = 3'($urandom_range(0, 5));
        resp[i][c] = 2'($urandom_range(0, 2));
      end
    for (int c = 0; c < NCH; c++) begin
      setting[c] = {2'($urandom), (c != 3)};
      fmt[c] = 3'(c);              // NRZ, RZ, RO, SBC
    end
    repeat (5) @(posedge clk); rst = 0;
    for (int c = 0; c < NCH; c++) begin
      @(negedge clk); sys_data = setting[c]; sys_data_en = 1;
      @(negedge clk); sys_data_en = 0;
    end
    wait (sys_prepare_done);
    repeat (3) @(posedge clk);
    check(frames.size() == NCH, "one setting word per channel");
    for (int c = 0; c < NCH && c < frames.size(); c++) begin
      check(frames[c] == {2'(c), setting[c], 11'b0}, $sformatf("setting word %h", frames[c]));
      check(lens[c] == 400, $sformatf("setting word %0d cycles, expected 400", lens[c]));
    end
    check(swen == 1 && force_o == 0 && sense == 0, "static control pins");
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      time_set_data = 16'(i == 0 ? P : i == 1 ? T1 : i == 2 ? T2 : STB); en_data = 1;
      @(negedge clk); en_data = 0;
    end
    qavail = 30;
    @(negedge clk); start_test_sig = 1;
    // hold the queue empty at vector 30 for a while: the tester must stall
    wait (qhead == 30);
    repeat (57) @(negedge clk);
    n_stall = (qhead == 30);
    for (int c = 0; c < NCH; c++) fmt[c] = 3'((c + 1) % 4);   // new formats from vector 30 on
    qavail = NV;
    wait (n_stb == NV);
    @(negedge clk); start_test_sig = 0;
    repeat (2*P) @(negedge clk);
    check(n_stall == 1, "stall while no vector was available");
    check(n_gap == 1, $sformatf("exactly one irregular period gap (the stall), got %0d", n_gap));
    check(n_pp == NV && n_stb == NV, $sformatf("%0d periods, %0d strobes", n_pp, n_stb));
    check(dut.tstate == 2'd0, "idle after start_test_sig falls");
    for (int f = 0; f < 4; f++) check(fmt_seen[f] > 0, $sformatf("format %0d exercised", f));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
