// main_controller: the tester's sequencer. It receives commands and data
// from the host through the UART system, sets up the DACs and the
// pin-electronics controller, stores test vectors in SDRAM, runs the test
// and reports the result.
//
// A state controller moves between the document's states:
//  INIT     wait INIT_WAIT cycles (100 us at 100 MHz), then start the
//           SDRAM (sd_delay), AD5308 and AD5676 initialisation; go to IDLE
//           when all three report done.
//  IDLE     wait for a command byte: A1 start time set, A2 start write
//           pattern, A3 run test (codes in ate_pkg). Other bytes are dropped.
//  TIMESET  receive the time set in a fixed order and forward each item as
//           it arrives: NCH channel settings (3 bits each) to the PE
//           controller, NCH waveform formats (kept here, driven on
//           form_wave), four 16-bit timing words (period, T1, T2, strobe;
//           high byte first) to the PE controller, NCH 8-bit load voltages to
//           the AD5308 controller, N_DAC 16-bit levels to the AD5676
//           controller (high byte first).
//  PREPARE  wait until the three controllers have sent their serial data.
//  PATTERN  receive vectors as byte pairs, high byte first, and write each
//           16-bit word {4'b0, ch3, ch2, ch1, ch0} (3-bit symbols) to SDRAM at
//           consecutive addresses from 0. A high byte with bit 7 set is the
//           stop-pattern indicator; the number of vectors written is kept.
//  TEST     two processes run together: a reader fetches the stored vectors
//           from SDRAM into a VBUF-deep vector buffer, and the PE controller
//           takes one per period (period_pulse) while the buffer is not empty
//           (empty_data). The PE controller starts (start_test_sig) once the
//           buffer is full or holds every vector. Each strobe_pulse with any
//           fail_x bit counts a failing vector and records its index as first
//           or second fail. After as many strobes as vectors, the test stops.
//  REPORT   send first fail, second fail and the number of failing vectors,
//           three bytes each, high byte first (FFFFFF: none), then IDLE.
// Throughout, from the end of initialisation, an AUTO REFRESH request is made
// every REF_INTERVAL cycles (7.8 us) and the SDRAM controller interleaves it
// with the accesses.
//
// The states, the sub-FSM split, the 8-to-16-bit vector packing and the
// three result items are the document's; byte codes, item order, buffer
// depth and refresh during write and test are this design's choices. The
// document's bidirectional SDRAM data bus is split into sd_wdata / sd_rdata.
module main_controller
  import ate_pkg::*;
#(
  parameter int unsigned NCH          = NUM_CH,
  parameter int unsigned N_DAC        = 16,
  parameter int unsigned INIT_WAIT    = 10_000,
  parameter int unsigned REF_INTERVAL = 780,
  parameter int unsigned VBUF_AW      = 4
) (
  input  logic        clk,
  input  logic        rst,
  // UART system
  output logic [7:0]  sys_r_data,
  input  logic [7:0]  sys_w_data,
  output logic        sys_rd_uart,
  output logic        sys_wr_uart,
  input  logic        sys_rx_empty,
  input  logic        sys_tx_full,
  // SDRAM controller
  output logic        sd_delay,
  input  logic        sd_init_done,
  output logic        sd_rd_wr_en,
  output logic        sd_ads_en,
  output logic        sd_ref_req,
  input  logic        sd_ref_ack,
  input  logic        sd_cyc_end,
  output logic [23:0] sd_address,
  output logic [15:0] sd_wdata,
  input  logic [15:0] sd_rdata,
  input  logic        sd_data_valid,
  // AD5308 controller
  output logic [7:0]  a8_data,
  output logic        a8_data_en,
  output logic        a8_init_start,
  input  logic        a8_init_done,
  input  logic        a8_prepare_done,
  // AD5676 controller
  output logic [15:0] a16_data,
  output logic        a16_data_en,
  output logic        a16_init_start,
  input  logic        a16_init_done,
  input  logic        a16_prepare_done,
  // PE (MAX19005) controller
  output logic [2:0]           pe_data,
  output logic                 pe_data_en,
  input  logic                 pe_prepare_done,
  output logic [15:0]          time_set_data,
  output logic                 en_data,
  output logic                 start_test_sig,
  output logic                 empty_data,
  input  logic                 strobe_pulse,
  input  logic                 period_pulse,
  output logic [NCH-1:0][2:0]  pattern_data,
  output logic [NCH-1:0][2:0]  form_wave,
  input  logic [NCH-1:0]       data_1,
  input  logic [NCH-1:0]       data_2,
  input  logic [NCH-1:0]       fail
);
  typedef enum logic [2:0] {
    M_INIT, M_IDLE, M_TIMESET, M_PREPARE, M_PATTERN, M_TEST, M_REPORT
  } main_state_e;

  // Time-set byte layout
  localparam int unsigned B_SET  = 0;
  localparam int unsigned B_FMT  = B_SET + NCH;
  localparam int unsigned B_TIME = B_FMT + NCH;
  localparam int unsigned B_LDV  = B_TIME + 2 * TS_WORDS;
  localparam int unsigned B_DAC  = B_LDV + NCH;
  localparam int unsigned B_END  = B_DAC + 2 * N_DAC;

  main_state_e state;
  logic [15:0] cnt;          // init timer, time-set byte index, report byte index
  logic [7:0]  hi_byte;
  logic        lo_phase;
  logic [23:0] n_vec;        // vectors stored
  logic [23:0] rd_addr;      // next vector to fetch
  logic [23:0] n_strobe, n_fail, first_fail, second_fail;
  logic        acc_busy;     // an SDRAM access is in progress
  logic        init_go;

  // ---------------- UART interface ----------------
  wire want_byte = (state == M_IDLE) || (state == M_TIMESET) ||
                   (state == M_PATTERN && !acc_busy);
  assign sys_rd_uart = want_byte && !sys_rx_empty;
  wire [7:0] rx_b = sys_w_data;

  logic [7:0] rep_byte;
  always_comb begin
    unique case (cnt[3:0])
      4'd0: rep_byte = first_fail[23:16];
      4'd1: rep_byte = first_fail[15:8];
      4'd2: rep_byte = first_fail[7:0];
      4'd3: rep_byte = second_fail[23:16];
      4'd4: rep_byte = second_fail[15:8];
      4'd5: rep_byte = second_fail[7:0];
      4'd6: rep_byte = n_fail[23:16];
      4'd7: rep_byte = n_fail[15:8];
      default: rep_byte = n_fail[7:0];
    endcase
  end
  assign sys_r_data  = rep_byte;
  assign sys_wr_uart = (state == M_REPORT) && !sys_tx_full;

  // ---------------- vector buffer ----------------
  logic [15:0] vb_head;
  logic        vb_full;
  logic [VBUF_AW:0] vb_count;
  logic        vb_clear;

  sync_fifo #(.WIDTH(16), .AW(VBUF_AW)) u_vbuf (
    .clk, .rst(rst || vb_clear), .wr_en(sd_data_valid && state == M_TEST),
    .wr_data(sd_rdata), .rd_en(period_pulse), .rd_data(vb_head),
    .empty(empty_data), .full(vb_full), .count(vb_count));

  always_comb
    for (int c = 0; c < NCH; c++) pattern_data[c] = vb_head[3*c +: 3];

  wire room      = vb_count < (VBUF_AW+1)'(2**VBUF_AW - 1);
  wire all_read  = (rd_addr == n_vec);
  wire fail_any  = |fail;

  // ---------------- refresh request ----------------
  logic [$clog2(REF_INTERVAL+1)-1:0] ref_cnt;
  always_ff @(posedge clk) begin
    if (rst) begin
      ref_cnt <= '0; sd_ref_req <= 1'b0;
    end else if (sd_init_done) begin
      if (sd_ref_ack) sd_ref_req <= 1'b0;
      if (ref_cnt == $bits(ref_cnt)'(REF_INTERVAL - 1)) begin
        ref_cnt <= '0; sd_ref_req <= 1'b1;
      end else ref_cnt <= ref_cnt + 1'b1;
    end
  end

  // ---------------- state controller and sub-FSMs ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      state <= M_INIT; cnt <= '0; hi_byte <= '0; lo_phase <= 1'b0;
      n_vec <= '0; rd_addr <= '0; n_strobe <= '0; n_fail <= '0;
      first_fail <= NO_FAIL; second_fail <= NO_FAIL; acc_busy <= 1'b0;
      init_go <= 1'b0; vb_clear <= 1'b0;
      sd_delay <= 1'b0; sd_rd_wr_en <= 1'b0; sd_ads_en <= 1'b0;
      sd_address <= '0; sd_wdata <= '0;
      a8_data <= '0; a8_data_en <= 1'b0; a8_init_start <= 1'b0;
      a16_data <= '0; a16_data_en <= 1'b0; a16_init_start <= 1'b0;
      pe_data <= '0; pe_data_en <= 1'b0; time_set_data <= '0; en_data <= 1'b0;
      start_test_sig <= 1'b0; form_wave <= '0;
    end else begin
      a8_data_en <= 1'b0; a16_data_en <= 1'b0; pe_data_en <= 1'b0; en_data <= 1'b0;
      a8_init_start <= 1'b0; a16_init_start <= 1'b0; vb_clear <= 1'b0;

      // SDRAM interface: hold the request until the cycle ends
      if (sd_ads_en && sd_cyc_end) begin
        sd_ads_en <= 1'b0;
        acc_busy  <= 1'b0;
      end

      case (state)
        // ---- Init FSM ----
        M_INIT: begin
          if (!init_go) begin
            if (cnt == 16'(INIT_WAIT - 1)) begin
              init_go <= 1'b1; sd_delay <= 1'b1;
              a8_init_start <= 1'b1; a16_init_start <= 1'b1;
            end else cnt <= cnt + 1'b1;
          end else if (sd_init_done && a8_init_done && a16_init_done) begin
            state <= M_IDLE;
          end
        end
        M_IDLE: if (sys_rd_uart) begin
          cnt <= '0; lo_phase <= 1'b0;
          case (rx_b)
            CMD_TIMESET: state <= M_TIMESET;
            CMD_PATTERN: begin state <= M_PATTERN; n_vec <= '0; end
            CMD_RUN: begin
              state <= M_TEST; rd_addr <= '0; n_strobe <= '0; n_fail <= '0;
              first_fail <= NO_FAIL; second_fail <= NO_FAIL; vb_clear <= 1'b1;
            end
            default: ;
          endcase
        end
        // ---- Receive FSM: time set ----
        M_TIMESET: if (sys_rd_uart) begin
          cnt <= cnt + 1'b1;
          if (cnt < 16'(B_FMT)) begin
            pe_data <= rx_b[2:0]; pe_data_en <= 1'b1;
          end else if (cnt < 16'(B_TIME)) begin
            form_wave[cnt - 16'(B_FMT)] <= rx_b[2:0];
          end else if (cnt < 16'(B_LDV)) begin
            if (!cnt[0]) hi_byte <= rx_b;
            else begin time_set_data <= {hi_byte, rx_b}; en_data <= 1'b1; end
          end else if (cnt < 16'(B_DAC)) begin
            a8_data <= rx_b; a8_data_en <= 1'b1;
          end else begin
            if (!cnt[0]) hi_byte <= rx_b;
            else begin a16_data <= {hi_byte, rx_b}; a16_data_en <= 1'b1; end
          end
          if (cnt == 16'(B_END - 1)) state <= M_PREPARE;
        end
        // ---- Prepare FSM ----
        M_PREPARE:
          if (pe_prepare_done && a8_prepare_done && a16_prepare_done) state <= M_IDLE;
        // ---- Receive FSM: write pattern ----
        M_PATTERN: begin
          if (sys_rd_uart) begin
            if (!lo_phase) begin
              if (rx_b[7]) state <= M_IDLE;        // stop-pattern indicator
              else begin hi_byte <= rx_b; lo_phase <= 1'b1; end
            end else begin
              lo_phase    <= 1'b0;
              sd_wdata    <= {hi_byte, rx_b};
              sd_address  <= n_vec;
              sd_rd_wr_en <= 1'b0;
              sd_ads_en   <= 1'b1;
              acc_busy    <= 1'b1;
            end
          end
          if (sd_ads_en && sd_cyc_end) n_vec <= n_vec + 1'b1;
        end
        // ---- Test FSM ----
        M_TEST: begin
          if (!acc_busy && !all_read && room) begin
            sd_address  <= rd_addr;
            sd_rd_wr_en <= 1'b1;
            sd_ads_en   <= 1'b1;
            acc_busy    <= 1'b1;
          end
          if (sd_ads_en && sd_cyc_end) rd_addr <= rd_addr + 1'b1;
          if (!start_test_sig && (!room || all_read) && n_strobe != n_vec)
            start_test_sig <= 1'b1;
          if (strobe_pulse) begin
            n_strobe <= n_strobe + 1'b1;
            if (fail_any) begin
              n_fail <= n_fail + 1'b1;
              if (first_fail == NO_FAIL) first_fail <= n_strobe;
              else if (second_fail == NO_FAIL) second_fail <= n_strobe;
            end
          end
          if (n_strobe == n_vec) begin
            start_test_sig <= 1'b0; cnt <= '0; state <= M_REPORT;
          end
        end
        // ---- result report ----
        M_REPORT: if (sys_wr_uart) begin
          cnt <= cnt + 1'b1;
          if (cnt == 16'd8) state <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  // The vector buffer never overflows: a read starts only with room left.
  assert property (@(posedge clk) disable iff (rst)
                   !(sd_data_valid && state == M_TEST && vb_full));
endmodule
