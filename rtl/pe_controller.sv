// pe_controller: controller for one MAX19005 four-channel pin-electronics
// driver/comparator (the document's "PE controller").
//
// Prepare phase. The main controller gives one 3-bit setting per channel on
// sys_data with sys_data_en, channel 0 first (bit 0: channel on, bit 1:
// active load on, bit 2: spare mode bit). When all NUM_CH settings are in,
// one 16-bit serial word per channel is sent on max19005_cs/sclk/din:
// {channel[1:0], setting[2:0], 11'b0}, 16 bits x 25 cycles = 4.00 us per
// channel at 100 MHz (the document measures 4.005 us). sys_prepare_done then
// rises and stays high until the next setting arrives. Four 16-bit time-set
// words arrive on time_set_data with en_data: period, T1, T2, strobe, in
// clock cycles.
//
// Test phase. While start_test_sig is high the controller runs vector
// periods. At each period start it takes the vector on pattern_data_x (one
// 3-bit symbol per channel, see ate_pkg) if empty_data is low, and pulses
// period_pulse to say the vector was taken; if empty_data is high it waits
// (the tester stalls) until a vector arrives or start_test_sig falls. Within
// the period the drive symbols 0/1 are shaped by form_wave_x (NRZ, RZ, RO,
// SBC over the window [T1,T2)) on max19005_data_x with max19005_rcv_x low;
// compare and don't-care symbols put the channel in receive
// (max19005_rcv_x high). At the strobe time the comparator outputs are
// captured on data_1_x (cmph) and data_2_x (cmpl), fail_x shows a mismatch,
// and strobe_pulse is high for that cycle. cmph is taken as "DUT above the
// high threshold" and cmpl as "DUT above the low threshold". A channel that
// is switched off never drives and never fails. The outputs to the
// MAX19005 are registered, one cycle after the period counter.
//
// Port names follow the document's figure; the serial word, symbol and
// waveform codes, the meaning of the setting bits and the time-set order are
// this design's choices. max19005_swen/force/sense are held at 1/0/0, the
// levels the document's system simulation shows.
module pe_controller
  import ate_pkg::*;
#(
  parameter int unsigned NCH            = NUM_CH,
  parameter int unsigned SPI_BITS       = 16,
  parameter int unsigned SPI_BIT_CYCLES = 25
) (
  input  logic                 clk,
  input  logic                 rst,
  // main controller: channel settings
  input  logic [2:0]           sys_data,
  input  logic                 sys_data_en,
  output logic                 sys_prepare_done,
  // main controller: time set and test
  input  logic [15:0]          time_set_data,
  input  logic                 en_data,
  input  logic                 start_test_sig,
  input  logic                 empty_data,
  output logic                 strobe_pulse,
  output logic                 period_pulse,
  input  logic [NCH-1:0][2:0]  pattern_data,
  input  logic [NCH-1:0][2:0]  form_wave,
  output logic [NCH-1:0]       data_1,
  output logic [NCH-1:0]       data_2,
  output logic [NCH-1:0]       fail,
  // MAX19005
  output logic                 max19005_swen,
  output logic                 max19005_force,
  output logic                 max19005_sense,
  output logic                 max19005_sclk,
  output logic                 max19005_din,
  output logic                 max19005_cs,
  output logic [NCH-1:0]       max19005_data,
  output logic [NCH-1:0]       max19005_rcv,
  input  logic [NCH-1:0]       max19005_cmph,
  input  logic [NCH-1:0]       max19005_cmpl
);
  localparam int unsigned CW   = (NCH > 1) ? $clog2(NCH) : 1;
  localparam int unsigned NB_W = $clog2(SPI_BITS + 1);

  // ---------------- channel settings and serial port ----------------
  logic [NCH-1:0][2:0] setting;
  logic [CW:0]         set_cnt;     // settings received
  logic [CW:0]         send_idx;    // next channel to send
  logic                sending;
  logic                spi_start, spi_busy, spi_done;
  logic [SPI_BITS-1:0] spi_word;

  always_comb begin
    spi_word = '0;
    spi_word[SPI_BITS-1 -: 2] = 2'(send_idx);
    spi_word[SPI_BITS-3 -: 3] = setting[send_idx[CW-1:0]];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      setting <= '0; set_cnt <= '0; send_idx <= '0; sending <= 1'b0;
      spi_start <= 1'b0; sys_prepare_done <= 1'b0;
    end else begin
      spi_start <= 1'b0;
      if (sys_data_en && !sending) begin
        setting[set_cnt[CW-1:0]] <= sys_data;
        sys_prepare_done <= 1'b0;
        if (set_cnt == (CW+1)'(NCH - 1)) begin
          set_cnt  <= '0;
          sending  <= 1'b1;
          send_idx <= '0;
          spi_start <= 1'b1;
        end else set_cnt <= set_cnt + 1'b1;
      end
      if (sending && spi_done) begin
        if (send_idx == (CW+1)'(NCH - 1)) begin
          sending <= 1'b0;
          sys_prepare_done <= 1'b1;
        end else begin
          send_idx  <= send_idx + 1'b1;
          spi_start <= 1'b1;
        end
      end
    end
  end

  logic spi_sync_n;
  spi_shift_tx #(.MAX_BITS(SPI_BITS), .BIT_CYCLES(SPI_BIT_CYCLES)) u_spi (
    .clk, .rst, .start(spi_start), .data(spi_word),
    .nbits(NB_W'(SPI_BITS)), .busy(spi_busy), .done(spi_done),
    .sclk(max19005_sclk), .sdo(max19005_din), .sync_n(spi_sync_n));
  assign max19005_cs = spi_sync_n;

  // ---------------- time set ----------------
  logic [15:0] ts [TS_WORDS];
  logic [1:0]  ts_cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      ts_cnt <= '0;
      for (int i = 0; i < TS_WORDS; i++) ts[i] <= '0;
    end else if (en_data) begin
      ts[ts_cnt] <= time_set_data;
      ts_cnt     <= ts_cnt + 1'b1;
    end
  end

  // ---------------- vector timing ----------------
  typedef enum logic [1:0] {T_IDLE, T_WAIT, T_RUN} tst_state_e;
  tst_state_e tstate;
  logic [15:0] tcnt;
  logic [NCH-1:0][2:0] vec, fmt;

  wire period_end = (tstate == T_RUN) && (tcnt == ts[TS_PERIOD] - 16'd1);
  wire want_vec   = (tstate == T_WAIT) || period_end;
  wire take_vec   = want_vec && start_test_sig && !empty_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      tstate <= T_IDLE; tcnt <= '0; vec <= '0; fmt <= '0; period_pulse <= 1'b0;
    end else begin
      period_pulse <= 1'b0;
      case (tstate)
        T_IDLE: if (start_test_sig) tstate <= T_WAIT;
        default: begin
          if (tstate == T_RUN && !period_end) tcnt <= tcnt + 1'b1;
          if (take_vec) begin
            vec          <= pattern_data;
            fmt          <= form_wave;
            tcnt         <= '0;
            tstate       <= T_RUN;
            period_pulse <= 1'b1;
          end else if (want_vec) begin
            tstate <= start_test_sig ? T_WAIT : T_IDLE;
          end
        end
      endcase
    end
  end

  // ---------------- drive waveform and compare ----------------
  wire in_win  = (tcnt >= ts[TS_T1]) && (tcnt < ts[TS_T2]);
  wire running = (tstate == T_RUN);
  wire strobe  = running && (tcnt == ts[TS_STROBE]);

  always_ff @(posedge clk) begin
    if (rst) begin
      max19005_data <= '0; max19005_rcv <= '1;
      data_1 <= '0; data_2 <= '0; fail <= '0; strobe_pulse <= 1'b0;
      max19005_swen <= 1'b0; max19005_force <= 1'b0; max19005_sense <= 1'b0;
    end else begin
      max19005_swen  <= 1'b1;
      max19005_force <= 1'b0;
      max19005_sense <= 1'b0;
      strobe_pulse   <= strobe;
      for (int c = 0; c < NCH; c++) begin
        logic d, drive;
        d     = (vec[c] == PAT_D1);
        drive = running && setting[c][0] && (vec[c] == PAT_D0 || vec[c] == PAT_D1);
        max19005_rcv[c] <= !drive;
        if (!drive) max19005_data[c] <= 1'b0;
        else case (fmt[c])
          WF_RZ:   max19005_data[c] <= in_win ? d : 1'b0;
          WF_RO:   max19005_data[c] <= in_win ? d : 1'b1;
          WF_SBC:  max19005_data[c] <= in_win ? d : !d;
          default: max19005_data[c] <= d;
        endcase
        if (strobe) begin
          data_1[c] <= max19005_cmph[c];
          data_2[c] <= max19005_cmpl[c];
          if (!setting[c][0]) fail[c] <= 1'b0;
          else case (vec[c])
            PAT_EH:  fail[c] <= !max19005_cmph[c];
            PAT_EL:  fail[c] <= max19005_cmpl[c];
            PAT_EZ:  fail[c] <= max19005_cmph[c] || !max19005_cmpl[c];
            default: fail[c] <= 1'b0;
          endcase
        end
      end
    end
  end
endmodule
