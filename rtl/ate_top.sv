// ate_top: FPGA-based digital test module, a stand-alone replacement for the
// digital driver/detector instrument of a production tester.
//
// A host PC sends, over RS-232, a time set (channel settings, waveform
// formats, vector timing, load, drive and compare voltages) and a list of
// test vectors; the module stores the vectors in a 32 MB SDR SDRAM, applies
// them to a device under test through a MAX19005 four-channel driver /
// comparator, compares the device's responses at the strobe time and returns
// the first and second failing vector and the number of failing vectors.
// Voltage levels come from four daisy-chained AD5676 16-bit DACs (drive
// high/low, compare high/low) and an AD5308 8-bit DAC (load voltages).
//
// Blocks: uart_system, main_controller, sdram_controller, pe_controller,
// ad5308_controller, ad5676_controller, all on one system clock `clk`
// (100 MHz by default; the board's 50 MHz crystal and the FPGA clock
// generator that multiplies it are outside this RTL). `rst` is synchronous
// and active high. The SDRAM data pins appear as sdr_dq_o / sdr_dq_oe /
// sdr_dq_i for the FPGA's tri-state pad. All parameter defaults are the
// full-size design: 19200 baud, 100 us start-up wait, 7.8 us refresh.
module ate_top
  import ate_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 100_000_000,
  parameter int unsigned BAUD         = 19_200,
  parameter int unsigned UART_DIVISOR = (CLK_HZ + BAUD*8) / (BAUD*16),
  parameter int unsigned INIT_WAIT    = CLK_HZ / 10_000,        // 100 us
  parameter int unsigned REF_INTERVAL = 780,                    // 7.8 us
  parameter int unsigned NUM_DAC_IC   = 4,
  parameter int unsigned DAC_CH_USED  = 4
) (
  input  logic                clk,
  input  logic                rst,
  // RS-232 (TTL side of the level shifter)
  input  logic                rs_232_rx,
  output logic                rs_232_tx,
  // SDR SDRAM
  output logic                sdr_clk,
  output logic                sdr_cke,
  output logic                sdr_cs_en,
  output logic                sdr_ras_en,
  output logic                sdr_cas_en,
  output logic                sdr_we_en,
  output logic                sdr_dqm,
  output logic [1:0]          sdr_ba,
  output logic [12:0]         sdr_address,
  output logic [15:0]         sdr_dq_o,
  output logic                sdr_dq_oe,
  input  logic [15:0]         sdr_dq_i,
  // MAX19005 pin electronics
  output logic                max19005_swen,
  output logic                max19005_force,
  output logic                max19005_sense,
  output logic                max19005_sclk,
  output logic                max19005_din,
  output logic                max19005_cs,
  output logic [NUM_CH-1:0]   max19005_data,
  output logic [NUM_CH-1:0]   max19005_rcv,
  input  logic [NUM_CH-1:0]   max19005_cmph,
  input  logic [NUM_CH-1:0]   max19005_cmpl,
  // AD5308 load-voltage DAC
  output logic                ad5308_sync,
  output logic                ad5308_sclk,
  output logic                ad5308_din,
  // AD5676 level DACs (daisy chain)
  output logic                ad5676_sync,
  output logic                ad5676_sclk,
  output logic                ad5676_sdi,
  output logic                ad5676_ldac
);
  // UART system <-> main controller
  logic [7:0] u_r_data, u_w_data;
  logic u_rd, u_wr, u_rx_empty, u_tx_full;
  // SDRAM controller <-> main controller
  logic sd_delay, sd_init_done, sd_rd_wr_en, sd_ads_en, sd_ref_req, sd_ref_ack;
  logic sd_cyc_end, sd_data_valid;
  logic [23:0] sd_address;
  logic [15:0] sd_wdata, sd_rdata;
  // DAC controllers <-> main controller
  logic [7:0]  a8_data;  logic a8_data_en, a8_init_start, a8_init_done, a8_prepare_done;
  logic [15:0] a16_data; logic a16_data_en, a16_init_start, a16_init_done, a16_prepare_done;
  // PE controller <-> main controller
  logic [2:0] pe_data; logic pe_data_en, pe_prepare_done;
  logic [15:0] time_set_data; logic en_data, start_test_sig, empty_data;
  logic strobe_pulse, period_pulse;
  logic [NUM_CH-1:0][2:0] pattern_data, form_wave;
  logic [NUM_CH-1:0] data_1, data_2, fail;

  uart_system #(.DIVISOR(UART_DIVISOR)) u_uart (
    .clk, .rst, .rs_232_rx, .rs_232_tx,
    .sys_r_data(u_r_data), .sys_w_data(u_w_data), .sys_rd_uart(u_rd),
    .sys_wr_uart(u_wr), .sys_rx_empty(u_rx_empty), .sys_tx_full(u_tx_full));

  sdram_controller u_sdram (
    .clk, .rst, .sys_delay(sd_delay), .sys_init_done(sd_init_done),
    .sys_rd_wr_en(sd_rd_wr_en), .sys_ads_en(sd_ads_en), .sys_ref_req(sd_ref_req),
    .sys_ref_ack(sd_ref_ack), .sys_cyc_end(sd_cyc_end), .sys_address(sd_address),
    .sys_wdata(sd_wdata), .sys_rdata(sd_rdata), .sys_data_valid(sd_data_valid),
    .sdr_clk, .sdr_cke, .sdr_cs_en, .sdr_ras_en, .sdr_cas_en, .sdr_we_en, .sdr_dqm,
    .sdr_ba, .sdr_address, .sdr_dq_o, .sdr_dq_oe, .sdr_dq_i);

  main_controller #(
    .NCH(NUM_CH), .N_DAC(NUM_DAC_IC * DAC_CH_USED),
    .INIT_WAIT(INIT_WAIT), .REF_INTERVAL(REF_INTERVAL)
  ) u_main (
    .clk, .rst,
    .sys_r_data(u_r_data), .sys_w_data(u_w_data), .sys_rd_uart(u_rd),
    .sys_wr_uart(u_wr), .sys_rx_empty(u_rx_empty), .sys_tx_full(u_tx_full),
    .sd_delay, .sd_init_done, .sd_rd_wr_en, .sd_ads_en, .sd_ref_req, .sd_ref_ack,
    .sd_cyc_end, .sd_address, .sd_wdata, .sd_rdata, .sd_data_valid,
    .a8_data, .a8_data_en, .a8_init_start, .a8_init_done, .a8_prepare_done,
    .a16_data, .a16_data_en, .a16_init_start, .a16_init_done, .a16_prepare_done,
    .pe_data, .pe_data_en, .pe_prepare_done, .time_set_data, .en_data,
    .start_test_sig, .empty_data, .strobe_pulse, .period_pulse,
    .pattern_data, .form_wave, .data_1, .data_2, .fail);

  pe_controller #(.NCH(NUM_CH)) u_pe (
    .clk, .rst, .sys_data(pe_data), .sys_data_en(pe_data_en),
    .sys_prepare_done(pe_prepare_done), .time_set_data, .en_data,
    .start_test_sig, .empty_data, .strobe_pulse, .period_pulse,
    .pattern_data, .form_wave, .data_1, .data_2, .fail,
    .max19005_swen, .max19005_force, .max19005_sense, .max19005_sclk,
    .max19005_din, .max19005_cs, .max19005_data, .max19005_rcv,
    .max19005_cmph, .max19005_cmpl);

  ad5308_controller #(.NCH(NUM_CH)) u_ad5308 (
    .clk, .rst, .sys_data(a8_data), .sys_data_en(a8_data_en),
    .sys_init_start(a8_init_start), .sys_init_done(a8_init_done),
    .sys_prepare_done(a8_prepare_done),
    .ad5308_sync, .ad5308_sclk, .ad5308_din);

  ad5676_controller #(.NUM_IC(NUM_DAC_IC), .CH_USED(DAC_CH_USED)) u_ad5676 (
    .clk, .rst, .sys_data(a16_data), .sys_data_en(a16_data_en),
    .sys_init_start(a16_init_start), .sys_init_done(a16_init_done),
    .sys_prepare_done(a16_prepare_done),
    .ad5676_sync, .ad5676_sclk, .ad5676_sdi, .ad5676_ldac);
endmodule
