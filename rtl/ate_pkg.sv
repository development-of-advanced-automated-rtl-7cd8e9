// ate_pkg: types and constants shared by the FPGA pin-electronics tester.
//
// The tester drives a device under test (DUT) through four MAX19005 driver /
// comparator channels. Each test vector holds one 3-bit symbol per channel;
// each channel also has a 3-bit waveform format chosen in the time set. The
// host talks to the tester over a byte-wide UART link with a small command
// set defined here. The symbol, format and command encodings are this
// design's own choices: the published description names these quantities
// (3-bit pattern and waveform fields, time-set, write-pattern and run-test
// commands) but does not print their codes.
package ate_pkg;

  // Number of tester channels (one MAX19005 with four channels).
  localparam int unsigned NUM_CH = 4;

  // Per-channel vector symbol (pattern_data_x, 3 bits).
  typedef enum logic [2:0] {
    PAT_D0 = 3'd0,  // drive logic 0
    PAT_D1 = 3'd1,  // drive logic 1
    PAT_EL = 3'd2,  // receive, expect low  (comparator-low output = 0)
    PAT_EH = 3'd3,  // receive, expect high (comparator-high output = 1)
    PAT_X  = 3'd4,  // receive, no compare
    PAT_EZ = 3'd5   // receive, expect mid-band (between the two thresholds)
  } pat_sym_e;

  // Per-channel waveform format (form_wave_x, 3 bits); applies to drive symbols.
  typedef enum logic [2:0] {
    WF_NRZ = 3'd0,  // non-return-to-zero: level held for the whole period
    WF_RZ  = 3'd1,  // return-to-zero: data inside [T1,T2), 0 outside
    WF_RO  = 3'd2,  // return-to-one: data inside [T1,T2), 1 outside
    WF_SBC = 3'd3   // surround-by-complement: data inside, complement outside
  } wave_fmt_e;

  // Host command bytes received while the tester is idle.
  localparam logic [7:0] CMD_TIMESET = 8'hA1;  // start time set
  localparam logic [7:0] CMD_PATTERN = 8'hA2;  // start write pattern
  localparam logic [7:0] CMD_RUN     = 8'hA3;  // run test

  // Time-set words given to the pin-electronics controller, in this order.
  localparam int unsigned TS_PERIOD = 0;  // vector period, clock cycles
  localparam int unsigned TS_T1     = 1;  // drive edge 1 (window start)
  localparam int unsigned TS_T2     = 2;  // drive edge 2 (window end)
  localparam int unsigned TS_STROBE = 3;  // compare strobe time
  localparam int unsigned TS_WORDS  = 4;

  // Marker meaning "no failing vector" in the first / second fail reports.
  localparam logic [23:0] NO_FAIL = 24'hFFFFFF;

  // SDR SDRAM commands as {cs_n, ras_n, cas_n, we_n}.
  typedef enum logic [3:0] {
    SDR_NOP   = 4'b0111,
    SDR_ACT   = 4'b0011,
    SDR_READ  = 4'b0101,
    SDR_WRITE = 4'b0100,
    SDR_PRE   = 4'b0010,
    SDR_REF   = 4'b0001,
    SDR_MRS   = 4'b0000
  } sdr_cmd_e;

endpackage
