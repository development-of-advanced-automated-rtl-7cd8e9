// ad5308_controller: drives the AD5308 octal 8-bit DAC that sets the
// MAX19005 load voltages (one per tester channel).
//
// Initialisation: a one-cycle sys_init_start sends two 16-bit control words,
// GAIN/BUF (control bit 15 = 1, bits 14:13 = 00, unbuffered reference, gain 1)
// and LDAC (bits 14:13 = 01, LDAC bits = 00: outputs update as soon as a
// channel is written), then raises sys_init_done. Prepare: the main
// controller gives NCH 8-bit values on sys_data with sys_data_en, channel 0
// first. When the last one is in, each value is sent as a DAC write word
// {0, channel[2:0], value[7:0], 4'b0000} and sys_prepare_done rises once all
// are sent; it stays high until the next value arrives.
//
// Serial timing: SYNC low for the 16 bits of a word, SCLK idles high and the
// DAC samples DIN on its falling edge; BIT_CYCLES = 32 system cycles per bit,
// so a word takes 512 cycles = 5.12 us at 100 MHz, the packet time the
// document reports. The 16-bit word and its conversion from the main
// controller's 8-bit value are the document's; the bit fields are taken from
// the AD5308 data sheet and the chosen control settings are this design's.
// The document clocks this block at 20 MHz; here it runs on the common
// system clock.
module ad5308_controller #(
  parameter int unsigned NCH        = 4,
  parameter int unsigned BIT_CYCLES = 32
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] sys_data,
  input  logic       sys_data_en,
  input  logic       sys_init_start,
  output logic       sys_init_done,
  output logic       sys_prepare_done,
  output logic       ad5308_sync,
  output logic       ad5308_sclk,
  output logic       ad5308_din
);
  localparam logic [15:0] CTRL_GAIN_BUF = 16'b1_00_0_0000_0000_0000;
  localparam logic [15:0] CTRL_LDAC     = 16'b1_01_0_0000_0000_0000;
  localparam int unsigned CW = $clog2(NCH + 2);
  localparam int unsigned IW = $clog2(NCH);

  typedef enum logic [1:0] {A_IDLE, A_INIT, A_SEND} a_state_e;
  a_state_e state;
  logic [7:0]  val [NCH];
  logic [CW-1:0] rx_cnt, idx;
  logic        spi_start, spi_busy, spi_done;
  logic [15:0] word;

  always_comb begin
    if (state == A_INIT) word = (idx == 0) ? CTRL_GAIN_BUF : CTRL_LDAC;
    else                 word = {1'b0, 3'(idx), val[idx[IW-1:0]], 4'b0000};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= A_IDLE; rx_cnt <= '0; idx <= '0; spi_start <= 1'b0;
      sys_init_done <= 1'b0; sys_prepare_done <= 1'b0;
      for (int i = 0; i < NCH; i++) val[i] <= '0;
    end else begin
      spi_start <= 1'b0;
      case (state)
        A_IDLE: begin
          if (sys_init_start) begin
            sys_init_done <= 1'b0; idx <= '0; spi_start <= 1'b1; state <= A_INIT;
          end else if (sys_data_en) begin
            val[rx_cnt[IW-1:0]] <= sys_data;
            sys_prepare_done <= 1'b0;
            if (rx_cnt == CW'(NCH - 1)) begin
              rx_cnt <= '0; idx <= '0; spi_start <= 1'b1; state <= A_SEND;
            end else rx_cnt <= rx_cnt + 1'b1;
          end
        end
        A_INIT: if (spi_done) begin
          if (idx == CW'(1)) begin sys_init_done <= 1'b1; state <= A_IDLE; end
          else begin idx <= idx + 1'b1; spi_start <= 1'b1; end
        end
        A_SEND: if (spi_done) begin
          if (idx == CW'(NCH - 1)) begin sys_prepare_done <= 1'b1; state <= A_IDLE; end
          else begin idx <= idx + 1'b1; spi_start <= 1'b1; end
        end
        default: state <= A_IDLE;
      endcase
    end
  end

  spi_shift_tx #(.MAX_BITS(16), .BIT_CYCLES(BIT_CYCLES)) u_spi (
    .clk, .rst, .start(spi_start), .data(word), .nbits(5'd16),
    .busy(spi_busy), .done(spi_done),
    .sclk(ad5308_sclk), .sdo(ad5308_din), .sync_n(ad5308_sync));
endmodule
