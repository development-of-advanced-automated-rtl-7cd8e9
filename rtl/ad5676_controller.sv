// ad5676_controller: drives NUM_IC AD5676 octal 16-bit DACs connected in a
// daisy chain (SDO of one into SDI of the next); they set the MAX19005 drive
// and compare levels: chip 0 DHV, chip 1 DLV, chip 2 CHV, chip 3 CLV, DAC
// channel n of each chip serving tester channel n.
//
// Each chip takes 24-bit commands {command[3:0], address[3:0], data[15:0]}.
// Initialisation (sys_init_start) turns daisy-chain mode on chip by chip:
// frame k (k = 1..NUM_IC) is k x 24 bits of "set up DCEN register, DCEN = 1"
// (command 1000), because a chip passes data on only once its own DCEN bit
// is set. sys_init_done then rises. Prepare: the main controller gives
// NUM_IC x CH_USED 16-bit values on sys_data with sys_data_en, ordered
// channel by channel and chip 0 first within a channel. When the last value
// is in, one 96-bit packet per channel is sent, holding a "write and update
// DAC channel n" command (0011) for every chip, the word for the last chip in
// the chain shifted out first; sys_prepare_done rises when all are sent.
// ad5676_ldac is held low, so written channels update at once.
//
// Serial timing: SYNC low for the whole packet, SCLK idles high, data
// sampled on the falling edge, BIT_CYCLES = 32 cycles per bit at 100 MHz.
// A 96-bit packet for four chips therefore takes 30.72 us; the document
// reports 30.60 us for the same packet. The 96-bit daisy-chain packet and the
// DHV/DLV/CHV/CLV use are the document's; command codes come from the AD5676
// data sheet; the chip-by-chip DCEN start-up and value order are this
// design's choices. The document clocks this block at 50 MHz; here it runs on
// the common system clock.
module ad5676_controller #(
  parameter int unsigned NUM_IC     = 4,
  parameter int unsigned CH_USED    = 4,
  parameter int unsigned BIT_CYCLES = 32
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] sys_data,
  input  logic        sys_data_en,
  input  logic        sys_init_start,
  output logic        sys_init_done,
  output logic        sys_prepare_done,
  output logic        ad5676_sync,
  output logic        ad5676_sclk,
  output logic        ad5676_sdi,
  output logic        ad5676_ldac
);
  localparam int unsigned NVAL  = NUM_IC * CH_USED;
  localparam int unsigned PBITS = 24 * NUM_IC;
  localparam int unsigned NB_W  = $clog2(PBITS + 1);
  localparam int unsigned VW    = $clog2(NVAL + 1);
  localparam int unsigned IW    = $clog2(NVAL);
  localparam logic [23:0] DCEN_ON = {4'b1000, 4'b0000, 16'h0001};

  typedef enum logic [1:0] {D_IDLE, D_INIT, D_SEND} d_state_e;
  d_state_e state;
  logic [15:0] val [NVAL];
  logic [VW-1:0] rx_cnt;
  logic [7:0]  idx;          // init frame number or channel being sent
  logic        spi_start, spi_busy, spi_done;
  logic [PBITS-1:0] pkt;
  logic [NB_W-1:0]  nbits;

  always_comb begin
    pkt   = '0;
    nbits = NB_W'(PBITS);
    if (state == D_INIT) begin
      // frame idx+1: (idx+1) DCEN words, left-aligned
      for (int k = 0; k < NUM_IC; k++)
        if (k <= int'(idx)) pkt[PBITS-1-24*k -: 24] = DCEN_ON;
      nbits = NB_W'(24 * (int'(idx) + 1));
    end else begin
      // chip NUM_IC-1 first, chip 0 last
      for (int k = 0; k < NUM_IC; k++)
        pkt[PBITS-1-24*k -: 24] = {4'b0011, 4'(idx), val[int'(idx)*NUM_IC + (NUM_IC-1-k)]};
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= D_IDLE; rx_cnt <= '0; idx <= '0; spi_start <= 1'b0;
      sys_init_done <= 1'b0; sys_prepare_done <= 1'b0; ad5676_ldac <= 1'b1;
      for (int i = 0; i < NVAL; i++) val[i] <= '0;
    end else begin
      spi_start   <= 1'b0;
      ad5676_ldac <= 1'b0;
      case (state)
        D_IDLE: begin
          if (sys_init_start) begin
            sys_init_done <= 1'b0; idx <= '0; spi_start <= 1'b1; state <= D_INIT;
          end else if (sys_data_en) begin
            val[rx_cnt[IW-1:0]] <= sys_data;
            sys_prepare_done <= 1'b0;
            if (rx_cnt == VW'(NVAL - 1)) begin
              rx_cnt <= '0; idx <= '0; spi_start <= 1'b1; state <= D_SEND;
            end else rx_cnt <= rx_cnt + 1'b1;
          end
        end
        D_INIT: if (spi_done) begin
          if (idx == 8'(NUM_IC - 1)) begin sys_init_done <= 1'b1; state <= D_IDLE; end
          else begin idx <= idx + 1'b1; spi_start <= 1'b1; end
        end
        D_SEND: if (spi_done) begin
          if (idx == 8'(CH_USED - 1)) begin sys_prepare_done <= 1'b1; state <= D_IDLE; end
          else begin idx <= idx + 1'b1; spi_start <= 1'b1; end
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  spi_shift_tx #(.MAX_BITS(PBITS), .BIT_CYCLES(BIT_CYCLES)) u_spi (
    .clk, .rst, .start(spi_start), .data(pkt), .nbits(nbits),
    .busy(spi_busy), .done(spi_done),
    .sclk(ad5676_sclk), .sdo(ad5676_sdi), .sync_n(ad5676_sync));
endmodule
