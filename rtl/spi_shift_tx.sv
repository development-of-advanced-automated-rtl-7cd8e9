// spi_shift_tx: write-only SPI frame generator shared by the DAC and
// pin-electronics controllers.
//
// A one-cycle `start` loads `data` (MSB first, left-aligned in MAX_BITS) and
// a frame length `nbits`. The frame line `sync_n` goes low, and every bit
// occupies BIT_CYCLES clock cycles: `sclk` is high for the first half and low
// for the second, so the bit is sampled by the slave on the falling edge in the
// middle of the bit (the mode used by the AD5308, AD5676 and the serial port
// assumed for the MAX19005). `sclk` idles high. After the last bit `sync_n`
// returns high and `done` pulses for one cycle, nbits*BIT_CYCLES cycles after
// the cycle in which `start` was sampled. `busy` is high in between; `start`
// is ignored while busy.
module spi_shift_tx #(
  parameter int unsigned MAX_BITS   = 16,
  parameter int unsigned BIT_CYCLES = 32
) (
  input  logic                        clk,
  input  logic                        rst,
  input  logic                        start,
  input  logic [MAX_BITS-1:0]         data,
  input  logic [$clog2(MAX_BITS+1)-1:0] nbits,
  output logic                        busy,
  output logic                        done,
  output logic                        sclk,
  output logic                        sdo,
  output logic                        sync_n
);
  localparam int unsigned HALF = BIT_CYCLES / 2;

  logic [MAX_BITS-1:0]            shreg;
  logic [$clog2(MAX_BITS+1)-1:0]  bits_left;
  logic [$clog2(BIT_CYCLES)-1:0]  div;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; done <= 1'b0; sclk <= 1'b1; sdo <= 1'b0; sync_n <= 1'b1;
      shreg <= '0; bits_left <= '0; div <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start && nbits != 0) begin
          busy      <= 1'b1;
          sync_n    <= 1'b0;
          sclk      <= 1'b1;
          sdo       <= data[MAX_BITS-1];
          shreg     <= data << 1;
          bits_left <= nbits - 1'b1;
          div       <= '0;
        end
      end else begin
        div <= div + 1'b1;
        if (div == $bits(div)'(HALF - 1)) sclk <= 1'b0;
        if (div == $bits(div)'(BIT_CYCLES - 1)) begin
          div  <= '0;
          sclk <= 1'b1;
          if (bits_left == 0) begin
            busy   <= 1'b0;
            sync_n <= 1'b1;
            done   <= 1'b1;
            sdo    <= 1'b0;
          end else begin
            sdo       <= shreg[MAX_BITS-1];
            shreg     <= shreg << 1;
            bits_left <= bits_left - 1'b1;
          end
        end
      end
    end
  end
endmodule
