// uart_baud_gen: oversampling tick for the UART receiver and transmitter.
//
// Emits a one-cycle `tick` every DIVISOR clock cycles, that is OVERSAMPLE
// ticks per bit time. The default divides the 100 MHz system clock to
// 16 x 19200 baud: round(100e6 / (19200*16)) = 326, a rate error of 0.15 %.
// The 19200 baud rate is the document's; the 16x oversampling and the
// counter form are this design's choices.
module uart_baud_gen #(
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned BAUD       = 19_200,
  parameter int unsigned OVERSAMPLE = 16,
  parameter int unsigned DIVISOR    = (CLK_HZ + BAUD*OVERSAMPLE/2) / (BAUD*OVERSAMPLE)
) (
  input  logic clk,
  input  logic rst,
  output logic tick
);
  logic [$clog2(DIVISOR+1)-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == $bits(cnt)'(DIVISOR - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end
endmodule
