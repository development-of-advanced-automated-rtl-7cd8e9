// uart_tx: parallel-to-serial UART transmitter, 8 data bits, no parity, 1 stop.
//
// `start` with `data` (accepted when `busy` is low) sends a low start bit,
// the eight data bits LSB first and a high stop bit, each lasting OVERSAMPLE
// ticks of the baud generator. The line idles high. `busy` stays high from
// the cycle after `start` until the stop bit has been on the line for a full
// bit time. Frame format from the document; the rest is this design's.
module uart_tx #(
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic       start,
  input  logic [7:0] data,
  output logic       busy,
  output logic       tx
);
  logic [9:0] frame;   // {stop, data[7:0], start}, shifted out LSB first
  logic [3:0] bitn;
  logic [$clog2(OVERSAMPLE)-1:0] tcnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; tx <= 1'b1; frame <= '1; bitn <= '0; tcnt <= '0;
    end else if (!busy) begin
      tx <= 1'b1;
      if (start) begin
        busy  <= 1'b1;
        frame <= {1'b1, data, 1'b0};
        bitn  <= '0;
        tcnt  <= '0;
        tx    <= 1'b0;
      end
    end else if (tick) begin
      if (tcnt == $bits(tcnt)'(OVERSAMPLE - 1)) begin
        tcnt <= '0;
        if (bitn == 4'd9) begin
          busy <= 1'b0;
          tx   <= 1'b1;
        end else begin
          bitn <= bitn + 1'b1;
          tx   <= frame[bitn + 1'b1];
        end
      end else tcnt <= tcnt + 1'b1;
    end
  end
endmodule
