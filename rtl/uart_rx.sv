// uart_rx: serial-to-parallel UART receiver, 8 data bits, no parity, 1 stop.
//
// The line is synchronised by two flip-flops. A falling edge starts a frame;
// the start bit is re-checked half a bit later (8 ticks of the 16x baud
// tick), then each data bit (LSB first) and the stop bit are sampled 16 ticks
// apart, in the bit centre. A good frame gives `data` and a one-cycle
// `valid`; a frame whose stop bit is low is dropped and pulses `frame_err`.
// The frame format is the document's; the sampling scheme is this design's.
module uart_rx #(
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       tick,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);
  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rx_state_e;
  rx_state_e state;
  logic [1:0] sync;
  logic [$clog2(OVERSAMPLE)-1:0] tcnt;
  logic [2:0] bitn;
  logic [7:0] sh;

  always_ff @(posedge clk) begin
    if (rst) sync <= 2'b11;
    else     sync <= {sync[0], rx};
  end
  wire rx_s = sync[1];

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= R_IDLE; tcnt <= '0; bitn <= '0; sh <= '0;
      data <= '0; valid <= 1'b0; frame_err <= 1'b0;
    end else begin
      valid <= 1'b0; frame_err <= 1'b0;
      case (state)
        R_IDLE: if (!rx_s) begin state <= R_START; tcnt <= '0; end
        R_START: if (tick) begin
          if (tcnt == $bits(tcnt)'(OVERSAMPLE/2 - 1)) begin
            tcnt <= '0;
            if (!rx_s) begin state <= R_DATA; bitn <= '0; end
            else state <= R_IDLE;  // glitch, not a start bit
          end else tcnt <= tcnt + 1'b1;
        end
        R_DATA: if (tick) begin
          if (tcnt == $bits(tcnt)'(OVERSAMPLE - 1)) begin
            tcnt <= '0;
            sh   <= {rx_s, sh[7:1]};
            if (bitn == 3'd7) state <= R_STOP;
            bitn <= bitn + 1'b1;
          end else tcnt <= tcnt + 1'b1;
        end
        R_STOP: if (tick) begin
          if (tcnt == $bits(tcnt)'(OVERSAMPLE - 1)) begin
            tcnt  <= '0;
            state <= R_IDLE;
            if (rx_s) begin data <= sh; valid <= 1'b1; end
            else frame_err <= 1'b1;
          end else tcnt <= tcnt + 1'b1;
        end
        default: state <= R_IDLE;
      endcase
    end
  end
endmodule
