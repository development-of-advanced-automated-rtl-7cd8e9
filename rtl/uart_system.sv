// uart_system: the tester's host link, an RS-232 UART with receive and
// transmit FIFO buffers.
//
// Bytes arriving on rs_232_rx are converted to parallel form and stored in
// the receive FIFO; the main controller sees the oldest byte on sys_w_data
// while sys_rx_empty is low and removes it with a one-cycle sys_rd_uart.
// Bytes written with sys_wr_uart / sys_r_data (ignored while sys_tx_full)
// go to the transmit FIFO, which is emptied onto rs_232_tx automatically, one
// frame after another, whenever the transmitter is free. The port names, the
// baud rate (19200, 8N1) and the structure (baud generator, receiver,
// transmitter, two FIFOs) follow the document; sys_r_data carries bytes from
// the main controller to the UART and sys_w_data bytes from the UART to the
// main controller, as the arrows in its figures show. FIFO depth 16 and the
// 16x oversampling are this design's choices.
module uart_system #(
  parameter int unsigned CLK_HZ   = 100_000_000,
  parameter int unsigned BAUD     = 19_200,
  parameter int unsigned DIVISOR  = (CLK_HZ + BAUD*8) / (BAUD*16),
  parameter int unsigned FIFO_AW  = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rs_232_rx,
  output logic       rs_232_tx,
  input  logic [7:0] sys_r_data,
  output logic [7:0] sys_w_data,
  input  logic       sys_rd_uart,
  input  logic       sys_wr_uart,
  output logic       sys_rx_empty,
  output logic       sys_tx_full
);
  logic tick;
  logic [7:0] rx_data, tx_data;
  logic rx_valid, rx_ferr, tx_busy, tx_empty, tx_start;
  logic rx_full;
  logic [FIFO_AW:0] rx_cnt, tx_cnt;

  uart_baud_gen #(.DIVISOR(DIVISOR)) u_baud (.clk, .rst, .tick);

  uart_rx u_rx (.clk, .rst, .tick, .rx(rs_232_rx), .data(rx_data),
                .valid(rx_valid), .frame_err(rx_ferr));

  sync_fifo #(.WIDTH(8), .AW(FIFO_AW)) u_rx_fifo (
    .clk, .rst, .wr_en(rx_valid), .wr_data(rx_data), .rd_en(sys_rd_uart),
    .rd_data(sys_w_data), .empty(sys_rx_empty), .full(rx_full), .count(rx_cnt));

  sync_fifo #(.WIDTH(8), .AW(FIFO_AW)) u_tx_fifo (
    .clk, .rst, .wr_en(sys_wr_uart), .wr_data(sys_r_data), .rd_en(tx_start),
    .rd_data(tx_data), .empty(tx_empty), .full(sys_tx_full), .count(tx_cnt));

  // Send the next buffered byte as soon as the transmitter is free.
  assign tx_start = !tx_busy && !tx_empty;

  uart_tx u_tx (.clk, .rst, .tick, .start(tx_start), .data(tx_data),
                .busy(tx_busy), .tx(rs_232_tx));
endmodule
