// sync_fifo: single-clock first-in first-out buffer, first-word fall-through.
//
// Used as the UART receive and transmit buffers and as the vector buffer
// between SDRAM reads and the pin-electronics controller. `rd_data` always
// shows the oldest entry while `empty` is low; `rd_en` removes it. `wr_en`
// while full and `rd_en` while empty are ignored. Storage is a register array
// of 2**AW words of WIDTH bits; the document gives no depth, so the depth is
// this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned AW    = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem [2**AW];
  logic [AW:0] wp, rp;

  wire do_wr = wr_en && !full;
  wire do_rd = rd_en && !empty;

  assign count   = wp - rp;
  assign empty   = (wp == rp);
  assign full    = (count == (AW+1)'(2**AW));
  assign rd_data = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0; rp <= '0;
    end else begin
      if (do_wr) wp <= wp + 1'b1;
      if (do_rd) rp <= rp + 1'b1;
    end
  end
endmodule
