`timescale 1ns/1ps
// sdram_model: behavioural model of a x16 SDR SDRAM (4 banks, 13-bit row,
// 9-bit column) for simulation only; not synthesizable.
//
// It decodes {cs_n, ras_n, cas_n, we_n} on each rising clock edge (the
// controller launches commands on the same edge), keeps an associative array
// as storage, returns read data CAS_LAT edges after the READ command (the
// data is valid before that edge), and checks the protocol points a
// controller can get wrong: the power-up order (PRECHARGE ALL, two AUTO
// REFRESH, LOAD MODE) before any ACTIVE, READ/WRITE only to a bank with the
// addressed row open, ACTIVE only to a closed bank, and AUTO REFRESH only
// with all banks closed. Protocol errors are counted in `errors`.
module sdram_model #(
  parameter int unsigned CAS_LAT = 2
) (
  input  logic        clk,
  input  logic        cke,
  input  logic        cs_n, ras_n, cas_n, we_n,
  input  logic [1:0]  ba,
  input  logic [12:0] a,
  input  logic [15:0] dq_in,
  input  logic        dq_oe,
  output logic [15:0] dq_out
);
  logic [15:0] mem [int unsigned];
  logic        open_b [4];
  logic [12:0] row_b [4];
  int          init_step = 0;
  int          errors = 0, n_ref = 0, n_act = 0, n_rd = 0, n_wr = 0;
  logic [12:0] mode = '0;
  logic [15:0] rd_pipe [8];
  logic        rd_v [8];

  initial begin
    for (int i = 0; i < 4; i++) begin open_b[i] = 0; row_b[i] = '0; end
    for (int i = 0; i < 8; i++) begin rd_pipe[i] = '0; rd_v[i] = 0; end
    dq_out = '0;
  end

  function automatic int unsigned key(input logic [1:0] b, input logic [12:0] r,
                                      input logic [8:0] c);
    return {8'b0, b, r, c};
  endfunction

  always @(posedge clk) begin
    // read data pipeline: the word read at edge E is driven after edge E+CL-1
    for (int i = 7; i > 0; i--) begin rd_pipe[i] <= rd_pipe[i-1]; rd_v[i] <= rd_v[i-1]; end
    rd_pipe[0] <= '0; rd_v[0] <= 0;
    if (rd_v[CAS_LAT-2]) dq_out <= rd_pipe[CAS_LAT-2];
    if (cke && !cs_n) begin
      case ({ras_n, cas_n, we_n})
        3'b010: begin // PRECHARGE
          if (a[10]) for (int i = 0; i < 4; i++) open_b[i] = 0; else open_b[ba] = 0;
          if (init_step == 0 && a[10]) init_step = 1;
        end
        3'b001: begin // AUTO REFRESH
          n_ref++;
          for (int i = 0; i < 4; i++) if (open_b[i]) errors++;
          if (init_step == 1 || init_step == 2) init_step++;
        end
        3'b000: begin // LOAD MODE
          mode = a;
          if (init_step == 3) init_step = 4; else errors++;
          if (a[6:4] != 3'(CAS_LAT)) errors++;
        end
        3'b011: begin // ACTIVE
          n_act++;
          if (init_step != 4 || open_b[ba]) errors++;
          open_b[ba] = 1; row_b[ba] = a;
        end
        3'b101: begin // READ
          n_rd++;
          if (!open_b[ba]) errors++;
          rd_pipe[0] <= mem.exists(key(ba, row_b[ba], a[8:0])) ? mem[key(ba, row_b[ba], a[8:0])] : 16'hDEAD;
          rd_v[0] <= 1;
          if (a[10]) open_b[ba] = 0;
        end
        3'b100: begin // WRITE
          n_wr++;
          if (!open_b[ba] || !dq_oe) errors++;
          mem[key(ba, row_b[ba], a[8:0])] = dq_in;
          if (a[10]) open_b[ba] = 0;
        end
        default: ;
      endcase
    end
  end

  function automatic logic [15:0] peek(input logic [23:0] addr);
    int unsigned k = key(addr[23:22], addr[21:9], addr[8:0]);
    return mem.exists(k) ? mem[k] : 16'hDEAD;
  endfunction
endmodule
