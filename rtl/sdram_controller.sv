// sdram_controller: single-word SDR SDRAM controller for the H57V2562GTR
// (256 Mbit, x16, 4 banks x 8192 rows x 512 columns).
//
// It hides the SDRAM command protocol behind a simple request interface, in
// the style of the Lattice RD1010 reference design the document builds on,
// and has the two state machines the document names:
//  * Initialization FSM - waits for sys_delay (the main controller's "100 us
//    have passed" signal), then PRECHARGE ALL, two AUTO REFRESH, LOAD MODE
//    REGISTER (burst length 1, CAS latency 2), and raises sys_init_done.
//  * Command FSM - runs only after initialisation. An AUTO REFRESH request
//    (sys_ref_req, level) has priority and is answered with a one-cycle
//    sys_ref_ack when the command is issued. Otherwise a held sys_ads_en
//    starts one access: ACTIVE, READ or WRITE with auto-precharge, recovery.
//    sys_rd_wr_en = 1 reads, 0 writes. sys_address = {bank[1:0], row[12:0],
//    column[8:0]}. The requester keeps sys_ads_en, address and write data
//    stable until sys_cyc_end, which is high in the last cycle of the access.
//
// Timing at the 100 MHz system clock: a write takes 9 cycles (90 ns) and a
// read 8 cycles (80 ns) from the ACTIVE command to sys_cyc_end inclusive, the
// figures the document reports. Read data appears on sys_rdata with a
// one-cycle sys_data_valid in the sixth cycle of a read. tRCD = 2, CL = 2,
// tRP = 2, tRC = 7 and tMRD = 2 cycles are this design's choices for a 100 MHz
// part. The document's bidirectional sys_data bus and sdr_data pin are split
// into input, output and output-enable signals (the pad's tri-state buffer
// sits outside this module). sdr_clk is the system clock inverted, so that
// commands launched on a rising edge are stable at the SDRAM's sampling edge.
module sdram_controller
  import ate_pkg::*;
#(
  parameter int unsigned T_RCD     = 2,
  parameter int unsigned CAS_LAT   = 2,
  parameter int unsigned T_RP      = 2,
  parameter int unsigned T_RC      = 7,
  parameter int unsigned T_MRD     = 2,
  parameter int unsigned RD_CYCLES = 8,
  parameter int unsigned WR_CYCLES = 9
) (
  input  logic        clk,
  input  logic        rst,
  // system side
  input  logic        sys_delay,
  output logic        sys_init_done,
  input  logic        sys_rd_wr_en,
  input  logic        sys_ads_en,
  input  logic        sys_ref_req,
  output logic        sys_ref_ack,
  output logic        sys_cyc_end,
  input  logic [23:0] sys_address,
  input  logic [15:0] sys_wdata,
  output logic [15:0] sys_rdata,
  output logic        sys_data_valid,
  // SDRAM side
  output logic        sdr_clk,
  output logic        sdr_cke,
  output logic        sdr_cs_en,
  output logic        sdr_ras_en,
  output logic        sdr_cas_en,
  output logic        sdr_we_en,
  output logic        sdr_dqm,
  output logic [1:0]  sdr_ba,
  output logic [12:0] sdr_address,
  output logic [15:0] sdr_dq_o,
  output logic        sdr_dq_oe,
  input  logic [15:0] sdr_dq_i
);
  // Mode register: write burst as programmed, CL=2, sequential, burst length 1.
  localparam logic [12:0] MODE_REG = 13'b000_0_00_010_0_000;

  typedef enum logic [3:0] {
    I_WAIT, I_PRE, I_REF1, I_REF2, I_MRS, I_DONE,   // initialization FSM
    C_IDLE, C_REF, C_ACC                              // command FSM
  } sdr_state_e;

  sdr_state_e state;
  sdr_cmd_e   cmd;
  logic [3:0] cnt;
  logic       is_rd;
  logic [23:0] addr_q;

  assign {sdr_cs_en, sdr_ras_en, sdr_cas_en, sdr_we_en} = cmd;
  assign sdr_clk = ~clk;

  assign sys_cyc_end = (state == C_ACC) &&
                       (cnt == (is_rd ? 4'(RD_CYCLES - 1) : 4'(WR_CYCLES - 1)));

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= I_WAIT; cmd <= SDR_NOP; cnt <= '0; is_rd <= 1'b0; addr_q <= '0;
      sdr_cke <= 1'b0; sdr_dqm <= 1'b1; sdr_ba <= '0; sdr_address <= '0;
      sdr_dq_o <= '0; sdr_dq_oe <= 1'b0;
      sys_init_done <= 1'b0; sys_ref_ack <= 1'b0;
      sys_rdata <= '0; sys_data_valid <= 1'b0;
    end else begin
      cmd            <= SDR_NOP;
      sys_ref_ack    <= 1'b0;
      sys_data_valid <= 1'b0;
      sdr_dq_oe      <= 1'b0;
      sdr_cke        <= 1'b1;
      cnt            <= cnt + 1'b1;
      case (state)
        // ---------------- initialization FSM ----------------
        I_WAIT: if (sys_delay) begin
          cmd <= SDR_PRE; sdr_address <= 13'h0400;  // A10 = 1: all banks
          cnt <= '0; state <= I_PRE;
        end
        I_PRE: if (cnt == 4'(T_RP - 1)) begin
          cmd <= SDR_REF; cnt <= '0; state <= I_REF1;
        end
        I_REF1: if (cnt == 4'(T_RC - 1)) begin
          cmd <= SDR_REF; cnt <= '0; state <= I_REF2;
        end
        I_REF2: if (cnt == 4'(T_RC - 1)) begin
          cmd <= SDR_MRS; sdr_ba <= '0; sdr_address <= MODE_REG;
          cnt <= '0; state <= I_MRS;
        end
        I_MRS: if (cnt == 4'(T_MRD - 1)) begin
          cnt <= '0; state <= I_DONE;
        end
        I_DONE: begin
          sys_init_done <= 1'b1; sdr_dqm <= 1'b0; state <= C_IDLE;
        end
        // ---------------- command FSM ----------------
        C_IDLE: begin
          cnt <= '0;
          if (sys_ref_req) begin
            cmd <= SDR_REF; sys_ref_ack <= 1'b1; state <= C_REF;
          end else if (sys_ads_en) begin
            cmd         <= SDR_ACT;
            sdr_ba      <= sys_address[23:22];
            sdr_address <= sys_address[21:9];
            addr_q      <= sys_address;
            is_rd       <= sys_rd_wr_en;
            state       <= C_ACC;
          end
        end
        C_REF: if (cnt == 4'(T_RC - 1)) begin
          cnt <= '0; state <= C_IDLE;
        end
        C_ACC: begin
          if (cnt == 4'(T_RCD - 1)) begin
            cmd         <= is_rd ? SDR_READ : SDR_WRITE;
            sdr_ba      <= addr_q[23:22];
            sdr_address <= {2'b00, 1'b1, 1'b0, addr_q[8:0]};  // A10 = auto-precharge
            if (!is_rd) begin
              sdr_dq_o  <= sys_wdata;
              sdr_dq_oe <= 1'b1;
            end
          end
          if (is_rd && cnt == 4'(T_RCD + CAS_LAT)) begin
            sys_rdata      <= sdr_dq_i;
            sys_data_valid <= 1'b1;
          end
          if (sys_cyc_end) begin
            cnt <= '0; state <= C_IDLE;
          end
        end
        default: state <= I_WAIT;
      endcase
    end
  end
endmodule
