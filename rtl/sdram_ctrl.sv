// sdram_ctrl: SDRAM command and address control ("DRAM control").
//
// Takes one request at a time from the memory queue and turns it into
// SDRAM commands for a single-data-rate SDRAM whose bytes are CW_W bits wide
// (9-bit bytes carry the limited-weight codewords). The data it moves is
// already encoded; this block never looks inside it.
//
// How it works:
//  * After reset it waits INIT_WAIT cycles, precharges all banks, issues two
//    auto refreshes and loads the mode register (burst length BL, sequential,
//    CAS latency CAS). init_done then goes high.
//  * Closed-page policy: each request is ACTIVATE, then T_RCD cycles later a
//    READ or WRITE with auto precharge (A10 = 1). The next ACTIVATE waits
//    T_POST cycles, the largest of the write-recovery + precharge time, the
//    row cycle time, tRAS + tRP and the read-data return, so every bank
//    timing holds whichever bank comes next.
//  * A refresh timer raises a request every T_REFI cycles; a pending refresh
//    is served before the next access and blocks new requests for T_RFC.
//  * One system-bus word is BL = LANES / DQ_BYTES beats on the DQ bus, beat b
//    carrying bytes [b*DQ_BYTES +: DQ_BYTES]. The word address maps to
//    {row, bank, column}, column low bits zero.
//
// Timing: all SDRAM outputs are registered. req_ready is high only in a cycle
// in which a request is accepted and its ACTIVATE is registered at the same
// edge. Write data is driven with the WRITE command and in the following
// beats. Read data is sampled CAS cycles after the READ reaches the device;
// rd_valid pulses one cycle after the last beat with the whole encoded word.
// The page policy, burst length and default timing values (a 75 MHz
// MT48LC32M16A2-class part, in clock cycles) are this design's choices.
// sd_cs_n is constant low (the only device is always selected); the pin is
// kept so that the command bus is complete.
module sdram_ctrl #(
  parameter int unsigned LANES     = 4,
  parameter int unsigned CW_W      = 9,
  parameter int unsigned DQ_BYTES  = 2,
  parameter int unsigned ROW_W     = 13,
  parameter int unsigned COL_W     = 10,
  parameter int unsigned BA_W      = 2,
  parameter int unsigned T_RCD     = 2,
  parameter int unsigned T_RP      = 2,
  parameter int unsigned T_RAS     = 4,
  parameter int unsigned T_RC      = 5,
  parameter int unsigned T_WR      = 2,
  parameter int unsigned T_RFC     = 5,
  parameter int unsigned T_MRD     = 2,
  parameter int unsigned CAS       = 2,
  parameter int unsigned T_REFI    = 585,
  parameter int unsigned INIT_WAIT = 7500,
  // derived
  parameter int unsigned BL        = LANES / DQ_BYTES,
  parameter int unsigned DATA_W    = LANES * CW_W,
  parameter int unsigned DQ_W      = DQ_BYTES * CW_W,
  parameter int unsigned ADDR_W    = ROW_W + BA_W + COL_W - $clog2(BL),
  parameter int unsigned A_W       = (ROW_W > 11) ? ROW_W : 11
) (
  input  logic                clk,
  input  logic                rst_n,
  // request from the queue
  input  logic                req_valid,
  output logic                req_ready,
  input  logic                req_we,
  input  logic [ADDR_W-1:0]   req_addr,
  input  logic [DATA_W-1:0]   req_wdata,
  input  logic [LANES-1:0]    req_strb,
  // encoded read data
  output logic                rd_valid,
  output logic [DATA_W-1:0]   rd_data,
  output logic                init_done,
  output logic                ref_issued,
  // SDRAM pins
  output logic                sd_cs_n,
  output logic                sd_ras_n,
  output logic                sd_cas_n,
  output logic                sd_we_n,
  output logic [BA_W-1:0]     sd_ba,
  output logic [A_W-1:0]      sd_a,
  output logic [DQ_BYTES-1:0] sd_dqm,
  output logic [DQ_W-1:0]     sd_dq_out,
  output logic                sd_dq_oe,
  input  logic [DQ_W-1:0]     sd_dq_in
);
  import cic_pkg::*;

  localparam int unsigned BLB = $clog2(BL);
  localparam logic [BLB:0] WB_DONE = (BLB+1)'(BL);  // no write beat pending

  function automatic int unsigned max2(input int unsigned a, input int unsigned b);
    return (a > b) ? a : b;
  endfunction

  // Cycles from READ/WRITE to the next command that may open a row.
  localparam int unsigned T_POST = max2(max2(BL + T_WR + T_RP, T_RC - T_RCD),
                                        max2(T_RAS + T_RP - T_RCD, CAS + BL + 1));
  localparam int unsigned CNT_W  = $clog2(max2(INIT_WAIT, T_REFI) + 1);

  // Mode register: burst length BL, sequential, CAS latency CAS, burst write.
  localparam logic [A_W-1:0] MODE = A_W'((CAS << 4) | BLB);

  initial assert (LANES % DQ_BYTES == 0 && BL <= 8 && (1 << BLB) == BL)
    else $error("sdram_ctrl: LANES/DQ_BYTES must be a power of two up to 8");

  typedef enum logic [2:0] {
    S_INIT, S_INIT_PRE, S_INIT_REF1, S_INIT_REF2, S_INIT_MRS, S_IDLE, S_RW
  } state_e;

  state_e             state;
  logic [CNT_W-1:0]   cnt;
  logic [CNT_W-1:0]   ref_cnt;
  logic               ref_pending;
  sdram_cmd_e         cmd_q;

  // latched request
  logic               we_q;
  logic [DATA_W-1:0]  wdata_q;
  logic [LANES-1:0]   strb_q;
  logic [COL_W-1:0]   col_q;
  logic [BA_W-1:0]    ba_q;

  // data beats
  logic [BLB:0]       wbeat;                 // next write beat to drive, BL = none
  logic [CAS+BL-1:0]  rd_sh;                 // READ issue history
  logic [DATA_W-1:0]  rd_buf;

  logic [ROW_W-1:0]   req_row;
  logic [BA_W-1:0]    req_ba;
  logic [COL_W-1:0]   req_col;

  assign req_col = COL_W'({req_addr[COL_W-BLB-1:0], {BLB{1'b0}}});
  assign req_ba  = req_addr[COL_W-BLB +: BA_W];
  assign req_row = req_addr[COL_W-BLB+BA_W +: ROW_W];

  assign req_ready = (state == S_IDLE) && (cnt == 0) && !ref_pending;
  assign {sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n} = cmd_q;
  assign ref_issued = (cmd_q == CMD_REF) && init_done;

  // Refresh interval timer, running once the device is initialised.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ref_cnt     <= CNT_W'(T_REFI - 1);
      ref_pending <= 1'b0;
    end else if (init_done) begin
      if (ref_cnt == 0) begin
        ref_cnt     <= CNT_W'(T_REFI - 1);
        ref_pending <= 1'b1;
      end else begin
        ref_cnt <= ref_cnt - 1'b1;
        if (state == S_IDLE && cnt == 0) ref_pending <= 1'b0;  // served below
      end
    end
  end

  // Command sequencer.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_INIT;
      cnt       <= CNT_W'(INIT_WAIT);
      cmd_q     <= CMD_NOP;
      sd_ba     <= '0;
      sd_a      <= '0;
      init_done <= 1'b0;
      we_q      <= 1'b0;
      wdata_q   <= '0;
      strb_q    <= '0;
      col_q     <= '0;
      ba_q      <= '0;
    end else begin
      cmd_q <= CMD_NOP;
      if (cnt != 0) begin
        cnt <= cnt - 1'b1;
      end else begin
        unique case (state)
          S_INIT: begin
            cmd_q      <= CMD_PRE;
            sd_a       <= '0;
            sd_a[10]   <= 1'b1;               // all banks
            cnt        <= CNT_W'(T_RP - 1);
            state      <= S_INIT_REF1;
          end
          S_INIT_REF1, S_INIT_REF2: begin
            cmd_q <= CMD_REF;
            cnt   <= CNT_W'(T_RFC - 1);
            state <= (state == S_INIT_REF1) ? S_INIT_REF2 : S_INIT_MRS;
          end
          S_INIT_MRS: begin
            cmd_q     <= CMD_MRS;
            sd_ba     <= '0;
            sd_a      <= MODE;
            cnt       <= CNT_W'(T_MRD - 1);
            state     <= S_IDLE;
            init_done <= 1'b1;
          end
          S_IDLE: begin
            if (ref_pending) begin
              cmd_q <= CMD_REF;
              cnt   <= CNT_W'(T_RFC - 1);
            end else if (req_valid) begin
              cmd_q   <= CMD_ACT;
              sd_ba   <= req_ba;
              sd_a    <= A_W'(req_row);
              we_q    <= req_we;
              wdata_q <= req_wdata;
              strb_q  <= req_strb;
              col_q   <= req_col;
              ba_q    <= req_ba;
              cnt     <= CNT_W'(T_RCD - 1);
              state   <= S_RW;
            end
          end
          S_RW: begin
            cmd_q    <= we_q ? CMD_WRITE : CMD_READ;
            sd_ba    <= ba_q;
            sd_a     <= A_W'(col_q);
            sd_a[10] <= 1'b1;                  // auto precharge
            cnt      <= CNT_W'(T_POST - 1);
            state    <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  logic issue_wr, issue_rd;
  assign issue_wr = (state == S_RW) && (cnt == 0) && we_q;
  assign issue_rd = (state == S_RW) && (cnt == 0) && !we_q;

  // Byte masks follow the write beats (masks are low during reads).
  logic [DQ_BYTES-1:0] dqm_next;
  always_comb begin
    dqm_next = '0;
    if (issue_wr)         dqm_next = ~strb_q[0 +: DQ_BYTES];
    else if (wbeat != WB_DONE) dqm_next = ~strb_q[wbeat[BLB-1:0]*DQ_BYTES +: DQ_BYTES];
  end

  // Write data beats: beat 0 goes out with the WRITE command.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wbeat     <= WB_DONE;
      sd_dq_out <= '0;
      sd_dq_oe  <= 1'b0;
      sd_dqm    <= '1;
    end else begin
      sd_dq_oe <= 1'b0;
      sd_dqm   <= init_done ? dqm_next : '1;   // masks held high until initialised
      if (issue_wr) begin
        sd_dq_out <= wdata_q[0 +: DQ_W];
        sd_dq_oe  <= 1'b1;
        wbeat     <= (BLB+1)'(1);
      end else if (wbeat != WB_DONE) begin
        sd_dq_out <= wdata_q[wbeat[BLB-1:0]*DQ_W +: DQ_W];
        sd_dq_oe  <= 1'b1;
        wbeat     <= wbeat + 1'b1;
      end
    end
  end

  // Read data capture.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_sh    <= '0;
      rd_buf   <= '0;
      rd_valid <= 1'b0;
    end else begin
      rd_sh    <= {rd_sh[CAS+BL-2:0], issue_rd};
      for (int b = 0; b < BL; b++)
        if (rd_sh[CAS+b]) rd_buf[b*DQ_W +: DQ_W] <= sd_dq_in;
      rd_valid <= rd_sh[CAS+BL-1];
    end
  end
  assign rd_data = rd_buf;

  a_ref_late: assert property (@(posedge clk) disable iff (!rst_n)
                               !(ref_pending && ref_cnt == 0 && init_done))
    else $error("sdram_ctrl: refresh postponed past a full interval");
endmodule
