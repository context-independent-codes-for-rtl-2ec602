// cic_mem_ctrl: memory controller with a context-independent bus code.
//
// Write data from the system bus is encoded byte by byte (ci_encoder) with a
// fixed one-to-one code before it enters the memory request queue
// (mem_queue); the SDRAM control (sdram_ctrl) writes the codewords to an
// ordinary SDRAM whose bytes are CW_W bits wide. Read data comes back as
// codewords and is decoded (ci_decoder) on its way to the system bus. Because
// a codeword depends only on its byte, the memory stores encoded data and no
// coding logic is needed in the memory. With the default frequency-ranked
// 4-limited-weight code every 9-bit byte on the DQ pins has at most four ones
// and the most frequent bytes get the lightest codewords, which cuts the
// transitions on the off-chip bus.
//
// Interface:
//  * After reset the tables are filled with the fixed limited-weight code
//    (code_table_loader, 2**SYM_W cycles); cfg_ready then rises.
//  * cfg_we/cfg_sym/cfg_cw load one (symbol, codeword) pair into every
//    encode and decode table once cfg_ready is high. To switch to a
//    frequency-ranked code, load all 2**SYM_W pairs; the code must not
//    change while memory holds data written with the old one.
//  * req_valid/req_ready/req_we/req_addr/req_wdata/req_strb: one 32-bit word
//    request per handshake (word address; strobes mask bytes of a write).
//  * resp_valid/resp_rdata: decoded read data, in request order, one pulse
//    per read, no back-pressure.
//  * sd_*: SDRAM pins; the DQ bus is split into sd_dq_out/sd_dq_oe/sd_dq_in.
//
// Timing: encoding takes one register stage ahead of the queue; decoding
// adds one cycle after the read data arrives. Reads and writes are served
// strictly in order, one at a time. Widths, queue depth, page policy and the
// table-loading port are choices of this design.
module cic_mem_ctrl #(
  parameter int unsigned LANES     = 4,
  parameter int unsigned SYM_W     = 8,
  parameter int unsigned CW_W      = 9,
  parameter int unsigned DQ_BYTES  = 2,
  parameter int unsigned QDEPTH    = 8,
  parameter int unsigned ROW_W     = 13,
  parameter int unsigned COL_W     = 10,
  parameter int unsigned BA_W      = 2,
  parameter int unsigned T_REFI    = 585,
  parameter int unsigned INIT_WAIT = 7500,
  // derived
  parameter int unsigned BL        = LANES / DQ_BYTES,
  parameter int unsigned ADDR_W    = ROW_W + BA_W + COL_W - $clog2(BL),
  parameter int unsigned DQ_W      = DQ_BYTES * CW_W,
  parameter int unsigned A_W       = (ROW_W > 11) ? ROW_W : 11
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // code table load
  input  logic                     cfg_we,
  input  logic [SYM_W-1:0]         cfg_sym,
  input  logic [CW_W-1:0]          cfg_cw,
  // system bus
  input  logic                     req_valid,
  output logic                     req_ready,
  input  logic                     req_we,
  input  logic [ADDR_W-1:0]        req_addr,
  input  logic [LANES*SYM_W-1:0]   req_wdata,
  input  logic [LANES-1:0]         req_strb,
  output logic                     resp_valid,
  output logic [LANES*SYM_W-1:0]   resp_rdata,
  // status
  output logic                     cfg_ready,
  output logic                     init_done,
  output logic                     ref_issued,
  output logic [$clog2(QDEPTH+1)-1:0] queue_count,
  // SDRAM pins
  output logic                     sd_cs_n,
  output logic                     sd_ras_n,
  output logic                     sd_cas_n,
  output logic                     sd_we_n,
  output logic [BA_W-1:0]          sd_ba,
  output logic [A_W-1:0]           sd_a,
  output logic [DQ_BYTES-1:0]      sd_dqm,
  output logic [DQ_W-1:0]          sd_dq_out,
  output logic                     sd_dq_oe,
  input  logic [DQ_W-1:0]          sd_dq_in
);
  localparam int unsigned DATA_W = LANES * CW_W;
  localparam int unsigned SIDE_W = 1 + ADDR_W + LANES;
  localparam int unsigned Q_W    = SIDE_W + DATA_W;

  // encoder -> queue
  logic                 enc_valid, enc_ready;
  logic [DATA_W-1:0]    enc_data;
  logic [SIDE_W-1:0]    enc_side;
  // queue -> SDRAM control
  logic                 q_valid, q_ready;
  logic [Q_W-1:0]       q_data;
  logic                 q_we;
  logic [ADDR_W-1:0]    q_addr;
  logic [LANES-1:0]     q_strb;
  logic [DATA_W-1:0]    q_wdata;
  // table writes after the default-code loader
  logic                 tbl_we;
  logic [SYM_W-1:0]     tbl_sym;
  logic [CW_W-1:0]      tbl_cw;
  // SDRAM control -> decoder
  logic                 rd_valid;
  logic [DATA_W-1:0]    rd_data;

  code_table_loader #(.SYM_W(SYM_W), .CW_W(CW_W)) u_loader (
    .clk, .rst_n,
    .ext_we (cfg_we), .ext_sym (cfg_sym), .ext_cw (cfg_cw),
    .cfg_ready,
    .tbl_we, .tbl_sym, .tbl_cw
  );

  ci_encoder #(.LANES(LANES), .SYM_W(SYM_W), .CW_W(CW_W), .SIDE_W(SIDE_W)) u_enc (
    .clk, .rst_n,
    .cfg_we (tbl_we), .cfg_sym (tbl_sym), .cfg_cw (tbl_cw),
    .in_valid  (req_valid),
    .in_ready  (req_ready),
    .in_data   (req_wdata),
    .in_side   ({req_we, req_addr, req_strb}),
    .out_valid (enc_valid),
    .out_ready (enc_ready),
    .out_data  (enc_data),
    .out_side  (enc_side)
  );

  mem_queue #(.WIDTH(Q_W), .DEPTH(QDEPTH)) u_queue (
    .clk, .rst_n,
    .in_valid  (enc_valid),
    .in_ready  (enc_ready),
    .in_data   ({enc_side, enc_data}),
    .out_valid (q_valid),
    .out_ready (q_ready),
    .out_data  (q_data),
    .count     (queue_count)
  );

  assign {q_we, q_addr, q_strb, q_wdata} = q_data;

  sdram_ctrl #(
    .LANES(LANES), .CW_W(CW_W), .DQ_BYTES(DQ_BYTES),
    .ROW_W(ROW_W), .COL_W(COL_W), .BA_W(BA_W),
    .T_REFI(T_REFI), .INIT_WAIT(INIT_WAIT)
  ) u_sdram (
    .clk, .rst_n,
    .req_valid (q_valid),
    .req_ready (q_ready),
    .req_we    (q_we),
    .req_addr  (q_addr),
    .req_wdata (q_wdata),
    .req_strb  (q_strb),
    .rd_valid, .rd_data,
    .init_done, .ref_issued,
    .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n,
    .sd_ba, .sd_a, .sd_dqm, .sd_dq_out, .sd_dq_oe, .sd_dq_in
  );

  ci_decoder #(.LANES(LANES), .SYM_W(SYM_W), .CW_W(CW_W)) u_dec (
    .clk, .rst_n,
    .cfg_we (tbl_we), .cfg_sym (tbl_sym), .cfg_cw (tbl_cw),
    .in_valid  (rd_valid),
    .in_data   (rd_data),
    .out_valid (resp_valid),
    .out_data  (resp_rdata)
  );
endmodule
