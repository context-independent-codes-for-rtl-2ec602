// sdram_model: behavioural model of a single-data-rate SDRAM with CW_W-bit
// bytes, used only by the testbenches; it has no synthesizable counterpart.
//
// It stores what is written (honouring the byte masks), returns read bursts
// CAS cycles after the READ, and checks the protocol the controller must
// obey: power-up wait, precharge / two refreshes / mode register before use,
// the expected mode, ACTIVATE only to an idle bank after tRC / tRP / tRAS,
// READ/WRITE only to an open bank after tRCD, refresh only with all banks
// idle, the refresh interval, and write data driven exactly in write beats.
// Each breach adds one to `violations`. It also counts the bit transitions
// between consecutive data beats on the DQ wires (`toggles`), the bytes
// written with more than MAXW ones (`heavy`), and the commands seen.
module sdram_model #(
  parameter int unsigned CW_W      = 9,
  parameter int unsigned DQ_BYTES  = 2,
  parameter int unsigned ROW_W     = 13,
  parameter int unsigned COL_W     = 10,
  parameter int unsigned BA_W      = 2,
  parameter int unsigned BL        = 2,
  parameter int unsigned CAS       = 2,
  parameter int unsigned T_RCD     = 2,
  parameter int unsigned T_RP      = 2,
  parameter int unsigned T_RAS     = 4,
  parameter int unsigned T_RC      = 5,
  parameter int unsigned T_WR      = 2,
  parameter int unsigned T_RFC     = 5,
  parameter int unsigned T_REFI    = 585,
  parameter int unsigned INIT_WAIT = 7500,
  parameter int unsigned MAXW      = 4,
  parameter int unsigned A_W       = (ROW_W > 11) ? ROW_W : 11,
  parameter int unsigned DQ_W      = DQ_BYTES * CW_W
) (
  input  logic                clk,
  input  logic                rst_n,     // commands are ignored while low
  input  logic                cs_n, ras_n, cas_n, we_n,
  input  logic [BA_W-1:0]     ba,
  input  logic [A_W-1:0]      a,
  input  logic [DQ_BYTES-1:0] dqm,
  input  logic [DQ_W-1:0]     dq_in,     // from the controller
  input  logic                dq_oe,
  output logic [DQ_W-1:0]     dq_out,    // to the controller
  output int                  violations,
  output int                  toggles,
  output int                  beats,
  output int                  heavy,
  output int                  n_act, n_rd, n_wr, n_ref
);
  localparam int NB = 1 << BA_W;

  logic [DQ_W-1:0] mem [longint];
  longint cyc = 0;
  bit     mode_ok = 0;
  int     init_ref = 0;
  bit     init_pre = 0;
  bit     first_cmd = 1;
  longint last_ref = -1;
  bit     open_b [NB];
  longint rowreg [NB];    // row latched by ACTIVATE
  longint t_act [NB];
  longint t_ready [NB];
  // write burst in progress
  int     wr_left = 0;
  longint wr_addr;
  // read return schedule, indexed by cycle modulo 16
  bit              sch_v [16];
  logic [DQ_W-1:0] sch_d [16];
  logic [DQ_W-1:0] last_beat = '0;

  initial begin
    violations = 0; toggles = 0; beats = 0; heavy = 0;
    n_act = 0; n_rd = 0; n_wr = 0; n_ref = 0;
    dq_out = '0;
    for (int b = 0; b < NB; b++) begin open_b[b] = 0; t_act[b] = -100; t_ready[b] = 0; end
    for (int i = 0; i < 16; i++) sch_v[i] = 0;
  end

  function automatic longint lmax(longint x, longint y); return (x > y) ? x : y; endfunction

  task automatic bad(input string what);
    violations++;
    $display("sdram_model: cycle %0d: %s", cyc, what);
  endtask

  task automatic beat(input logic [DQ_W-1:0] d);
    toggles += $countones(d ^ last_beat);
    last_beat = d;
    beats++;
  endtask

  always @(posedge clk) begin
    logic [3:0] cmd;
    longint addr;
    cmd = rst_n ? {cs_n, ras_n, cas_n, we_n} : 4'b0111;

    // read data scheduled for this edge
    if (sch_v[cyc % 16]) begin
      dq_out <= sch_d[cyc % 16];
      beat(sch_d[cyc % 16]);
      sch_v[cyc % 16] = 0;
    end

    // write beats after the first
    if (wr_left > 0) begin
      if (!dq_oe) bad("write beat without data");
      for (int y = 0; y < DQ_BYTES; y++) if (!dqm[y]) begin
        automatic logic [DQ_W-1:0] old = mem.exists(wr_addr) ? mem[wr_addr] : '0;
        old[y*CW_W +: CW_W] = dq_in[y*CW_W +: CW_W];
        mem[wr_addr] = old;
        if ($countones(dq_in[y*CW_W +: CW_W]) > MAXW) heavy++;
      end
      beat(dq_in);
      wr_addr++;
      wr_left--;
    end else if (rst_n && dq_oe && cmd != 4'b0100) bad("data driven outside a write");

    if (cmd[3] == 1'b0 && cmd != 4'b0111) begin
      if (first_cmd && cyc < INIT_WAIT) bad("command before the power-up wait");
      first_cmd = 0;
    end

    case (cmd)
      4'b0010: begin  // PRECHARGE
        if (!a[10]) bad("single-bank precharge not expected");
        for (int b = 0; b < NB; b++) begin open_b[b] = 0; t_ready[b] = lmax(t_ready[b], cyc + T_RP); end
        init_pre = 1;
      end
      4'b0001: begin  // AUTO REFRESH
        for (int b = 0; b < NB; b++) begin
          if (open_b[b] || cyc < t_ready[b]) bad("refresh with a bank busy");
          t_ready[b] = cyc + T_RFC;
        end
        if (!mode_ok) begin
          if (!init_pre) bad("refresh before precharge-all in init");
          init_ref++;
        end else begin
          if (last_ref >= 0 && cyc - last_ref > T_REFI + 16) bad("refresh interval exceeded");
          n_ref++;
        end
        last_ref = cyc;
      end
      4'b0000: begin  // LOAD MODE REGISTER
        if (init_ref < 2) bad("mode register before two refreshes");
        if (a[2:0] != A_W'($clog2(BL)) || a[6:4] != 3'(CAS) || a[3] || a[9]) bad("unexpected mode");
        for (int b = 0; b < NB; b++) if (cyc < t_ready[b]) bad("mode register too early");
        mode_ok = 1;
      end
      4'b0011: begin  // ACTIVATE
        if (!mode_ok) bad("activate before init");
        if (open_b[ba]) bad("activate to an open bank");
        if (cyc < t_ready[ba]) bad("activate too early (tRP/tRFC)");
        if (cyc - t_act[ba] < T_RC) bad("activate too early (tRC)");
        open_b[ba] = 1; t_act[ba] = cyc; n_act++;
        rowreg[ba] = longint'(a[ROW_W-1:0]);
      end
      4'b0101, 4'b0100: begin  // READ / WRITE
        longint row;
        if (!open_b[ba]) bad("read/write to a closed bank");
        if (cyc - t_act[ba] < T_RCD) bad("read/write too early (tRCD)");
        if (!a[10]) bad("auto precharge expected");
        row = rowreg[ba];
        addr = (((row << BA_W) | longint'(ba)) << COL_W) | longint'(a[COL_W-1:0]);
        open_b[ba] = 0;
        if (cmd == 4'b0101) begin
          n_rd++;
          t_ready[ba] = lmax(cyc + BL, t_act[ba] + T_RAS) + T_RP;
          for (int k = 0; k < BL; k++) begin
            sch_v[(cyc + CAS + k - 1) % 16] = 1;
            sch_d[(cyc + CAS + k - 1) % 16] = mem.exists(addr + k) ? mem[addr + k] : '0;
          end
        end else begin
          n_wr++;
          t_ready[ba] = lmax(cyc + BL - 1 + T_WR, t_act[ba] + T_RAS) + T_RP;
          if (!dq_oe) bad("write without data");
          for (int y = 0; y < DQ_BYTES; y++) if (!dqm[y]) begin
            automatic logic [DQ_W-1:0] old = mem.exists(addr) ? mem[addr] : '0;
            old[y*CW_W +: CW_W] = dq_in[y*CW_W +: CW_W];
            mem[addr] = old;
            if ($countones(dq_in[y*CW_W +: CW_W]) > MAXW) heavy++;
          end
          beat(dq_in);
          wr_addr = addr + 1;
          wr_left = BL - 1;
        end
      end
      default: ;
    endcase
    cyc++;
  end

endmodule
