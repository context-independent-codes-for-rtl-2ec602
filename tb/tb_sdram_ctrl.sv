// tb_sdram_ctrl: drives the SDRAM control directly with random reads and
// writes (some with byte masks) to a small set of addresses spread over
// banks and rows, against the behavioural SDRAM model. Checks: read data
// equals a shadow copy of memory, the model finds no timing or protocol
// violation, every request costs exactly T_RCD + T_POST cycles from one
// ACTIVATE to the next when back to back, read data arrives
// T_RCD + CAS + BL + 1 cycles after the request is accepted, and refreshes
// happen. The power-up wait and refresh interval are shortened.
module tb_sdram_ctrl;
  localparam int INIT_WAIT = 40;
  localparam int T_REFI    = 120;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        req_valid = 0, req_we = 0;
  logic [23:0] req_addr = 0;
  logic [35:0] req_wdata = 0;
  logic [3:0]  req_strb = 0;
  logic        req_ready, rd_valid, init_done, ref_issued;
  logic [35:0] rd_data;
  logic        cs_n, ras_n, cas_n, we_n, dq_oe;
  logic [1:0]  ba, dqm;
  logic [12:0] a;
  logic [17:0] dq_out, dq_in;

  sdram_ctrl #(.INIT_WAIT(INIT_WAIT), .T_REFI(T_REFI)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .req_strb,
    .rd_valid, .rd_data, .init_done, .ref_issued,
    .sd_cs_n(cs_n), .sd_ras_n(ras_n), .sd_cas_n(cas_n), .sd_we_n(we_n),
    .sd_ba(ba), .sd_a(a), .sd_dqm(dqm), .sd_dq_out(dq_out), .sd_dq_oe(dq_oe), .sd_dq_in(dq_in));

  int violations, toggles, beats, heavy, n_act, n_rd, n_wr, n_ref;
  sdram_model #(.INIT_WAIT(INIT_WAIT), .T_REFI(T_REFI), .MAXW(9)) mdl (
    .clk, .rst_n, .cs_n, .ras_n, .cas_n, .we_n, .ba, .a, .dqm, .dq_in(dq_out), .dq_oe,
    .dq_out(dq_in), .violations, .toggles, .beats, .heavy, .n_act, .n_rd, .n_wr, .n_ref);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [35:0] shadow [logic [23:0]];
  logic [23:0] addrs [16];
  longint cyc = 0, t_acc_prev = -1;
  always @(posedge clk) cyc <= cyc + 1;
  int n_masked = 0, n_b2b = 0, n_reads_checked = 0;
  // reads in flight: {accept cycle, expected data}
  longint      pend_t[$];
  logic [35:0] pend_d[$];

  localparam int T_POST = 6;   // max(BL+tWR+tRP, tRC-tRCD, tRAS+tRP-tRCD, CAS+BL+1)

  initial begin
    for (int i = 0; i < 16; i++) addrs[i] = 24'($urandom);
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    wait (init_done);
    for (int n = 0; n < 600; n++) begin
      automatic logic [23:0] ad = addrs[$urandom % 16];
      @(negedge clk);
      req_valid = 1;
      req_addr  = ad;
      req_we    = !shadow.exists(ad) || ($urandom % 2 == 1);
      req_wdata = {$urandom, 4'($urandom)};
      req_strb  = ($urandom % 4 == 0) ? 4'($urandom) : 4'hf;
      do @(posedge clk); while (!req_ready);
      #1 req_valid = 0;
      if ($urandom % 3 == 0) repeat ($urandom % 12) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    check(pend_t.size() == 0, "every read returned");
    check(violations == 0, $sformatf("model found %0d violations", violations));
    check(n_ref > 0, "refresh happened");
    check(n_masked > 0, "masked write happened");
    check(n_b2b > 0, "back-to-back requests at full rate happened");
    check(n_reads_checked > 0, "reads checked");
    $display("act=%0d rd=%0d wr=%0d ref=%0d masked=%0d b2b=%0d", n_act, n_rd, n_wr, n_ref, n_masked, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // accepted requests: shadow memory, expected read data, request spacing
  always @(posedge clk) if (rst_n && req_valid && req_ready) begin
    if (t_acc_prev >= 0 && cyc - t_acc_prev == 2 + T_POST) n_b2b++;
    if (t_acc_prev >= 0) check(cyc - t_acc_prev >= 2 + T_POST,
                               "requests no closer than tRCD + T_POST");
    t_acc_prev = cyc;
    if (req_we) begin
      automatic logic [35:0] old = shadow.exists(req_addr) ? shadow[req_addr] : '0;
      for (int l = 0; l < 4; l++) if (req_strb[l]) old[l*9 +: 9] = req_wdata[l*9 +: 9];
      if (req_strb != 4'hf) n_masked++;
      shadow[req_addr] = old;
    end else begin
      pend_t.push_back(cyc);
      pend_d.push_back(shadow[req_addr]);
    end
  end

  // read returns: data and latency
  always @(posedge clk) if (rst_n && rd_valid) begin
    if (pend_t.size() == 0) check(0, "read data with no read pending");
    else begin
      automatic longint t = pend_t.pop_front();
      automatic logic [35:0] e = pend_d.pop_front();
      n_reads_checked++;
      check(rd_data == e, $sformatf("read got %h want %h", rd_data, e));
      check(cyc - t == 2 + 2 + 2 + 1, $sformatf("read latency %0d", cyc - t));
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
