// tb_table2_codes: compares the single-ended byte codes the controller can
// hold, on the whole controller at its default parameters.
//
// Three synthetic "applications" with different byte statistics are used:
// (0) mostly 0x00 / 0xFF and a few other words, (1) text-like ASCII, (2)
// samples scattered around mid-scale. For each application one request
// stream (reads, writes, masked writes) is generated, and the same stream is
// run once under each of six codes loaded through the table port:
//   UNC    identity, ninth wire held at 0 (the uncoded bus)
//   LWC4   the fixed 4-limited-weight code (invert bytes with > 4 ones)
//   SELF8  frequency-ranked permutation from this application's counts
//   SELF4  frequency-ranked 4-LWC from this application's counts
//   GLOB8  frequency-ranked permutation from all three applications' counts
//   GLOB4  frequency-ranked 4-LWC from all three applications' counts
// Every run checks all read data and every codeword on the DQ pins, and
// the 4-LWC runs check that no pin byte has more than four ones. Bus
// transitions per run are counted by the SDRAM model and printed as a
// reduction against UNC. Checks on the results: SELF4 beats UNC for every
// application, and averaged over the applications SELF4 beats GLOB4 and
// LWC4, and SELF8 beats GLOB8.
module tb_table2_codes;
  import cic_tb_pkg::*;
  localparam int NREQ  = 600;
  localparam int NAPP  = 3;
  localparam int NCODE = 6;
  localparam string CNAME[NCODE] = '{"UNC", "LWC4", "SELF8", "SELF4", "GLOB8", "GLOB4"};
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        cfg_we = 0;
  logic [7:0]  cfg_sym = 0;
  logic [8:0]  cfg_cw = 0;
  logic        req_valid = 0, req_we = 0;
  logic [23:0] req_addr = 0;
  logic [31:0] req_wdata = 0;
  logic [3:0]  req_strb = 0;
  logic        req_ready, resp_valid, init_done, ref_issued, cfg_ready;
  logic [31:0] resp_rdata;
  logic [3:0]  queue_count;
  logic        cs_n, ras_n, cas_n, we_n, dq_oe;
  logic [1:0]  ba, dqm;
  logic [12:0] a;
  logic [17:0] dq_out, dq_in;

  cic_mem_ctrl dut (
    .clk, .rst_n, .cfg_we, .cfg_sym, .cfg_cw,
    .req_valid, .req_ready, .req_we, .req_addr, .req_wdata, .req_strb,
    .resp_valid, .resp_rdata, .cfg_ready, .init_done, .ref_issued, .queue_count,
    .sd_cs_n(cs_n), .sd_ras_n(ras_n), .sd_cas_n(cas_n), .sd_we_n(we_n),
    .sd_ba(ba), .sd_a(a), .sd_dqm(dqm), .sd_dq_out(dq_out), .sd_dq_oe(dq_oe), .sd_dq_in(dq_in));

  int violations, toggles, beats, heavy, n_act, n_rd, n_wr, n_ref;
  sdram_model mdl (
    .clk, .rst_n, .cs_n, .ras_n, .cas_n, .we_n, .ba, .a, .dqm, .dq_in(dq_out), .dq_oe,
    .dq_out(dq_in), .violations, .toggles, .beats, .heavy, .n_act, .n_rd, .n_wr, .n_ref);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [7:0] gen_byte(input int app);
    int r = $urandom % 100;
    case (app)
      0: begin
        if (r < 30) return 8'h00;
        if (r < 42) return 8'hff;
        if (r < 50) return 8'h01;
        if (r < 56) return 8'h80;
        if (r < 61) return 8'hfe;
        if (r < 65) return 8'h7f;
        if (r < 68) return 8'h20;
        if (r < 71) return 8'h0a;
        return 8'($urandom);
      end
      1: begin
        if (r < 16) return 8'h20;
        if (r < 20) return 8'h0a;
        if (r < 28) return 8'h65;
        if (r < 34) return 8'h74;
        if (r < 85) return 8'h61 + 8'($urandom % 26);
        return 8'h41 + 8'($urandom % 26);
      end
      default: return 8'h80 + 8'($urandom % 16) - 8'($urandom % 16);
    endcase
  endfunction

  int unsigned enc[];
  int unsigned freq_app [NAPP][];
  int unsigned freq_all[];
  logic [31:0] shadow [logic [23:0]];
  logic [23:0] addrs [64];
  logic [31:0] exp_rd[$];
  logic [17:0] exp_beat[$];
  int n_rd_req = 0, n_resp = 0;
  int tog [NAPP][NCODE];

  logic        s_we   [NREQ];
  logic [23:0] s_addr [NREQ];
  logic [31:0] s_data [NREQ];
  logic [3:0]  s_strb [NREQ];

  task automatic make_stream(input int app);
    bit written [logic [23:0]];
    for (int n = 0; n < NREQ; n++) begin
      automatic logic [23:0] ad = addrs[$urandom % 64];
      s_addr[n] = ad;
      s_we[n]   = !written.exists(ad) || ($urandom % 2 == 1);
      s_data[n] = {gen_byte(app), gen_byte(app), gen_byte(app), gen_byte(app)};
      s_strb[n] = (!written.exists(ad) || $urandom % 8 != 0) ? 4'hf : 4'($urandom);
      if (s_we[n]) written[ad] = 1;
    end
  endtask

  task automatic make_code(input int app, input int code);
    int unsigned f[] = new[256];
    case (code)
      0: begin enc = new[256]; for (int s = 0; s < 256; s++) enc[s] = s; end
      1: begin
        enc = new[256];
        for (int s = 0; s < 256; s++) enc[s] = ($countones(8'(s)) > 4) ? (256 | (255 & ~s)) : s;
      end
      2: begin f = freq_app[app]; build_code(8, 8, f, enc); end
      3: begin f = freq_app[app]; build_code(8, 9, f, enc); end
      4: build_code(8, 8, freq_all, enc);
      default: build_code(8, 9, freq_all, enc);
    endcase
  endtask

  task automatic load_code();
    for (int s = 0; s < 256; s++) begin
      @(negedge clk); cfg_we = 1; cfg_sym = 8'(s); cfg_cw = 9'(enc[s]);
    end
    @(negedge clk); cfg_we = 0;
  endtask

  task automatic run_stream();
    shadow.delete();
    for (int n = 0; n < NREQ; n++) begin
      @(negedge clk);
      req_valid = 1;
      req_we    = s_we[n];
      req_addr  = s_addr[n];
      req_wdata = s_data[n];
      req_strb  = s_strb[n];
      do @(posedge clk); while (!req_ready);
      #1 req_valid = 0;
    end
    // let the queue drain and the last read come back
    wait (queue_count == 0);
    repeat (60) @(negedge clk);
    check(exp_rd.size() == 0, "every read answered");
    check(exp_beat.size() == 0, "every write reached the pins");
  endtask

  initial begin
    real red [NAPP][NCODE];
    real avg [NCODE];
    for (int i = 0; i < 64; i++) addrs[i] = 24'($urandom);
    freq_all = new[256];
    for (int p = 0; p < NAPP; p++) begin
      freq_app[p] = new[256];
      for (int i = 0; i < 20000; i++) begin
        automatic logic [7:0] v = gen_byte(p);
        freq_app[p][v] = freq_app[p][v] + 1;
        freq_all[v] = freq_all[v] + 1;
      end
    end

    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    wait (cfg_ready);
    wait (init_done);

    for (int p = 0; p < NAPP; p++) begin
      make_stream(p);
      for (int c = 0; c < NCODE; c++) begin
        automatic int t0 = toggles;
        automatic int h0 = heavy;
        make_code(p, c);
        load_code();
        run_stream();
        tog[p][c] = toggles - t0;
        if (c == 1 || c == 3 || c == 5)
          check(heavy == h0, $sformatf("app %0d %s: pin byte with more than four ones", p, CNAME[c]));
      end
    end

    check(violations == 0, $sformatf("SDRAM model saw %0d violations", violations));
    check(n_resp == n_rd_req, "one response per read");
    for (int c = 0; c < NCODE; c++) avg[c] = 0.0;
    $display("reduction in bus transitions against the uncoded bus:");
    $display("app   LWC4    SELF8   SELF4   GLOB8   GLOB4");
    for (int p = 0; p < NAPP; p++) begin
      for (int c = 0; c < NCODE; c++) begin
        red[p][c] = 100.0 * (1.0 - real'(tog[p][c]) / real'(tog[p][0]));
        avg[c] += red[p][c] / NAPP;
      end
      $display("%0d   %6.1f  %6.1f  %6.1f  %6.1f  %6.1f", p, red[p][1], red[p][2], red[p][3], red[p][4], red[p][5]);
      check(tog[p][3] < tog[p][0], $sformatf("app %0d: SELF4 below uncoded", p));
    end
    $display("avg %6.1f  %6.1f  %6.1f  %6.1f  %6.1f", avg[1], avg[2], avg[3], avg[4], avg[5]);
    check(avg[3] > avg[5], "SELF4 beats GLOB4 on average");
    check(avg[3] > avg[1], "SELF4 beats the fixed LWC4 on average");
    check(avg[2] > avg[4], "SELF8 beats GLOB8 on average");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // accepted requests: shadow memory, expected pin codewords and responses
  always @(posedge clk) if (rst_n && req_valid && req_ready) begin
    if (req_we) begin
      automatic logic [31:0] old = shadow.exists(req_addr) ? shadow[req_addr] : '0;
      automatic logic [35:0] cw;
      for (int l = 0; l < 4; l++) begin
        if (req_strb[l]) old[l*8 +: 8] = req_wdata[l*8 +: 8];
        cw[l*9 +: 9] = 9'(enc[req_wdata[l*8 +: 8]]);
      end
      shadow[req_addr] = old;
      exp_beat.push_back(cw[17:0]);
      exp_beat.push_back(cw[35:18]);
    end else begin
      exp_rd.push_back(shadow[req_addr]);
      n_rd_req++;
    end
  end

  always @(posedge clk) if (rst_n && dq_oe) begin
    if (exp_beat.size() == 0) check(0, "unexpected write beat");
    else begin
      automatic logic [17:0] e = exp_beat.pop_front();
      for (int y = 0; y < 2; y++)
        if (!dqm[y]) check(dq_out[y*9 +: 9] == e[y*9 +: 9], "pin codeword");
    end
  end

  always @(posedge clk) if (rst_n && resp_valid) begin
    n_resp++;
    if (exp_rd.size() == 0) check(0, "response with no read pending");
    else begin
      automatic logic [31:0] e = exp_rd.pop_front();
      check(resp_rdata == e, $sformatf("read got %h want %h", resp_rdata, e));
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
