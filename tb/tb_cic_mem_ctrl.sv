// tb_cic_mem_ctrl: end-to-end test of the whole controller at its default
// parameters (four 8-bit lanes, 9-bit codewords, x18 SDRAM, 8-entry queue,
// full power-up wait and refresh interval) against the behavioural SDRAM.
//
// Phase A runs on the default code the controller loads itself after reset
// (the fixed 4-LWC). Then a frequency-ranked 4-LWC ("self" code, built from
// the symbol counts of a sample of the same skewed byte source) is loaded
// through the table port, and phase B replays the same request stream.
// Each phase sends NREQ random reads, writes and masked writes to 64
// addresses, in bursts of back-to-back requests that fill the queue and
// stall the bus; the first access to an address is always a full write.
// Checks: every read returns the last data written (masked bytes kept);
// every write beat on the DQ pins carries exactly the codewords of the
// table; no 9-bit byte on the pins has more than four ones; the model sees
// no timing or protocol violation; decoded data leaves one cycle after the
// encoded data arrives; the coded bus toggles less than the same stream sent
// uncoded on a 16-bit bus. The transition counts of both codes and of the
// uncoded stream are printed. Each mechanism (default-code load, code
// switch, write, read, masked write, queue full, bus stall, refresh) is
// counted and must happen.
module tb_cic_mem_ctrl;
  import cic_tb_pkg::*;
  localparam int NREQ = 1200;
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

  // skewed byte source: a few values dominate, as in real memory traffic
  function automatic logic [7:0] gen_byte();
    int r = $urandom % 100;
    if (r < 30) return 8'h00;
    if (r < 42) return 8'hff;
    if (r < 50) return 8'h01;
    if (r < 56) return 8'h80;
    if (r < 61) return 8'hfe;
    if (r < 65) return 8'h7f;
    if (r < 68) return 8'h20;
    if (r < 71) return 8'h0a;
    return 8'($urandom);
  endfunction

  int unsigned enc[];
  logic [31:0] shadow [logic [23:0]];
  logic [23:0] addrs [64];
  logic [31:0] exp_rd[$];
  logic [17:0] exp_beat[$];
  logic [15:0] last_raw = '0;
  int raw_toggles = 0;
  int n_cfg = 0, n_wr_req = 0, n_rd_req = 0, n_masked = 0, n_qfull = 0, n_stall = 0;
  int n_refi = 0, n_resp = 0, n_wbeats = 0, n_default = 0, n_switch = 0;

  // one request stream, replayed in both phases
  logic        s_we   [NREQ];
  logic [23:0] s_addr [NREQ];
  logic [31:0] s_data [NREQ];
  logic [3:0]  s_strb [NREQ];
  int          s_gap  [NREQ];
  int          tog_a, raw_a, tog_b, raw_b;

  task automatic run_phase();
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
      repeat (s_gap[n]) @(negedge clk);
    end
    repeat (200) @(negedge clk);
    check(exp_rd.size() == 0, "every read answered");
    check(exp_beat.size() == 0, "every write reached the pins");
  endtask

  initial begin
    int unsigned freq[] = new[256];
    bit written [logic [23:0]];
    for (int i = 0; i < 64; i++) addrs[i] = 24'($urandom);
    for (int n = 0; n < NREQ; n++) begin
      automatic logic [23:0] ad = addrs[$urandom % 64];
      s_addr[n] = ad;
      s_we[n]   = !written.exists(ad) || ($urandom % 2 == 1);
      s_data[n] = {gen_byte(), gen_byte(), gen_byte(), gen_byte()};
      s_strb[n] = (!written.exists(ad) || $urandom % 8 != 0) ? 4'hf : 4'($urandom);
      s_gap[n]  = (n % 200 == 199) ? 100 : (($urandom % 4 == 0) ? int'($urandom % 10) : 0);
      if (s_we[n]) written[ad] = 1;
    end
    // default code, computed here from its definition: invert bytes with
    // more than four ones and set the ninth bit
    enc = new[256];
    for (int s = 0; s < 256; s++) enc[s] = ($countones(8'(s)) > 4) ? (256 | (255 & ~s)) : s;

    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    wait (cfg_ready);
    n_default = 1;
    wait (init_done);

    // phase A: default fixed 4-LWC
    run_phase();
    tog_a = toggles;  raw_a = raw_toggles;

    // switch to a frequency-ranked 4-LWC
    for (int i = 0; i < 20000; i++) begin
      automatic logic [7:0] v = gen_byte();
      freq[v] = freq[v] + 1;
    end
    build_code(8, 9, freq, enc);
    for (int s = 0; s < 256; s++) begin
      @(negedge clk); cfg_we = 1; cfg_sym = 8'(s); cfg_cw = 9'(enc[s]);
    end
    @(negedge clk); cfg_we = 0;
    n_switch++;

    // phase B: same stream
    run_phase();
    tog_b = toggles - tog_a;  raw_b = raw_toggles - raw_a;

    check(violations == 0, $sformatf("SDRAM model saw %0d violations", violations));
    check(heavy == 0, $sformatf("%0d bytes on the pins had more than four ones", heavy));
    check(tog_b < raw_b, $sformatf("coded toggles %0d not below uncoded %0d", tog_b, raw_b));
    check(n_default == 1,  "default code loaded");
    check(n_cfg == 256,    "code switch: 256 table writes");
    check(n_wr_req > 0,    "writes");
    check(n_rd_req > 0,    "reads");
    check(n_masked > 0,    "masked writes");
    check(n_qfull > 0,     "queue full");
    check(n_stall > 0,     "bus stalled");
    check(n_refi > 0,      "refresh");
    check(n_resp == n_rd_req, "one response per read");
    $display("default=%0d switch=%0d table_writes=%0d writes=%0d reads=%0d masked=%0d qfull=%0d stalls=%0d refresh=%0d wbeats=%0d",
             n_default, n_switch, n_cfg, n_wr_req, n_rd_req, n_masked, n_qfull, n_stall, n_refi, n_wbeats);
    check(cod_toggles == toggles, "pin transitions match the codes");
    $display("transitions per phase: uncoded %0d, fixed 4-LWC %0d (%0d%% fewer), frequency-ranked 4-LWC %0d (%0d%% fewer)",
             raw_b, tog_a, (raw_a - tog_a) * 100 / raw_a, tog_b, (raw_b - tog_b) * 100 / raw_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic raw_beat(input logic [15:0] d);
    raw_toggles += $countones(d ^ last_raw);
    last_raw = d;
  endtask

  logic [17:0] last_cb = '0;
  int cod_toggles = 0;
  task automatic cod_word(input logic [31:0] d);
    logic [35:0] c;
    for (int l = 0; l < 4; l++) c[l*9 +: 9] = 9'(enc[d[l*8 +: 8]]);
    cod_toggles += $countones(c[17:0] ^ last_cb);
    cod_toggles += $countones(c[35:18] ^ c[17:0]);
    last_cb = c[35:18];
  endtask

  // accepted requests: shadow memory, expected pins and responses, and the
  // same stream as it would toggle an uncoded 16-bit bus
  always @(posedge clk) begin
    if (rst_n && cfg_we && cfg_ready) n_cfg++;
    if (rst_n && ref_issued) n_refi++;
    if (rst_n && queue_count == 4'd8) n_qfull++;
    if (rst_n && req_valid && !req_ready && init_done) n_stall++;
    if (rst_n && req_valid && req_ready) begin
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
        n_wr_req++;
        if (req_strb != 4'hf) n_masked++;
        cod_word(req_wdata);
        raw_beat(req_wdata[15:0]);
        raw_beat(req_wdata[31:16]);
      end else begin
        exp_rd.push_back(shadow[req_addr]);
        n_rd_req++;
        cod_word(shadow[req_addr]);
        raw_beat(shadow[req_addr][15:0]);
        raw_beat(shadow[req_addr][31:16]);
      end
    end
  end

  // write beats on the pins, masked bytes excluded
  always @(posedge clk) if (rst_n && dq_oe) begin
    if (exp_beat.size() == 0) check(0, "unexpected write beat");
    else begin
      automatic logic [17:0] e = exp_beat.pop_front();
      for (int y = 0; y < 2; y++)
        if (!dqm[y]) check(dq_out[y*9 +: 9] == e[y*9 +: 9],
                           $sformatf("pin byte %0d got %b want %b", y, dq_out[y*9 +: 9], e[y*9 +: 9]));
      n_wbeats++;
    end
  end

  // responses: data, and exactly one cycle of decoding
  logic enc_rd_q = 0;
  always @(posedge clk) begin
    enc_rd_q <= dut.rd_valid;
    if (rst_n && resp_valid) begin
      n_resp++;
      check(enc_rd_q, "decoded data one cycle after the encoded data");
      if (exp_rd.size() == 0) check(0, "response with no read pending");
      else begin
        automatic logic [31:0] e = exp_rd.pop_front();
        check(resp_rdata == e, $sformatf("read got %h want %h", resp_rdata, e));
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
