// tb_ci_encoder: checks the table-driven encoder.
//  * u4: two 4-bit lanes, 5-bit codewords, loaded with the published
//    frequency-based 2-LWC example; every symbol pair is encoded and compared
//    with that table.
//  * u4p: two 4-bit lanes, 4-bit codewords, loaded with the published
//    frequency-based remapping (a permutation).
//  * u8: the default four 8-bit lanes with 9-bit codewords, loaded with a
//    frequency-ranked 4-LWC built by the testbench; random words under
//    random output stalls are compared with the table through a scoreboard,
//    the sideband must travel with its word, a word accepted in cycle t must
//    be valid in cycle t+1, and no codeword may have more than four ones.
module tb_ci_encoder;
  import cic_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // published 4-bit examples, indexed by symbol
  localparam logic [4:0] FLWC[16] = '{5'b00110, 5'b01010, 5'b11000, 5'b00011,
                                      5'b00100, 5'b10000, 5'b10010, 5'b00010,
                                      5'b01001, 5'b00001, 5'b01100, 5'b10100,
                                      5'b00101, 5'b00000, 5'b10001, 5'b01000};
  localparam logic [3:0] FREM[16] = '{4'b1001, 4'b0101, 4'b1011, 4'b1010,
                                      4'b0100, 4'b1100, 4'b1101, 4'b0010,
                                      4'b1110, 4'b0001, 4'b0011, 4'b0111,
                                      4'b0110, 4'b0000, 4'b1111, 4'b1000};

  // ---- 4-bit instances --------------------------------------------------
  logic       c4_we = 0;
  logic [3:0] c4_sym = 0;
  logic [4:0] c4_cw = 0;
  logic [3:0] c4p_cw = 0;
  logic       i4_valid = 0;
  logic [7:0] i4_data = 0;
  logic       i4_ready, o4_valid, i4p_ready, o4p_valid;
  logic [9:0] o4_data;
  logic [7:0] o4p_data;
  logic [0:0] o4_side, o4p_side;

  ci_encoder #(.LANES(2), .SYM_W(4), .CW_W(5), .SIDE_W(1)) u4 (
    .clk, .rst_n, .cfg_we(c4_we), .cfg_sym(c4_sym), .cfg_cw(c4_cw),
    .in_valid(i4_valid), .in_ready(i4_ready), .in_data(i4_data), .in_side(1'b0),
    .out_valid(o4_valid), .out_ready(1'b1), .out_data(o4_data), .out_side(o4_side));
  ci_encoder #(.LANES(2), .SYM_W(4), .CW_W(4), .SIDE_W(1)) u4p (
    .clk, .rst_n, .cfg_we(c4_we), .cfg_sym(c4_sym), .cfg_cw(c4p_cw),
    .in_valid(i4_valid), .in_ready(i4p_ready), .in_data(i4_data), .in_side(1'b0),
    .out_valid(o4p_valid), .out_ready(1'b1), .out_data(o4p_data), .out_side(o4p_side));

  // ---- default instance -------------------------------------------------
  logic        c8_we = 0;
  logic [7:0]  c8_sym = 0;
  logic [8:0]  c8_cw = 0;
  logic        i8_valid = 0, o8_ready = 0;
  logic [31:0] i8_data = 0;
  logic [7:0]  i8_side = 0;
  logic        i8_ready, o8_valid;
  logic [35:0] o8_data;
  logic [7:0]  o8_side;

  ci_encoder #(.SIDE_W(8)) u8 (
    .clk, .rst_n, .cfg_we(c8_we), .cfg_sym(c8_sym), .cfg_cw(c8_cw),
    .in_valid(i8_valid), .in_ready(i8_ready), .in_data(i8_data), .in_side(i8_side),
    .out_valid(o8_valid), .out_ready(o8_ready), .out_data(o8_data), .out_side(o8_side));

  int unsigned enc8[];
  logic [39:0] sb[$];   // {side, data}
  int          stalls = 0;

  initial begin
    int unsigned freq[] = new[256];
    rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;

    // load the 4-bit tables
    for (int s = 0; s < 16; s++) begin
      @(negedge clk); c4_we = 1; c4_sym = 4'(s); c4_cw = FLWC[s]; c4p_cw = FREM[s];
    end
    @(negedge clk); c4_we = 0;
    for (int p = 0; p < 256; p++) begin
      @(negedge clk); i4_valid = 1; i4_data = 8'(p);
      @(posedge clk); #1;
      check(o4_valid && o4p_valid, "4-bit output valid one cycle after accept");
      check(o4_data == {FLWC[p >> 4], FLWC[p & 15]},
            $sformatf("2-LWC pair %h got %b", p, o4_data));
      check(o4p_data == {FREM[p >> 4], FREM[p & 15]},
            $sformatf("remap pair %h got %b", p, o4p_data));
    end
    @(negedge clk); i4_valid = 0;

    // load a frequency-ranked 4-LWC into the default instance
    for (int s = 0; s < 256; s++) freq[s] = $urandom % 1000;
    build_code(8, 9, freq, enc8);
    for (int s = 0; s < 256; s++) begin
      @(negedge clk); c8_we = 1; c8_sym = 8'(s); c8_cw = 9'(enc8[s]);
    end
    @(negedge clk); c8_we = 0;

    // random traffic with random stalls
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      if (!i8_valid || i8_ready) begin
        i8_valid = 1'($urandom % 4 != 0);
        i8_data  = $urandom;
        i8_side  = 8'($urandom);
      end
      o8_ready = 1'($urandom % 3 != 0);
    end
    @(negedge clk); i8_valid = 0; o8_ready = 1;
    repeat (5) @(negedge clk);
    check(sb.size() == 0, "every accepted word came out");
    check(stalls > 0, "output stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard for the default instance
  always @(posedge clk) if (rst_n) begin
    if (o8_valid && o8_ready) begin
      logic [39:0] e;
      if (sb.size() == 0) check(0, "output without input");
      else begin
        e = sb.pop_front();
        check(o8_side == e[39:32], "sideband travels with its word");
        for (int l = 0; l < 4; l++) begin
          check(o8_data[l*9 +: 9] == 9'(enc8[e[l*8 +: 8]]),
                $sformatf("lane %0d sym %h got %b", l, e[l*8 +: 8], o8_data[l*9 +: 9]));
          check($countones(o8_data[l*9 +: 9]) <= 4, "codeword weight <= 4");
        end
      end
    end
    if (o8_valid && !o8_ready) stalls++;
    if (i8_valid && i8_ready) begin
      sb.push_back({i8_side, i8_data});
      #1 check(o8_valid, "default: valid one cycle after accept");
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
