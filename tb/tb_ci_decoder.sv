// tb_ci_decoder: checks the table-driven decoder.
//  * u4 / u4p: the published 4-bit frequency-based 2-LWC and remapping
//    examples; every codeword pair must decode to its symbols.
//  * u8: default parameters, loaded with a frequency-ranked 4-LWC built by
//    the testbench; random codewords (one per random symbol) must decode to
//    the symbol exactly one cycle later, with random gaps in in_valid.
module tb_ci_decoder;
  import cic_tb_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  localparam logic [4:0] FLWC[16] = '{5'b00110, 5'b01010, 5'b11000, 5'b00011,
                                      5'b00100, 5'b10000, 5'b10010, 5'b00010,
                                      5'b01001, 5'b00001, 5'b01100, 5'b10100,
                                      5'b00101, 5'b00000, 5'b10001, 5'b01000};
  localparam logic [3:0] FREM[16] = '{4'b1001, 4'b0101, 4'b1011, 4'b1010,
                                      4'b0100, 4'b1100, 4'b1101, 4'b0010,
                                      4'b1110, 4'b0001, 4'b0011, 4'b0111,
                                      4'b0110, 4'b0000, 4'b1111, 4'b1000};

  logic       c4_we = 0;
  logic [3:0] c4_sym = 0;
  logic [4:0] c4_cw = 0;
  logic [3:0] c4p_cw = 0;
  logic       i4_valid = 0;
  logic [9:0] i4_data = 0;
  logic [7:0] i4p_data = 0;
  logic       o4_valid, o4p_valid;
  logic [7:0] o4_data, o4p_data;

  ci_decoder #(.LANES(2), .SYM_W(4), .CW_W(5)) u4 (
    .clk, .rst_n, .cfg_we(c4_we), .cfg_sym(c4_sym), .cfg_cw(c4_cw),
    .in_valid(i4_valid), .in_data(i4_data), .out_valid(o4_valid), .out_data(o4_data));
  ci_decoder #(.LANES(2), .SYM_W(4), .CW_W(4)) u4p (
    .clk, .rst_n, .cfg_we(c4_we), .cfg_sym(c4_sym), .cfg_cw(c4p_cw),
    .in_valid(i4_valid), .in_data(i4p_data), .out_valid(o4p_valid), .out_data(o4p_data));

  logic        c8_we = 0;
  logic [7:0]  c8_sym = 0;
  logic [8:0]  c8_cw = 0;
  logic        i8_valid = 0;
  logic [35:0] i8_data = 0;
  logic        o8_valid;
  logic [31:0] o8_data;

  ci_decoder u8 (
    .clk, .rst_n, .cfg_we(c8_we), .cfg_sym(c8_sym), .cfg_cw(c8_cw),
    .in_valid(i8_valid), .in_data(i8_data), .out_valid(o8_valid), .out_data(o8_data));

  int unsigned enc8[];

  initial begin
    int unsigned freq[] = new[256];
    logic [31:0] sym, prev_sym;
    bit          prev_v;
    rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;

    for (int s = 0; s < 16; s++) begin
      @(negedge clk); c4_we = 1; c4_sym = 4'(s); c4_cw = FLWC[s]; c4p_cw = FREM[s];
    end
    @(negedge clk); c4_we = 0;
    for (int p = 0; p < 256; p++) begin
      @(negedge clk); i4_valid = 1;
      i4_data  = {FLWC[p >> 4], FLWC[p & 15]};
      i4p_data = {FREM[p >> 4], FREM[p & 15]};
      @(posedge clk); #1;
      check(o4_valid && o4p_valid, "4-bit output valid one cycle later");
      check(o4_data == 8'(p), $sformatf("2-LWC pair %h got %h", p, o4_data));
      check(o4p_data == 8'(p), $sformatf("remap pair %h got %h", p, o4p_data));
    end
    @(negedge clk); i4_valid = 0;

    for (int s = 0; s < 256; s++) freq[s] = $urandom % 1000;
    build_code(8, 9, freq, enc8);
    for (int s = 0; s < 256; s++) begin
      @(negedge clk); c8_we = 1; c8_sym = 8'(s); c8_cw = 9'(enc8[s]);
    end
    @(negedge clk); c8_we = 0;

    prev_v = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      i8_valid = 1'($urandom % 4 != 0);
      sym = $urandom;
      for (int l = 0; l < 4; l++) i8_data[l*9 +: 9] = 9'(enc8[sym[l*8 +: 8]]);
      @(posedge clk); #1;
      check(o8_valid == i8_valid, "out_valid follows in_valid by one cycle");
      if (i8_valid) check(o8_data == sym, $sformatf("decode got %h want %h", o8_data, sym));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
