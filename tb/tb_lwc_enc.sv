// tb_lwc_enc: checks the fixed limited-weight encoder.
// K = 4: all 16 codewords against the published 2-LWC table (symbol ->
// 5-bit codeword). K = 8: every codeword has weight <= 4, all 256 are
// distinct (so the code is one-to-one and perfect), and the low bits equal
// the symbol or its complement as the flag bit says.
module tb_lwc_enc;
  int checks = 0, failures = 0;

  logic [3:0] d4;  logic [4:0] c4;
  logic [7:0] d8;  logic [8:0] c8;
  lwc_enc #(.K(4)) u4 (.data(d4), .cw(c4));
  lwc_enc           u8 (.data(d8), .cw(c8));

  // 2-LWC codewords for symbols 0..15
  localparam logic [4:0] T2[16] = '{5'b00000, 5'b00001, 5'b00010, 5'b00011,
                                    5'b00100, 5'b00101, 5'b00110, 5'b11000,
                                    5'b01000, 5'b01001, 5'b01010, 5'b10100,
                                    5'b01100, 5'b10010, 5'b10001, 5'b10000};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit seen [512];
    for (int s = 0; s < 16; s++) begin
      d4 = 4'(s); #1;
      check(c4 === T2[s], $sformatf("K=4 sym %0d got %b want %b", s, c4, T2[s]));
    end
    for (int s = 0; s < 256; s++) begin
      d8 = 8'(s); #1;
      check($countones(c8) <= 4, $sformatf("K=8 sym %0d weight %0d", s, $countones(c8)));
      check(!seen[c8], $sformatf("K=8 codeword %b repeated", c8));
      seen[c8] = 1;
      check((c8[8] ? ~c8[7:0] : c8[7:0]) == d8, $sformatf("K=8 sym %0d low bits", s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
