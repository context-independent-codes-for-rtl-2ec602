// tb_lwc_dec: checks the fixed limited-weight decoder.
// K = 4: the published 2-LWC codewords decode to their symbols. K = 8: all
// 256 words of nine bits with weight <= 4 decode to 256 different bytes.
module tb_lwc_dec;
  int checks = 0, failures = 0;

  logic [4:0] c4;  logic [3:0] d4;
  logic [8:0] c8;  logic [7:0] d8;
  lwc_dec #(.K(4)) u4 (.cw(c4), .data(d4));
  lwc_dec           u8 (.cw(c8), .data(d8));

  localparam logic [4:0] T2[16] = '{5'b00000, 5'b00001, 5'b00010, 5'b00011,
                                    5'b00100, 5'b00101, 5'b00110, 5'b11000,
                                    5'b01000, 5'b01001, 5'b01010, 5'b10100,
                                    5'b01100, 5'b10010, 5'b10001, 5'b10000};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit seen [256];
    int n = 0;
    for (int s = 0; s < 16; s++) begin
      c4 = T2[s]; #1;
      check(d4 == 4'(s), $sformatf("K=4 cw %b got %0d want %0d", c4, d4, s));
    end
    for (int c = 0; c < 512; c++) begin
      if ($countones(9'(c)) > 4) continue;
      c8 = 9'(c); #1;
      n++;
      check(!seen[d8], $sformatf("K=8 cw %b -> %h repeated", c8, d8));
      seen[d8] = 1;
    end
    check(n == 256, "perfect 4-LWC has 256 codewords");
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
