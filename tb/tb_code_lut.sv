// tb_code_lut: random writes and reads against a shadow array; checks the
// one-cycle registered read, hold when the read is disabled, and
// old-data-on-collision.
module tb_code_lut;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       we = 0, re = 0;
  logic [7:0] waddr = 0, raddr = 0;
  logic [8:0] wdata = 0, rdata;
  logic [8:0] shadow [256];

  code_lut dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [8:0] expect_d;
    // fill
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); we = 1; waddr = 8'(i); wdata = 9'($urandom); shadow[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 8'($urandom); wdata = 9'($urandom);
      re = 1'($urandom); raddr = ($urandom % 4 == 0) ? waddr : 8'($urandom);
      expect_d = re ? shadow[raddr] : rdata;
      @(posedge clk); #1;
      if (we) shadow[waddr] = wdata;
      check(rdata == expect_d, $sformatf("read %0d got %h want %h", raddr, rdata, expect_d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
