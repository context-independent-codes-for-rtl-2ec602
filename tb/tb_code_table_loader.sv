// tb_code_table_loader: after reset the loader must write all 256 symbols,
// in order, one per cycle, each with a codeword of weight <= 4 that is the
// symbol or (flag set) its complement, the complement exactly when the
// symbol has more than four ones; cfg_ready must stay low for exactly those
// 256 cycles, external writes in that time must be dropped, and afterwards
// external writes must pass straight through. A second reset repeats the
// walk.
module tb_code_table_loader;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       ext_we = 0;
  logic [7:0] ext_sym = 0;
  logic [8:0] ext_cw = 0;
  logic       cfg_ready, tbl_we;
  logic [7:0] tbl_sym;
  logic [8:0] tbl_cw;

  code_table_loader dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic walk();
    int busy_cycles = 0;
    @(negedge clk); rst_n = 0;
    @(negedge clk); rst_n = 1;
    for (int s = 0; s < 256; s++) begin
      ext_we = 1; ext_sym = 8'($urandom); ext_cw = 9'($urandom);
      #1;
      check(!cfg_ready, "busy during the walk");
      check(tbl_we && tbl_sym == 8'(s), $sformatf("walk step %0d wrote %0d", s, tbl_sym));
      check($countones(tbl_cw) <= 4, "default codeword weight <= 4");
      check(tbl_cw[8] == ($countones(8'(s)) > 4), $sformatf("flag of %0d", s));
      check(tbl_cw[7:0] == (tbl_cw[8] ? ~8'(s) : 8'(s)), $sformatf("low bits of %0d", s));
      @(negedge clk);
      busy_cycles++;
    end
    #1 check(cfg_ready, "ready after 256 cycles");
  endtask

  initial begin
    walk();
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      ext_we = 1'($urandom); ext_sym = 8'($urandom); ext_cw = 9'($urandom);
      #1;
      check(cfg_ready && tbl_we == ext_we && tbl_sym == ext_sym && tbl_cw == ext_cw,
            "external write passes through");
    end
    walk();
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
