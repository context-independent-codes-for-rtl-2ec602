// tb_mem_queue: random pushes and pops against a reference queue. Checks
// order and contents, the occupancy count, that in_ready drops exactly when
// the queue is full and nothing is popped, and that full and empty both
// happen.
module tb_mem_queue;
  localparam int DEPTH = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        in_valid = 0, out_ready = 0;
  logic [63:0] in_data = 0;
  logic        in_ready, out_valid;
  logic [63:0] out_data;
  logic [3:0]  count;

  mem_queue dut (.*);

  logic [63:0] ref_q[$];
  int n_full = 0, n_empty = 0, n_stall = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      automatic int phase = (n / 500) % 2;   // alternate fill-heavy and drain-heavy
      @(negedge clk);
      in_valid  = 1'($urandom % 4 < (phase ? 1 : 3));
      in_data   = {$urandom, $urandom};
      out_ready = 1'($urandom % 4 < (phase ? 3 : 1));
      #1;
      check(int'(count) == ref_q.size(), $sformatf("count %0d want %0d", count, ref_q.size()));
      check(out_valid == (ref_q.size() != 0), "out_valid");
      check(in_ready == (ref_q.size() < DEPTH || out_ready), "in_ready");
      if (out_valid) check(out_data == ref_q[0], "head of queue");
      if (ref_q.size() == DEPTH) n_full++;
      if (ref_q.size() == 0) n_empty++;
      if (in_valid && !in_ready) n_stall++;
      @(posedge clk);
      if (out_valid && out_ready) void'(ref_q.pop_front());
      if (in_valid && in_ready) ref_q.push_back(in_data);
    end
    check(n_full > 0 && n_empty > 0 && n_stall > 0, "full, empty and stall all happened");
    $display("full=%0d empty=%0d stalls=%0d", n_full, n_empty, n_stall);
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
