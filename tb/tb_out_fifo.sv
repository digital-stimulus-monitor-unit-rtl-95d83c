// tb_out_fifo - random pushes and pops against a queue model; checks data
// order, full/empty/count and that pushes while full are dropped.
module tb_out_fifo;
  localparam int D = 16;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, full, empty;
  logic [7:0] wdata = 0, rdata;
  logic [$clog2(D):0] count;
  byte unsigned q[$];
  int checks = 0, failures = 0, nfull = 0;

  out_fifo #(.DEPTH(D)) dut (.clk, .rst_n, .push, .wdata, .pop, .rdata, .full, .empty, .count);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(count == q.size(), "count");
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == D), "full");
      if (q.size() > 0) check(rdata == q[0], "head data");
      if (full) nfull++;
      // bias towards filling in the first half, draining in the second
      push = ($urandom_range(99) < ((i % 400) < 200 ? 70 : 30));
      pop  = ($urandom_range(99) < ((i % 400) < 200 ? 30 : 70));
      wdata = 8'($urandom);
      begin
        bit do_pop, do_push;
        do_pop  = pop && q.size() > 0;
        do_push = push && q.size() < D;
        @(posedge clk);
        if (do_pop)  void'(q.pop_front());
        if (do_push) q.push_back(wdata);
      end
    end
    check(nfull > 0, "buffer never became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
