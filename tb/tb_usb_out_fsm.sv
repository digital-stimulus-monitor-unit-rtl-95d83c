// tb_usb_out_fsm - the USB output machine with a small output buffer.
// A new pin byte (a running number) arrives on every strobe; a host model
// reads the output register whenever the new-data flag is set, at a chosen
// speed. Checks: with a fast host every byte goes straight to the register;
// with a slow host bytes queue in the buffer and still arrive complete and
// in order; with a stalled host the buffer fills, the overflow flag is set
// and the bytes that do arrive are in order; clr_ovf clears the flag.
module tb_usb_out_fsm;
  localparam int D = 8;
  logic clk = 0, rst_n = 0, new_data = 0, out_read = 0, clr_ovf = 0;
  logic [7:0] pin_values = 0, out_reg, fifo_wdata, fifo_rdata;
  logic fifo_push, fifo_pop, fifo_full, fifo_empty, new_flag, overflow;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  int n_push = 0, n_pop = 0, n_move = 0;
  byte unsigned sent[$], got[$];
  int host_wait = 0;   // cycles the host waits after the flag before reading
  bit stop_strobes = 0;

  usb_out_fsm dut (.clk, .rst_n, .new_data, .pin_values, .out_read, .clr_ovf,
                   .fifo_push, .fifo_wdata, .fifo_pop, .fifo_rdata, .fifo_full,
                   .fifo_empty, .out_reg, .new_flag, .overflow);
  out_fifo #(.DEPTH(D)) u_fifo (.clk, .rst_n, .push(fifo_push), .wdata(fifo_wdata),
                                .pop(fifo_pop), .rdata(fifo_rdata), .full(fifo_full),
                                .empty(fifo_empty), .count);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // strobe source: every 10 cycles, a new byte
  initial begin
    @(posedge rst_n);
    forever begin
      repeat (9) @(posedge clk);
      if (!stop_strobes) begin
        new_data   <= 1;
        pin_values <= 8'(sent.size());
        sent.push_back(8'(sent.size()));
      end
      @(posedge clk);
      new_data <= 0;
    end
  end

  // host model
  initial begin
    @(posedge rst_n);
    forever begin
      @(posedge clk);
      if (new_flag) begin
        repeat (host_wait) @(posedge clk);
        got.push_back(out_reg);
        out_read <= 1;
        @(posedge clk);
        out_read <= 0;
        @(posedge clk);
      end
    end
  end

  // a new-data flag that rises without a pop just before is a direct move
  logic nf_q = 0, pop_q = 0;
  always @(posedge clk) begin
    if (fifo_push) n_push++;
    if (fifo_pop)  n_pop++;
    if (rst_n && new_flag && !nf_q && !pop_q) n_move++;
    nf_q  <= new_flag;
    pop_q <= fifo_pop;
  end

  task automatic drain_and_compare(bit exact, string phase);
    stop_strobes = 1;
    host_wait = 0;
    repeat (20 * D + 50) @(posedge clk);
    if (exact) begin
      check(got.size() == sent.size(), $sformatf("%s: got %0d of %0d", phase, got.size(), sent.size()));
      foreach (got[i]) if (i < sent.size()) check(got[i] == sent[i], $sformatf("%s: byte %0d", phase, i));
    end else begin
      int j = 0;
      check(got.size() < sent.size(), $sformatf("%s: nothing lost", phase));
      foreach (got[i]) begin
        while (j < sent.size() && sent[j] != got[i]) j++;
        check(j < sent.size(), $sformatf("%s: byte %0d out of order", phase, i));
        j++;
      end
    end
    sent.delete();
    got.delete();
    stop_strobes = 0;
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m0, p0;
    repeat (3) @(posedge clk);
    rst_n <= 1;

    // fast host: every byte moves straight to the output register
    host_wait = 0;
    m0 = n_move; p0 = n_push;
    repeat (400) @(posedge clk);
    check(n_push == p0, "fast host: byte pushed onto the buffer");
    check(n_move > m0, "fast host: no direct move");
    drain_and_compare(1, "fast");
    check(!overflow, "fast host: overflow");

    // slow host: bytes queue but none is lost
    host_wait = 11;
    p0 = n_push;
    repeat (10 * 2 * D) @(posedge clk);
    check(n_push > p0 && n_pop > 0, "slow host: buffer not used");
    drain_and_compare(1, "slow");
    check(!overflow, "slow host: overflow");

    // stalled host: overflow
    host_wait = 400;
    repeat (10 * 4 * D) @(posedge clk);
    check(overflow, "stalled host: overflow flag not set");
    drain_and_compare(0, "stalled");
    check(overflow, "overflow flag not sticky");
    @(negedge clk) clr_ovf = 1;
    @(negedge clk) clr_ovf = 0;
    check(!overflow, "clr_ovf");

    $display("moves=%0d pushes=%0d pops=%0d", n_move, n_push, n_pop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
