// tb_strobe_gen - checks the data collection strobe: one pulse every DIV
// clocks (10 at 50 MHz / 5 MHz), pulses one cycle wide, none while disabled.
module tb_strobe_gen;
  logic clk = 0, rst_n = 0, en = 0, strobe;
  int checks = 0, failures = 0;
  int last, cyc = 0, nstrobe = 0;

  strobe_gen dut (.clk, .rst_n, .en, .strobe);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (30) begin @(posedge clk); check(!strobe, "strobe while disabled"); end
    en <= 1;
    last = -1;
    while (nstrobe < 50) begin
      @(posedge clk);
      if (strobe) begin
        if (last >= 0) check(cyc - last == 10, $sformatf("period %0d", cyc - last));
        last = cyc;
        nstrobe++;
        @(posedge clk);
        check(!strobe, "strobe wider than one cycle");
      end
    end
    en <= 0;
    @(posedge clk);
    repeat (40) begin @(posedge clk); check(!strobe, "strobe after disable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
