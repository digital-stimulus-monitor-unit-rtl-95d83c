// tb_wave_mem - writes random bytes to the waveform store and reads every
// bit back, comparing with a model where bit 8*k+j is bit j of byte k.
module tb_wave_mem;
  logic clk = 0, we = 0, rbit;
  logic [4:0] waddr = 0;
  logic [7:0] wdata = 0, raddr = 0;
  logic [7:0] model [32];
  int checks = 0, failures = 0;

  wave_mem dut (.clk, .we, .waddr, .wdata, .raddr, .rbit);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      for (int k = 0; k < 32; k++) begin
        @(negedge clk);
        we = 1; waddr = 5'(k); wdata = 8'($urandom); model[k] = wdata;
      end
      @(negedge clk) we = 0;
      for (int b = 0; b < 256; b++) begin
        raddr = 8'(b);
        #1 check(rbit == model[b/8][b%8], $sformatf("bit %0d", b));
      end
    end
    // a write with we low must not change anything
    @(negedge clk) we = 0; waddr = 3; wdata = ~model[3];
    @(negedge clk);
    for (int b = 24; b < 32; b++) begin
      raddr = 8'(b);
      #1 check(rbit == model[3][b%8], "write without we");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
