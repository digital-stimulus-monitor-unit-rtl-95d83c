// tb_pin_tristate - checks the channel buffer: in output mode the plug
// carries fpga_out, in input mode fpga_in follows a value driven on the plug
// and the FPGA output does not reach the plug.
module tb_pin_tristate;
  logic fpga_out = 0, in_nout = 1, ext_v = 0, ext_en = 0;
  wire  fpga_in, banana;
  int checks = 0, failures = 0;

  pin_tristate dut (.fpga_out, .in_nout, .fpga_in, .banana);
  assign banana = ext_en ? ext_v : 1'bz;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      logic o, e;
      o = $urandom_range(1);
      e = $urandom_range(1);
      // output mode: the plug is driven by the FPGA
      in_nout = 0; ext_en = 0; fpga_out = o;
      #1 check(banana == o, "output mode: plug != fpga_out");
      // input mode: the plug is driven from outside, the FPGA sees it
      in_nout = 1; ext_en = 1; ext_v = e; fpga_out = ~e;
      #1 check(fpga_in == e, "input mode: fpga_in != plug");
      check(banana == e, "input mode: FPGA output reached the plug");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
