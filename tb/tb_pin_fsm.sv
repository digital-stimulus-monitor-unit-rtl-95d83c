// tb_pin_fsm - checks one generic pin machine.
// Output mode: for several rate codes and lengths, the pin and the value
// register carry waveform bit k from the (k+1)*2**rate-th strobe after
// reprogramming ends, wrapping at the length, and hold in between (so the
// rate is checked strobe by strobe). A zero length drives 0.
// Input mode: the value register follows the pin once per strobe.
// Reprogramming: in either mode nothing changes while reprog is high.
module tb_pin_fsm;
  import dsmu_pkg::*;
  logic clk = 0, rst_n = 0, strobe = 0, reprog = 1;
  pin_cfg_t cfg;
  logic [7:0] raddr;
  logic wave_bit, pin_in = 0, pin_out, in_nout, value;
  logic wave [256];
  int checks = 0, failures = 0;

  pin_fsm dut (.clk, .rst_n, .strobe, .reprog, .cfg, .wave_raddr(raddr),
               .wave_bit, .pin_in, .pin_out, .in_nout, .value);
  assign wave_bit = wave[raddr];

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one strobe period of 10 cycles; strobe high in the first cycle
  task automatic strobe_period();
    strobe <= 1;
    @(posedge clk);
    strobe <= 0;
    repeat (9) @(posedge clk);
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_output(int rate, int len, int nstrobes);
    logic last;
    int n;
    reprog <= 1;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 256; i++) wave[i] = 1'($urandom);
    cfg <= '{is_input: 1'b0, rate: 4'(rate), len: 8'(len)};
    repeat (3) @(posedge clk);
    check(in_nout == 1'b0, "in_nout in output mode");
    last = pin_out;
    reprog <= 0;
    repeat (3) @(posedge clk);
    for (n = 1; n <= nstrobes; n++) begin
      // before the strobe: the pin holds the last written bit
      check(pin_out == last && value == last, $sformatf("hold r=%0d n=%0d", rate, n));
      strobe_period();
      if (n % (1 << rate) == 0) begin
        int k = n / (1 << rate) - 1;
        last = (len == 0) ? 1'b0 : wave[k % len];
      end
    end
    check(pin_out == last && value == last, "last bit");
  endtask

  initial begin
    cfg = PIN_CFG_RESET;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);

    run_output(0, 5, 40);
    run_output(0, 255, 300);
    run_output(1, 7, 40);
    run_output(3, 3, 64);
    run_output(0, 0, 10);
    run_output(0, 1, 10);

    // reprogramming freezes the output
    begin
      logic held;
      run_output(0, 37, 20);
      reprog <= 1;
      repeat (3) @(posedge clk);
      held = pin_out;
      repeat (10) begin
        strobe_period();
        check(pin_out == held, "output changed during reprogramming");
      end
    end

    // input mode
    cfg <= '{is_input: 1'b1, rate: 4'd0, len: 8'd0};
    repeat (3) @(posedge clk);
    check(in_nout == 1'b1, "in_nout in input mode");
    reprog <= 0;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 100; n++) begin
      logic v;
      v = 1'($urandom);
      pin_in <= v;
      repeat (5) @(posedge clk);
      strobe_period();
      check(value == v, $sformatf("input sample %0d", n));
    end
    // reprogramming freezes sampling
    begin
      logic held;
      reprog <= 1;
      repeat (3) @(posedge clk);
      held = value;
      repeat (10) begin
        pin_in <= ~pin_in;
        repeat (5) @(posedge clk);
        strobe_period();
        check(value == held, "input sampled during reprogramming");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
