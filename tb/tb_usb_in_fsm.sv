// tb_usb_in_fsm - sends configuration transmissions byte by byte and checks
// the USB input machine: reprog rises after the first byte and stays high
// until the start command, the configuration does not change before the
// start command and matches an independently built model after it, waveform
// bytes reach the right channel and address, an unknown byte is ignored, and
// a transmission without a config command keeps the old configuration.
module tb_usb_in_fsm;
  import dsmu_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, reprog;
  logic [7:0] in_data = 0;
  pin_cfg_t cfg [NPINS];
  logic wave_we;
  logic [2:0] wave_pin;
  logic [WAVE_AW-1:0] wave_addr;
  logic [7:0] wave_data;
  logic [7:0] got_wave [NPINS][WAVE_BYTES];
  logic [7:0] exp_wave [NPINS][WAVE_BYTES];
  pin_cfg_t exp_cfg [NPINS];
  int checks = 0, failures = 0, nrise = 0, nwrites = 0;
  logic reprog_q = 0;
  byte unsigned stream[$];

  usb_in_fsm dut (.clk, .rst_n, .in_data, .in_valid, .reprog, .cfg,
                  .wave_we, .wave_pin, .wave_addr, .wave_data);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    reprog_q <= reprog;
    if (reprog && !reprog_q) nrise++;
    if (wave_we) begin
      got_wave[wave_pin][wave_addr] <= wave_data;
      nwrites++;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send_stream(int min_gap);
    pin_cfg_t old_cfg [NPINS];
    for (int i = 0; i < NPINS; i++) old_cfg[i] = cfg[i];
    foreach (stream[i]) begin
      @(negedge clk);
      in_data  = stream[i];
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      repeat ($urandom_range(min_gap + 8, min_gap)) @(negedge clk);
      if (i < stream.size() - 1) begin
        if (i > 0) check(reprog, $sformatf("reprog low after byte %0d", i));
        for (int p = 0; p < NPINS; p++)
          check(cfg[p] == old_cfg[p], "configuration changed before start");
      end
    end
    repeat (6) @(negedge clk);
    check(!reprog, "reprog still high after start");
    stream.delete();
  endtask

  task automatic add_config();
    logic [7:0] dir;
    dir = 8'($urandom);
    stream.push_back(8'hA0);
    stream.push_back(dir);
    for (int p = 0; p < NPINS; p++) begin
      exp_cfg[p].is_input = dir[p];
      exp_cfg[p].rate     = 4'($urandom);
    end
    for (int k = 0; k < 4; k++) stream.push_back({exp_cfg[2*k+1].rate, exp_cfg[2*k].rate});
  endtask

  task automatic add_seq(int p, int len);
    stream.push_back({4'b1011, 1'b0, 3'(p)});
    stream.push_back(8'(len));
    exp_cfg[p].len = 8'(len);
    for (int k = 0; k < (len + 7) / 8; k++) begin
      exp_wave[p][k] = 8'($urandom);
      stream.push_back(exp_wave[p][k]);
    end
  endtask

  task automatic compare_all();
    for (int p = 0; p < NPINS; p++) begin
      check(cfg[p] == exp_cfg[p], $sformatf("cfg of channel %0d", p));
      for (int k = 0; k < (exp_cfg[p].len + 7) / 8; k++)
        check(got_wave[p][k] == exp_wave[p][k], $sformatf("wave %0d byte %0d", p, k));
    end
  endtask

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NPINS; p++) exp_cfg[p] = PIN_CFG_RESET;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    for (int p = 0; p < NPINS; p++) check(cfg[p] == PIN_CFG_RESET, "reset configuration");
    check(!reprog, "reprog after reset");

    // full configuration with waveforms on every channel
    for (int t = 0; t < 6; t++) begin
      stream.push_back(8'h90);
      add_config();
      for (int p = 0; p < NPINS; p++) add_seq(p, (t == 0) ? 255 : $urandom_range(255, 0));
      if (t == 1) stream.push_back(8'h3C);   // unknown header: ignored
      stream.push_back(8'hC0);
      send_stream(t < 3 ? 1 : 3);
      compare_all();
    end

    // prepare + start only: configuration is kept
    stream.push_back(8'h90);
    stream.push_back(8'hC0);
    send_stream(2);
    compare_all();

    // one waveform changed, directions and rates kept
    stream.push_back(8'h90);
    add_seq(6, 9);
    stream.push_back(8'hC0);
    send_stream(2);
    compare_all();

    check(nrise == 8, $sformatf("reprogramming entered %0d times", nrise));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
