// dsmu_tb_env - end-to-end test environment for dsmu_top.
//
// A host model drives the parallel port (address/data strobes with the WAIT
// handshake); a device-under-test model drives the channels configured as
// inputs with random data and loops output channel 0 back into input
// channel 1 (one channel out, one in, wired together). The run:
//   1. after reset every channel is an input; the host reads nothing, so the
//      output buffer fills and the overflow status bit is set
//   2. configuration A (functions 1-4): directions, rates, waveforms; the
//      host reads the reprogramming status bit while it sends
//   3. every output channel is checked strobe by strobe against a model of
//      its waveform, rate and common start; the host reads the pin stream
//   4. configuration B swaps channel directions (mode switch), step 3 again
// Stream check: the stream the host receives is compared with a model of the
// byte the unit takes at every strobe. With EXACT set (slower strobe, so the
// host model keeps up) the last bytes received must be one contiguous run of
// that model and the loop-back must show in them; otherwise (full rate, the
// host falls behind and bytes are dropped) they must appear in order.
// Every mechanism (reprogramming, direct move, buffer push and pop,
// overflow, mode switch, output writes, input samples, loop-back) is counted
// and must occur.
module dsmu_tb_env #(
  parameter bit          EXACT     = 1'b0,
  parameter int unsigned STROBE_HZ = 5_000_000
);
  import dsmu_pkg::*;
  localparam int unsigned DIV = 50_000_000 / STROBE_HZ;

  logic clk = 0, rst_n = 0;
  logic astb_n = 1, dstb_n = 1, pwrite = 0;
  logic [7:0] pdb_i = 0, pdb_o;
  logic pdb_oe, pwait;
  wire  [7:0] banana;

  int checks = 0, failures = 0;

  if (STROBE_HZ == 5_000_000) begin : g_full
    dsmu_top dut (.clk, .rst_n, .astb_n, .dstb_n, .pwrite, .pdb_i, .pdb_o, .pdb_oe,
                  .pwait, .banana);
  end else begin : g_slow
    dsmu_top #(.STROBE_HZ(STROBE_HZ)) dut (.clk, .rst_n, .astb_n, .dstb_n, .pwrite,
                  .pdb_i, .pdb_o, .pdb_oe, .pwait, .banana);
  end

  // internal signals used only to align the models in time and to count
  logic strobe_i, reprog_i;
  logic [2:0] out_state;
  logic fifo_push_i, fifo_pop_i;
  if (STROBE_HZ == 5_000_000) begin : g_probe_full
    assign strobe_i    = g_full.dut.strobe;
    assign reprog_i    = g_full.dut.reprog;
    assign out_state   = g_full.dut.u_out.state;
    assign fifo_push_i = g_full.dut.fifo_push;
    assign fifo_pop_i  = g_full.dut.fifo_pop;
  end else begin : g_probe_slow
    assign strobe_i    = g_slow.dut.strobe;
    assign reprog_i    = g_slow.dut.reprog;
    assign out_state   = g_slow.dut.u_out.state;
    assign fifo_push_i = g_slow.dut.fifo_push;
    assign fifo_pop_i  = g_slow.dut.fifo_pop;
  end

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- DUT model
  logic [7:0] drv_en = 8'hFF, drv_v = 0;
  bit loop_on = 0;
  for (genvar p = 0; p < 8; p++) begin : g_drv
    if (p == 1) begin : g_loop
      assign banana[p] = loop_on ? banana[0] : (drv_en[p] ? drv_v[p] : 1'bz);
    end else begin : g_plain
      assign banana[p] = drv_en[p] ? drv_v[p] : 1'bz;
    end
  end

  // new random input values 3 cycles after every strobe
  always @(posedge clk) begin
    if (strobe_i) begin
      repeat (3) @(posedge clk);
      drv_v <= 8'($urandom);
    end
  end

  // ------------------------------------------------------------ configuration
  typedef struct {
    logic [7:0] is_in;
    int rate [8];
    int len [8];
    logic wave [8][256];
  } conf_t;
  conf_t conf;       // what the unit runs now (valid after release)
  conf_t next_conf;  // being sent

  // -------------------------------------------------- output and stream model
  int n_strobe [8];
  logic last [8];
  logic [7:0] prev_pins;
  logic reprog_q = 0;
  int since_release = 0;
  int release_edge_wait = 0;
  int n_writes = 0, n_samples = 0, n_releases = 0;
  logic [8:0] exp_q [$];      // bit 8: wildcard
  int n_move = 0, n_push = 0, n_pop = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (out_state == 3'd2) n_move++;
      if (fifo_push_i) n_push++;
      if (fifo_pop_i)  n_pop++;
      // release: the first edge with reprog low after it was high
      if (!reprog_i && reprog_q) begin
        n_releases++;
        release_edge_wait = 3;
        since_release = 0;
        conf = next_conf;
        for (int p = 0; p < 8; p++) begin
          n_strobe[p] = 0;
          last[p] = banana[p];
        end
      end
      reprog_q <= reprog_i;
      if (release_edge_wait > 0) release_edge_wait--;
      if (strobe_i && !reprog_i && release_edge_wait == 0 && n_releases > 0) begin
        for (int p = 0; p < 8; p++) begin
          if (!conf.is_in[p]) begin
            check(banana[p] == last[p], $sformatf("channel %0d strobe %0d", p, n_strobe[p]));
            n_strobe[p]++;
            if (n_strobe[p] % (1 << conf.rate[p]) == 0) begin
              int k;
              k = n_strobe[p] / (1 << conf.rate[p]) - 1;
              last[p] = (conf.len[p] == 0) ? 1'b0 : conf.wave[p][k % conf.len[p]];
              n_writes++;
            end
          end else begin
            n_samples++;
          end
        end
      end
      if (strobe_i && !reprog_i) begin
        logic [7:0] b;
        for (int p = 0; p < 8; p++) b[p] = conf.is_in[p] ? prev_pins[p] : banana[p];
        exp_q.push_back({(since_release < 3 || n_releases == 0), b});
        since_release++;
      end
      if (strobe_i) prev_pins = banana;
    end
  end

  // ----------------------------------------------------------------- host
  task automatic host_cycle(bit addr, bit wr, logic [7:0] wd, output logic [7:0] rd);
    #3;
    pwrite = wr;
    pdb_i  = wd;
    #7;
    if (addr) astb_n = 0; else dstb_n = 0;
    wait (pwait == 1'b1);
    #7;
    rd = pdb_o;
    if (addr) astb_n = 1; else dstb_n = 1;
    wait (pwait == 1'b0);
    #3;
  endtask
  task automatic set_addr(logic [7:0] a);
    logic [7:0] d;
    host_cycle(1, 1, a, d);
  endtask
  task automatic wr_data(logic [7:0] v);
    logic [7:0] d;
    host_cycle(0, 1, v, d);
  endtask
  task automatic rd_data(output logic [7:0] v);
    host_cycle(0, 0, 8'h00, v);
  endtask

  logic [7:0] rx_q [$];
  int n_reprog_seen = 0, n_ovf_seen = 0, n_mode_switch = 0;

  task automatic send_byte(logic [7:0] v);
    logic [7:0] st;
    set_addr(REG_IN);
    wr_data(v);
    set_addr(REG_STATUS);
    rd_data(st);
    if (st[STAT_REPROG]) begin
      n_reprog_seen++;
      check(!st[STAT_OVERFLOW], "overflow status not cleared by reprogramming");
    end
  endtask

  task automatic send_config();
    logic [7:0] dir;
    for (int p = 0; p < 8; p++) dir[p] = next_conf.is_in[p];
    send_byte(8'h90);
    send_byte(8'hA0);
    send_byte(dir);
    for (int k = 0; k < 4; k++)
      send_byte({4'(next_conf.rate[2*k+1]), 4'(next_conf.rate[2*k])});
    for (int p = 0; p < 8; p++) begin
      if (!next_conf.is_in[p]) begin
        send_byte({4'b1011, 1'b0, 3'(p)});
        send_byte(8'(next_conf.len[p]));
        for (int k = 0; k < (next_conf.len[p] + 7) / 8; k++) begin
          logic [7:0] b;
          for (int j = 0; j < 8; j++) b[j] = next_conf.wave[p][8*k+j];
          send_byte(b);
        end
      end
    end
    // the DUT model stops driving channels that become outputs
    for (int p = 0; p < 8; p++) begin
      if (!next_conf.is_in[p]) drv_en[p] = 0;
      if (conf.is_in[p] != next_conf.is_in[p]) n_mode_switch++;
    end
    loop_on = next_conf.is_in[1] && !next_conf.is_in[0];
    send_byte(8'hC0);
    repeat (10) @(posedge clk);
    for (int p = 0; p < 8; p++) drv_en[p] = next_conf.is_in[p] && !(p == 1 && loop_on);
  endtask

  // read the pin stream for a while: poll status, read REG_OUT when new
  task automatic host_read(int ncycles);
    logic [7:0] st, v;
    time t_end = $time + ncycles * 20;
    while ($time < t_end) begin
      set_addr(REG_STATUS);
      rd_data(st);
      if (st[STAT_OVERFLOW]) n_ovf_seen++;
      if (st[STAT_NEW_DATA]) begin
        set_addr(REG_OUT);
        rd_data(v);
        rx_q.push_back(v);
      end
    end
  endtask

  // compare the received stream with the model
  int n_loop = 0;
  int j_pos = 0;   // order check: position in the model stream
  task automatic check_stream(string phase);
    int m = (rx_q.size() < 300) ? rx_q.size() : 300;
    int base = rx_q.size() - m;
    check(m > 50, $sformatf("%s: only %0d bytes received", phase, m));
    if (EXACT) begin
      int found = -1;
      for (int j = 0; j + m <= exp_q.size() && found < 0; j++) begin
        bit ok = 1;
        for (int i = 0; i < m && ok; i++)
          if (!exp_q[j+i][8] && exp_q[j+i][7:0] != rx_q[base+i]) ok = 0;
        if (ok) found = j;
      end
      check(found >= 0, $sformatf("%s: received stream is not a run of the model", phase));
      if (loop_on)
        for (int i = 1; i < m; i++) begin
          check(rx_q[base+i][1] == rx_q[base+i-1][0], $sformatf("%s: loop-back byte %0d", phase, i));
          n_loop++;
        end
    end else begin
      // bytes still buffered from an earlier phase come later in the model
      for (int i = 0; i < rx_q.size(); i++) begin
        while (j_pos < exp_q.size() && !(exp_q[j_pos][8] || exp_q[j_pos][7:0] == rx_q[i])) j_pos++;
        check(j_pos < exp_q.size(), $sformatf("%s: byte %0d out of order", phase, i));
        j_pos++;
      end
    end
    rx_q.delete();
    if (EXACT) exp_q.delete();
  endtask

  task automatic make_conf(logic [7:0] is_in, int r0, int r2, int r3, int r5, int r7,
                           int l0, int l2, int l3, int l5, int l7, int r4, int l4);
    next_conf.is_in = is_in;
    for (int p = 0; p < 8; p++) begin
      next_conf.rate[p] = 0;
      next_conf.len[p]  = 0;
      for (int b = 0; b < 256; b++) next_conf.wave[p][b] = 1'($urandom);
    end
    next_conf.rate[0] = r0; next_conf.len[0] = l0;
    next_conf.rate[2] = r2; next_conf.len[2] = l2;
    next_conf.rate[3] = r3; next_conf.len[3] = l3;
    next_conf.rate[4] = r4; next_conf.len[4] = l4;
    next_conf.rate[5] = r5; next_conf.len[5] = l5;
    next_conf.rate[7] = r7; next_conf.len[7] = l7;
  endtask

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] st;
    conf.is_in = 8'hFF;
    for (int p = 0; p < 8; p++) begin conf.rate[p] = 0; conf.len[p] = 0; end
    next_conf = conf;
    repeat (5) @(posedge clk);
    rst_n <= 1;

    // 1. nobody reads: the buffer fills up
    repeat (1100 * DIV) @(posedge clk);
    set_addr(REG_STATUS);
    rd_data(st);
    check(st[STAT_OVERFLOW], "overflow status after the buffer filled");
    if (st[STAT_OVERFLOW]) n_ovf_seen++;
    check(!st[STAT_REPROG], "reprogramming status before configuration");

    // 2./3. configuration A: 0,2,3,5,7 outputs, 1 (loop-back),4,6 inputs
    make_conf(8'b0101_0010, 1, 0, 2, 0, 3,  13, 255, 10, 0, 8, 0, 0);
    send_config();
    set_addr(REG_STATUS);
    rd_data(st);
    check(!st[STAT_REPROG], "reprogramming status after start");
    host_read(EXACT ? 1300 * DIV + 2000 * DIV : 3000 * DIV);
    check_stream("A");

    // 4. configuration B: mode switch, 2 becomes an input, 4 an output
    make_conf(8'b0100_0110, 0, 0, 4, 1, 0,  29, 0, 200, 3, 1, 2, 77);
    send_config();
    host_read(EXACT ? 1300 * DIV + 2000 * DIV : 3000 * DIV);
    check_stream("B");

    $display("releases=%0d reprog_seen=%0d overflow_seen=%0d moves=%0d pushes=%0d pops=%0d",
             n_releases, n_reprog_seen, n_ovf_seen, n_move, n_push, n_pop);
    $display("writes=%0d samples=%0d mode_switches=%0d loopback=%0d",
             n_writes, n_samples, n_mode_switch, n_loop);
    check(n_releases == 2, "two configurations released");
    check(n_reprog_seen > 0, "reprogramming mode never seen by the host");
    check(n_ovf_seen > 0, "overflow never happened");
    check(n_move > 0, "direct move never happened");
    check(n_push > 0, "buffer push never happened");
    check(n_pop > 0, "buffer pop never happened");
    check(n_mode_switch > 0, "mode switch never happened");
    check(n_writes > 0, "no output write");
    check(n_samples > 0, "no input sample");
    if (EXACT) check(n_loop > 0, "loop-back never checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
