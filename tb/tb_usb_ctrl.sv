// tb_usb_ctrl - drives the parallel interface as a host would (address and
// data strobes with the WAIT handshake) and checks: address register
// write/read, REG_IN writes (in_valid exactly once, in_data), REG_OUT and
// REG_STATUS reads (unit-side values, out_read exactly once after a REG_OUT
// read and never otherwise), scratch registers 3..7, and the bus enable.
module tb_usb_ctrl;
  logic clk = 0, rst_n = 0;
  logic astb_n = 1, dstb_n = 1, pwrite = 0;
  logic [7:0] pdb_i = 0, pdb_o, in_data, out_data = 0, status = 0;
  logic pdb_oe, pwait, in_valid, out_read;
  int checks = 0, failures = 0;
  int n_in_valid = 0, n_out_read = 0;

  usb_ctrl dut (.clk, .rst_n, .astb_n, .dstb_n, .pwrite, .pdb_i, .pdb_o, .pdb_oe,
                .pwait, .in_data, .in_valid, .out_data, .out_read, .status);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && in_valid) n_in_valid++;
    if (rst_n && out_read) n_out_read++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // host transfers, asynchronous to clk (times in ns, clk period 10 ns)
  task automatic host_cycle(bit addr, bit wr, logic [7:0] wd, output logic [7:0] rd);
    #3;
    pwrite = wr;
    pdb_i  = wd;
    #7;
    if (addr) astb_n = 0; else dstb_n = 0;
    wait (pwait == 1'b1);
    #7;
    rd = pdb_o;
    if (!wr) begin checks++; if (!pdb_oe) begin failures++; $display("FAIL: bus not driven"); end end
    if (addr) astb_n = 1; else dstb_n = 1;
    wait (pwait == 1'b0);
    #13;
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

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] v, a;
    logic [7:0] scratch [8];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (3) @(posedge clk);
    check(!pwait && !pdb_oe, "idle after reset");

    // address register read back
    set_addr(8'd5);
    host_cycle(1, 0, 8'h00, a);
    check(a[2:0] == 3'd5, "address read back");

    // configuration bytes
    set_addr(8'd0);
    for (int i = 0; i < 20; i++) begin
      int n_prev;
      v = 8'($urandom);
      n_prev = n_in_valid;
      wr_data(v);
      check(n_in_valid == n_prev + 1, "one in_valid per REG_IN write");
      check(in_data == v, "in_data");
    end
    rd_data(v);
    check(v == in_data, "REG_IN read back");

    // pin values and status
    for (int i = 0; i < 20; i++) begin
      int n_prev;
      out_data = 8'($urandom);
      status   = 8'($urandom);
      set_addr(8'd1);
      n_prev = n_out_read;
      rd_data(v);
      check(v == out_data, "REG_OUT read");
      repeat (2) @(posedge clk);
      check(n_out_read == n_prev + 1, "one out_read per REG_OUT read");
      set_addr(8'd2);
      rd_data(v);
      check(v == status, "REG_STATUS read");
      check(n_out_read == n_prev + 1, "out_read on a status read");
    end

    // scratch registers
    for (int r = 3; r < 8; r++) begin
      scratch[r] = 8'($urandom);
      set_addr(8'(r));
      wr_data(scratch[r]);
    end
    for (int r = 3; r < 8; r++) begin
      set_addr(8'(r));
      rd_data(v);
      check(v == scratch[r], $sformatf("scratch %0d", r));
    end
    check(n_in_valid == 20, "in_valid from a write to another register");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
