// tb_dsmu_full - end-to-end test of the unit with every parameter at its
// default (5 MHz strobe, 1024-byte buffer). The host model cannot keep up
// with 5 MHz, so the stream is checked for order only; the outputs are
// checked strobe by strobe. See dsmu_tb_env.
module tb_dsmu_full;
  dsmu_tb_env #(.EXACT(1'b0), .STROBE_HZ(5_000_000)) env ();
endmodule
