// tb_dsmu_top - end-to-end test of the unit with a 1 MHz strobe, slow enough
// for the host model to keep up, so the received pin stream is checked byte
// for byte. See dsmu_tb_env for the sequence and the checks.
module tb_dsmu_top;
  dsmu_tb_env #(.EXACT(1'b1), .STROBE_HZ(1_000_000)) env ();
endmodule
