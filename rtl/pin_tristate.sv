// pin_tristate - channel buffer between the FPGA and a banana plug.
//
// Each channel uses two FPGA pins, one input and one output, tied to the
// same banana plug through two tri-state buffers. The In/Out select enables
// exactly one of them, so the two FPGA pins are never shorted together:
//   in_nout = 1 : plug -> fpga_in, the output buffer is off (monitor)
//   in_nout = 0 : fpga_out -> plug, the input buffer is off (stimulus)
// The disabled buffer leaves its side undriven (high impedance).
// The structure and the select polarity follow the channel circuit of the
// design; in the real unit this is discrete logic next to the FPGA.
// One instance serves W channels, bit i of every port belonging to channel i.
// Timing: purely combinational.
module pin_tristate #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] fpga_out,   // values from the FPGA output pins
  input  logic [W-1:0] in_nout,    // 1: channel is an input, 0: an output
  output wire  [W-1:0] fpga_in,    // values towards the FPGA input pins
  inout  wire  [W-1:0] banana      // the channels' external plugs
);
  for (genvar i = 0; i < W; i++) begin : g_ch
    assign banana[i]  = in_nout[i] ? 1'bz : fpga_out[i];
    assign fpga_in[i] = in_nout[i] ? banana[i] : 1'bz;
  end
endmodule
