// wave_mem - waveform store of one channel.
//
// Holds the bit sequence an output channel plays, up to WAVE_BITS bits.
// The USB input machine writes it a byte at a time as the sequence arrives;
// bit j of byte k is sequence bit 8*k+j, so the first bit sent is the LSB of
// the first byte. The channel's machine reads one bit at a time.
// The host sends a waveform as "a series of bits"; the byte packing and the
// size (every length a one-byte length field can hold) are this design's.
//
// Interface: synchronous byte write (we, waddr, wdata); asynchronous bit read
// (raddr -> rbit). Contents are not reset; a channel only reads bits below
// the length it was given, which are always written first.
module wave_mem #(
  parameter int unsigned WAVE_BITS = dsmu_pkg::WAVE_BITS
) (
  input  logic                          clk,
  input  logic                          we,
  input  logic [$clog2(WAVE_BITS/8)-1:0] waddr,
  input  logic [7:0]                    wdata,
  input  logic [$clog2(WAVE_BITS)-1:0]  raddr,
  output logic                          rbit
);
  localparam int unsigned NBYTES = WAVE_BITS / 8;

  logic [7:0] mem [NBYTES];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rbit = mem[raddr[$clog2(WAVE_BITS)-1:3]][raddr[2:0]];
endmodule
