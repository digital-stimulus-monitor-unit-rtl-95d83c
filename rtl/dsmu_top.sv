// dsmu_top - Digital Stimulus/Monitor Unit.
//
// An FPGA unit that gives a host computer eight digital channels towards a
// device under test. Each channel is, by host command, a monitor input
// sampled at the data collection strobe (5 MHz) or a stimulus output that
// replays a stored bit sequence at the strobe rate divided by 2**rate.
// The values of all eight channels stream back to the host as one byte per
// strobe, through an output register and a buffer.
//
// Blocks:
//   usb_ctrl     host parallel interface (ASTB/DSTB/WRITE, eight registers)
//   usb_in_fsm   receives configuration bytes, holds the unit in
//                reprogramming mode, commits the new configuration
//   usb_out_fsm  moves each strobe's pin byte to the output register or the
//                buffer, keeps new-data and overflow status
//   out_fifo     the output buffer
//   strobe_gen   the data collection strobe
//   pin_fsm      one generic pin machine per channel
//   wave_mem     one waveform store per channel
//   pin_tristate the In/Out channel buffers, one per channel
//
// Status register: bit 0 new data in REG_OUT, bit 1 overflow, bit 2
// reprogramming. The block structure follows the design; the register
// numbers, status bits, byte layout of the commands, buffer depth and clock
// frequency are this design's choices (see dsmu_pkg and each block).
//
// Ports: clk (board oscillator, CLK_HZ), rst_n (synchronous, active low),
// the host parallel port (data bus split into pdb_i/pdb_o/pdb_oe), and the
// eight banana plugs as a bidirectional bus.
module dsmu_top
  import dsmu_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned STROBE_HZ  = 5_000_000,
  parameter int unsigned FIFO_DEPTH = 1024
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             astb_n,
  input  logic             dstb_n,
  input  logic             pwrite,
  input  logic [7:0]       pdb_i,
  output logic [7:0]       pdb_o,
  output logic             pdb_oe,
  output logic             pwait,
  inout  wire  [NPINS-1:0] banana
);
  logic strobe;
  logic reprog;

  // host interface <-> machines
  logic [7:0] in_data;
  logic       in_valid;
  logic [7:0] out_reg;
  logic       out_read;
  logic       new_flag, overflow;
  logic [7:0] status;

  // configuration
  pin_cfg_t           cfg [NPINS];
  logic               wave_we;
  logic [2:0]         wave_pin;
  logic [WAVE_AW-1:0] wave_addr;
  logic [7:0]         wave_data;

  // channels
  logic [NPINS-1:0] value, pin_out, in_nout;
  wire  [NPINS-1:0] pin_in;

  // buffer
  logic       fifo_push, fifo_pop, fifo_full, fifo_empty;
  logic [7:0] fifo_wdata, fifo_rdata;

  always_comb begin
    status = '0;
    status[STAT_NEW_DATA] = new_flag;
    status[STAT_OVERFLOW] = overflow;
    status[STAT_REPROG]   = reprog;
  end

  strobe_gen #(.CLK_HZ(CLK_HZ), .STROBE_HZ(STROBE_HZ)) u_strobe (
    .clk, .rst_n, .en(1'b1), .strobe
  );

  usb_ctrl u_ctrl (
    .clk, .rst_n,
    .astb_n, .dstb_n, .pwrite, .pdb_i, .pdb_o, .pdb_oe, .pwait,
    .in_data, .in_valid,
    .out_data(out_reg), .out_read, .status
  );

  usb_in_fsm u_in (
    .clk, .rst_n, .in_data, .in_valid, .reprog, .cfg,
    .wave_we, .wave_pin, .wave_addr, .wave_data
  );

  usb_out_fsm u_out (
    .clk, .rst_n,
    .new_data(strobe && !reprog), .pin_values(value),
    .out_read, .clr_ovf(reprog),
    .fifo_push, .fifo_wdata, .fifo_pop, .fifo_rdata, .fifo_full, .fifo_empty,
    .out_reg, .new_flag, .overflow
  );

  out_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(8)) u_fifo (
    .clk, .rst_n,
    .push(fifo_push), .wdata(fifo_wdata), .pop(fifo_pop), .rdata(fifo_rdata),
    .full(fifo_full), .empty(fifo_empty), .count()
  );

  for (genvar p = 0; p < NPINS; p++) begin : g_ch
    logic [$clog2(WAVE_BITS)-1:0] raddr;
    logic                         rbit;

    wave_mem u_wave (
      .clk,
      .we(wave_we && (wave_pin == 3'(p))),
      .waddr(wave_addr), .wdata(wave_data),
      .raddr, .rbit
    );

    pin_fsm u_pin (
      .clk, .rst_n, .strobe, .reprog, .cfg(cfg[p]),
      .wave_raddr(raddr), .wave_bit(rbit),
      .pin_in(pin_in[p]), .pin_out(pin_out[p]), .in_nout(in_nout[p]),
      .value(value[p])
    );
  end

  pin_tristate #(.W(NPINS)) u_buf (
    .fpga_out(pin_out), .in_nout(in_nout), .fpga_in(pin_in), .banana(banana)
  );
endmodule
