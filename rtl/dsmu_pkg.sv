// dsmu_pkg - constants and types shared by the Digital Stimulus/Monitor Unit.
//
// The unit has eight configurable channels. The host talks to it over an
// 8-bit parallel register interface and sends configuration as a byte stream
// whose four command headers (1001, 1010, 1011, 1100) follow the unit's
// protocol table. The register numbers, the status bit positions, the packing
// of frequencies and waveform bits into bytes and the reset defaults are this
// design's own choices; they are documented where they are defined.
package dsmu_pkg;

  // Number of channels (banana plugs).
  localparam int unsigned NPINS = 8;

  // Width of a channel's rate code (protocol: "8 x 4-bit frequencies").
  localparam int unsigned FREQ_W = 4;

  // Width of a waveform length field (protocol: "1-byte sequence length").
  localparam int unsigned LEN_W = 8;

  // Bits of waveform storage per channel: every length a byte can hold.
  localparam int unsigned WAVE_BITS = 256;
  localparam int unsigned WAVE_BYTES = WAVE_BITS / 8;
  localparam int unsigned WAVE_AW = $clog2(WAVE_BYTES);

  // Command headers, carried in the upper nibble of a command's first byte.
  typedef enum logic [3:0] {
    HDR_PREPARE = 4'b1001,  // function 1: prepare for a new configuration
    HDR_CONFIG  = 4'b1010,  // function 2: directions and rate codes
    HDR_SEQ     = 4'b1011,  // function 3: waveform of one port
    HDR_START   = 4'b1100   // function 4: start all outputs together
  } hdr_e;

  // Register numbers in the parallel interface's address space.
  localparam logic [2:0] REG_IN     = 3'd0;  // host -> unit configuration byte
  localparam logic [2:0] REG_OUT    = 3'd1;  // unit -> host pin values
  localparam logic [2:0] REG_STATUS = 3'd2;  // unit -> host status

  // Status register bit positions.
  localparam int unsigned STAT_NEW_DATA = 0;  // REG_OUT holds an unread value
  localparam int unsigned STAT_OVERFLOW = 1;  // a sample was lost, buffer full
  localparam int unsigned STAT_REPROG   = 2;  // unit is in reprogramming mode

  // Configuration of one channel as committed by the USB input machine.
  typedef struct packed {
    logic              is_input;  // 1: input (monitor), 0: output (stimulus)
    logic [FREQ_W-1:0] rate;      // output bit lasts 2**rate strobes
    logic [LEN_W-1:0]  len;       // waveform length in bits, 0: none
  } pin_cfg_t;

  // Reset configuration: every channel an input, so nothing is driven.
  localparam pin_cfg_t PIN_CFG_RESET = '{is_input: 1'b1, rate: '0, len: '0};

endpackage
