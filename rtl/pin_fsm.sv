// pin_fsm - generic pin state machine, one per channel.
//
// Each channel is either a monitor input or a stimulus output, and waits
// whenever the unit is in reprogramming mode so that all outputs restart
// together when the new configuration is released.
//
//   WAIT_RP   reprogramming wait; on release go to COLLECT (input) or
//             RESET_CNT (output), restarting the waveform at bit 0
//   COLLECT   on every strobe copy the synchronised pin into the value
//             register; back to WAIT_RP when reprogramming starts
//   RESET_CNT load the rate counter with 2**rate - 1
//   WAIT_CNT  count strobes down; when a strobe finds the counter at zero
//             go to WRITE_OUT; back to WAIT_RP when reprogramming starts
//   WRITE_OUT drive the next waveform bit on the pin and into the value
//             register, advance the bit pointer (wrapping at len), then
//             RESET_CNT
//
// The states and transitions follow the pin state diagram of the design. The
// meaning of the 4-bit rate code (one output bit every 2**rate strobes, so
// code 0 is the strobe rate, 5 MHz), the waveform repeating, a zero length
// driving 0, the input synchroniser and leaving WAIT_RP only once
// reprogramming ends are this design's choices.
//
// Interface: strobe (one-cycle pulse), reprog level, cfg (pin_cfg_t),
// wave_raddr/wave_bit to the channel's waveform store, pin_in from the plug,
// pin_out and in_nout to the channel buffer, value to the USB output machine.
// Timing: an output bit changes 2 cycles after the strobe that expires the
// counter and lasts 2**rate strobes; an input is sampled 2 cycles after it
// reaches pin_in (synchroniser) at the next strobe.
module pin_fsm
  import dsmu_pkg::*;
#(
  parameter int unsigned WAVE_DEPTH = dsmu_pkg::WAVE_BITS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         strobe,
  input  logic                         reprog,
  input  pin_cfg_t                     cfg,
  output logic [$clog2(WAVE_DEPTH)-1:0] wave_raddr,
  input  logic                         wave_bit,
  input  logic                         pin_in,
  output logic                         pin_out,
  output logic                         in_nout,
  output logic                         value
);
  localparam int unsigned CNT_W = 1 << FREQ_W;  // holds 2**15 - 1
  localparam int unsigned PW    = $clog2(WAVE_DEPTH);

  typedef enum logic [2:0] {
    WAIT_RP, COLLECT, RESET_CNT, WAIT_CNT, WRITE_OUT
  } state_e;

  state_e           state;
  logic [CNT_W-1:0] cnt;
  logic [PW-1:0]    ptr;
  logic [1:0]       sync;

  assign in_nout    = cfg.is_input;
  assign wave_raddr = ptr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sync <= '0;
    end else begin
      sync <= {sync[0], pin_in};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= WAIT_RP;
      cnt     <= '0;
      ptr     <= '0;
      pin_out <= 1'b0;
      value   <= 1'b0;
    end else begin
      unique case (state)
        WAIT_RP: begin
          ptr <= '0;
          if (!reprog) state <= cfg.is_input ? COLLECT : RESET_CNT;
        end
        COLLECT: begin
          if (reprog)      state <= WAIT_RP;
          else if (strobe) value <= sync[1];
        end
        RESET_CNT: begin
          cnt   <= CNT_W'((1 << cfg.rate) - 1);
          state <= WAIT_CNT;
        end
        WAIT_CNT: begin
          if (reprog) begin
            state <= WAIT_RP;
          end else if (strobe) begin
            if (cnt == '0) state <= WRITE_OUT;
            else           cnt   <= cnt - 1'b1;
          end
        end
        WRITE_OUT: begin
          if (cfg.len == '0) begin
            pin_out <= 1'b0;
            value   <= 1'b0;
          end else begin
            pin_out <= wave_bit;
            value   <= wave_bit;
            ptr     <= ((PW+1)'(ptr) + 1'b1 >= (PW+1)'(cfg.len)) ? '0 : ptr + 1'b1;
          end
          state <= RESET_CNT;
        end
        default: state <= WAIT_RP;
      endcase
    end
  end

  // Once reprogramming has lasted a few cycles, the output is frozen.
  a_frozen: assert property (@(posedge clk) disable iff (!rst_n)
                             reprog && $past(reprog) && $past(reprog, 2) |-> $stable(pin_out));
endmodule
