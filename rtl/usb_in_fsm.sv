// usb_in_fsm - USB input machine: receives a new configuration.
//
// Sits in WAIT until the host writes a byte to the input register. It then
// raises reprog (all channels stop and wait), copies and parses each byte as
// it arrives, and when it sees the start command it commits the new
// configuration to every channel at once and drops reprog, which restarts
// all outputs together.
//
//   WAIT -> SET_RP1 -> COPY -> CHECK_END --(new byte, no end)--> COPY
//                                        --(end)--> INTERPRET -> SET_RP0 -> WAIT
//
// Byte stream (command header in the upper nibble of the first byte):
//   1001 xxxx                         prepare for a new configuration
//   1010 xxxx, D, F0, F1, F2, F3      D bit i = 1: channel i is an input;
//                                     Fk = {rate(2k+1), rate(2k)}
//   1011 0ppp, L, B0 .. B(ceil(L/8)-1) waveform of channel p, L bits,
//                                     first bit = B0[0]
//   1100 xxxx                         start: end of the transmission
// Bytes of an unknown header are ignored. Directions, rates and lengths are
// collected in shadow registers (preloaded with the current configuration) and
// copied to cfg in INTERPRET; waveform bytes go straight to the channel's
// waveform store, which is safe because every channel waits meanwhile.
// The states, the headers and the field sizes follow the design; the byte
// layout inside each command and the shadow/commit scheme are this design's.
//
// Timing: reprog rises 2 cycles after in_valid of the first byte; cfg changes
// and reprog falls 1 and 2 cycles after the start byte is parsed.
module usb_in_fsm
  import dsmu_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [7:0]           in_data,
  input  logic                 in_valid,
  output logic                 reprog,
  output pin_cfg_t             cfg [NPINS],
  output logic                 wave_we,
  output logic [2:0]           wave_pin,
  output logic [WAVE_AW-1:0]   wave_addr,
  output logic [7:0]           wave_data
);
  typedef enum logic [2:0] {WAIT, SET_RP1, COPY, CHECK_END, INTERPRET, SET_RP0} state_e;
  typedef enum logic [2:0] {P_HDR, P_DIR, P_FREQ, P_LEN, P_DATA} parse_e;

  state_e   state;
  parse_e   pstate;
  logic     pend;           // an unparsed byte is waiting in byte_r
  logic     end_seen;
  logic [7:0] byte_r;
  logic [1:0] fidx;         // rate byte index
  logic [2:0] port;
  logic [WAVE_AW-1:0] didx;   // data byte index
  logic [WAVE_AW-1:0] dlast;  // index of the last data byte
  pin_cfg_t shadow [NPINS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= WAIT;
      pstate    <= P_HDR;
      pend      <= 1'b0;
      end_seen  <= 1'b0;
      byte_r    <= '0;
      fidx      <= '0;
      port      <= '0;
      didx      <= '0;
      dlast     <= '0;
      reprog    <= 1'b0;
      wave_we   <= 1'b0;
      wave_pin  <= '0;
      wave_addr <= '0;
      wave_data <= '0;
      for (int i = 0; i < NPINS; i++) begin
        cfg[i]    <= PIN_CFG_RESET;
        shadow[i] <= PIN_CFG_RESET;
      end
    end else begin
      wave_we <= 1'b0;
      if (in_valid) begin
        byte_r <= in_data;
        pend   <= 1'b1;
      end

      unique case (state)
        WAIT: begin
          if (pend) state <= SET_RP1;
        end

        SET_RP1: begin
          reprog   <= 1'b1;
          end_seen <= 1'b0;
          pstate   <= P_HDR;
          for (int i = 0; i < NPINS; i++) shadow[i] <= cfg[i];
          state    <= COPY;
        end

        COPY: begin
          if (!in_valid) pend <= 1'b0;
          unique case (pstate)
            P_HDR: begin
              unique case (byte_r[7:4])
                HDR_CONFIG: pstate <= P_DIR;
                HDR_SEQ: begin
                  port   <= byte_r[2:0];
                  pstate <= P_LEN;
                end
                HDR_START: end_seen <= 1'b1;
                default: ;  // HDR_PREPARE and unknown bytes
              endcase
            end
            P_DIR: begin
              for (int i = 0; i < NPINS; i++) shadow[i].is_input <= byte_r[i];
              fidx   <= '0;
              pstate <= P_FREQ;
            end
            P_FREQ: begin
              shadow[2*fidx].rate   <= byte_r[3:0];
              shadow[2*fidx+1].rate <= byte_r[7:4];
              fidx <= fidx + 1'b1;
              if (fidx == 2'd3) pstate <= P_HDR;
            end
            P_LEN: begin
              shadow[port].len <= byte_r;
              didx  <= '0;
              dlast <= WAVE_AW'((9'(byte_r) + 9'd7) / 9'd8 - 9'd1);
              pstate <= (byte_r == '0) ? P_HDR : P_DATA;
            end
            P_DATA: begin
              wave_we   <= 1'b1;
              wave_pin  <= port;
              wave_addr <= didx;
              wave_data <= byte_r;
              didx      <= didx + 1'b1;
              if (didx == dlast) pstate <= P_HDR;
            end
            default: pstate <= P_HDR;
          endcase
          state <= CHECK_END;
        end

        CHECK_END: begin
          if (end_seen)  state <= INTERPRET;
          else if (pend) state <= COPY;
        end

        INTERPRET: begin
          for (int i = 0; i < NPINS; i++) cfg[i] <= shadow[i];
          state <= SET_RP0;
        end

        SET_RP0: begin
          reprog <= 1'b0;
          state  <= WAIT;
        end

        default: state <= WAIT;
      endcase
    end
  end

  // Waveform stores are written only while every channel waits.
  a_wave_in_reprog: assert property (@(posedge clk) disable iff (!rst_n) wave_we |-> reprog);
endmodule
