// usb_out_fsm - USB output machine: streams pin values to the host.
//
// On every data collection strobe outside reprogramming the eight channel
// values form one byte. If the host has read the output register (new-data
// flag clear) and nothing is queued, the byte goes straight to the output
// register and the flag is set; otherwise it is pushed onto the output buffer.
// While no new byte is pending, the host has read the register and the buffer
// is not empty, the oldest buffered byte moves to the output register. A byte
// that finds the buffer full is dropped and sets the sticky overflow flag,
// which is cleared when reprogramming starts.
//
//   WAIT --new data--> COPY --read & buffer empty--> MOVE --> WAIT
//                           --otherwise-----------> PUSH --> WAIT
//   WAIT --no new data & read & buffer not empty--> POP --> WAIT
//
// The states and their actions follow the output state diagram of the design.
// Where the diagram's wait self-loop reads "(data read || buffer empty)", this
// machine follows the prose instead (a buffered byte moves out once the host
// has read); requiring an empty buffer before MOVE keeps bytes in order, and
// clearing the overflow flag at reprogramming is this design's choice.
//
// Interface: new_data strobe and pin values in; out_read pulse from the
// parallel interface (host read the output register); FIFO push/pop side;
// out_reg, new_flag and overflow towards the status and output registers.
// Timing: new_data captures the byte in a one-entry holding register, so a
// strobe is never missed while the machine is busy; the byte reaches out_reg
// 4 cycles after its strobe. One byte per strobe is sustained as long as
// strobes are at least 4 cycles apart.
module usb_out_fsm (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       new_data,
  input  logic [7:0] pin_values,
  input  logic       out_read,
  input  logic       clr_ovf,
  // output buffer
  output logic       fifo_push,
  output logic [7:0] fifo_wdata,
  output logic       fifo_pop,
  input  logic [7:0] fifo_rdata,
  input  logic       fifo_full,
  input  logic       fifo_empty,
  // to the host registers
  output logic [7:0] out_reg,
  output logic       new_flag,
  output logic       overflow
);
  typedef enum logic [2:0] {WAIT, COPY, MOVE, PUSH, POP} state_e;

  state_e     state;
  logic [7:0] local_v;
  logic [7:0] cap_v;     // byte captured at the strobe
  logic       pend;      // cap_v not yet taken by WAIT
  logic       data_read;

  assign data_read = !new_flag;

  always_comb begin
    fifo_push  = (state == PUSH) && !fifo_full;
    fifo_wdata = local_v;
    fifo_pop   = (state == POP);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= WAIT;
      local_v  <= '0;
      cap_v    <= '0;
      pend     <= 1'b0;
      out_reg  <= '0;
      new_flag <= 1'b0;
      overflow <= 1'b0;
    end else begin
      if (out_read) new_flag <= 1'b0;
      if (clr_ovf)  overflow <= 1'b0;
      if (new_data) begin
        cap_v <= pin_values;
        pend  <= 1'b1;
      end
      unique case (state)
        WAIT: begin
          if (pend) begin
            local_v <= cap_v;
            if (!new_data) pend <= 1'b0;
            state   <= COPY;
          end else if (data_read && !fifo_empty) begin
            state <= POP;
          end
        end
        COPY: state <= (data_read && fifo_empty) ? MOVE : PUSH;
        MOVE: begin
          out_reg  <= local_v;
          new_flag <= 1'b1;
          state    <= WAIT;
        end
        PUSH: begin
          if (fifo_full) overflow <= 1'b1;
          state <= WAIT;
        end
        POP: begin
          out_reg  <= fifo_rdata;
          new_flag <= 1'b1;
          state    <= WAIT;
        end
        default: state <= WAIT;
      endcase
    end
  end

  // The buffer is never popped empty nor pushed full.
  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n) fifo_pop |-> !fifo_empty);
  a_push_nonfull: assert property (@(posedge clk) disable iff (!rst_n) fifo_push |-> !fifo_full);
endmodule
