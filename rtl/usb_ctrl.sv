// usb_ctrl - host parallel interface (USB controller machine).
//
// The board's USB chip presents the host as an 8-bit parallel port with an
// address register and eight data registers, driven by three host signals:
// WRITE (direction), ASTB (address strobe) and DSTB (data strobe), both
// strobes active low. A transfer is a four-phase handshake:
//   host drives pwrite (and pdb for a write), pulls a strobe low;
//   this machine performs the access and raises pwait;
//   host releases the strobe; this machine drops pwait.
// The strobes are synchronised to clk, so the host may be asynchronous.
//
// Register map (this design's): REG_IN (0) is written by the host with
// configuration bytes; each write raises in_valid for one cycle. REG_OUT (1)
// reads the pin-value byte from the USB output machine; out_read pulses when
// such a read completes (the strobe is released), which clears the new-data
// status bit. REG_STATUS (2) reads the status byte. Registers 3..7 are plain
// host read/write scratch registers, completing the eight.
// The register structure and the three host signals follow the design; the
// active-low strobes, the WAIT handshake, the data bus split into in/out/enable
// and the register numbers are this design's choices.
//
// Timing: the access is performed, and pwait rises, on the 4th clock edge
// after a strobe falls (2 synchroniser stages, IDLE, ACCESS); pwait drops on
// the 3rd edge after the strobe rises.
module usb_ctrl
  import dsmu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // host side
  input  logic       astb_n,
  input  logic       dstb_n,
  input  logic       pwrite,    // 1: host writes, 0: host reads
  input  logic [7:0] pdb_i,
  output logic [7:0] pdb_o,
  output logic       pdb_oe,
  output logic       pwait,
  // unit side
  output logic [7:0] in_data,   // last byte written to REG_IN
  output logic       in_valid,  // one-cycle pulse per REG_IN write
  input  logic [7:0] out_data,  // REG_OUT contents
  output logic       out_read,  // one-cycle pulse after a REG_OUT read
  input  logic [7:0] status     // REG_STATUS contents
);
  typedef enum logic [1:0] {IDLE, ACCESS, HOLD} state_e;

  state_e     state;
  logic [1:0] astb_s, dstb_s;
  logic       astb, dstb;       // synchronised, active high
  logic       is_addr, is_rd_out;
  logic [2:0] addr;
  logic [7:0] regs [8];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      astb_s <= '0;
      dstb_s <= '0;
    end else begin
      astb_s <= {astb_s[0], !astb_n};
      dstb_s <= {dstb_s[0], !dstb_n};
    end
  end
  assign astb = astb_s[1];
  assign dstb = dstb_s[1];

  assign in_data = regs[REG_IN];

  // Read data for the current address.
  logic [7:0] rd_mux;
  always_comb begin
    unique case (addr)
      REG_OUT:    rd_mux = out_data;
      REG_STATUS: rd_mux = status;
      default:    rd_mux = regs[addr];
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= IDLE;
      addr      <= '0;
      pwait     <= 1'b0;
      pdb_o     <= '0;
      pdb_oe    <= 1'b0;
      in_valid  <= 1'b0;
      out_read  <= 1'b0;
      is_addr   <= 1'b0;
      is_rd_out <= 1'b0;
      for (int i = 0; i < 8; i++) regs[i] <= '0;
    end else begin
      in_valid <= 1'b0;
      out_read <= 1'b0;
      unique case (state)
        IDLE: begin
          if (astb || dstb) begin
            is_addr <= astb;
            state   <= ACCESS;
          end
        end
        ACCESS: begin
          if (pwrite) begin
            if (is_addr) begin
              addr <= pdb_i[2:0];
            end else begin
              regs[addr] <= pdb_i;
              if (addr == REG_IN) in_valid <= 1'b1;
            end
          end else begin
            pdb_o     <= is_addr ? {5'b0, addr} : rd_mux;
            pdb_oe    <= 1'b1;
            is_rd_out <= !is_addr && (addr == REG_OUT);
          end
          pwait <= 1'b1;
          state <= HOLD;
        end
        HOLD: begin
          if (!astb && !dstb) begin
            pwait     <= 1'b0;
            pdb_oe    <= 1'b0;
            out_read  <= is_rd_out;
            is_rd_out <= 1'b0;
            state     <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // The bus is driven only inside an acknowledged read, and a single access
  // never reports both a configuration byte and an output read.
  a_oe_in_ack: assert property (@(posedge clk) disable iff (!rst_n) pdb_oe |-> pwait);
  a_one_event: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && out_read));
endmodule
