// out_fifo - output data buffer.
//
// When the host has not yet read the last byte of pin values, the USB output
// machine parks new bytes here; it moves them to the output register one by
// one as the host reads. A plain synchronous FIFO with first-word fall-through:
// rdata always shows the oldest entry while empty is low.
// The buffer and its full condition (the overflow status bit) follow the
// design; the depth of 1024 bytes (one 18 Kbit block RAM of the FPGA) is this
// design's choice.
//
// Interface: push/wdata and pop/rdata, full and empty flags, count.
// A push while full and a pop while empty are ignored.
// Timing: one push and one pop per cycle; rdata is valid the cycle after push.
module out_fifo #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [WIDTH-1:0]         wdata,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rdata,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH):0]   count
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;

  logic do_push, do_pop;
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= (wptr == AW'(DEPTH - 1)) ? '0 : wptr + 1'b1;
      if (do_pop)  rptr <= (rptr == AW'(DEPTH - 1)) ? '0 : rptr + 1'b1;
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  assign rdata = mem[rptr];
  assign full  = (count == ($clog2(DEPTH)+1)'(DEPTH));
  assign empty = (count == '0);

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("out_fifo: DEPTH must be a power of two");
  end
endmodule
