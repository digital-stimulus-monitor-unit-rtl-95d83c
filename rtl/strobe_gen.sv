// strobe_gen - data collection strobe.
//
// Divides the board clock down to the sampling rate of the unit: a one-cycle
// pulse every DIV clocks. Every channel samples its input and advances its
// output on this strobe, and the USB output machine takes one byte of pin
// values per strobe, so the strobe is the unit's maximum signal rate.
//
// The 5 MHz rate follows the unit's specification. The 50 MHz board clock is
// this design's assumption; DIV must be at least 3 so that a channel's
// two-cycle write/reload sequence finishes between strobes.
//
// Interface: clk, rst_n (active low, synchronous), en gates the strobe.
// Timing: the first strobe comes DIV cycles after reset is released.
module strobe_gen #(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned STROBE_HZ = 5_000_000,
  parameter int unsigned DIV       = CLK_HZ / STROBE_HZ
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic strobe
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt    <= CW'(DIV - 1);
      strobe <= 1'b0;
    end else begin
      strobe <= 1'b0;
      if (en) begin
        if (cnt == '0) begin
          cnt    <= CW'(DIV - 1);
          strobe <= 1'b1;
        end else begin
          cnt <= cnt - 1'b1;
        end
      end
    end
  end

  initial begin
    assert (DIV >= 3) else $error("strobe_gen: DIV must be at least 3");
  end
endmodule
