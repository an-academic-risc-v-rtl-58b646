// clk_div: derives the FMC link clock from the core clock.
//
// The core runs from a 200 MHz external oscillator; the external memory link
// runs at a quarter of it, 50 MHz. A free-running counter of log2(DIV) bits
// divides the clock: `clk_out` is its top bit, a square wave at clk/DIV that
// stays edge-aligned with the core clock, and `tick` is high for one core
// cycle in every DIV, in the cycle before `clk_out` rises. Logic that moves data over the
// link stays in the core clock domain and advances on `tick`, so no clock
// domain crossing is needed. The divide-by-4 ratio is the document's; the
// `tick` enable is this design's way of using it.
module clk_div #(
  parameter int unsigned DIV = 4      // power of two, at least 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk_out,
  output logic tick
);
  localparam int unsigned W = $clog2(DIV);
  logic [W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else        cnt <= cnt + 1'b1;
  end

  assign clk_out = cnt[W-1];
  assign tick    = (cnt == W'(DIV/2 - 1));
endmodule
