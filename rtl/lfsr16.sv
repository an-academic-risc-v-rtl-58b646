// lfsr16: 16-bit linear feedback shift register for random cache replacement.
//
// The caches pick the way to replace from the low bits of this register. The
// feedback polynomial x^16 + x^14 + x^13 + x^11 + 1 is the one the caches of
// the SoC use; it is maximal length, so the register walks through all 65535
// non-zero states. The register shifts left by one each cycle `en` is high and
// the new bit 0 is the XOR of bits 15, 13, 12 and 10 (taps 16, 14, 13, 11).
// Reset loads SEED (this design's choice, any non-zero value works).
//
// Interface: `state` is the current register value, valid in the cycle after
// reset; it changes on the clock edge after `en`.
module lfsr16 #(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  output logic [15:0] state
);
  logic fb;
  assign fb = state[15] ^ state[13] ^ state[12] ^ state[10];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {state[14:0], fb};
  end

  initial assert (SEED != 16'h0) else $error("lfsr16: SEED must be non-zero");
endmodule
