// sadu: serial Sum-of-Absolute-Differences unit.
//
// Each enabled cycle it forms |a - b| of one macroblock pixel and one
// candidate-block pixel, zero-extends it to 16 bits and adds it to the
// accumulator register. A start pulse loads the accumulator with an initial
// value instead (the destination register of SAD16), so that SAD16 adds a
// line's SAD to a running total. Sixteen enabled cycles process one line of
// sixteen pixels. The accumulator wraps modulo 2^16; the largest 16x16 block
// SAD (256 * 255 = 65280) fits.
// The structure (absolute difference, 16-bit adder with zero-extended
// operand, register with load and enable, initial value) follows the
// published SADU diagram. start has priority over en.
//
// Timing: sad updates on the rising edge after start or en.
module sadu
  import asip_pkg::*;
(
  input  logic   clk,
  input  logic   start,     // load sad_init
  input  logic   en,        // accumulate |mb_px - cand_px|
  input  word_t  sad_init,
  input  pixel_t mb_px,
  input  pixel_t cand_px,
  output word_t  sad
);

  pixel_t absdiff;
  word_t  sum;

  always_comb begin
    absdiff = (mb_px > cand_px) ? mb_px - cand_px : cand_px - mb_px;
    sum     = sad + {8'h00, absdiff};
  end

  always_ff @(posedge clk) begin
    if (start)   sad <= sad_init;
    else if (en) sad <= sum;
  end

endmodule
