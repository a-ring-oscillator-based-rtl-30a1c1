// gray_select: Gray-code conversion and bit selection of one counter value.
//
// The counter value is first converted to reflected Gray code,
// g = b ^ (b >> 1), so that a count that moves by one changes only one bit and
// a carry cannot flip the whole selected block. Then the bits at positions
// POS_FIRST..POS_LAST are taken, positions being numbered from 1 at the MSB to
// W at the LSB; position p is bit W-p. Bits near the MSB are stable but equal
// on every chip, bits near the LSB are noisy; positions in the middle carry the
// chip-specific information. Positions 7..8 (bits 9..8 of a 16-bit value) are
// the default.
//
// The Gray code, the position numbering and the default positions are those of
// the original PUF proposal; converting the whole value before selecting is the reading taken
// here. Purely combinational; bits[WB-1] is position POS_FIRST.
`timescale 1ns / 1ps
module gray_select #(
  parameter int unsigned W         = 16,
  parameter int unsigned POS_FIRST = 7,
  parameter int unsigned POS_LAST  = 8,
  parameter bit          GRAY_WINDOW = 1'b0,
  localparam int unsigned WB       = POS_LAST - POS_FIRST + 1
) (
  input  logic [W-1:0]  value,
  output logic [WB-1:0] bits
);

  // Gray bit i is value[i] ^ value[i+1] (the MSB is kept); only the selected
  // window is formed. With GRAY_WINDOW the bit above the window counts as 0.
  localparam int unsigned LO = W - POS_LAST;

  logic [W-1:0] shifted;

  always_comb begin
    shifted = value >> 1;
    if (GRAY_WINDOW) shifted[LO+WB-1] = 1'b0;
  end

  assign bits = value[LO +: WB] ^ shifted[LO +: WB];

  initial begin
    assert (POS_FIRST >= 1 && POS_FIRST <= POS_LAST && POS_LAST <= W)
      else $error("gray_select: positions must satisfy 1 <= POS_FIRST <= POS_LAST <= W");
  end

endmodule
