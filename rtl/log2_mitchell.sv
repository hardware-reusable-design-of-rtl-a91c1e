// log2_mitchell: Mitchell's approximation of the base-2 logarithm.
//
// For a non-zero unsigned input Z, log2(Z) is approximated as c + m: the
// characteristic c is the position of the leading one, and the mantissa m is
// formed by the bits to its right, read as a binary fraction. Example:
// Z = 21 = 0b10101 gives c = 4, m = 0.0101b, result 4.3125 (exact 4.3922).
// The result is unsigned fixed point with FRAC = 10 fraction bits (scale
// 2^10), so the characteristic sits in the bits above them; mantissa bits
// beyond FRAC are dropped, missing ones are zero. Z = 0 gives 0.
//
// Purely combinational: a leading-one detector and a normalising left shift.
// The method follows the document; the input width, the output format and
// the value for zero are this design's choices.
module log2_mitchell #(
  parameter int XW   = 32,                      // input width
  parameter int FRAC = 10,                      // fraction bits of the result
  parameter int YW   = $clog2(XW) + FRAC        // result width
) (
  input  logic [XW-1:0] z,
  output logic [YW-1:0] y
);

  localparam int CW = $clog2(XW);

  logic [CW-1:0]   c;
  logic [XW-2:0]   rest;    // bits below the leading one, left-aligned
  logic [FRAC-1:0] m;

  always_comb begin
    c = '0;
    for (int i = 0; i < XW; i++)
      if (z[i]) c = CW'(i);
    rest = (XW-1)'(z << (CW'(XW - 1) - c));   // leading one shifted out at the top
  end

  // mantissa: the FRAC bits just below the leading one
  if (XW - 1 >= FRAC) begin : g_wide
    assign m = rest[XW-2 -: FRAC];
  end else begin : g_narrow
    assign m = FRAC'({rest, {(FRAC - XW + 1){1'b0}}});
  end

  assign y = YW'({c, m});

endmodule
