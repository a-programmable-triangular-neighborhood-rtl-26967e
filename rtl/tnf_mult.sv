// tnf_mult: the r x E multiplier of the triangular neighborhood function.
//
// An unsigned array multiplier with no clock: every bit of r that is 1 adds
// E, shifted left by that bit's position, into the product, so a 5-bit r
// costs five additions. The product is kept at its full width,
// R_BITS + E_BITS bits, and goes to the bit-shift divider.
// Widths follow the transistor-level test of the block (5-bit r, 5-bit E,
// 10-bit product); the shift-and-add structure is this design's choice for
// "an asynchronous multiplier".
module tnf_mult #(
  parameter int unsigned R_BITS = 5,
  parameter int unsigned E_BITS = 5
) (
  input  logic [R_BITS-1:0]        r,   // ring signal r = r_PROG - d
  input  logic [E_BITS-1:0]        e,   // steepness numerator E
  output logic [R_BITS+E_BITS-1:0] p    // r * E
);

  localparam int unsigned P_BITS = R_BITS + E_BITS;

  always_comb begin
    p = '0;
    for (int i = 0; i < R_BITS; i++)
      if (r[i]) p = p + (P_BITS'(e) << i);
  end

endmodule
