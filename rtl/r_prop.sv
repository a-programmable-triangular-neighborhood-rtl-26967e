// r_prop: the radius-propagation cell.
//
// The signal r carried between neighbors equals r_PROG - d, the programmed
// neighborhood radius minus the ring distance from the winner. A cell takes
// the r value of the ring it belongs to and hands r - 1 to the next ring.
// When the incoming r is zero the cell lowers STOP, which blocks the enable
// wave at this ring, and drives all bits of its output to zero; otherwise
// STOP is high and the output is r_in - 1. This is the function of the
// published gate-level cell (a ripple decrementer whose outputs are gated by
// STOP); it is written here as a plain subtraction.
//
// Purely combinational, no clock. R_BITS is q, the width of r (5 bits).
module r_prop #(
  parameter int unsigned R_BITS = 5
) (
  input  logic [R_BITS-1:0] r_in,   // r of this ring
  output logic [R_BITS-1:0] r_out,  // r of the next ring (0 once r_in is 0)
  output logic              stop    // 0 when r_in is 0: propagation ends here
);

  always_comb begin
    stop  = |r_in;
    r_out = stop ? r_in - R_BITS'(1) : '0;
  end

endmodule
