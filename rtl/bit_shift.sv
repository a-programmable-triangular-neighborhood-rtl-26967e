// bit_shift: divider by D, a power of two, built as a right shifter.
//
// D is given one-hot as d[0..D_BITS-1]; d[k] = 1 divides by 2**k. Every
// output bit is a wired choice among the input bits k places above it,
// selected by d[k] (the published block uses one transmission-gate switch
// per input bit and per shift amount). Output bits that no input reaches
// for the selected shift - the k most significant ones - are tied to 0, as
// the grounding switches of the published block do. With D all zero every
// output is 0. At most one bit of d may be 1; an assertion checks it.
//
// Purely combinational. The default of six shift settings (divide by 1 to
// 32) is the published one.
module bit_shift #(
  parameter int unsigned P_BITS = 10,  // width of the product rE
  parameter int unsigned D_BITS = 6    // d0..d5: shift by 0..5 bits
) (
  input  logic [P_BITS-1:0] din,    // rE
  input  logic [D_BITS-1:0] d,      // one-hot divisor D
  output logic [P_BITS-1:0] dout    // rE / D, truncated
);

  always_comb begin
    dout = '0;
    for (int k = 0; k < D_BITS; k++)
      if (d[k]) dout = dout | (din >> k);
  end

  // D is a power of two: only one switch group may be closed at a time.
  always_comb begin
    assert ($onehot0(d)) else $error("bit_shift: D is not one-hot (%b)", d);
  end

endmodule
