// tnf: programmable triangular neighborhood function of one neuron.
//
// Computes the learning factor eta*G of eq. (1) from the ring signal r of the
// neuron:
//     g = C + floor(r * E / D)   when en = 1 (the neuron is within radius R)
//     g = 0                      when en = 0
// where r = R - d falls by one per ring, so g falls linearly with the
// distance d from the winner, from C + R*E/D at the winner to C at the last
// ring. E (steepness numerator), D (power-of-two divisor, one-hot) and C
// (bias) are programmed per training epoch and are common to all neurons.
//
// Datapath: tnf_mult (r x E) -> bit_shift (divide by D) -> adder (+ C). The
// sum saturates at 2**NB - 1, the value that stands for 1.0 at an NB-bit
// output; saturation is this design's choice, the published block does not
// say what happens on overflow.
//
// Purely combinational. Defaults: r 5 bits, E 5 bits, D = 1..32, output
// resolution NB = 5 bits.
module tnf #(
  parameter int unsigned R_BITS = 5,
  parameter int unsigned E_BITS = 5,
  parameter int unsigned D_BITS = 6,
  parameter int unsigned NB     = 5
) (
  input  logic              en,   // neuron lies in the neighborhood
  input  logic [R_BITS-1:0] r,    // ring signal of this neuron
  input  logic [E_BITS-1:0] e,    // steepness numerator E
  input  logic [D_BITS-1:0] d,    // divisor D, one-hot
  input  logic [NB-1:0]     c,    // bias C
  output logic [NB-1:0]     g     // eta*G, NB-bit
);

  localparam int unsigned P_BITS = R_BITS + E_BITS;
  localparam int unsigned S_BITS = ((P_BITS > NB) ? P_BITS : NB) + 1;

  logic [P_BITS-1:0] prod;
  logic [P_BITS-1:0] quot;
  logic [S_BITS-1:0] sum;

  tnf_mult #(.R_BITS(R_BITS), .E_BITS(E_BITS)) u_mult (.r(r), .e(e), .p(prod));
  bit_shift #(.P_BITS(P_BITS), .D_BITS(D_BITS)) u_shift (.din(prod), .d(d), .dout(quot));

  always_comb begin
    sum = S_BITS'(c) + S_BITS'(quot);
    if (!en)
      g = '0;
    else if (sum > S_BITS'({NB{1'b1}}))
      g = {NB{1'b1}};
    else
      g = sum[NB-1:0];
  end

endmodule
