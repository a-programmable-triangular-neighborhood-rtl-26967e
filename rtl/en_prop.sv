// en_prop: enable-propagation block of one neuron.
//
// The winner's WSC input is privileged: it switches on every output
// direction of the topology. Any other neuron receives the enable from one
// neighbor only, and passes it on to the opposite side according to
// som_pkg::en_activates(): in Rect8 a horizontal or vertical arrival drives
// one output, a diagonal arrival drives three; in Rect4 a vertical arrival
// drives three (straight on, E and W) and a horizontal one drives one. The
// wave therefore spreads concentrically from the winner without ever
// reaching a neuron from two sides. en_prop does not know the radius: the
// outputs are cut by STOP in the neuron.
//
// The topology is a run-time input, common to the whole map, so one chip
// can be switched between the 8- and the 4-neighbor grid between epochs
// (the published design offers this switch, hexagonal grid included; the
// hexagonal grid is not provided here). In Rect4 the diagonal inputs are
// ignored and the diagonal outputs stay low.
//
// en is the neuron's own enable (in the neighborhood of the winner).
// Purely combinational.
module en_prop
  import som_pkg::*;
(
  input  topo_t           topo,         // map topology
  input  logic            wsc,          // this neuron is the winner
  input  logic [NDIR-1:0] en_in,        // enable arriving from direction j
  output logic [NDIR-1:0] en_out_raw,   // enable to send towards direction k
  output logic            en            // neuron lies in the neighborhood
);

  // The rule is evaluated for each topology with constant arguments and the
  // run-time topology only selects between the two results, so every output
  // depends only on inputs that can switch it on in some topology.
  logic rect8, rect4;
  assign rect8 = (topo == TOPO_RECT8);
  assign rect4 = (topo == TOPO_RECT4);

  always_comb begin
    for (int k = 0; k < NDIR; k++) begin
      en_out_raw[k] = wsc & ((rect8 & dir_used(TOPO_RECT8, k)) | (rect4 & dir_used(TOPO_RECT4, k)));
      for (int j = 0; j < NDIR; j++) begin
        if (en_activates(TOPO_RECT8, j, k)) en_out_raw[k] = en_out_raw[k] | (rect8 & en_in[j]);
        if (en_activates(TOPO_RECT4, j, k)) en_out_raw[k] = en_out_raw[k] | (rect4 & en_in[j]);
      end
    end
    en = wsc;
    for (int j = 0; j < NDIR; j++)
      en = en | (en_in[j] & ((rect8 & dir_used(TOPO_RECT8, j)) | (rect4 & dir_used(TOPO_RECT4, j))));
  end

endmodule
