// som_neuron: neighborhood part of one neuron of the self-organizing map.
//
// The neuron learns its distance to the winner from the enable/radius wave
// and turns it into its learning factor eta*G:
//  * r selection - the winner (wsc = 1) takes the programmed radius r_prog;
//    any other neuron takes the r value of the one neighbor whose enable
//    reaches it (the switches on the r inputs). This is the neuron's r.
//  * en_prop - decides which output directions the wave continues in.
//  * r_prop - one per output direction: the outgoing r is the selected r
//    minus 1, and STOP (r = 0) blocks the outgoing enable, so the wave ends
//    at the ring where r reaches 0, i.e. at distance r_prog.
//  * tnf - eta*G = C + r*E/D while en = 1, else 0.
//
// The published neuron has a single r selector and a single R_PROP. Here
// each output direction gets its own selector (over only the inputs that
// can switch that direction on) and its own r_prop. The values are the same,
// because an enable only ever arrives from one side, but the netlist then
// has no combinational path that returns to where it started: signals only
// ever travel away from the winner. This is a choice of this design.
// (Verilator's UNOPTFLAT on en_out_raw and r_sel, seen when the neuron is
// placed in the map, comes from tracking these vectors as a whole; see
// som_nbh_top.)
//
// Purely combinational: once wsc and r_prog are applied, the map settles
// in a time set by the number of rings the wave crosses.
module som_neuron
  import som_pkg::*;
#(
  parameter int unsigned R_BITS = 5,
  parameter int unsigned E_BITS = 5,
  parameter int unsigned D_BITS = 6,
  parameter int unsigned NB     = 5
) (
  input  topo_t                        topo,     // map topology
  input  logic                         wsc,      // winner-selected
  input  logic [R_BITS-1:0]            r_prog,   // radius R of this epoch
  input  logic [NDIR-1:0]              en_in,    // enable from neighbor j
  input  logic [NDIR-1:0][R_BITS-1:0]  r_in,     // r from neighbor j
  input  logic [E_BITS-1:0]            e,        // TNF steepness E
  input  logic [D_BITS-1:0]            d,        // TNF divisor D, one-hot
  input  logic [NB-1:0]                c,        // TNF bias C
  output logic [NDIR-1:0]              en_out,   // enable to neighbor k
  output logic [NDIR-1:0][R_BITS-1:0]  r_out,    // r to neighbor k
  output logic                         en,       // in the neighborhood
  output logic [R_BITS-1:0]            r,        // r = R - d of this neuron
  output logic [NB-1:0]                g         // eta*G
);

  logic [NDIR-1:0]             en_out_raw;
  logic [NDIR-1:0]             stop;
  logic [NDIR-1:0][R_BITS-1:0] r_sel;

  en_prop u_en_prop (
    .topo      (topo),
    .wsc       (wsc),
    .en_in     (en_in),
    .en_out_raw(en_out_raw),
    .en        (en)
  );

  // r switches: the neuron's own r, and one selector per output direction.
  // As in en_prop, the rule is evaluated per topology with constant
  // arguments and the run-time topology only picks the result.
  logic rect8, rect4;
  assign rect8 = (topo == TOPO_RECT8);
  assign rect4 = (topo == TOPO_RECT4);

  always_comb begin
    r = wsc ? r_prog : '0;
    for (int j = 0; j < NDIR; j++)
      if (!wsc && en_in[j] && ((rect8 && dir_used(TOPO_RECT8, j)) || (rect4 && dir_used(TOPO_RECT4, j))))
        r = r | r_in[j];
    for (int k = 0; k < NDIR; k++) begin
      r_sel[k] = (wsc && ((rect8 && dir_used(TOPO_RECT8, k)) || (rect4 && dir_used(TOPO_RECT4, k))))
                 ? r_prog : '0;
      for (int j = 0; j < NDIR; j++) begin
        if (en_activates(TOPO_RECT8, j, k) && !wsc && rect8 && en_in[j]) r_sel[k] = r_sel[k] | r_in[j];
        if (en_activates(TOPO_RECT4, j, k) && !wsc && rect4 && en_in[j]) r_sel[k] = r_sel[k] | r_in[j];
      end
    end
  end

  for (genvar k = 0; k < NDIR; k++) begin : g_dir
    r_prop #(.R_BITS(R_BITS)) u_r_prop (
      .r_in (r_sel[k]),
      .r_out(r_out[k]),
      .stop (stop[k])
    );
    assign en_out[k] = en_out_raw[k] & stop[k];
  end

  tnf #(.R_BITS(R_BITS), .E_BITS(E_BITS), .D_BITS(D_BITS), .NB(NB)) u_tnf (
    .en(en), .r(r), .e(e), .d(d), .c(c), .g(g)
  );

endmodule
