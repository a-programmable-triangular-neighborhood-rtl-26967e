// som_nbh_top: asynchronous neighborhood mechanism of a Kohonen
// self-organizing map, with a programmable triangular neighborhood function.
//
// ROWS x COLS neurons (som_neuron) sit on a grid; each is wired only to its
// nearest neighbors (8 in Rect8, 4 in Rect4). When the winner-selecting
// circuit raises wsc for one neuron, that neuron starts an enable wave
// carrying r = r_prog. Every ring the wave crosses lowers r by one, and the
// wave stops at the ring where r reaches 0, so the neurons with en = 1 are
// exactly those within distance R = r_prog of the winner (Chebyshev
// distance in Rect8, Manhattan distance in Rect4) and each of them knows
// r = R - d. Each neuron then forms its learning factor
//     g = C + floor(r * E / D)  inside the neighborhood, 0 outside.
// en alone gives the rectangular neighborhood function; g gives the
// triangular one.
//
// Interface: topo selects the 8- or 4-neighbor grid for the whole map and
// may change between epochs. wsc is one bit per neuron, at most one of them
// 1 (asserted). r_prog, e, d (one-hot) and c are common to the map and are
// changed once per epoch. Outputs: en, r and g per neuron, indexed [row][col], row 0 at
// the top. The edges of the map have no neighbors: their inputs are tied
// low.
//
// Timing: there is no clock. All outputs are combinational functions of the
// inputs; the settling time grows with the number of rings crossed. The map
// size (8 x 8), the 5-bit r and E, the divisor range 1..32 and the 5-bit
// output are defaults taken from the published design's test cases. The
// published design can also switch to a hexagonal grid; that grid is not
// provided here.
//
// A lint tool that tracks whole vectors (Verilator: UNOPTFLAT) reports a
// combinational loop here: each neuron's 8-bit enable and r vectors feed its
// neighbors, whose vectors feed it back. Bit by bit there is no loop - every
// enable and r bit depends only on bits travelling away from the winner (see
// som_neuron) - and synthesis finds none. The warning is left standing
// because splitting the vectors would only obscure the wiring.
module som_nbh_top
  import som_pkg::*;
#(
  parameter int unsigned ROWS   = 8,
  parameter int unsigned COLS   = 8,
  parameter int unsigned R_BITS = 5,
  parameter int unsigned E_BITS = 5,
  parameter int unsigned D_BITS = 6,
  parameter int unsigned NB     = 5
) (
  input  topo_t                                 topo,    // Rect8 or Rect4
  input  logic [ROWS-1:0][COLS-1:0]             wsc,     // winner, one-hot
  input  logic [R_BITS-1:0]                     r_prog,  // radius R
  input  logic [E_BITS-1:0]                     e,       // TNF steepness E
  input  logic [D_BITS-1:0]                     d,       // TNF divisor D
  input  logic [NB-1:0]                         c,       // TNF bias C
  output logic [ROWS-1:0][COLS-1:0]             en,      // in neighborhood
  output logic [ROWS-1:0][COLS-1:0][R_BITS-1:0] r,       // R - d
  output logic [ROWS-1:0][COLS-1:0][NB-1:0]     g        // eta*G
);

  logic [ROWS-1:0][COLS-1:0][NDIR-1:0]             en_o;
  logic [ROWS-1:0][COLS-1:0][NDIR-1:0][R_BITS-1:0] r_o;

  for (genvar row = 0; row < ROWS; row++) begin : g_row
    for (genvar col = 0; col < COLS; col++) begin : g_col
      logic [NDIR-1:0]             en_i;
      logic [NDIR-1:0][R_BITS-1:0] r_i;

      // Neighbor j of this neuron sends on its output opp(j).
      for (genvar j = 0; j < NDIR; j++) begin : g_link
        localparam int NR = row + dir_drow(j);
        localparam int NC = col + dir_dcol(j);
        if (NR >= 0 && NR < ROWS && NC >= 0 && NC < COLS) begin : g_nb
          assign en_i[j] = en_o[NR][NC][dir_opp(j)];
          assign r_i[j]  = r_o[NR][NC][dir_opp(j)];
        end else begin : g_edge
          assign en_i[j] = 1'b0;
          assign r_i[j]  = '0;
        end
      end

      som_neuron #(
        .R_BITS(R_BITS), .E_BITS(E_BITS), .D_BITS(D_BITS), .NB(NB)
      ) u_neuron (
        .topo  (topo),
        .wsc   (wsc[row][col]),
        .r_prog(r_prog),
        .en_in (en_i),
        .r_in  (r_i),
        .e     (e),
        .d     (d),
        .c     (c),
        .en_out(en_o[row][col]),
        .r_out (r_o[row][col]),
        .en    (en[row][col]),
        .r     (r[row][col]),
        .g     (g[row][col])
      );
    end
  end

  // Only one neuron can win.
  always_comb begin
    assert ($onehot0(wsc)) else $error("som_nbh_top: more than one winner");
  end

endmodule
