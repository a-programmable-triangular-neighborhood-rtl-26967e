// som_pkg: types and constants shared by the neighborhood mechanism of the
// self-organizing map.
//
// Every neuron talks to its nearest neighbors over up to eight directions.
// The directions are numbered clockwise from the upper-left neighbor, which is
// the numbering of the EN_in/EN_out terminals of the Rect8 enable-propagation
// block: index 0 = NW, 1 = N, 2 = NE, 3 = E, 4 = SE, 5 = S, 6 = SW, 7 = W.
// en_in[j] / r_in[j] arrive from the neighbor lying in direction j, and
// en_out[j] / r_out[j] leave towards that neighbor.
//
// en_activates() is the propagation rule of the enable wave. A signal arriving
// from direction j travels towards the opposite side, opp(j):
//   Rect8: it always continues straight on; if it travels diagonally it also
//          starts the two straight directions next to it (three outputs), so
//          that each ring of eight more neurons is reached exactly once.
//   Rect4: only N, E, S and W exist; a vertically travelling signal continues
//          and also starts E and W, a horizontally travelling one only goes on.
// The Rect8 rule is the one of the published design; the Rect4 rule is read
// from the propagation paths drawn for the 4-neighbor grid (vertical first,
// then along the rows). The hexagonal topology is not provided.
package som_pkg;

  typedef enum logic [0:0] {
    TOPO_RECT8 = 1'b0,   // 8 neighbors, Chebyshev ring distance
    TOPO_RECT4 = 1'b1    // 4 neighbors, Manhattan ring distance
  } topo_t;

  localparam int unsigned NDIR = 8;

  localparam int unsigned DIR_NW = 0;
  localparam int unsigned DIR_N  = 1;
  localparam int unsigned DIR_NE = 2;
  localparam int unsigned DIR_E  = 3;
  localparam int unsigned DIR_SE = 4;
  localparam int unsigned DIR_S  = 5;
  localparam int unsigned DIR_SW = 6;
  localparam int unsigned DIR_W  = 7;

  // Row and column step of each direction (row 0 is the top row of the map).
  function automatic int dir_drow(int unsigned k);
    case (k)
      DIR_NW, DIR_N, DIR_NE: return -1;
      DIR_SW, DIR_S, DIR_SE: return 1;
      default:               return 0;
    endcase
  endfunction

  function automatic int dir_dcol(int unsigned k);
    case (k)
      DIR_NW, DIR_W, DIR_SW: return -1;
      DIR_NE, DIR_E, DIR_SE: return 1;
      default:               return 0;
    endcase
  endfunction

  function automatic int unsigned dir_opp(int unsigned k);
    return (k + 4) % NDIR;
  endfunction

  // Whether a direction exists in a topology.
  function automatic bit dir_used(topo_t topo, int unsigned k);
    if (topo == TOPO_RECT4) return (k % 2) == 1;
    return 1'b1;
  endfunction

  // Does an enable arriving from direction j switch on output direction k?
  function automatic bit en_activates(topo_t topo, int unsigned j, int unsigned k);
    int unsigned o;
    if (!dir_used(topo, j) || !dir_used(topo, k)) return 1'b0;
    o = dir_opp(j);
    if (k == o) return 1'b1;
    if (topo == TOPO_RECT8) begin
      // diagonal travel (even index) also feeds its two straight neighbors
      return (o % 2 == 0) && ((k == (o + 1) % NDIR) || (k == (o + NDIR - 1) % NDIR));
    end
    // Rect4: vertical travel (N or S) also feeds E and W
    return ((o == DIR_N) || (o == DIR_S)) && ((k == DIR_E) || (k == DIR_W));
  endfunction

endpackage
