// tb_som_nbh_top: end-to-end test of the neighborhood mechanism.
// One 8 x 8 map at default parameters gets each winner, radius and TNF
// setting twice, first as a Rect8 grid and then, after switching the
// topology input, as a Rect4 grid. For every neuron the testbench computes
// the ring distance d to the winner (Chebyshev for Rect8, Manhattan for
// Rect4) and expects en = (d <= R), r = R - d and g = C + (r*E)/D saturated
// at 31 inside the neighborhood, and 0 outside.
// It counts how often each mechanism occurs and fails if one never did:
// the run-time topology switch,
// the wave stopped by STOP inside the map, the wave cut off by a map edge,
// R = 0 (winner alone), no winner at all, the whole map enabled, diagonal
// fan-out, output saturation, each divisor setting, and the worst case of
// the published 8 x 8 Rect4 simulation (winner in a corner, wave reaching the
// opposite corner 14 rings away).
module tb_som_nbh_top;
  import som_pkg::*;
  localparam int ROWS = 8, COLS = 8;

  logic [ROWS-1:0][COLS-1:0]      wsc;
  logic [4:0]                     r_prog, e, c;
  logic [5:0]                     d;
  topo_t                          topo;
  logic [ROWS-1:0][COLS-1:0]      en;
  logic [ROWS-1:0][COLS-1:0][4:0] r, g;

  int checks = 0, failures = 0;
  int n_stop_inside = 0, n_edge_cut = 0, n_r_zero = 0, n_no_winner = 0;
  int n_full_map = 0, n_diag_fan = 0, n_saturate = 0, n_corner14 = 0;
  int n_shift [6];

  int n_mode_switch = 0;

  som_nbh_top dut (
    .topo(topo), .wsc(wsc), .r_prog(r_prog), .e(e), .d(d), .c(c), .en(en), .r(r), .g(g));

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  // one map, one configuration; wr < 0 means no winner
  task automatic check_map(bit rect4, int wr, int wc, int rr, int sh);
    bit all_en, stopped, edge_cut;
    all_en = 1; stopped = 0; edge_cut = 0;
    for (int row = 0; row < ROWS; row++)
      for (int col = 0; col < COLS; col++) begin
        int ring, exp_r, exp_g, got_r, got_g;
        bit exp_en, got_en;
        if (wr < 0) ring = 1000;
        else if (rect4) ring = iabs(row - wr) + iabs(col - wc);
        else ring = (iabs(row - wr) > iabs(col - wc)) ? iabs(row - wr) : iabs(col - wc);
        exp_en = (ring <= rr);
        exp_r  = exp_en ? rr - ring : 0;
        exp_g  = exp_en ? int'(c) + (exp_r * int'(e)) / (1 << sh) : 0;
        if (exp_g > 31) begin exp_g = 31; n_saturate++; end
        if (!exp_en) begin all_en = 0; if (wr >= 0) stopped = 1; end
        if (!rect4 && exp_en && iabs(row - wr) != iabs(col - wc) && row != wr && col != wc) n_diag_fan++;
        got_en = en[row][col];
        got_r  = int'(r[row][col]);
        got_g  = int'(g[row][col]);
        checks++;
        if (got_en !== exp_en || got_r != exp_r || got_g != exp_g) begin
          failures++;
          if (failures < 20)
            $display("FAIL %s win=(%0d,%0d) R=%0d neuron (%0d,%0d): en=%0b r=%0d g=%0d expected %0b %0d %0d",
                     rect4 ? "rect4" : "rect8", wr, wc, rr, row, col, got_en, got_r, got_g, exp_en, exp_r, exp_g);
        end
      end
    if (wr >= 0) begin
      // would the neighborhood reach past a map edge?
      if (wr - rr < 0 || wr + rr >= ROWS || wc - rr < 0 || wc + rr >= COLS) edge_cut = 1;
      n_edge_cut += edge_cut;
      n_stop_inside += stopped;
      if (rr == 0) n_r_zero++;
      if (all_en) n_full_map++;
      if (rect4 && wr == 0 && wc == 0 && rr >= 14 && en[ROWS-1][COLS-1]) n_corner14++;
    end else n_no_winner++;
  endtask

  task automatic run(int wr, int wc, int rr, int sh, int ee, int cc);
    wsc = '0;
    if (wr >= 0) wsc[wr][wc] = 1'b1;
    r_prog = 5'(rr); d = 6'(1 << sh); e = 5'(ee); c = 5'(cc);
    topo = TOPO_RECT8;
    #1;
    n_shift[sh]++;
    check_map(1'b0, wr, wc, rr, sh);
    topo = TOPO_RECT4;
    n_mode_switch++;
    #1;
    check_map(1'b1, wr, wc, rr, sh);
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_shift[i]) n_shift[i] = 0;
    // the published worst case: winner (1,1), Rect4, R = 15, C=0 E=31 D=32
    run(0, 0, 15, 5, 31, 0);
    run(0, 0, 14, 5, 31, 0);
    run(-1, 0, 7, 0, 5, 3);
    // every winner position, several radii
    for (int wr = 0; wr < ROWS; wr++)
      for (int wc = 0; wc < COLS; wc++)
        for (int rr = 0; rr <= 9; rr += 3)
          run(wr, wc, rr, (wr + wc + rr) % 6, $urandom_range(0, 31), $urandom_range(0, 31));
    // random configurations over the whole r range
    for (int i = 0; i < 300; i++)
      run($urandom_range(0, ROWS - 1), $urandom_range(0, COLS - 1), $urandom_range(0, 31),
          $urandom_range(0, 5), $urandom_range(0, 31), $urandom_range(0, 31));
    $display("mechanisms: stop_inside=%0d edge_cut=%0d r_zero=%0d no_winner=%0d full_map=%0d diag_fan=%0d saturate=%0d corner14=%0d switches=%0d",
             n_stop_inside, n_edge_cut, n_r_zero, n_no_winner, n_full_map, n_diag_fan, n_saturate, n_corner14, n_mode_switch);
    if (n_mode_switch == 0) begin failures++; $display("FAIL topology never switched"); end
    if (n_stop_inside == 0) begin failures++; $display("FAIL never stopped inside the map"); end
    if (n_edge_cut == 0)    begin failures++; $display("FAIL never cut by an edge"); end
    if (n_r_zero == 0)      begin failures++; $display("FAIL R=0 never applied"); end
    if (n_no_winner == 0)   begin failures++; $display("FAIL no-winner case never applied"); end
    if (n_full_map == 0)    begin failures++; $display("FAIL whole map never enabled"); end
    if (n_diag_fan == 0)    begin failures++; $display("FAIL diagonal fan-out never used"); end
    if (n_saturate == 0)    begin failures++; $display("FAIL saturation never happened"); end
    if (n_corner14 == 0)    begin failures++; $display("FAIL corner-to-corner Rect4 case never reached"); end
    for (int i = 0; i < 6; i++)
      if (n_shift[i] == 0) begin failures++; $display("FAIL divisor 2**%0d never used", i); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
