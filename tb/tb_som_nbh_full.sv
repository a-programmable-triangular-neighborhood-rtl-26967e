// tb_som_nbh_full: one complete pass of the default map (8 x 8 neurons,
// 5-bit r, 5-bit E, D = 1..32, 5-bit output) with no parameter overridden.
// In both topologies every neuron is made the winner in turn with every
// radius R = 0..31; after each the enable, r and eta*G of all 64 neurons are
// compared with values computed here (ring distance d: Chebyshev for Rect8,
// Manhattan for Rect4; en = d <= R, r = R - d, g = C + (r*E)/D saturated
// at 31).
module tb_som_nbh_full;
  localparam int ROWS = 8, COLS = 8;

  import som_pkg::*;
  topo_t                          topo;
  logic [ROWS-1:0][COLS-1:0]      wsc;
  logic [4:0]                     r_prog, e, c;
  logic [5:0]                     d;
  logic [ROWS-1:0][COLS-1:0]      en;
  logic [ROWS-1:0][COLS-1:0][4:0] r, g;
  int checks = 0, failures = 0, n_inside = 0, n_outside = 0;

  som_nbh_top dut (.topo(topo), .wsc(wsc), .r_prog(r_prog), .e(e), .d(d), .c(c), .en(en), .r(r), .g(g));

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2; t++)
    for (int wr = 0; wr < ROWS; wr++)
      for (int wc = 0; wc < COLS; wc++)
        for (int rr = 0; rr < 32; rr++) begin
          int sh;
          sh = (wr + wc + rr) % 6;
          topo = (t == 0) ? TOPO_RECT8 : TOPO_RECT4;
          wsc = '0; wsc[wr][wc] = 1'b1;
          r_prog = 5'(rr); d = 6'(1 << sh);
          e = 5'($urandom_range(0, 31)); c = 5'($urandom_range(0, 31));
          #1;
          for (int row = 0; row < ROWS; row++)
            for (int col = 0; col < COLS; col++) begin
              int ring, exp_r, exp_g;
              bit exp_en;
              if (t == 0) ring = (iabs(row - wr) > iabs(col - wc)) ? iabs(row - wr) : iabs(col - wc);
              else        ring = iabs(row - wr) + iabs(col - wc);
              exp_en = (ring <= rr);
              exp_r = exp_en ? rr - ring : 0;
              exp_g = exp_en ? int'(c) + (exp_r * int'(e)) / (1 << sh) : 0;
              if (exp_g > 31) exp_g = 31;
              if (exp_en) n_inside++; else n_outside++;
              checks++;
              if (en[row][col] !== exp_en || int'(r[row][col]) != exp_r || int'(g[row][col]) != exp_g) begin
                failures++;
                if (failures < 20)
                  $display("FAIL %s win=(%0d,%0d) R=%0d neuron (%0d,%0d): en=%0b r=%0d g=%0d expected %0b %0d %0d",
                           topo.name(), wr, wc, rr, row, col, en[row][col], r[row][col], g[row][col], exp_en, exp_r, exp_g);
              end
            end
        end
    if (n_inside == 0 || n_outside == 0) begin
      failures++;
      $display("FAIL neighborhood never both inside and outside");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
