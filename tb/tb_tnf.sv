// tb_tnf: self-checking test of the triangular neighborhood function.
//  1. The 512-point sweep of the published transistor-level test: r from 15
//     down to 0 times E from 31 down to 0, divided by D = 32, C = 0.
//  2. Triangular curves over distance d = 0..R, for the small-valued example
//     settings of the published function plot (default widths), and for its
//     large-valued settings on a wide instance (6-bit r, 8-bit E, 9-bit out).
//  3. en = 0 gives 0; results above 2**NB - 1 saturate; random settings.
// Every expected value is computed here as C + (r*E)/D in integers.
module tb_tnf;
  localparam int unsigned NB = 5;

  logic       en;
  logic [4:0] r, e;
  logic [5:0] d;
  logic [4:0] c;
  logic [4:0] g;

  logic       en_w;
  logic [5:0] r_w;
  logic [7:0] e_w;
  logic [6:0] d_w;
  logic [8:0] c_w;
  logic [8:0] g_w;

  int checks = 0, failures = 0, saturations = 0;

  tnf dut (.en(en), .r(r), .e(e), .d(d), .c(c), .g(g));
  tnf #(.R_BITS(6), .E_BITS(8), .D_BITS(7), .NB(9)) dut_w (
    .en(en_w), .r(r_w), .e(e_w), .d(d_w), .c(c_w), .g(g_w));

  function automatic int ref_g(int cc, int rr, int ee, int sh, int nb);
    int v;
    v = cc + (rr * ee) / (1 << sh);
    if (v > (1 << nb) - 1) v = (1 << nb) - 1;
    return v;
  endfunction

  task automatic apply(int cc, int rr, int ee, int sh, bit enable);
    int exp_g;
    en = enable; c = 5'(cc); r = 5'(rr); e = 5'(ee); d = 6'(1 << sh);
    #1;
    exp_g = enable ? ref_g(cc, rr, ee, sh, NB) : 0;
    if (enable && cc + (rr * ee) / (1 << sh) > 31) saturations++;
    checks++;
    if (int'(g) != exp_g) begin
      failures++;
      $display("FAIL en=%0b C=%0d r=%0d E=%0d D=%0d: g=%0d expected %0d", enable, cc, rr, ee, 1 << sh, g, exp_g);
    end
  endtask

  task automatic curve(int cc, int sh, int ee, int rmax);
    for (int ring = 0; ring <= rmax; ring++) apply(cc, rmax - ring, ee, sh, 1'b1);
  endtask

  task automatic curve_w(int cc, int sh, int ee, int rmax);
    for (int ring = 0; ring <= rmax; ring++) begin
      int exp_g;
      en_w = 1'b1; c_w = 9'(cc); r_w = 6'(rmax - ring); e_w = 8'(ee); d_w = 7'(1 << sh);
      #1;
      exp_g = ref_g(cc, rmax - ring, ee, sh, 9);
      checks++;
      if (int'(g_w) != exp_g) begin
        failures++;
        $display("FAIL wide C=%0d D=%0d E=%0d R=%0d d=%0d: g=%0d expected %0d", cc, 1 << sh, ee, rmax, ring, g_w, exp_g);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en_w = 0; r_w = 0; e_w = 0; d_w = 1; c_w = 0;
    // 1. sweep of the published test, D = 32 (shift by 5)
    for (int rr = 15; rr >= 0; rr--)
      for (int ee = 31; ee >= 0; ee--) apply(0, rr, ee, 5, 1'b1);
    // 2. example curves (C, D, E, R) of the published function plot
    curve(10, 3, 4, 20);   // C=10 D=8  E=4  R=20
    curve(0, 4, 13, 20);   // C=0  D=16 E=13 R=20
    curve(0, 3, 7, 10);    // C=0  D=8  E=7  R=10
    curve(6, 3, 3, 10);    // C=6  D=8  E=3  R=10
    curve(0, 2, 3, 5);     // C=0  D=4  E=3  R=5
    curve_w(0, 6, 255, 63);  // C=0  D=64 E=255 R=63
    curve_w(34, 5, 200, 39); // C=34 D=32 E=200 R=39
    curve_w(10, 5, 157, 30); // C=10 D=32 E=157 R=30
    curve_w(44, 5, 111, 19); // C=44 D=32 E=111 R=19
    curve_w(4, 5, 65, 31);   // C=4  D=32 E=65  R=31
    // spot values: winner of the C=34 curve and of the C=10/D=8 curve
    en_w = 1; c_w = 34; r_w = 39; e_w = 200; d_w = 7'(1 << 5);
    #1;
    checks++;
    if (g_w != 9'd277) begin failures++; $display("FAIL spot 277: %0d", g_w); end
    apply(10, 20, 4, 3, 1'b1);
    checks++;
    if (g != 5'd20) begin failures++; $display("FAIL spot 20: %0d", g); end
    // 3. outside the neighborhood, saturation, random
    apply(31, 31, 31, 0, 1'b0);
    apply(7, 3, 3, 1, 1'b0);
    apply(20, 31, 31, 0, 1'b1);
    apply(31, 1, 1, 0, 1'b1);
    for (int i = 0; i < 2000; i++)
      apply($urandom_range(0, 31), $urandom_range(0, 31), $urandom_range(0, 31),
            $urandom_range(0, 5), 1'($urandom_range(0, 1)));
    if (saturations == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
