// tb_som_neuron: self-checking test of one neuron of the neighborhood
// mechanism (Rect8 and Rect4). The neighbors are played by the testbench:
// it applies the winner input or an enable with its r from one direction
// and checks en, r, eta*G and the enable and r the neuron sends to each of
// its eight neighbors. Expected values come from the ring rule (r - 1 goes
// on while r > 0), the written-out propagation table and C + r*E/D.
module tb_som_neuron;
  import som_pkg::*;

  logic                  wsc;
  logic [4:0]            r_prog;
  logic [7:0]            en_in;
  logic [7:0][4:0]       r_in;
  logic [4:0]            e, c;
  logic [5:0]            d;
  logic [7:0]            en_out8, en_out4;
  logic [7:0][4:0]       r_out8, r_out4;
  logic                  en8, en4;
  logic [4:0]            r8, r4;
  logic [4:0]            g8, g4;
  int checks = 0, failures = 0;

  localparam logic [7:0] RECT8_TAB [8] = '{
    8'b0011_1000, 8'b0010_0000, 8'b1110_0000, 8'b1000_0000,
    8'b1000_0011, 8'b0000_0010, 8'b0000_1110, 8'b0000_1000
  };
  localparam logic [7:0] RECT4_TAB [8] = '{
    8'b0000_0000, 8'b1010_1000, 8'b0000_0000, 8'b1000_0000,
    8'b0000_0000, 8'b1000_1010, 8'b0000_0000, 8'b0000_1000
  };

  som_neuron dut8 (
    .topo(TOPO_RECT8),
    .wsc(wsc), .r_prog(r_prog), .en_in(en_in), .r_in(r_in), .e(e), .d(d), .c(c),
    .en_out(en_out8), .r_out(r_out8), .en(en8), .r(r8), .g(g8));
  som_neuron dut4 (
    .topo(TOPO_RECT4),
    .wsc(wsc), .r_prog(r_prog), .en_in(en_in), .r_in(r_in), .e(e), .d(d), .c(c),
    .en_out(en_out4), .r_out(r_out4), .en(en4), .r(r4), .g(g4));

  function automatic int ref_g(int rr, int sh);
    int v;
    v = int'(c) + (rr * int'(e)) / (1 << sh);
    return (v > 31) ? 31 : v;
  endfunction

  // rr: r the neuron should hold; dirs: outputs it should switch on if rr > 0
  task automatic check(string name, logic [7:0] dirs8, logic [7:0] dirs4, bit in8, bit in4, int rr, int sh);
    logic [7:0] x8, x4;
    #1;
    x8 = (rr > 0) ? dirs8 : 8'h00;
    x4 = (rr > 0) ? dirs4 : 8'h00;
    checks++;
    if (en8 !== in8 || (in8 && int'(r8) != rr) || int'(g8) != (in8 ? ref_g(rr, sh) : 0)) begin
      failures++;
      $display("FAIL %s rect8: en=%0b r=%0d g=%0d", name, en8, r8, g8);
    end
    checks++;
    if (en4 !== in4 || (in4 && int'(r4) != rr) || int'(g4) != (in4 ? ref_g(rr, sh) : 0)) begin
      failures++;
      $display("FAIL %s rect4: en=%0b r=%0d g=%0d", name, en4, r4, g4);
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (en_out8[k] !== x8[k] || int'(r_out8[k]) != (x8[k] ? rr - 1 : 0)) begin
        failures++;
        $display("FAIL %s rect8 dir %0d: en_out=%0b r_out=%0d", name, k, en_out8[k], r_out8[k]);
      end
      checks++;
      if (en_out4[k] !== x4[k] || int'(r_out4[k]) != (x4[k] ? rr - 1 : 0)) begin
        failures++;
        $display("FAIL %s rect4 dir %0d: en_out=%0b r_out=%0d", name, k, en_out4[k], r_out4[k]);
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
    e = 5'd7; d = 6'b001000; c = 5'd2;
    wsc = 0; r_prog = 5'd6; en_in = '0; r_in = '0;
    check("idle", 8'h00, 8'h00, 0, 0, 0, 3);
    // winner: takes r_prog, drives all directions
    wsc = 1;
    check("winner", 8'hFF, 8'hAA, 1, 1, 6, 3);
    r_prog = 5'd0;
    check("winner R=0", 8'hFF, 8'hAA, 1, 1, 0, 3);
    r_prog = 5'd31;
    check("winner R=31", 8'hFF, 8'hAA, 1, 1, 31, 3);
    // winner ignores stray neighbor inputs
    en_in = 8'h01; r_in[0] = 5'd3;
    check("winner+stray", 8'hFF, 8'hAA, 1, 1, 31, 3);
    wsc = 0;
    // single arrivals with random r (including 0 and 1)
    for (int rep = 0; rep < 20; rep++)
      for (int j = 0; j < 8; j++) begin
        int rr;
        rr = (rep == 0) ? 0 : (rep == 1) ? 1 : int'($urandom_range(0, 31));
        en_in = 8'(1 << j);
        r_in = '0;
        for (int k = 0; k < 8; k++) r_in[k] = 5'($urandom_range(0, 31));
        r_in[j] = 5'(rr);
        // neighbors that are not sending keep random junk on r_in
        check($sformatf("from %0d", j), RECT8_TAB[j], RECT4_TAB[j], 1, (j % 2 == 1),
              rr, 3);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
