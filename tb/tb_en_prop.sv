// tb_en_prop: self-checking test of en_prop in both topologies.
// The expected outputs come from a propagation table written out here by
// hand (one row per arrival direction, directions 0..7 = NW,N,NE,E,SE,S,SW,W),
// independent of the rule function the block uses. Single arrivals, the
// winner input and random multi-direction inputs (whose outputs are the OR
// of the rows) are all applied.
module tb_en_prop;
  import som_pkg::*;

  logic            wsc;
  logic [NDIR-1:0] en_in;
  logic [NDIR-1:0] out8, out4;
  logic            en8, en4;
  int checks = 0, failures = 0;

  // outputs switched on by an arrival from direction j (bit k = output k)
  localparam logic [7:0] RECT8_TAB [8] = '{
    8'b0011_1000,  // from NW -> E, SE, S
    8'b0010_0000,  // from N  -> S
    8'b1110_0000,  // from NE -> S, SW, W
    8'b1000_0000,  // from E  -> W
    8'b1000_0011,  // from SE -> NW, N, W
    8'b0000_0010,  // from S  -> N
    8'b0000_1110,  // from SW -> N, NE, E
    8'b0000_1000   // from W  -> E
  };
  localparam logic [7:0] RECT4_TAB [8] = '{
    8'b0000_0000,  // NW unused
    8'b1010_1000,  // from N  -> S, E, W
    8'b0000_0000,  // NE unused
    8'b1000_0000,  // from E  -> W
    8'b0000_0000,  // SE unused
    8'b1000_1010,  // from S  -> N, E, W
    8'b0000_0000,  // SW unused
    8'b0000_1000   // from W  -> E
  };

  en_prop dut8 (.topo(TOPO_RECT8), .wsc(wsc), .en_in(en_in), .en_out_raw(out8), .en(en8));
  en_prop dut4 (.topo(TOPO_RECT4), .wsc(wsc), .en_in(en_in), .en_out_raw(out4), .en(en4));

  task automatic check_now();
    logic [7:0] e8, e4;
    bit x8, x4;
    e8 = wsc ? 8'hFF : 8'h00;
    e4 = wsc ? 8'b1010_1010 : 8'h00;
    x8 = wsc;
    x4 = wsc;
    for (int j = 0; j < 8; j++) if (en_in[j]) begin
      e8 |= RECT8_TAB[j];
      e4 |= RECT4_TAB[j];
      x8 = 1'b1;
      if (j % 2 == 1) x4 = 1'b1;
    end
    #1;
    checks++;
    if (out8 !== e8 || en8 !== x8) begin
      failures++;
      $display("FAIL rect8 wsc=%0b en_in=%b: out=%b en=%0b expected %b %0b", wsc, en_in, out8, en8, e8, x8);
    end
    checks++;
    if (out4 !== e4 || en4 !== x4) begin
      failures++;
      $display("FAIL rect4 wsc=%0b en_in=%b: out=%b en=%0b expected %b %0b", wsc, en_in, out4, en4, e4, x4);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wsc = 0; en_in = '0;
    check_now();
    for (int j = 0; j < 8; j++) begin
      en_in = 8'(1 << j);
      check_now();
    end
    wsc = 1; en_in = '0;
    check_now();
    for (int i = 0; i < 256; i++) begin
      wsc   = 1'($urandom_range(0, 1));
      en_in = 8'(i);
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
