// tb_tnf_mult: exhaustive self-checking test of the r x E multiplier at the
// default 5 x 5 bit widths, plus random operands at 6 x 8 bits (the widest
// operands of the published example curves).
module tb_tnf_mult;
  logic [4:0] r5, e5;
  logic [9:0] p5;
  logic [5:0] r6;
  logic [7:0] e8;
  logic [13:0] p6;
  int checks = 0, failures = 0;

  tnf_mult dut (.r(r5), .e(e5), .p(p5));
  tnf_mult #(.R_BITS(6), .E_BITS(8)) dut_w (.r(r6), .e(e8), .p(p6));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++) begin
        r5 = 5'(a); e5 = 5'(b);
        #1;
        checks++;
        if (int'(p5) != a * b) begin
          failures++;
          $display("FAIL %0d x %0d = %0d", a, b, p5);
        end
      end
    for (int i = 0; i < 500; i++) begin
      int a, b;
      a = $urandom_range(0, 63); b = $urandom_range(0, 255);
      r6 = 6'(a); e8 = 8'(b);
      #1;
      checks++;
      if (int'(p6) != a * b) begin
        failures++;
        $display("FAIL wide %0d x %0d = %0d", a, b, p6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
