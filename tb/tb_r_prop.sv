// tb_r_prop: exhaustive self-checking test of r_prop.
// Every r_in value of the 5-bit default width is applied; the expected
// output (r_in - 1, or 0 with STOP low when r_in is 0) is computed here with
// integer arithmetic. A watchdog ends the run if it ever hangs.
module tb_r_prop;
  localparam int unsigned R_BITS = 5;

  logic [R_BITS-1:0] r_in, r_out;
  logic              stop;
  int checks = 0, failures = 0;

  r_prop #(.R_BITS(R_BITS)) dut (.r_in(r_in), .r_out(r_out), .stop(stop));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << R_BITS); v++) begin
      int exp_r;
      bit exp_stop;
      r_in = R_BITS'(v);
      #1;
      exp_stop = (v != 0);
      exp_r    = (v == 0) ? 0 : v - 1;
      checks++;
      if (stop !== exp_stop || int'(r_out) != exp_r) begin
        failures++;
        $display("FAIL r_in=%0d: r_out=%0d stop=%0b, expected %0d %0b", v, r_out, stop, exp_r, exp_stop);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
