// tb_bit_shift: self-checking test of the power-of-two divider.
// For every one-hot D (divide by 1..32) and random 10-bit inputs the output
// must equal floor(din / 2**k), i.e. the top k bits must be 0. D = 0 must
// give 0.
module tb_bit_shift;
  logic [9:0] din, dout;
  logic [5:0] d;
  int checks = 0, failures = 0;

  bit_shift dut (.din(din), .d(d), .dout(dout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 6; k++)
      for (int i = 0; i < 64; i++) begin
        int v;
        v = (i == 0) ? 1023 : int'($urandom_range(0, 1023));
        din = 10'(v); d = 6'(1 << k);
        #1;
        checks++;
        if (int'(dout) != v / (1 << k)) begin
          failures++;
          $display("FAIL %0d / %0d = %0d", v, 1 << k, dout);
        end
      end
    din = 10'h3FF; d = '0;
    #1;
    checks++;
    if (dout !== '0) begin
      failures++;
      $display("FAIL D=0 gives %0d", dout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
