// tb_haar_bpu: checks the butterfly exhaustively for 8-bit inputs and on
// random 11-bit inputs: the sum must be a+b, the difference a-b as a
// (W+1)-bit two's-complement number.
module tb_haar_bpu;

  logic [7:0]  a8, b8;
  logic [8:0]  s8, d8;
  logic [10:0] a11, b11;
  logic [11:0] s11, d11;
  int checks = 0, failures = 0;

  haar_bpu #(.W(8))  dut8  (.a(a8),  .b(b8),  .sum(s8),  .diff(d8));
  haar_bpu #(.W(11)) dut11 (.a(a11), .b(b11), .sum(s11), .diff(d11));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        a8 = 8'(a); b8 = 8'(b);
        #1;
        checks++;
        if (int'(s8) != a + b || int'($signed(d8)) != a - b) begin
          failures++;
          if (failures < 10) $display("FAIL W=8 a=%0d b=%0d sum=%0d diff=%0d", a, b, s8, $signed(d8));
        end
      end
    for (int n = 0; n < 5000; n++) begin
      int a, b;
      a = int'($urandom_range(2047)); b = int'($urandom_range(2047));
      if (n == 0) begin a = 2047; b = 0; end
      if (n == 1) begin a = 0; b = 2047; end
      a11 = 11'(a); b11 = 11'(b);
      #1;
      checks++;
      if (int'(s11) != a + b || int'($signed(d11)) != a - b) begin
        failures++;
        if (failures < 10) $display("FAIL W=11 a=%0d b=%0d sum=%0d diff=%0d", a, b, s11, $signed(d11));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
