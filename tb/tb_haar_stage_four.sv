// tb_haar_stage_four: drives the last stage with random 11-bit vectors (lanes
// 0 and 1 unsigned approximation values, lanes 2..15 signed details) and the
// extreme corners, and checks each 8-bit output against a value computed
// here: lane 0 = (in0 + in1) / 16, lane 1 = (in0 - in1) / 16, lane i =
// in_i / 16, all rounded toward minus infinity. Also checks the one-cycle
// latency of out_valid and the reset value.
module tb_haar_stage_four;
  import haar_ref_pkg::floor_div;

  localparam int N = 16, W = 11;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                nrst, in_valid, out_valid;
  logic [N-1:0][W-1:0] d_in;
  logic [N-1:0][7:0]   d_out;
  int checks = 0, failures = 0;

  haar_stage_four dut (.clk, .nrst, .in_valid, .d_in, .out_valid, .d_out);

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int inv[N];
    int expv[N];
    logic ev;
    nrst = 1'b0; in_valid = 1'b0; d_in = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (d_out != '0 || out_valid) begin failures++; $display("FAIL reset"); end
    nrst = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(5) != 0);
      for (int i = 0; i < N; i++) begin
        if (i < 2) inv[i] = int'($urandom_range(2040));
        else       inv[i] = int'($urandom_range(2047)) - 1024;
        if (n == 0) inv[i] = (i < 2) ? 2040 : 1023;
        if (n == 1) inv[i] = (i == 0) ? 0 : (i == 1) ? 2040 : -1024;
        if (n == 2) inv[i] = (i == 0) ? 2040 : (i == 1) ? 0 : -1;
        d_in[i] = W'(inv[i]);
      end
      expv[0] = floor_div(inv[0] + inv[1], 16);
      expv[1] = floor_div(inv[0] - inv[1], 16);
      for (int i = 2; i < N; i++) expv[i] = floor_div(inv[i], 16);
      ev = in_valid;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != ev) begin failures++; $display("FAIL out_valid"); end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (d_out[i] != 8'(expv[i])) begin
          failures++;
          if (failures < 10)
            $display("FAIL lane %0d: got %0d expected %0d (in %0d %0d)", i,
                     (i == 0) ? int'(d_out[i]) : int'($signed(d_out[i])), expv[i], inv[0], inv[1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
