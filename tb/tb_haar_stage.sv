// tb_haar_stage: checks the butterfly stage in the three configurations the
// transform uses (stage one: 8 bits, 8 butterflies; stage two: 9 bits, 4;
// stage three: 10 bits, 2) against values computed in the harness, with a
// one-cycle latency check on every vector.
module tb_haar_stage;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int c1, f1, c2, f2, c3, f3;
  logic d1, d2, d3;
  int checks, failures;

  haar_stage_harness #(.W(8),  .N_BF(8)) h1 (.clk, .checks(c1), .failures(f1), .done(d1));
  haar_stage_harness #(.W(9),  .N_BF(4)) h2 (.clk, .checks(c2), .failures(f2), .done(d2));
  haar_stage_harness #(.W(10), .N_BF(2)) h3 (.clk, .checks(c3), .failures(f3), .done(d3));

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c1 + c2 + c3, f1 + f2 + f3 + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    wait (d1 && d2 && d3);
    checks   = c1 + c2 + c3;
    failures = f1 + f2 + f3;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
