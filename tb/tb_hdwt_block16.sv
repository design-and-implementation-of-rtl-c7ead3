// tb_hdwt_block16: runs the transform over a whole 16x16 pixel block, the unit
// the module is meant for. The block (a smooth gradient with noise and a
// sharp edge) is generated here. Its 16 rows and then its 16 columns are
// streamed into the module back to back, one vector per clock; every
// coefficient is checked against the reference model, and the last result
// must leave the module 32 + 4 - 1 clocks after the first vector entered
// (one vector per clock, 4 clocks of latency).
module tb_hdwt_block16;
  import haar_pkg::*;
  import haar_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic           nrst, in_valid, out_valid;
  pix_t  [N-1:0]  pix;
  coef_t [N-1:0]  coef;

  hdwt_top dut (.clk, .nrst, .in_valid, .pix, .out_valid, .coef);

  int blk[16][16];
  logic [7:0] expc[32][16];
  int checks = 0, failures = 0;
  int cycle = 0, first_in = -1, last_out = -1, n_out = 0;

  initial begin : watchdog
    repeat (10_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (in_valid && first_in < 0) first_in = cycle;
    if (nrst && out_valid) begin
      for (int m = 0; m < N; m++) begin
        checks++;
        if (coef[m] != expc[n_out][m]) begin
          failures++;
          if (failures < 10)
            $display("FAIL vector %0d coef[%0d] got %0d expected %0d", n_out, m,
                     $signed(coef[m]), $signed(expc[n_out][m]));
        end
      end
      n_out++;
      last_out = cycle;
    end
  end

  initial begin
    int v[16];
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) begin
        blk[r][c] = 8 * r + 4 * c + int'($urandom_range(15));
        if (c >= 11 && r >= 5) blk[r][c] = 250 - int'($urandom_range(5));
        if (blk[r][c] > 255) blk[r][c] = 255;
      end
    for (int t = 0; t < 32; t++) begin
      for (int i = 0; i < 16; i++) v[i] = (t < 16) ? blk[t][i] : blk[i][t-16];
      for (int m = 0; m < 16; m++) expc[t][m] = haar_coef(v, m);
    end
    nrst = 1'b0; in_valid = 1'b0; pix = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) nrst = 1'b1;
    for (int t = 0; t < 32; t++) begin
      @(negedge clk);
      in_valid = 1'b1;
      for (int i = 0; i < 16; i++) pix[i] = 8'((t < 16) ? blk[t][i] : blk[i][t-16]);
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (8) @(posedge clk);
    #1;
    checks += 2;
    if (n_out != 32) begin failures++; $display("FAIL %0d vectors out, expected 32", n_out); end
    if (last_out - first_in != 32 + 4 - 1) begin
      failures++;
      $display("FAIL block took %0d clocks, expected %0d", last_out - first_in, 32 + 4 - 1);
    end
    $display("block of 16 rows + 16 columns: first input at %0d, last result at %0d", first_in, last_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
