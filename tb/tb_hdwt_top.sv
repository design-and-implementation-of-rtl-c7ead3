// tb_hdwt_top: end-to-end test of the 16-point relaxed Haar transform at its
// default sizes. Random 16-sample vectors (plus smooth ramps, constant and
// alternating black/white patterns) are fed with in_valid, partly back to
// back and partly with idle cycles; every output vector is compared with the
// reference model, which computes each coefficient straight from its
// definition. Each result must appear exactly 4 clocks after its input. A
// reset is applied while vectors are in flight: those vectors must be lost
// and nothing may come out of the pipe afterwards except new inputs.
// The test counts how often each behaviour occurred and fails if one never
// did: back-to-back input, idle cycles, a full pipe (4 vectors in flight),
// a flush by reset, and the range corners (mean 255, detail -128 and +127).
module tb_hdwt_top;
  import haar_pkg::*;
  import haar_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic           nrst, in_valid, out_valid;
  pix_t  [N-1:0]  pix;
  coef_t [N-1:0]  coef;

  hdwt_top dut (.clk, .nrst, .in_valid, .pix, .out_valid, .coef);

  typedef struct {
    logic [7:0] c[16];
    int         cycle;
  } exp_t;

  exp_t q[$];
  int   cycle = 0;
  int   checks = 0, failures = 0;
  int   n_vec = 0, n_out = 0;
  int   n_b2b = 0, n_bubble = 0, n_full = 0, n_flush = 0;
  int   n_mean255 = 0, n_detmin = 0, n_detmax = 0;
  logic prev_valid = 1'b0;

  localparam int LATENCY = 4;
  localparam int NVEC    = 5000;

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard: compare every output vector, and its timing
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (nrst && out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL output with nothing in flight at cycle %0d", cycle);
      end else begin
        e = q.pop_front();
        n_out++;
        checks++;
        if (cycle - e.cycle != LATENCY) begin
          failures++;
          if (failures < 10) $display("FAIL latency %0d cycles, expected %0d", cycle - e.cycle, LATENCY);
        end
        for (int m = 0; m < N; m++) begin
          checks++;
          if (coef[m] != e.c[m]) begin
            failures++;
            if (failures < 10)
              $display("FAIL vector %0d coef[%0d] got %0d expected %0d", n_out, m,
                       $signed(coef[m]), $signed(e.c[m]));
          end
          if (m == 0 && coef[m] == 8'd255) n_mean255++;
          if (m != 0 && coef[m] == 8'h80)  n_detmin++;
          if (m != 0 && coef[m] == 8'h7f)  n_detmax++;
        end
      end
    end
  end

  task automatic drive(bit valid, int kind);
    int s[16];
    exp_t e;
    @(negedge clk);
    in_valid = valid;
    for (int i = 0; i < N; i++) begin
      case (kind)
        0: s[i] = int'($urandom_range(255));
        1: s[i] = 255;                                   // flat white
        2: s[i] = (i < 8) ? 0 : 255;                     // step: detail -128
        3: s[i] = (i < 8) ? 255 : 0;                     // step: detail +127
        4: s[i] = (i % 2 == 0) ? 255 : 0;                // finest-detail pattern
        default: s[i] = (16 * i + int'($urandom_range(15))) & 255; // ramp
      endcase
      pix[i] = 8'(s[i]);
    end
    if (valid) begin
      for (int m = 0; m < N; m++) e.c[m] = haar_coef(s, m);
      e.cycle = cycle;          // value the scoreboard sees at the coming edge
      q.push_back(e);
      n_vec++;
      if (prev_valid) n_b2b++;
    end else begin
      if (prev_valid) n_bubble++;
    end
    prev_valid = valid;
    if (q.size() >= LATENCY) n_full++;
  endtask

  initial begin
    nrst = 1'b0; in_valid = 1'b0; pix = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) nrst = 1'b1;
    // corner patterns back to back
    for (int k = 1; k <= 5; k++) drive(1'b1, k);
    for (int n = 0; n < NVEC; n++) begin
      int r;
      r = int'($urandom_range(99));
      if (n == NVEC / 2) begin
        // reset with vectors in flight: they must be dropped
        drive(1'b1, 0); drive(1'b1, 0);
        @(negedge clk);
        in_valid = 1'b0;
        nrst = 1'b0;
        if (q.size() > 0) n_flush++;
        q.delete();
        prev_valid = 1'b0;
        @(negedge clk);
        nrst = 1'b1;
      end
      if (r < 70)      drive(1'b1, 0);
      else if (r < 80) drive(1'b1, 5);
      else if (r < 82) drive(1'b1, 1 + int'($urandom_range(3)));
      else             drive(1'b0, 0);
    end
    drive(1'b0, 0);
    repeat (LATENCY + 2) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++; $display("FAIL %0d vectors never came out", q.size());
    end
    $display("inputs %0d outputs %0d back-to-back %0d idle %0d full-pipe %0d flush %0d mean255 %0d det-128 %0d det+127 %0d",
             n_vec, n_out, n_b2b, n_bubble, n_full, n_flush, n_mean255, n_detmin, n_detmax);
    checks += 7;
    if (n_b2b == 0)     begin failures++; $display("FAIL no back-to-back input"); end
    if (n_bubble == 0)  begin failures++; $display("FAIL no idle cycle"); end
    if (n_full == 0)    begin failures++; $display("FAIL pipe never full"); end
    if (n_flush == 0)   begin failures++; $display("FAIL no flush by reset"); end
    if (n_mean255 == 0) begin failures++; $display("FAIL mean 255 never seen"); end
    if (n_detmin == 0)  begin failures++; $display("FAIL detail -128 never seen"); end
    if (n_detmax == 0)  begin failures++; $display("FAIL detail +127 never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
