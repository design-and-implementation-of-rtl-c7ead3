// haar_stage_harness: drives one haar_stage instance of a given width and
// butterfly count with random vectors (back to back, with occasional idle
// cycles) and compares every registered output with values computed here:
// lane k < N_BF must hold in[2k] + in[2k+1], lane N_BF+k must hold
// in[2k] - in[2k+1], and any later lane must hold its input, read as a
// signed number. It also checks that out_valid follows in_valid by exactly
// one clock and that reset clears the outputs.
module haar_stage_harness #(
  parameter int unsigned W    = 8,
  parameter int unsigned N_BF = 8,
  parameter int unsigned NVEC = 400
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);

  localparam int unsigned N = 16;

  logic               nrst, in_valid, out_valid;
  logic [N-1:0][W-1:0] d_in;
  logic [N-1:0][W:0]   d_out;
  int                 expv[N];
  logic               exp_valid;

  haar_stage #(.N(N), .W(W), .N_BF(N_BF)) dut (
    .clk, .nrst, .in_valid, .d_in, .out_valid, .d_out);

  function automatic int lane_val(int i, logic [W:0] v);
    // approximation results (unsigned) in lanes 0..N_BF-1, the rest signed
    if (i < int'(N_BF)) return int'(v);
    return int'($signed(v));
  endfunction

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    nrst = 1'b0; in_valid = 1'b0; d_in = '0;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (d_out != '0 || out_valid) begin
      failures++; $display("FAIL W=%0d: outputs not cleared by reset", W);
    end
    nrst = 1'b1;
    for (int n = 0; n < int'(NVEC); n++) begin
      int inv[N];
      @(negedge clk);
      in_valid = ($urandom_range(7) != 0);
      for (int i = 0; i < int'(N); i++) begin
        if (i < 2*int'(N_BF)) begin
          // approximation lanes: unsigned; force the corners now and then
          case (n % 50)
            0: inv[i] = (1 << W) - 1;
            1: inv[i] = (i % 2 == 0) ? 0 : (1 << W) - 1;
            default: inv[i] = int'($urandom_range((1 << W) - 1));
          endcase
        end else begin
          // detail lanes: two's complement
          inv[i] = int'($urandom_range((1 << W) - 1)) - (1 << (W-1));
          if (n % 50 == 0) inv[i] = -(1 << (W-1));
        end
        d_in[i] = W'(inv[i]);
      end
      for (int k = 0; k < int'(N_BF); k++) begin
        expv[k]        = inv[2*k] + inv[2*k+1];
        expv[N_BF + k] = inv[2*k] - inv[2*k+1];
      end
      for (int i = 2*int'(N_BF); i < int'(N); i++) expv[i] = inv[i];
      exp_valid = in_valid;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != exp_valid) begin
        failures++; $display("FAIL W=%0d: out_valid %0b expected %0b", W, out_valid, exp_valid);
      end
      for (int i = 0; i < int'(N); i++) begin
        checks++;
        if (lane_val(i, d_out[i]) != expv[i]) begin
          failures++;
          if (failures < 10)
            $display("FAIL W=%0d N_BF=%0d lane %0d: got %0d expected %0d",
                     W, N_BF, i, lane_val(i, d_out[i]), expv[i]);
        end
      end
    end
    done = 1'b1;
  end

endmodule
