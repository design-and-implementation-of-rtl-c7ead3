// haar_stage: one registered stage of the butterfly pipeline (stages one to
// three of the transform).
//
// The first 2*N_BF lanes hold approximation values (unsigned). They are taken
// in even/odd pairs: butterfly k combines lanes 2k and 2k+1, writes the sum to
// lane k and the difference to lane N_BF+k. The remaining lanes already hold
// detail coefficients (two's complement) from earlier stages; they are only
// routed through, sign-extended by one bit. All lanes leave one bit wider
// than they entered, so nothing overflows.
//
//   stage one:   W=8,  N_BF=8  (16 pixels -> 8 sums, 8 finest details)
//   stage two:   W=9,  N_BF=4
//   stage three: W=10, N_BF=2
//
// Timing: every output is registered, one cycle of latency, one vector per
// clock. in_valid travels alongside the data as out_valid. nrst is an
// asynchronous active-low reset that clears the registers.
// Pairing even with odd elements, pass-through of the details and the
// widths 9/10/11 follow the published design; the valid flag and the reset style are
// this design's own choices.
module haar_stage #(
  parameter int unsigned N    = 16,          // lanes
  parameter int unsigned W    = 8,           // input lane width
  parameter int unsigned N_BF = 8            // butterflies (active pairs)
) (
  input  logic                 clk,
  input  logic                 nrst,
  input  logic                 in_valid,
  input  logic [N-1:0][W-1:0]  d_in,
  output logic                 out_valid,
  output logic [N-1:0][W:0]    d_out
);

  logic [N-1:0][W:0] nxt;

  // butterflies on the approximation lanes
  for (genvar k = 0; k < N_BF; k++) begin : g_bf
    haar_bpu #(.W(W)) u_bpu (
      .a   (d_in[2*k]),
      .b   (d_in[2*k+1]),
      .sum (nxt[k]),
      .diff(nxt[N_BF+k])
    );
  end

  // detail lanes from earlier stages: routed through, sign-extended
  for (genvar i = 2*N_BF; i < N; i++) begin : g_pass
    assign nxt[i] = {d_in[i][W-1], d_in[i]};
  end

  always_ff @(posedge clk or negedge nrst) begin
    if (!nrst) begin
      d_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      d_out     <= nxt;
      out_valid <= in_valid;
    end
  end

endmodule
