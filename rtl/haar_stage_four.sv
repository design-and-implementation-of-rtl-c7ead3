// haar_stage_four: last stage of the transform. It applies the final
// butterfly to lanes 0 and 1 (the two remaining approximation values), which
// gives the overall sum and the coarsest detail, routes the other 14 detail
// lanes through, and divides every lane by 16 with a right shift by SHIFT
// bits so the coefficients return to OUT_W = 8 bits.
//
// Lane 0 (sum of all 16 samples, at most 4080) is unsigned: shifted, it
// becomes the block mean, 0..255. All other lanes are two's complement and
// the shift rounds them toward minus infinity; the largest detail, +-2040,
// becomes -128..127 and fits 8 bits. With the 12-bit stage result both
// cases reduce to keeping bits 11..4, so no bit is dropped that could matter.
//
// Timing: registered outputs, one cycle of latency, one vector per clock;
// asynchronous active-low reset. The butterfly, the shift by 4 and the 8-bit
// output follow the published design; truncation rather than rounding, the signed
// reading of the detail lanes and the valid flag are this design's choices.
module haar_stage_four #(
  parameter int unsigned N     = 16,         // lanes
  parameter int unsigned W     = 11,         // input lane width
  parameter int unsigned SHIFT = 4,          // divide by 2**SHIFT
  parameter int unsigned OUT_W = 8           // output coefficient width
) (
  input  logic                   clk,
  input  logic                   nrst,
  input  logic                   in_valid,
  input  logic [N-1:0][W-1:0]    d_in,
  output logic                   out_valid,
  output logic [N-1:0][OUT_W-1:0] d_out
);

  logic [N-1:0][W:0]       wide;   // full-precision stage result
  logic [N-1:0][OUT_W-1:0] nxt;

  haar_bpu #(.W(W)) u_bpu (
    .a   (d_in[0]),
    .b   (d_in[1]),
    .sum (wide[0]),
    .diff(wide[1])
  );

  for (genvar i = 2; i < N; i++) begin : g_pass
    assign wide[i] = {d_in[i][W-1], d_in[i]};
  end

  // divide by 16: keep bits SHIFT .. SHIFT+OUT_W-1 of the full-precision
  // value. For the unsigned mean this is a logical shift; for a two's-complement
  // detail it is an arithmetic shift (floor), since every bit above the kept
  // field is a copy of the sign bit once the value fits OUT_W bits after the
  // shift, which the widths guarantee.
  for (genvar i = 0; i < N; i++) begin : g_scale
    assign nxt[i] = wide[i][SHIFT +: OUT_W];
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
