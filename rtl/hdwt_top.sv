// hdwt_top: relaxed 16-point Haar discrete wavelet transform, four pipeline
// stages, no multipliers.
//
// A vector of 16 unsigned 8-bit samples s0..s15 enters on `pix` with
// in_valid high. Four stages of add/subtract butterflies decompose it over
// four levels, and the last stage divides every coefficient by 16 with a
// 4-bit shift. "Relaxed" means that the usual 1/sqrt(2) normalisation of each
// level is dropped in favour of a single power-of-two scale at the end.
// Output order (coef[m], each 8 bits):
//   coef[0]       mean of the 16 samples (unsigned, 0..255)
//   coef[1]       level-4 detail: (s0+..+s7) - (s8+..+s15), /16
//   coef[2..3]    level-3 details over groups of 8 samples, /16
//   coef[4..7]    level-2 details over groups of 4 samples, /16
//   coef[8..15]   level-1 details s(2k) - s(2k+1), /16
// Details are two's complement, divided with rounding toward minus infinity.
//
// Datapath widths between the stages are 8 -> 9 -> 10 -> 11 -> 8 bits.
// Timing: latency 4 clock cycles from pix/in_valid to coef/out_valid; a new
// vector may enter on every clock. nrst is asynchronous, active low.
// The stage structure, widths and shift follow the published design; the valid flag,
// the coefficient order and the rounding are this design's choices.
module hdwt_top
  import haar_pkg::*;
(
  input  logic           clk,
  input  logic           nrst,
  input  logic           in_valid,
  input  pix_t  [N-1:0]  pix,        // pix[i] = sample s_i
  output logic           out_valid,
  output coef_t [N-1:0]  coef
);

  s1_t [N-1:0] xr;                   // stage one out  (9 bits)
  s2_t [N-1:0] yr;                   // stage two out  (10 bits)
  s3_t [N-1:0] zr;                   // stage three out (11 bits)
  logic        v1, v2, v3;

  haar_stage #(.N(N), .W(PIX_W),   .N_BF(N/2)) u_stage_one (
    .clk, .nrst, .in_valid,   .d_in(pix), .out_valid(v1), .d_out(xr));

  haar_stage #(.N(N), .W(PIX_W+1), .N_BF(N/4)) u_stage_two (
    .clk, .nrst, .in_valid(v1), .d_in(xr), .out_valid(v2), .d_out(yr));

  haar_stage #(.N(N), .W(PIX_W+2), .N_BF(N/8)) u_stage_three (
    .clk, .nrst, .in_valid(v2), .d_in(yr), .out_valid(v3), .d_out(zr));

  haar_stage_four #(.N(N), .W(PIX_W+3), .SHIFT(SHIFT), .OUT_W(PIX_W)) u_stage_four (
    .clk, .nrst, .in_valid(v3), .d_in(zr), .out_valid, .d_out(coef));

endmodule
