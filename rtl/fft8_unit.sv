// fft8_unit: streaming 8-point radix-2 DIF FFT.
//
// Three butterfly columns of the 8-point DIF flow graph, each an SDF stage
// (sdf_stage) with feedback depth 4, 2 and 1. Eight complex samples x(0..7)
// enter one per clock, in natural order, with in_sync high on x(0); one
// 8-point transform therefore occupies the unit for 8 clocks, and a second
// block may follow at once. The results leave one per clock in bit-reversed
// order X(0), X(4), X(2), X(6), X(1), X(5), X(3), X(7), with out_sync high on
// X(0). Latency from x(0) in to X(0) out is 10 clocks (fft16_pkg::FFT8_LAT).
//
// The radix-2 DIF algorithm, its flow graph and the absence of a true
// multiplier follow the source design; the streaming SDF mapping and the
// number format are this design's choices. Inputs of IN_W bits are
// sign-extended to W bits, which must leave 4 bits of headroom; the 1/sqrt(2)
// products are rounded.
module fft8_unit #(
  parameter int IN_W = 16,
  parameter int W    = 20
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic                   in_sync,
  input  logic signed [IN_W-1:0] in_re,
  input  logic signed [IN_W-1:0] in_im,
  output logic                   out_valid,
  output logic                   out_sync,
  output logic signed [W-1:0]    out_re,
  output logic signed [W-1:0]    out_im
);

  logic               v1, s1, v2, s2;
  logic signed [W-1:0] r1, i1, r2, i2;

  sdf_stage #(.D(4), .W(W)) u_col1 (
    .clk, .rst_n,
    .in_valid(in_valid), .in_sync(in_sync),
    .in_re(W'(in_re)), .in_im(W'(in_im)),
    .out_valid(v1), .out_sync(s1), .out_re(r1), .out_im(i1)
  );

  sdf_stage #(.D(2), .W(W)) u_col2 (
    .clk, .rst_n,
    .in_valid(v1), .in_sync(s1), .in_re(r1), .in_im(i1),
    .out_valid(v2), .out_sync(s2), .out_re(r2), .out_im(i2)
  );

  sdf_stage #(.D(1), .W(W)) u_col3 (
    .clk, .rst_n,
    .in_valid(v2), .in_sync(s2), .in_re(r2), .in_im(i2),
    .out_valid(out_valid), .out_sync(out_sync), .out_re(out_re), .out_im(out_im)
  );

endmodule
