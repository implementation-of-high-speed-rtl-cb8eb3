// multiplier_unit: inter-dimensional constant multiplication between the two
// FFT units.
//
// The second set of 8-point results (from the odd samples) is multiplied by
// W16^s = cos(2*pi*s/16) - j*sin(2*pi*s/16), s = 0..7; the first set is
// multiplied by W16^0 = 1 and passes unchanged. Only seven of the sixteen
// constants are non-trivial. Because the results arrive one per clock, a
// single complex multiplier (four real products) keeps up with the FFT unit.
// The twiddles are 16-bit words with 14 fraction bits (fft16_pkg), products
// are rounded half up.
//
// Interface: tw_apply selects the multiplication and tw_idx the constant, both
// from the master counter and aligned with in_*. Everything is registered:
// one clock of latency. out_set repeats tw_apply, telling the second FFT unit
// which set a word belongs to.
module multiplier_unit
  import fft16_pkg::TW_FRAC, fft16_pkg::tw16_cos, fft16_pkg::tw16_sin;
#(
  parameter int W = 20
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_sync,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  input  logic                tw_apply,
  input  logic [2:0]          tw_idx,
  output logic                out_valid,
  output logic                out_sync,
  output logic                out_set,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  logic signed [15:0]  c, s;
  logic signed [W+16:0] acc_re, acc_im;
  logic signed [W-1:0]  rot_re, rot_im;

  assign c = tw16_cos(tw_idx);
  assign s = tw16_sin(tw_idx);

  // (a + jb)(c - js) = (ac + bs) + j(bc - as)
  always_comb begin
    acc_re = (W+17)'(in_re * c) + (W+17)'(in_im * s) + (W+17)'(1 <<< (TW_FRAC - 1));
    acc_im = (W+17)'(in_im * c) - (W+17)'(in_re * s) + (W+17)'(1 <<< (TW_FRAC - 1));
    rot_re = W'(acc_re >>> TW_FRAC);
    rot_im = W'(acc_im >>> TW_FRAC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sync  <= 1'b0;
      out_set   <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= in_valid;
      out_sync  <= in_sync;
      out_set   <= tw_apply;
      out_re    <= tw_apply ? rot_re : in_re;
      out_im    <= tw_apply ? rot_im : in_im;
    end
  end

endmodule
