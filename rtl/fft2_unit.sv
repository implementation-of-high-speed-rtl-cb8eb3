// fft2_unit: second-dimension FFT unit, combining the two 8-point results.
//
// With N = 16 = 8 x 2, the outputs are A(s) = Y0(s) + Z1(s) and
// A(s + 8) = Y0(s) - Z1(s), where Y0 is the 8-point FFT of the even samples
// and Z1 = W16^s * Y1 the twiddled 8-point FFT of the odd samples. Pairs of
// words eight positions apart in the 16-word intermediate set form the
// inputs of each of the eight 2-point transforms.
//
// The first set (in_set = 0) streams in and is held in an 8-word buffer, in
// arrival order. When the word at the same position of the second set
// (in_set = 1) arrives, the unit computes both butterfly outputs and
// registers them with out_valid and out_idx = s; since the 8-point FFT
// delivers bit-reversed order, s = bitrev(position). in_sync marks the first
// word of each 8-word block and resets the position counter. Latency: one
// clock from the second-set word to the result. Outputs are one bit wider
// than the inputs so the sum cannot overflow.
module fft2_unit
  import fft16_pkg::bitrev3;
#(
  parameter int W = 20
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_sync,
  input  logic                in_set,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic [2:0]          out_idx,
  output logic signed [W:0]   out_sum_re,
  output logic signed [W:0]   out_sum_im,
  output logic signed [W:0]   out_dif_re,
  output logic signed [W:0]   out_dif_im
);

  logic signed [W-1:0] buf_re [8];
  logic signed [W-1:0] buf_im [8];
  logic [2:0] pos_q, pos;

  assign pos = in_sync ? 3'd0 : pos_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_q      <= '0;
      out_valid  <= 1'b0;
      out_idx    <= '0;
      out_sum_re <= '0;
      out_sum_im <= '0;
      out_dif_re <= '0;
      out_dif_im <= '0;
      for (int k = 0; k < 8; k++) begin
        buf_re[k] <= '0;
        buf_im[k] <= '0;
      end
    end else begin
      out_valid <= in_valid && in_set;
      if (in_valid) begin
        pos_q <= pos + 1'b1;
        if (!in_set) begin
          buf_re[pos] <= in_re;
          buf_im[pos] <= in_im;
        end else begin
          out_idx    <= bitrev3(pos);
          out_sum_re <= (W+1)'(buf_re[pos]) + (W+1)'(in_re);
          out_sum_im <= (W+1)'(buf_im[pos]) + (W+1)'(in_im);
          out_dif_re <= (W+1)'(buf_re[pos]) - (W+1)'(in_re);
          out_dif_im <= (W+1)'(buf_im[pos]) - (W+1)'(in_im);
        end
      end
    end
  end

endmodule
