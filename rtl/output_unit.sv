// output_unit: output register bank of the 16-point FFT/IFFT processor, the
// counterpart of the input unit.
//
// The second FFT unit delivers the results in pairs, A(s) and A(s + 8); on
// wr_en both are written into the 16-word bank at positions s and s + 8. In
// IFFT mode (mode = 1, the mode the input unit latched) the real and
// imaginary parts are swapped back as they are written. The bank drives the
// outputs in parallel. done, from the master counter on the clock of the last
// write, raises data_out_valid from the next clock on; clear (the start of the
// next transform) lowers it again. The results stay readable until the
// following transform overwrites them.
module output_unit #(
  parameter int W = 21
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                mode,
  input  logic                wr_en,
  input  logic [2:0]          wr_idx,
  input  logic signed [W-1:0] sum_re,
  input  logic signed [W-1:0] sum_im,
  input  logic signed [W-1:0] dif_re,
  input  logic signed [W-1:0] dif_im,
  input  logic                done,
  output logic signed [W-1:0] data_out_re [16],
  output logic signed [W-1:0] data_out_im [16],
  output logic                data_out_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_out_valid <= 1'b0;
      for (int k = 0; k < 16; k++) begin
        data_out_re[k] <= '0;
        data_out_im[k] <= '0;
      end
    end else begin
      if (clear)     data_out_valid <= 1'b0;
      else if (done) data_out_valid <= 1'b1;
      if (wr_en) begin
        data_out_re[{1'b0, wr_idx}] <= mode ? sum_im : sum_re;
        data_out_im[{1'b0, wr_idx}] <= mode ? sum_re : sum_im;
        data_out_re[{1'b1, wr_idx}] <= mode ? dif_im : dif_re;
        data_out_im[{1'b1, wr_idx}] <= mode ? dif_re : dif_im;
      end
    end
  end

endmodule
