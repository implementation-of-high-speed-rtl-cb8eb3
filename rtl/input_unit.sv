// input_unit: input register bank of the 16-point FFT/IFFT processor.
//
// On load, all 16 complex input words are captured in parallel together with
// the mode bit. In IFFT mode (mode = 1) the real and imaginary parts of every
// word are swapped as they are stored, so the forward FFT that follows
// computes an inverse transform once the output unit swaps back.
//
// The bank then feeds the first 8-point FFT one word per clock through a
// 16:1 multiplexer addressed by sel: sel 0..7 give the even samples
// B(0), B(2), ..., B(14) and sel 8..15 the odd samples B(1), ..., B(15),
// i.e. word B(2m + l) for sel = 8l + m. The output is combinational from the
// bank. mode_q holds the mode of the transform in flight.
//
// The parallel bank, the 16-bit word length and the swap follow the source
// design; the feeding order is the one the 16 = 8 x 2 decomposition needs.
module input_unit #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic                mode,
  input  logic signed [W-1:0] din_re [16],
  input  logic signed [W-1:0] din_im [16],
  input  logic [3:0]          sel,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im,
  output logic                mode_q
);

  logic signed [W-1:0] bank_re [16];
  logic signed [W-1:0] bank_im [16];
  logic [3:0] addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= 1'b0;
      for (int k = 0; k < 16; k++) begin
        bank_re[k] <= '0;
        bank_im[k] <= '0;
      end
    end else if (load) begin
      mode_q <= mode;
      for (int k = 0; k < 16; k++) begin
        bank_re[k] <= mode ? din_im[k] : din_re[k];
        bank_im[k] <= mode ? din_re[k] : din_im[k];
      end
    end
  end

  assign addr   = {sel[2:0], sel[3]};
  assign out_re = bank_re[addr];
  assign out_im = bank_im[addr];

endmodule
