// sdf_stage: one radix-2 decimation-in-frequency butterfly column of an
// 8-point FFT, in single-path delay-feedback (SDF) form.
//
// A block of 2*D complex samples streams in, one per clock. During the first
// D samples of a block (local phase c < D) the inputs are pushed into a
// D-deep feedback line while the line's head, the twiddled differences of the
// previous block, goes out. During the last D samples the head x(n) meets the
// new input x(n+D): the sum x(n) + x(n+D) goes out and the difference
// (x(n) - x(n+D)) * W_(2D)^(n) is pushed into the line. The twiddles of one
// column are those of the 8-point flow graph: W8^0..3 for D = 4, W8^0 and
// W8^2 for D = 2, and 1 for D = 1. Multiplying by W8^2 = -j is a swap and a
// negation; W8^1 and W8^3 need a sum or difference of the two parts followed
// by one multiplication by 1/sqrt(2), so the column holds no true complex
// multiplier.
//
// Interface: in_sync marks the first sample of a block and realigns the
// phase counter; the stage then runs every clock, so a block can follow the
// previous one directly and the pipeline flushes by itself. Outputs are
// registered. Latency: out_* carries the stream D + 1 clocks after in_*,
// with in_valid/in_sync delayed alongside. Word width W is not grown: the
// caller provides the headroom.
module sdf_stage
  import fft16_pkg::C45, fft16_pkg::C45_FRAC;
#(
  parameter int D = 4,    // feedback depth: 4, 2 or 1 for an 8-point FFT
  parameter int W = 20    // bits per real/imaginary part
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic                in_sync,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic                out_valid,
  output logic                out_sync,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im
);

  localparam int PW = (D > 1) ? $clog2(2 * D) : 1;

  logic [PW-1:0] phase_q, phase;
  logic signed [W-1:0] dl_re [D];
  logic signed [W-1:0] dl_im [D];
  logic signed [W-1:0] head_re, head_im;
  logic signed [W-1:0] sum_re, sum_im, dif_re, dif_im;
  logic signed [W-1:0] rot_re, rot_im, push_re, push_im;
  logic [1:0] tw_exp;
  logic first_half;

  assign phase      = in_sync ? '0 : phase_q;
  assign first_half = (int'(phase) < D);
  assign head_re    = dl_re[D-1];
  assign head_im    = dl_im[D-1];

  // Exponent e of W8^e for the difference leaving this column.
  always_comb begin
    tw_exp = '0;
    if (!first_half) tw_exp = 2'((int'(phase) - D) * (4 / D));
  end

  // Round a product with C45_FRAC fraction bits to an integer of W bits.
  function automatic logic signed [W-1:0] mul_c45(input logic signed [W:0] v);
    logic signed [W+16:0] p;
    p = v * C45;
    p = p + (W+17)'(1 <<< (C45_FRAC - 1));
    return W'(p >>> C45_FRAC);
  endfunction

  always_comb begin
    logic signed [W:0] s_ri, d_ir;
    sum_re = head_re + in_re;
    sum_im = head_im + in_im;
    dif_re = head_re - in_re;
    dif_im = head_im - in_im;
    s_ri   = (W+1)'(dif_re) + (W+1)'(dif_im);
    d_ir   = (W+1)'(dif_im) - (W+1)'(dif_re);
    case (tw_exp)
      2'd0: begin rot_re = dif_re;        rot_im = dif_im;          end
      2'd1: begin rot_re = mul_c45(s_ri); rot_im = mul_c45(d_ir);   end
      2'd2: begin rot_re = dif_im;        rot_im = -dif_re;         end
      default: begin rot_re = mul_c45(d_ir); rot_im = -mul_c45(s_ri); end
    endcase
    push_re = first_half ? in_re : rot_re;
    push_im = first_half ? in_im : rot_im;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= '0;
      out_re  <= '0;
      out_im  <= '0;
      for (int j = 0; j < D; j++) begin
        dl_re[j] <= '0;
        dl_im[j] <= '0;
      end
    end else begin
      phase_q  <= (int'(phase) == 2 * D - 1) ? '0 : phase + 1'b1;
      dl_re[0] <= push_re;
      dl_im[0] <= push_im;
      for (int j = 1; j < D; j++) begin
        dl_re[j] <= dl_re[j-1];
        dl_im[j] <= dl_im[j-1];
      end
      out_re <= first_half ? head_re : sum_re;
      out_im <= first_half ? head_im : sum_im;
    end
  end

  // valid and sync travel with the data: D + 1 clocks.
  logic [D:0] vpipe, spipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vpipe <= '0;
      spipe <= '0;
    end else begin
      vpipe <= {vpipe[D-1:0], in_valid};
      spipe <= {spipe[D-1:0], in_sync};
    end
  end
  assign out_valid = vpipe[D];
  assign out_sync  = spipe[D];

endmodule
