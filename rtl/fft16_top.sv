// fft16_top: 16-point FFT/IFFT processor, parallel in and parallel out.
//
// The 16-point DFT is computed as a two-dimensional 8 x 2 transform:
//   A(s + 8t) = sum_{l=0..1} W2^(l*t) * [ W16^(s*l) * sum_{m=0..7} B(l + 2m) W8^(s*m) ]
// with s = 0..7 and t = 0..1. The chain of units is
//   input unit -> 8-point FFT unit -> multiplier unit -> second FFT unit
//   -> output unit,
// with a 5-bit counter as master controller. The input unit holds the 16
// inputs and streams the even, then the odd samples into the 8-point FFT
// (two 8-point transforms, 8 clocks each). The multiplier rotates the odd
// set by W16^s. The second FFT unit forms A(s) and A(s + 8) from each pair,
// and the output unit collects them into a parallel bank.
//
// IFFT: with mode = 1 the real and imaginary parts are swapped on the way in
// and on the way out, which turns the forward FFT into an inverse DFT without
// other coefficients. The inverse is not divided by 16.
//
// Interface and timing: present data_in_* and mode, then raise data_start
// (it may stay high). The clock edge that sees the rising edge captures the
// inputs; 28 clocks later data_out_valid rises and data_out_* hold the
// results, X(k) in data_out_*[k], with DATA_W + 5 bits per part (no overflow
// for any input). busy is high while a transform runs; a new rising edge of
// data_start is accepted once busy is low. The unit chain, the swap-based
// IFFT and the counter control follow the source design; the 8 x 2 split,
// the streaming form, the number formats and the handshake are this design's
// own.
module fft16_top
  import fft16_pkg::DATA_W;
#(
  parameter int DATA_W_P = DATA_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       data_start,
  input  logic                       mode,
  input  logic signed [DATA_W_P-1:0] data_in_re  [16],
  input  logic signed [DATA_W_P-1:0] data_in_im  [16],
  output logic signed [DATA_W_P+4:0] data_out_re [16],
  output logic signed [DATA_W_P+4:0] data_out_im [16],
  output logic                       data_out_valid,
  output logic                       busy
);

  localparam int IW = DATA_W_P + 4;   // 8-point FFT and multiplier
  localparam int OW = DATA_W_P + 5;   // second FFT unit and output bank

  logic             start_count, done;
  logic             st_valid, st_sync, tw_apply;
  logic [3:0]       st_sel;
  logic [2:0]       tw_idx;
  logic             mode_q;

  logic signed [DATA_W_P-1:0] in_re, in_im;
  logic                       f_valid, f_sync;
  logic signed [IW-1:0]       f_re, f_im;
  logic                       m_valid, m_sync, m_set;
  logic signed [IW-1:0]       m_re, m_im;
  logic                       c_valid;
  logic [2:0]                 c_idx;
  logic signed [OW-1:0]       c_sum_re, c_sum_im, c_dif_re, c_dif_im;

  ctrl_counter u_ctrl (
    .clk, .rst_n,
    .data_start, .start_count, .busy, .count(),
    .stream_valid(st_valid), .stream_sync(st_sync), .stream_sel(st_sel),
    .tw_apply, .tw_idx, .done
  );

  input_unit #(.W(DATA_W_P)) u_in (
    .clk, .rst_n,
    .load(start_count), .mode,
    .din_re(data_in_re), .din_im(data_in_im),
    .sel(st_sel), .out_re(in_re), .out_im(in_im), .mode_q
  );

  fft8_unit #(.IN_W(DATA_W_P), .W(IW)) u_fft8 (
    .clk, .rst_n,
    .in_valid(st_valid), .in_sync(st_sync), .in_re, .in_im,
    .out_valid(f_valid), .out_sync(f_sync), .out_re(f_re), .out_im(f_im)
  );

  multiplier_unit #(.W(IW)) u_mult (
    .clk, .rst_n,
    .in_valid(f_valid), .in_sync(f_sync), .in_re(f_re), .in_im(f_im),
    .tw_apply, .tw_idx,
    .out_valid(m_valid), .out_sync(m_sync), .out_set(m_set),
    .out_re(m_re), .out_im(m_im)
  );

  fft2_unit #(.W(IW)) u_fft2 (
    .clk, .rst_n,
    .in_valid(m_valid), .in_sync(m_sync), .in_set(m_set),
    .in_re(m_re), .in_im(m_im),
    .out_valid(c_valid), .out_idx(c_idx),
    .out_sum_re(c_sum_re), .out_sum_im(c_sum_im),
    .out_dif_re(c_dif_re), .out_dif_im(c_dif_im)
  );

  output_unit #(.W(OW)) u_out (
    .clk, .rst_n,
    .clear(start_count), .mode(mode_q),
    .wr_en(c_valid), .wr_idx(c_idx),
    .sum_re(c_sum_re), .sum_im(c_sum_im), .dif_re(c_dif_re), .dif_im(c_dif_im),
    .done, .data_out_re, .data_out_im, .data_out_valid
  );

  // The last pair of results must be written on the clock the counter
  // reports done.
  assert property (@(posedge clk) disable iff (!rst_n) done |-> c_valid)
    else $error("fft16_top: last result not aligned with done");

endmodule
