// fft16_pkg: constants and helper functions shared by the 16-point FFT/IFFT
// processor.
//
// The transform is split as N = 16 = 8 x 2. The first dimension is an
// 8-point radix-2 DIF FFT applied to the even samples and then to the odd
// samples; the second dimension combines the two 8-point results after the
// odd set is rotated by the inter-dimensional constants W16^s, s = 0..7.
//
// Number formats (a choice of this design; only the 16-bit word length is
// given for the data):
//   * data words are two's complement integers, DATA_W = 16 bits per part;
//   * the 8-point stages and the multiplier run at DATA_W + 4 bits, enough
//     for the worst-case growth of an 8-point transform with no overflow;
//   * the outputs carry DATA_W + 5 bits, enough for the full 16-point growth;
//   * the 1/sqrt(2) constant inside the 8-point FFT has 15 fraction bits;
//   * the W16 twiddles have 14 fraction bits (16-bit words, 1.0 = 16384).
// Every constant product is rounded half up before its fraction bits are
// dropped.
package fft16_pkg;

  localparam int DATA_W   = 16;   // word length of one real or imaginary part
  localparam int CNT_W    = 5;    // width of the master counter

  // 1/sqrt(2) = cos(pi/4), round(0.70710678 * 2^15)
  localparam int C45_FRAC = 15;
  localparam logic signed [15:0] C45 = 16'sd23170;

  // W16^s = cos(2*pi*s/16) - j*sin(2*pi*s/16), stored as
  // round(2^14 * cos(2*pi*s/16)) and round(2^14 * sin(2*pi*s/16)).
  localparam int TW_FRAC = 14;

  function automatic logic signed [15:0] tw16_cos(input logic [2:0] s);
    case (s)
      3'd0: return 16'sd16384;
      3'd1: return 16'sd15137;
      3'd2: return 16'sd11585;
      3'd3: return 16'sd6270;
      3'd4: return 16'sd0;
      3'd5: return -16'sd6270;
      3'd6: return -16'sd11585;
      default: return -16'sd15137;
    endcase
  endfunction

  function automatic logic signed [15:0] tw16_sin(input logic [2:0] s);
    case (s)
      3'd0: return 16'sd0;
      3'd1: return 16'sd6270;
      3'd2: return 16'sd11585;
      3'd3: return 16'sd15137;
      3'd4: return 16'sd16384;
      3'd5: return 16'sd15137;
      3'd6: return 16'sd11585;
      default: return 16'sd6270;
    endcase
  endfunction

  // The 8-point FFT delivers its results in bit-reversed order.
  function automatic logic [2:0] bitrev3(input logic [2:0] v);
    return {v[0], v[1], v[2]};
  endfunction

  // Pipeline timing, in clock cycles. An SDF stage with delay D has a
  // latency of D + 1 (D for the feedback line, 1 for its output register).
  localparam int FFT8_LAT = (4 + 1) + (2 + 1) + (1 + 1);  // 10
  localparam int MULT_LAT = 1;
  localparam int FFT2_LAT = 1;
  // Counter value during which the last result is written into the output
  // bank: the 16th sample leaves the input unit at count 15.
  localparam int LAST_CNT = 15 + FFT8_LAT + MULT_LAT + FFT2_LAT;  // 27

endpackage
