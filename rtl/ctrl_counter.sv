// ctrl_counter: master controller of the 16-point FFT/IFFT processor, built
// around a 5-bit binary counter.
//
// A rising edge of data_start while the processor is idle produces a
// one-clock start_count pulse (the input bank loads on it) and restarts the
// counter at 0. data_start may stay high for several clocks; only its rising
// edge counts, and edges that arrive while a transform is running are
// ignored. While busy, the counter advances once per clock up to LAST_CNT
// (27) and every control signal is a decode of its value:
//   count 0..15   stream_valid, stream_sel = count: the input unit sends one
//                 sample per clock; stream_sync marks counts 0 and 8, the
//                 first sample of each 8-point block;
//   count 10..25  tw_apply/tw_idx for the multiplier unit, which sees the
//                 8-point results FFT8_LAT clocks after their inputs: the
//                 first 8 results (even samples) pass unchanged, the next 8
//                 (odd samples) are rotated by W16^s, with s the bit-reversed
//                 position of the result in its block;
//   count 27      done: the last result reaches the output bank.
// Results are therefore in the output bank 28 clocks after the clock edge
// that samples the rising edge of data_start. Using a counter as the only
// controller follows the source design; the decode values follow from this
// design's pipeline.
module ctrl_counter
  import fft16_pkg::CNT_W, fft16_pkg::FFT8_LAT, fft16_pkg::LAST_CNT, fft16_pkg::bitrev3;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             data_start,
  output logic             start_count,
  output logic             busy,
  output logic [CNT_W-1:0] count,
  output logic             stream_valid,
  output logic             stream_sync,
  output logic [3:0]       stream_sel,
  output logic             tw_apply,
  output logic [2:0]       tw_idx,
  output logic             done
);

  logic start_q;
  logic [3:0] tw_pos;

  assign start_count = data_start && !start_q && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_q <= 1'b0;
      busy    <= 1'b0;
      count   <= '0;
    end else begin
      start_q <= data_start;
      if (start_count) begin
        busy  <= 1'b1;
        count <= '0;
      end else if (busy) begin
        if (count == CNT_W'(LAST_CNT)) busy <= 1'b0;
        else                           count <= count + 1'b1;
      end
    end
  end

  assign stream_valid = busy && (count < CNT_W'(16));
  assign stream_sync  = stream_valid && (count[2:0] == 3'd0);
  assign stream_sel   = count[3:0];

  assign tw_pos   = 4'(count - CNT_W'(FFT8_LAT));
  assign tw_apply = busy && (count >= CNT_W'(FFT8_LAT)) && tw_pos[3];
  assign tw_idx   = bitrev3(tw_pos[2:0]);

  assign done = busy && (count == CNT_W'(LAST_CNT));

endmodule
