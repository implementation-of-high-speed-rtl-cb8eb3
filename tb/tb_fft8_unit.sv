// tb_fft8_unit: checks the streaming 8-point FFT against a floating-point
// 8-point DFT.
//
// Blocks of 8 samples are streamed in, some back to back, some with idle
// clocks between them. Each result block is taken from the output stream
// (bit-reversed order, starting at out_sync) and compared with the DFT
// within 4 LSB. The test also checks that out_sync follows in_sync by
// exactly 10 clocks and that out_valid covers 8 clocks per block.
module tb_fft8_unit;
  import fft16_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam int NBLK = 30;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_sync = 1'b0;
  logic signed [15:0] in_re = '0, in_im = '0;
  logic out_valid, out_sync;
  logic signed [19:0] out_re, out_im;

  int checks = 0, failures = 0;
  int cyc = 0;
  int sync_in_t [$];
  logic signed [15:0] blk_re [NBLK][8];
  logic signed [15:0] blk_im [NBLK][8];
  int rx_blk = 0, rx_pos = 0, n_valid = 0;
  real max_err = 0.0;

  fft8_unit #(.IN_W(16), .W(20)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Output side: sampled at the negative edge.
  always @(negedge clk) if (rst_n) begin
    if (out_valid) n_valid++;
    if (out_sync) begin
      int t0;
      t0 = sync_in_t.pop_front();
      check(cyc - t0 == FFT8_LAT, $sformatf("sync latency %0d", cyc - t0));
      rx_pos = 0;
    end
    if (out_valid && rx_blk < NBLK) begin
      int k;
      real er, ei, th, d;
      er = 0.0;
      ei = 0.0;
      check(out_sync == (rx_pos == 0), "out_sync position");
      k = int'(bitrev3(3'(rx_pos)));
      for (int n = 0; n < 8; n++) begin
        th = 2.0 * PI * real'(n * k) / 8.0;
        er += real'(blk_re[rx_blk][n]) * $cos(th) + real'(blk_im[rx_blk][n]) * $sin(th);
        ei += real'(blk_im[rx_blk][n]) * $cos(th) - real'(blk_re[rx_blk][n]) * $sin(th);
      end
      d = real'(out_re) - er; if (d < 0) d = -d; if (d > max_err) max_err = d;
      check(d <= 4.0, $sformatf("blk %0d X(%0d).re %0d vs %f", rx_blk, k, out_re, er));
      d = real'(out_im) - ei; if (d < 0) d = -d; if (d > max_err) max_err = d;
      check(d <= 4.0, $sformatf("blk %0d X(%0d).im %0d vs %f", rx_blk, k, out_im, ei));
      rx_pos++;
      if (rx_pos == 8) rx_blk++;
    end
  end

  initial begin
    for (int b = 0; b < NBLK; b++)
      for (int n = 0; n < 8; n++) begin
        case (b)
          0: begin blk_re[b][n] = (n == 0) ? 16'sd100 : '0; blk_im[b][n] = '0; end
          1: begin blk_re[b][n] = 16'sd500; blk_im[b][n] = -16'sd200; end
          2: begin blk_re[b][n] = -16'sd32768; blk_im[b][n] = -16'sd32768; end
          3: begin blk_re[b][n] = n[0] ? -16'sd32768 : 16'sd32767;
                   blk_im[b][n] = n[1] ? 16'sd32767 : -16'sd32768; end
          default: begin blk_re[b][n] = 16'($urandom); blk_im[b][n] = 16'($urandom); end
        endcase
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int b = 0; b < NBLK; b++) begin
      for (int n = 0; n < 8; n++) begin
        in_valid = 1'b1;
        in_sync  = (n == 0);
        in_re    = blk_re[b][n];
        in_im    = blk_im[b][n];
        if (n == 0) sync_in_t.push_back(cyc);
        @(negedge clk);
      end
      in_valid = 1'b0; in_sync = 1'b0;
      if (b % 4 == 1) repeat (3) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    check(rx_blk == NBLK, $sformatf("received %0d blocks", rx_blk));
    check(n_valid == 8 * NBLK, $sformatf("out_valid for %0d clocks", n_valid));
    $display("largest deviation: %f LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
