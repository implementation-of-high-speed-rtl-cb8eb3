// tb_fft16_top: end-to-end test of the 16-point FFT/IFFT processor at its
// default parameters.
//
// Each transform is checked against a DFT computed here in floating point
// (X(k) = sum_n x(n) e^(-/+ j 2 pi n k / 16)), within a tolerance that covers
// the rounding of the fixed-point constants. Stimuli: impulses, DC, single
// tones, full-scale extremes and random data, in FFT and IFFT mode. The test
// also checks the latency (28 clocks from the edge that sees the rising edge
// of data_start to data_out_valid), and makes each control mechanism happen
// and counts it: FFT mode, IFFT mode (real/imaginary swap), data_start held
// high for several clocks, a rising edge of data_start during a running
// transform (ignored), and back-to-back transforms. Finally it runs OFDM
// round trips: IFFT, division by 16, FFT, which must return the symbols.
module tb_fft16_top;
  import fft16_pkg::*;

  localparam int LATENCY = LAST_CNT + 1;   // 28
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic data_start = 1'b0;
  logic mode = 1'b0;
  logic signed [DATA_W-1:0]   din_re  [16];
  logic signed [DATA_W-1:0]   din_im  [16];
  logic signed [DATA_W+4:0]   dout_re [16];
  logic signed [DATA_W+4:0]   dout_im [16];
  logic data_out_valid, busy;

  int checks = 0, failures = 0;
  int n_fft = 0, n_ifft = 0, n_hold = 0, n_busy_edge = 0, n_b2b = 0, n_round = 0;
  real max_err = 0.0;

  fft16_top dut (
    .clk, .rst_n, .data_start, .mode,
    .data_in_re(din_re), .data_in_im(din_im),
    .data_out_re(dout_re), .data_out_im(dout_im),
    .data_out_valid, .busy
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Compare the output bank with a floating-point DFT of x.
  task automatic compare(input logic signed [DATA_W-1:0] xr [16],
                         input logic signed [DATA_W-1:0] xi [16],
                         input bit inv, input real tol);
    for (int k = 0; k < 16; k++) begin
      real er = 0.0, ei = 0.0, th, d;
      for (int n = 0; n < 16; n++) begin
        th = 2.0 * PI * real'(n * k) / 16.0;
        if (!inv) begin
          er += real'(xr[n]) * $cos(th) + real'(xi[n]) * $sin(th);
          ei += real'(xi[n]) * $cos(th) - real'(xr[n]) * $sin(th);
        end else begin
          er += real'(xr[n]) * $cos(th) - real'(xi[n]) * $sin(th);
          ei += real'(xi[n]) * $cos(th) + real'(xr[n]) * $sin(th);
        end
      end
      d = real'(dout_re[k]) - er; if (d < 0) d = -d;
      if (d > max_err) max_err = d;
      check(d <= tol, $sformatf("X(%0d).re = %0d, expected %f", k, dout_re[k], er));
      d = real'(dout_im[k]) - ei; if (d < 0) d = -d;
      if (d > max_err) max_err = d;
      check(d <= tol, $sformatf("X(%0d).im = %0d, expected %f", k, dout_im[k], ei));
    end
  endtask

  // One transform: present the data, raise data_start for `hold` clocks,
  // optionally pulse data_start again while busy, wait for the result.
  task automatic run(input logic signed [DATA_W-1:0] xr [16],
                     input logic signed [DATA_W-1:0] xi [16],
                     input bit inv, input int hold, input bit edge_while_busy,
                     input bit immediate);
    int k;
    // immediate: start on the clock right after the previous results became
    // valid, the shortest repeat period (LATENCY + 1 clocks).
    if (!immediate) @(negedge clk);
    din_re = xr;
    din_im = xi;
    mode = inv;
    data_start = 1'b1;
    @(negedge clk);                        // capture edge has passed
    check(busy === 1'b1, "busy after start");
    check(data_out_valid === 1'b0, "valid cleared at start");
    // The inputs may change once captured.
    for (int n = 0; n < 16; n++) begin din_re[n] = '0; din_im[n] = '0; end
    mode = ~inv;
    k = 0;
    while (!data_out_valid && k < 100) begin
      if (k + 1 >= hold) data_start = 1'b0;
      if (edge_while_busy && k == 5) data_start = 1'b0;
      if (edge_while_busy && k == 6) begin data_start = 1'b1; n_busy_edge++; end
      if (edge_while_busy && k == 8) data_start = 1'b0;
      @(negedge clk);
      k++;
    end
    data_start = 1'b0;
    check(k == LATENCY, $sformatf("latency %0d, expected %0d", k, LATENCY));
    check(busy === 1'b0, "idle when results are valid");
    if (hold > 1) n_hold++;
    if (inv) n_ifft++; else n_fft++;
    compare(xr, xi, inv, 8.0);
  endtask

  logic signed [DATA_W-1:0] xr [16];
  logic signed [DATA_W-1:0] xi [16];

  initial begin
    for (int n = 0; n < 16; n++) begin din_re[n] = '0; din_im[n] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // Impulse at n = 0: a flat spectrum.
    for (int n = 0; n < 16; n++) begin xr[n] = '0; xi[n] = '0; end
    xr[0] = 16'sd1000; xi[0] = -16'sd300;
    run(xr, xi, 1'b0, 1, 1'b0, 1'b0);
    // Impulse at n = 5, IFFT mode.
    for (int n = 0; n < 16; n++) begin xr[n] = '0; xi[n] = '0; end
    xr[5] = 16'sd2000; xi[5] = 16'sd700;
    run(xr, xi, 1'b1, 3, 1'b0, 1'b0);
    // DC.
    for (int n = 0; n < 16; n++) begin xr[n] = 16'sd1234; xi[n] = -16'sd77; end
    run(xr, xi, 1'b0, 4, 1'b0, 1'b0);
    // Complex tones, bin 3 and bin 13.
    for (int n = 0; n < 16; n++) begin
      xr[n] = DATA_W'($rtoi(8000.0 * $cos(2.0 * PI * 3.0 * n / 16.0)));
      xi[n] = DATA_W'($rtoi(8000.0 * $sin(2.0 * PI * 3.0 * n / 16.0)));
    end
    run(xr, xi, 1'b0, 2, 1'b1, 1'b0);
    for (int n = 0; n < 16; n++) begin
      xr[n] = DATA_W'($rtoi(8000.0 * $cos(2.0 * PI * 13.0 * n / 16.0)));
      xi[n] = DATA_W'($rtoi(-8000.0 * $sin(2.0 * PI * 13.0 * n / 16.0)));
    end
    run(xr, xi, 1'b1, 1, 1'b0, 1'b0);
    // Full-scale extremes.
    for (int n = 0; n < 16; n++) begin xr[n] = -16'sd32768; xi[n] = -16'sd32768; end
    run(xr, xi, 1'b0, 1, 1'b0, 1'b0);
    for (int n = 0; n < 16; n++) begin
      xr[n] = (n % 2 == 0) ? 16'sd32767 : -16'sd32768;
      xi[n] = ((n / 2) % 2 == 0) ? -16'sd32768 : 16'sd32767;
    end
    run(xr, xi, 1'b0, 1, 1'b0, 1'b0);
    // Random data, FFT and IFFT, half of them started back to back.
    for (int t = 0; t < 40; t++) begin
      for (int n = 0; n < 16; n++) begin
        xr[n] = DATA_W'($urandom);
        xi[n] = DATA_W'($urandom);
      end
      run(xr, xi, t[0], 1 + (t % 3), (t % 7) == 3, t > 0 && t[1]);
      if (t > 0 && t[1]) n_b2b++;
    end

    // OFDM round trip: an IFFT (transmit side), the result divided by 16,
    // then an FFT (receive side) must give back the original symbols.
    for (int t = 0; t < 10; t++) begin
      logic signed [DATA_W-1:0] sr [16];
      logic signed [DATA_W-1:0] si [16];
      int err, worst;
      for (int n = 0; n < 16; n++) begin
        sr[n] = DATA_W'($signed($urandom_range(0, 8000)) - 4000);
        si[n] = DATA_W'($signed($urandom_range(0, 8000)) - 4000);
      end
      run(sr, si, 1'b1, 1, 1'b0, 1'b0);
      for (int n = 0; n < 16; n++) begin
        xr[n] = DATA_W'((dout_re[n] + 21'sd8) >>> 4);
        xi[n] = DATA_W'((dout_im[n] + 21'sd8) >>> 4);
      end
      run(xr, xi, 1'b0, 1, 1'b0, 1'b0);
      worst = 0;
      for (int k = 0; k < 16; k++) begin
        err = int'(dout_re[k]) - int'(sr[k]); if (err < 0) err = -err; if (err > worst) worst = err;
        err = int'(dout_im[k]) - int'(si[k]); if (err < 0) err = -err; if (err > worst) worst = err;
      end
      // The division by 16 loses up to 0.5 LSB per word, at most 16 * 0.5 * sqrt(2)
      // after the FFT, plus the rounding of the two transforms.
      check(worst <= 16, $sformatf("round trip deviates by %0d", worst));
      n_round++;
    end

    check(n_fft > 0,       "FFT mode never exercised");
    check(n_round > 0,     "no IFFT/FFT round trip");
    check(n_ifft > 0,      "IFFT mode never exercised");
    check(n_hold > 0,      "data_start never held high");
    check(n_busy_edge > 0, "no start edge while busy");
    check(n_b2b > 0,       "no back-to-back transforms");
    $display("mechanisms: fft=%0d ifft=%0d held_start=%0d edge_while_busy=%0d back_to_back=%0d round_trip=%0d",
             n_fft, n_ifft, n_hold, n_busy_edge, n_b2b, n_round);
    $display("largest deviation from the floating-point DFT: %f LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
