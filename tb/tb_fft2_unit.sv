// tb_fft2_unit: checks the second FFT unit's 2-point butterflies.
//
// Each frame streams 8 first-set words (in_set = 0) and then 8 second-set
// words (in_set = 1), with in_sync on the first word of each block, in runs
// that are sometimes back to back and sometimes interrupted by idle clocks.
// For the second-set word at position p, one clock later the unit must give
// out_idx = bitrev(p), sum = Y0(p) + Z(p) and difference = Y0(p) - Z(p),
// exactly; nothing may come out for first-set words.
module tb_fft2_unit;
  import fft16_pkg::bitrev3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_sync = 1'b0, in_set = 1'b0;
  logic signed [19:0] in_re = '0, in_im = '0;
  logic out_valid;
  logic [2:0] out_idx;
  logic signed [20:0] out_sum_re, out_sum_im, out_dif_re, out_dif_im;

  int checks = 0, failures = 0, n_out = 0;

  fft2_unit #(.W(20)) dut (.*);

  always #5 clk = ~clk;

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

  logic signed [19:0] y_re [8], y_im [8];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int f = 0; f < 50; f++) begin
      for (int p = 0; p < 8; p++) begin
        y_re[p] = (f == 0) ? 20'sd524287 : 20'($urandom);
        y_im[p] = (f == 0) ? -20'sd524288 : 20'($urandom);
        in_valid = 1'b1; in_set = 1'b0; in_sync = (p == 0);
        in_re = y_re[p]; in_im = y_im[p];
        @(negedge clk);
        check(out_valid === 1'b0, "no output for the first set");
        if (f % 5 == 2 && p == 3) begin
          in_valid = 1'b0;
          repeat (2) @(negedge clk);
        end
      end
      for (int p = 0; p < 8; p++) begin
        logic signed [19:0] zr, zi;
        zr = (f == 0) ? 20'sd524287 : 20'($urandom);
        zi = (f == 0) ? 20'sd524287 : 20'($urandom);
        in_valid = 1'b1; in_set = 1'b1; in_sync = (p == 0);
        in_re = zr; in_im = zi;
        @(negedge clk);
        n_out++;
        check(out_valid === 1'b1, "output valid");
        check(out_idx == bitrev3(3'(p)), "out_idx");
        check(out_sum_re == 21'(y_re[p]) + 21'(zr), "sum re");
        check(out_sum_im == 21'(y_im[p]) + 21'(zi), "sum im");
        check(out_dif_re == 21'(y_re[p]) - 21'(zr), "dif re");
        check(out_dif_im == 21'(y_im[p]) - 21'(zi), "dif im");
      end
      in_valid = 1'b0; in_sync = 1'b0;
      if (f % 3 == 1) repeat (4) @(negedge clk);
    end
    @(negedge clk);
    check(out_valid === 1'b0, "quiet when idle");
    check(n_out == 400, "result count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
