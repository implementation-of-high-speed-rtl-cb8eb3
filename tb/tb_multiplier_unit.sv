// tb_multiplier_unit: checks the twiddle multiplier against floating-point
// rotations by W16^s = exp(-j 2 pi s / 16).
//
// Random words stream through with random tw_apply and tw_idx; one clock
// later the output must equal the input (tw_apply = 0) or the rotated input
// within 1 LSB plus the twiddle quantisation, 2^-15 of |re| + |im| (tw_apply = 1), and valid, sync and set must follow with
// one clock of latency.
module tb_multiplier_unit;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_sync = 1'b0, tw_apply = 1'b0;
  logic [2:0] tw_idx = '0;
  logic signed [19:0] in_re = '0, in_im = '0;
  logic out_valid, out_sync, out_set;
  logic signed [19:0] out_re, out_im;

  int checks = 0, failures = 0;
  real max_err = 0.0;

  multiplier_unit #(.W(20)) dut (.*);

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

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      logic signed [19:0] a, b;
      bit ap, v, sy;
      logic [2:0] s;
      real er, ei, d, th;
      // Components up to 2^18 in magnitude, the range an 8-point result
      // can reach.
      a  = 20'($signed(19'($urandom)));
      b  = 20'($signed(19'($urandom)));
      ap = $urandom_range(0, 1);
      s  = 3'($urandom);
      v  = $urandom_range(0, 3) != 0;
      sy = $urandom_range(0, 1);
      in_re = a; in_im = b; tw_apply = ap; tw_idx = s; in_valid = v; in_sync = sy;
      @(negedge clk);
      check(out_valid == v && out_sync == sy && out_set == ap, "sideband");
      if (!ap) begin
        check(out_re == a && out_im == b, "pass-through");
      end else begin
        th = 2.0 * PI * real'(s) / 16.0;
        er = real'(a) * $cos(th) + real'(b) * $sin(th);
        ei = real'(b) * $cos(th) - real'(a) * $sin(th);
        d = real'(out_re) - er; if (d < 0) d = -d; if (d > max_err) max_err = d;
        check(d <= 1.0 + 3.1e-5 * (real'(a) * (a < 0 ? -1.0 : 1.0) + real'(b) * (b < 0 ? -1.0 : 1.0)),
              $sformatf("re s=%0d: %0d vs %f", s, out_re, er));
        d = real'(out_im) - ei; if (d < 0) d = -d; if (d > max_err) max_err = d;
        check(d <= 1.0 + 3.1e-5 * (real'(a) * (a < 0 ? -1.0 : 1.0) + real'(b) * (b < 0 ? -1.0 : 1.0)),
              $sformatf("im s=%0d: %0d vs %f", s, out_im, ei));
      end
    end
    $display("largest deviation: %f LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
