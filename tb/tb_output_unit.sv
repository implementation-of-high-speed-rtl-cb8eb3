// tb_output_unit: checks the output register bank.
//
// Pairs are written at random indices s in FFT and IFFT mode; afterwards
// word s must hold the sum and word s + 8 the difference, with real and
// imaginary parts swapped in IFFT mode. data_out_valid must rise the clock
// after done and fall on clear, and the bank must not change without wr_en.
module tb_output_unit;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, mode = 1'b0, wr_en = 1'b0, done = 1'b0;
  logic [2:0] wr_idx = '0;
  logic signed [20:0] sum_re = '0, sum_im = '0, dif_re = '0, dif_im = '0;
  logic signed [20:0] data_out_re [16];
  logic signed [20:0] data_out_im [16];
  logic data_out_valid;

  int checks = 0, failures = 0;

  output_unit #(.W(21)) dut (.*);

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

  logic signed [20:0] e_re [16], e_im [16];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(data_out_valid === 1'b0, "invalid after reset");
    for (int t = 0; t < 30; t++) begin
      bit inv;
      inv = t[0];
      clear = 1'b1; mode = inv;
      @(negedge clk);
      clear = 1'b0;
      check(data_out_valid === 1'b0, "clear lowers valid");
      for (int i = 0; i < 8; i++) begin
        int s;
        s = (i * 5 + t) % 8;          // a permutation of 0..7
        sum_re = 21'($urandom); sum_im = 21'($urandom);
        dif_re = 21'($urandom); dif_im = 21'($urandom);
        e_re[s]     = inv ? sum_im : sum_re;
        e_im[s]     = inv ? sum_re : sum_im;
        e_re[s + 8] = inv ? dif_im : dif_re;
        e_im[s + 8] = inv ? dif_re : dif_im;
        wr_en = 1'b1; wr_idx = 3'(s); done = (i == 7);
        @(negedge clk);
        check(data_out_valid === (i == 7), "valid after done");
      end
      wr_en = 1'b0; done = 1'b0;
      sum_re = '0; sum_im = '0; dif_re = '0; dif_im = '0;
      repeat (2) @(negedge clk);
      check(data_out_valid === 1'b1, "valid holds");
      for (int k = 0; k < 16; k++) begin
        check(data_out_re[k] == e_re[k], $sformatf("word %0d re", k));
        check(data_out_im[k] == e_im[k], $sformatf("word %0d im", k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
