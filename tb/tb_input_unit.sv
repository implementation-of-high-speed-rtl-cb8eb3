// tb_input_unit: checks the input register bank.
//
// Random data are loaded in FFT and IFFT mode; for every sel = 8l + m the
// output must be word B(2m + l), with real and imaginary parts swapped in
// IFFT mode. The bank must hold its contents while load is low, even when
// the inputs change, and mode_q must follow the mode at the last load.
module tb_input_unit;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, mode = 1'b0;
  logic signed [15:0] din_re [16];
  logic signed [15:0] din_im [16];
  logic [3:0] sel = '0;
  logic signed [15:0] out_re, out_im;
  logic mode_q;

  int checks = 0, failures = 0;

  input_unit #(.W(16)) dut (.*);

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

  logic signed [15:0] ref_re [16];
  logic signed [15:0] ref_im [16];

  initial begin
    for (int n = 0; n < 16; n++) begin din_re[n] = '0; din_im[n] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      bit inv;
      inv = t[0];
      for (int n = 0; n < 16; n++) begin
        din_re[n] = 16'($urandom);
        din_im[n] = 16'($urandom);
        ref_re[n] = din_re[n];
        ref_im[n] = din_im[n];
      end
      mode = inv;
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      // Disturb the inputs: the bank must not follow.
      for (int n = 0; n < 16; n++) begin din_re[n] = 16'($urandom); din_im[n] = 16'($urandom); end
      mode = ~inv;
      @(negedge clk);
      check(mode_q == inv, "mode_q");
      for (int i = 0; i < 16; i++) begin
        int n;
        n = 2 * (i % 8) + i / 8;
        sel = 4'(i);
        #1;
        check(out_re == (inv ? ref_im[n] : ref_re[n]), $sformatf("sel %0d re", i));
        check(out_im == (inv ? ref_re[n] : ref_im[n]), $sformatf("sel %0d im", i));
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
