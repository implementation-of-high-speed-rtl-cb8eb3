// tb_ctrl_counter: checks the master controller's decode, cycle by cycle.
//
// After each accepted rising edge of data_start the expected control values
// for counts 0..27 are derived here from the schedule (stream during 0..15
// with sync at 0 and 8; multiplier twiddles during 10..25, applied to the
// second 8 results with index bitrev(position); done at 27) and compared with
// the outputs. Also checked: one start_count pulse per rising edge, a level
// held high does not restart, an edge while busy is ignored, and a new edge
// right after done is accepted.
module tb_ctrl_counter;
  import fft16_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, data_start = 1'b0;
  logic start_count, busy, stream_valid, stream_sync, tw_apply, done;
  logic [4:0] count;
  logic [3:0] stream_sel;
  logic [2:0] tw_idx;

  int checks = 0, failures = 0;

  ctrl_counter dut (.*);

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

  // Raise data_start at a negative edge; follow the transform to its end.
  task automatic transform(input int hold, input int busy_edge_at);
    int starts = 0;
    data_start = 1'b1;
    #1;
    check(start_count === 1'b1, "start_count on rising edge");
    @(negedge clk);
    for (int c = 0; c <= 27; c++) begin
      int p;
      bit sv, ta;
      if (c + 1 >= hold) data_start = (c == busy_edge_at);
      #1;
      if (start_count) starts++;
      sv = (c < 16);
      p  = c - 10;
      ta = (c >= 10) && (c <= 25) && (p >= 8);
      check(busy === 1'b1 && count == 5'(c), $sformatf("count %0d busy %0d at %0d", count, busy, c));
      check(stream_valid == sv, $sformatf("stream_valid at %0d", c));
      check(stream_sync == (sv && (c % 8 == 0)), $sformatf("stream_sync at %0d", c));
      if (sv) check(stream_sel == 4'(c), $sformatf("stream_sel at %0d", c));
      check(tw_apply == ta, $sformatf("tw_apply at %0d", c));
      if (ta) check(tw_idx == bitrev3(3'(p - 8)), $sformatf("tw_idx at %0d", c));
      check(done == (c == 27), $sformatf("done at %0d", c));
      @(negedge clk);
    end
    check(starts == 0, "no restart while busy");
    check(busy === 1'b0, "idle after done");
    data_start = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(busy === 1'b0 && done === 1'b0, "idle after reset");
    transform(1, -1);
    @(negedge clk);
    transform(6, -1);              // level held for several clocks
    transform(1, 12);              // back to back, edge while busy
    // One edge, then the level stays high: one transform only.
    data_start = 1'b1;
    @(negedge clk);
    check(busy === 1'b1, "started by the edge");
    repeat (40) begin
      #1;
      check(start_count === 1'b0, "no start without a rising edge");
      @(negedge clk);
    end
    check(busy === 1'b0, "single transform for a held level");
    data_start = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
