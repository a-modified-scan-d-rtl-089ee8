// Self-checking testbench for scan_test_sequencer.
//
// Uses a 5-bit chain length. Checks that after reset se and capture are low
// in functional mode, that with test_mode high the outputs repeat exactly
// five shift clocks (shift_idx 0..4) and one capture clock, so consecutive
// capture clocks are CHAIN_LEN+1 = 6 clocks apart, and that dropping
// test_mode in the middle of a load returns to functional mode at the next
// edge. The expected phase comes from a counter kept by the testbench.
module tb_scan_test_sequencer;

  localparam int unsigned N = 5;

  logic clk, rst_n, test_mode, se, capture;
  logic [2:0] shift_idx;
  int checks = 0, failures = 0;
  int captures = 0, last_capture = -1, cyc = 0;

  scan_test_sequencer #(.CHAIN_LEN(N)) dut (
    .clk(clk), .rst_n(rst_n), .test_mode(test_mode),
    .se(se), .capture(capture), .shift_idx(shift_idx)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    rst_n = 1'b0; test_mode = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (3) begin
      @(negedge clk);
      check(int'(se), 0, "se in functional mode");
      check(int'(capture), 0, "capture in functional mode");
    end
    test_mode = 1'b1;
    // 4 full periods: position p = 0..N-1 shift, p = N capture.
    for (int p = 0; p < 4 * int'(N + 1); p++) begin
      @(negedge clk);
      cyc++;
      if ((p % int'(N + 1)) < int'(N)) begin
        check(int'(se), 1, "se in shift");
        check(int'(capture), 0, "capture in shift");
        check(int'(shift_idx), p % int'(N + 1), "shift_idx");
      end else begin
        check(int'(se), 0, "se in capture");
        check(int'(capture), 1, "capture flag");
        if (last_capture >= 0) check(cyc - last_capture, int'(N) + 1, "pattern period");
        last_capture = cyc;
        captures++;
      end
    end
    check(captures, 4, "capture count");
    // Abort in the middle of a load.
    @(negedge clk); @(negedge clk);
    check(int'(se), 1, "se before abort");
    test_mode = 1'b0;
    @(negedge clk);
    check(int'(se), 0, "se after abort");
    check(int'(capture), 0, "capture after abort");
    // Restart: a fresh load starts at shift_idx 0.
    test_mode = 1'b1;
    @(negedge clk);
    check(int'(se), 1, "se after restart");
    check(int'(shift_idx), 0, "shift_idx after restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
