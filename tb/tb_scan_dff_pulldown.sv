// Self-checking testbench for scan_dff_pulldown.
//
// Drives d, sd and se with random values for 400 clocks and keeps its own
// copy of the stored bit (last clock's se ? sd : d). After every edge it
// checks sq against that copy, and q against the parked 0 while se is high or the copy
// while se is low. It also checks that q does not change at all across runs
// of consecutive shift clocks, and that the output switches back to the
// stored bit in the same cycle se falls (no clock between). A watchdog ends
// the run as a failure if it hangs.
module tb_scan_dff_pulldown;

  localparam logic PARK = 1'b0;

  logic clk;
  logic d, sd, se, q, sq;
  logic model;
  int   checks = 0;
  int   failures = 0;
  int   park_cycles = 0;
  int   q_toggles_in_shift = 0;

  scan_dff_pulldown dut (.clk(clk), .d(d), .sd(sd), .se(se), .q(q), .sq(sq));

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    logic prev_q;
    logic prev_se;
    d = 0; sd = 0; se = 0;
    // Load a known bit first.
    @(negedge clk); d = 1'b0; se = 1'b0;
    @(posedge clk); model = 1'b0;
    prev_se = 1'b0;
    prev_q  = 1'b0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      d  = 1'($urandom);
      sd = 1'($urandom);
      se = ($urandom % 3) != 0;  // mostly shifting
      #1;
      // Before the edge: q depends only on se and the stored bit.
      check(q, se ? PARK : model, "q before edge");
      check(sq, model, "sq before edge");
      @(posedge clk);
      model = se ? sd : d;
      #1;
      check(sq, model, "sq after edge");
      check(q, se ? PARK : model, "q after edge");
      if (se) begin
        park_cycles++;
        if (prev_se && q !== prev_q) q_toggles_in_shift++;
      end
      prev_se = se;
      prev_q  = q;
    end
    checks++;
    if (q_toggles_in_shift != 0) begin
      failures++;
      $display("FAIL q toggled %0d times during shift", q_toggles_in_shift);
    end
    checks++;
    if (park_cycles == 0) begin
      failures++;
      $display("FAIL shift never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
