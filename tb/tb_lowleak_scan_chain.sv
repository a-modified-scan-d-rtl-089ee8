// Self-checking testbench for lowleak_scan_chain.
//
// Uses an 8-bit chain with a mixed park pattern (both pull-up and pull-down
// cells). Each of 40 rounds shifts a random 8-bit vector in while checking,
// before and after every shift edge, that q equals the park pattern and that
// scan_out shows the cell the testbench's own shift-register copy says it
// should (the previous round's captured response). It then drops se and
// checks that q shows the loaded vector in the same cycle, applies random
// capture data on d, clocks once, and checks the capture on the next unload.
// Any change of q between shift clocks is counted as a failure.
module tb_lowleak_scan_chain;

  localparam int unsigned N = 8;
  localparam logic [N-1:0] PARK = 8'b1011_0010;

  logic         clk;
  logic         se, scan_in, scan_out;
  logic [N-1:0] d, q;
  logic [N-1:0] model;
  logic         model_valid = 1'b0;
  int checks = 0, failures = 0, q_toggles = 0, captures = 0;

  lowleak_scan_chain #(.CHAIN_LEN(N), .PARK_PATTERN(PARK)) dut (
    .clk(clk), .se(se), .scan_in(scan_in), .d(d), .q(q), .scan_out(scan_out)
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  task automatic check_vec(input logic [N-1:0] got, input logic [N-1:0] exp,
                           input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    logic [N-1:0] pat;
    logic [N-1:0] q_prev;
    se = 1'b0; scan_in = 1'b0; d = '0;
    for (int r = 0; r < 40; r++) begin
      pat = N'($urandom);
      @(negedge clk);
      se = 1'b1;
      #1 q_prev = q;
      for (int k = 0; k < int'(N); k++) begin
        scan_in = pat[k];
        d = N'($urandom);  // must be ignored while shifting
        #1;
        check_vec(q, PARK, "q parked before shift edge");
        if (model_valid) check_vec(N'(scan_out), N'(model[N-1]), "scan_out");
        if (q !== q_prev) q_toggles++;
        @(posedge clk);
        model = {model[N-2:0], pat[k]};
        #1;
        check_vec(q, PARK, "q parked after shift edge");
        if (q !== q_prev) q_toggles++;
        q_prev = q;
        @(negedge clk);
      end
      model_valid = 1'b1;
      // Loaded: cell i holds pat[N-1-i].
      check_vec(model, {<<{pat}}, "model self-check");
      se = 1'b0;
      #1 check_vec(q, model, "q shows loaded pattern when se falls");
      d = N'($urandom);
      @(posedge clk);
      model = d;
      captures++;
      #1 check_vec(q, d, "q after capture");
    end
    checks++;
    if (q_toggles != 0) begin
      failures++;
      $display("FAIL q changed %0d times during shift", q_toggles);
    end
    $display("captures=%0d", captures);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
