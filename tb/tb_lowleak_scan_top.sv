// End-to-end testbench for lowleak_scan_top.
//
// A small combinational block modelled in the testbench closes the loop:
// func_d[i] = q[i] ^ (q[i+1] & ~q[i+2]) (indices modulo the chain length).
// The testbench keeps its own copy of the chain contents and runs:
//   1. test mode: scan-loads random patterns, one capture after each load,
//      while unloading and checking the previous response on scan_out;
//   2. a switch to functional mode, where the registers iterate the logic
//      from the last captured state and func_q is checked every clock;
//   3. a switch back to test mode and a final load/capture/unload.
// On every shift clock func_q must equal the park pattern and the modelled
// logic must see no input change. Every mechanism of the design is counted
// and must occur at least once: shift clocks, captures, the pattern period
// of CHAIN_LEN+1 clocks, pull-up parking (a cell storing 0 shows 1) and
// pull-down parking (a cell storing 1 shows 0) where the pattern has such
// cells, functional clocks and both mode switches.
module tb_lowleak_scan_top;

  localparam int unsigned N = 6;
  localparam logic [N-1:0] PARK = 6'b110100;
  localparam int NPAT = 12;
  localparam int CW = (N > 1) ? $clog2(N) : 1;

  logic          clk, rst_n, test_mode, scan_in, scan_out, se, capture;
  logic [CW-1:0] shift_idx;
  logic [N-1:0]  func_d, func_q;

  lowleak_scan_top #(.CHAIN_LEN(N), .PARK_PATTERN(PARK)) dut (
    .clk(clk), .rst_n(rst_n), .test_mode(test_mode),
    .scan_in(scan_in), .scan_out(scan_out), .se(se), .capture(capture),
    .shift_idx(shift_idx), .func_d(func_d), .func_q(func_q)
  );

  function automatic logic [N-1:0] logic_fn(input logic [N-1:0] x);
    logic [N-1:0] y;
    for (int i = 0; i < int'(N); i++)
      y[i] = x[i] ^ (x[(i + 1) % N] & ~x[(i + 2) % N]);
    return y;
  endfunction

  function automatic logic [N-1:0] rand_vec();
    logic [N-1:0] v;
    for (int i = 0; i < int'(N); i++) v[i] = 1'($urandom);
    return v;
  endfunction

  always_comb func_d = logic_fn(func_q);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_shift = 0, n_capture = 0, n_period_ok = 0, n_pullup_park = 0;
  int n_pulldown_park = 0, n_functional = 0, n_to_func = 0, n_to_test = 0;
  int n_unload_bits = 0, cut_toggles_in_shift = 0;

  task automatic check(input logic [N-1:0] got, input logic [N-1:0] exp,
                       input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  task automatic need(input int count, input string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("  %-24s %0d", what, count);
    end
  endtask

  logic [N-1:0] model;       // expected chain contents
  logic         unload_ok;   // model holds a captured response to unload
  logic [N-1:0] pat;
  logic [N-1:0] q_prev;
  logic         prev_se;
  int           cyc, last_cap;

  // Runs test mode for npat patterns. Each iteration of the loop is one
  // clock, driven at the falling edge and checked around the rising edge.
  task automatic run_test(input int npat);
    int done = 0;
    test_mode = 1'b1;
    // The clock that samples test_mode still has se low: a functional load.
    @(posedge clk);
    model = logic_fn(model);
    @(negedge clk);  // the sequencer is in its first shift clock here
    while (done < npat) begin
      if (se) begin
        if (shift_idx == '0) pat = rand_vec();
        scan_in = pat[shift_idx];
        #1;
        check(func_q, PARK, "func_q parked during shift");
        if (prev_se && func_q !== q_prev) cut_toggles_in_shift++;
        for (int i = 0; i < int'(N); i++) begin
          if (PARK[i] && !model[i]) n_pullup_park++;
          if (!PARK[i] && model[i]) n_pulldown_park++;
        end
        if (unload_ok) begin
          check(N'(scan_out), N'(model[N-1]), "scan_out unload bit");
          n_unload_bits++;
        end
        @(posedge clk);
        model = {model[N-2:0], scan_in};
        n_shift++;
        q_prev = func_q;
      end else if (capture) begin
        #1;
        check(func_q, model, "func_q shows loaded pattern in capture");
        if (last_cap >= 0) begin
          checks++;
          if (cyc - last_cap != int'(N) + 1) begin
            failures++;
            $display("FAIL pattern period %0d", cyc - last_cap);
          end else n_period_ok++;
        end
        last_cap = cyc;
        @(posedge clk);
        model = logic_fn(model);
        unload_ok = 1'b1;
        n_capture++;
        done++;
      end else begin
        checks++; failures++;
        $display("FAIL neither shift nor capture in test mode at %0t", $time);
        @(posedge clk);
      end
      prev_se = se;
      @(negedge clk);
      cyc++;
    end
  endtask

  initial begin
    rst_n = 1'b0; test_mode = 1'b0; scan_in = 1'b0;
    unload_ok = 1'b0; prev_se = 1'b0; cyc = 0; last_cap = -1;
    model = '0; q_prev = '0; pat = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // Phase 1: test mode.
    run_test(NPAT);
    // Phase 2: functional mode from the last captured state.
    n_to_func++;
    test_mode = 1'b0;
    @(posedge clk);   // still the first shift clock of the next load
    model = {model[N-2:0], scan_in};
    @(negedge clk);
    checks++;
    if (se !== 1'b0) begin failures++; $display("FAIL se high in functional mode"); end
    unload_ok = 1'b0;
    for (int c = 0; c < 20; c++) begin
      #1 check(func_q, model, "func_q in functional mode");
      check(N'(se), '0, "se low in functional mode");
      @(posedge clk);
      model = logic_fn(model);
      n_functional++;
      @(negedge clk);
    end
    // Phase 3: back to test mode, load, capture and unload once more.
    n_to_test++;
    last_cap = -1;
    unload_ok = 1'b1;  // the functional state is shifted out first
    run_test(2);
    checks++;
    if (cut_toggles_in_shift != 0) begin
      failures++;
      $display("FAIL logic inputs changed %0d times during shift", cut_toggles_in_shift);
    end
    $display("Mechanisms exercised:");
    need(n_shift, "shift clocks");
    need(n_capture, "captures");
    need(n_period_ok, "m+1 pattern periods");
    need(n_unload_bits, "unloaded response bits");
    if (|PARK) need(n_pullup_park, "pull-up parks");
    if (!(&PARK)) need(n_pulldown_park, "pull-down parks");
    need(n_functional, "functional clocks");
    need(n_to_func, "test->functional switch");
    need(n_to_test, "functional->test switch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400 + 2 * (NPAT + 4) * (N + 1)) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
