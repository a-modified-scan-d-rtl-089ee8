// Workload testbench: parking the ISCAS-85 C17 benchmark at its
// least-leakage input vector.
//
// C17 is six two-input NAND gates with five inputs (N1 N2 N3 N6 N7) and two
// outputs (N22 N23):
//   N10 = NAND(N1,N3)   N11 = NAND(N3,N6)   N16 = NAND(N2,N11)
//   N19 = NAND(N11,N7)  N22 = NAND(N10,N16) N23 = NAND(N16,N19)
// The NAND2 leakage per input state is 0.93, 10.5, 3.96 and 61.7 nW for AB =
// 00, 01, 10, 11, where A is the first input listed above. A constant
// function walks all 32 input vectors, sums the gate leakages and picks the
// least-leakage vector; that vector becomes the PARK_PATTERN of a 5-cell
// lowleak_scan_chain whose q outputs drive C17 (cell 0 -> N1, 1 -> N2,
// 2 -> N3, 3 -> N6, 4 -> N7).
//
// The run scan-loads 30 random patterns with one capture each (cell 0
// captures N22, cell 1 captures N23, cells 2-4 recapture their own q). It
// checks that on every shift clock C17 sees exactly the parked vector, that
// no C17 net switches during shift, that the leakage while shifting is the
// minimum, and that each unloaded response matches a C17 model evaluated on
// the loaded pattern. For comparison it counts how many C17 net transitions
// an ungated scan chain would have caused during the same shifts, and prints
// the leakage of the all-zero parking of gated flip-flops without a choice
// of value.
module tb_c17_park_workload;

  localparam int unsigned N = 5;

  // Leakage per NAND2 input state, in units of 0.01 nW.
  function automatic int nand_leak(input logic a, input logic b);
    case ({a, b})
      2'b00:   return 93;
      2'b01:   return 1050;
      2'b10:   return 396;
      default: return 6170;
    endcase
  endfunction

  // Returns {N23, N22, N19, N16, N11, N10} for inputs x = {N7,N6,N3,N2,N1}.
  function automatic logic [5:0] c17_nets(input logic [N-1:0] x);
    logic n1, n2, n3, n6, n7, n10, n11, n16, n19, n22, n23;
    {n7, n6, n3, n2, n1} = x;
    n10 = ~(n1 & n3);
    n11 = ~(n3 & n6);
    n16 = ~(n2 & n11);
    n19 = ~(n11 & n7);
    n22 = ~(n10 & n16);
    n23 = ~(n16 & n19);
    return {n23, n22, n19, n16, n11, n10};
  endfunction

  function automatic int c17_leak(input logic [N-1:0] x);
    logic [5:0] g;
    logic n1, n2, n3, n6, n7;
    {n7, n6, n3, n2, n1} = x;
    g = c17_nets(x);
    return nand_leak(n1, n3) + nand_leak(n3, n6) + nand_leak(n2, g[1]) +
           nand_leak(g[1], n7) + nand_leak(g[0], g[2]) + nand_leak(g[2], g[3]);
  endfunction

  function automatic logic [N-1:0] best_vector();
    int best = 0;
    int best_leak = c17_leak('0);
    for (int p = 1; p < (1 << N); p++) begin
      if (c17_leak(N'(p)) < best_leak) begin
        best_leak = c17_leak(N'(p));
        best = p;
      end
    end
    return N'(best);
  endfunction

  localparam logic [N-1:0] PARK = best_vector();

  logic         clk, se, scan_in, scan_out;
  logic [N-1:0] d, q;
  logic [5:0]   nets;
  logic [N-1:0] model;

  lowleak_scan_chain #(.CHAIN_LEN(N), .PARK_PATTERN(PARK)) dut (
    .clk(clk), .se(se), .scan_in(scan_in), .d(d), .q(q), .scan_out(scan_out)
  );

  always_comb nets = c17_nets(q);
  always_comb d = {q[4:2], nets[5], nets[4]};

  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int gated_toggles = 0, ungated_toggles = 0, shifts = 0, unloads = 0;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    logic [N-1:0] pat, q_prev, model_prev;
    logic [5:0]   nets_prev;
    int min_leak;
    logic valid;
    min_leak = c17_leak(PARK);
    for (int p = 0; p < (1 << N); p++) begin
      checks++;
      if (c17_leak(N'(p)) < min_leak) begin
        failures++;
        $display("FAIL vector %b leaks less than the park vector", N'(p));
      end
    end
    $display("park vector {N7,N6,N3,N2,N1} = %b", PARK);
    $display("C17 leakage parked at that vector: %0d.%02d nW", min_leak / 100, min_leak % 100);
    $display("C17 leakage parked at all zeros:   %0d.%02d nW", c17_leak('0) / 100,
             c17_leak('0) % 100);
    se = 1'b0; scan_in = 1'b0; valid = 1'b0; model = '0;
    @(negedge clk);
    for (int r = 0; r < 30; r++) begin
      for (int k = 0; k < N; k++) pat[k] = 1'($urandom);
      se = 1'b1;
      #1;
      q_prev = q; nets_prev = nets;
      for (int k = 0; k < int'(N); k++) begin
        scan_in = pat[k];
        #1;
        check(int'(q), int'(PARK), "C17 inputs parked");
        check(c17_leak(q), min_leak, "leakage while shifting");
        if (valid) check(int'(scan_out), int'(model[N-1]), "unloaded response bit");
        model_prev = model;
        @(posedge clk);
        model = {model[N-2:0], pat[k]};
        shifts++;
        #1;
        gated_toggles += $countones(nets ^ nets_prev) + $countones(q ^ q_prev);
        // An ungated chain would drive C17 straight from the shifting cells.
        ungated_toggles += $countones(c17_nets(model) ^ c17_nets(model_prev)) +
                           $countones(model ^ model_prev);
        q_prev = q; nets_prev = nets;
        @(negedge clk);
      end
      se = 1'b0;
      #1 check(int'(q), int'(model), "loaded pattern reaches C17");
      @(posedge clk);
      model = {model[4:2], c17_nets(model)[5], c17_nets(model)[4]};
      valid = 1'b1;
      unloads++;
      @(negedge clk);
    end
    check(gated_toggles, 0, "C17 net transitions during shift");
    checks++;
    if (ungated_toggles == 0) begin
      failures++;
      $display("FAIL comparison never switched");
    end
    $display("shift clocks %0d: C17 net transitions %0d gated, %0d ungated",
             shifts, gated_toggles, ungated_toggles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
