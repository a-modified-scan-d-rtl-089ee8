// Low-leakage scan boundary: a scan chain of output-parked flip-flops and
// the sequencer that runs test-per-scan on it.
//
// The flip-flops of the chain drive the inputs of a block of combinational
// logic through func_q and take its outputs back through func_d; that logic
// lives outside this module. In functional mode (test_mode low) the
// flip-flops are plain registers: func_q is their content and every rising
// clock loads func_d. In test mode the sequencer shifts CHAIN_LEN bits in
// from scan_in (and the previous response out on scan_out), then gives one
// capture clock, and repeats, one pattern every CHAIN_LEN+1 clocks. During
// every shift clock func_q is held at PARK_PATTERN by the pull-up and
// pull-down output gating of the cells, so the logic does not switch and
// rests in the input state chosen for the least leakage.
//
// Interface: scan_in is sampled on every rising edge with se high; bit k of
// a load (k = 0 first) ends in cell CHAIN_LEN-1-k. scan_out shows cell
// CHAIN_LEN-1, so during a load it gives the previous response, cell
// CHAIN_LEN-1 first. se and capture report the sequencer's phase: the tester
// drives scan_in from them and reads scan_out on each shift clock.
//
// The chain, its cells and the m+1 period follow the technique; the single
// chain, the port set and the default sizes (see the chain and the
// sequencer) are this design's choices.
module lowleak_scan_top #(
  parameter int unsigned          CHAIN_LEN    = 207,
  parameter logic [CHAIN_LEN-1:0] PARK_PATTERN = '0,
  localparam int unsigned CW = (CHAIN_LEN > 1) ? $clog2(CHAIN_LEN) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 test_mode,
  input  logic                 scan_in,
  output logic                 scan_out,
  output logic                 se,
  output logic                 capture,
  output logic [CW-1:0]        shift_idx,
  input  logic [CHAIN_LEN-1:0] func_d,
  output logic [CHAIN_LEN-1:0] func_q
);

  scan_test_sequencer #(
    .CHAIN_LEN (CHAIN_LEN)
  ) u_seq (
    .clk       (clk),
    .rst_n     (rst_n),
    .test_mode (test_mode),
    .se        (se),
    .capture   (capture),
    .shift_idx (shift_idx)
  );

  lowleak_scan_chain #(
    .CHAIN_LEN    (CHAIN_LEN),
    .PARK_PATTERN (PARK_PATTERN)
  ) u_chain (
    .clk      (clk),
    .se       (se),
    .scan_in  (scan_in),
    .d        (func_d),
    .q        (func_q),
    .scan_out (scan_out)
  );

endmodule
