// Scan chain of output-parked flip-flops that holds the combinational logic
// at a chosen low-leakage input pattern during scan shift.
//
// Each of the CHAIN_LEN cells is a mux-D scan flip-flop whose functional
// output is disconnected and tied to a constant while se=1. Bit i of
// PARK_PATTERN selects the cell type: a 1 places a pull-up cell (q parks at
// 1), a 0 a pull-down cell (q parks at 0). While the chain shifts, q equals
// PARK_PATTERN exactly, so the logic it feeds neither switches nor sits in an
// arbitrary leakage state; PARK_PATTERN is meant to be the input vector found
// to give the logic its least leakage.
//
// Interface: d[i] is the functional/capture input of cell i (normally the
// logic's output), q[i] its parked functional output (the logic's input).
// The chain runs scan_in -> cell 0 -> cell 1 -> ... -> cell CHAIN_LEN-1 ->
// scan_out, so after CHAIN_LEN shift clocks the first bit shifted in sits in
// cell CHAIN_LEN-1. Timing: one bit per rising clock edge while se=1; with
// se=0 each cell loads d[i]. q follows se without a clock. An immediate
// assertion checks in simulation that q equals PARK_PATTERN whenever se=1.
//
// The per-bit choice between the two cell types follows the described use of
// the cells. The chain order, the widths and the default sizes are this
// design's choices: CHAIN_LEN=207 is the largest input count among the
// benchmark circuits evaluated for this technique, and the default pattern
// of all zeros parks like a conventional gated scan cell until a better
// pattern is chosen for the logic at hand.
module lowleak_scan_chain #(
  parameter int unsigned              CHAIN_LEN    = 207,
  parameter logic [CHAIN_LEN-1:0]     PARK_PATTERN = '0
) (
  input  logic                 clk,
  input  logic                 se,
  input  logic                 scan_in,
  input  logic [CHAIN_LEN-1:0] d,
  output logic [CHAIN_LEN-1:0] q,
  output logic                 scan_out
);

  // sdi[i] is the scan input of cell i; sdi[CHAIN_LEN] is the chain output.
  logic [CHAIN_LEN:0] sdi;

  assign sdi[0] = scan_in;

  for (genvar i = 0; i < CHAIN_LEN; i++) begin : g_cell
    if (PARK_PATTERN[i]) begin : g_pullup
      scan_dff_pullup u_ff (
        .clk (clk),
        .d   (d[i]),
        .sd  (sdi[i]),
        .se  (se),
        .q   (q[i]),
        .sq  (sdi[i+1])
      );
    end else begin : g_pulldown
      scan_dff_pulldown u_ff (
        .clk (clk),
        .d   (d[i]),
        .sd  (sdi[i]),
        .se  (se),
        .q   (q[i]),
        .sq  (sdi[i+1])
      );
    end
  end

  assign scan_out = sdi[CHAIN_LEN];

  // While shifting, the logic behind q must see exactly the park pattern.
  always_comb begin
    if (se) assert (q == PARK_PATTERN)
      else $error("scan chain: q %b differs from park pattern while shifting", q);
  end

endmodule
