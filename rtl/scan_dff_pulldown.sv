// Scan flip-flop with a pull-down parked functional output.
//
// A 2:1 multiplexer picks the functional data d (se=0) or the scan data sd
// (se=1) into a positive-edge flip-flop. The stored bit always drives the
// scan output sq toward the next cell of the scan chain. The functional
// output q passes through a transmission gate that conducts only while se=0;
// while se=1 the gate is open and a pull-down transistor (gate driven by the
// scan enable) holds q at 0. During the scan shift the combinational logic
// behind q therefore sees a constant 0 and does not switch.
//
// Interface: clk, d, sd, se in; q, sq out (the pin names of the pull-down
// cell). Timing: the flip-flop loads on the rising edge of clk; q reacts
// combinationally to se, being 0 as soon as se is high and the stored bit as
// soon as se is low.
//
// Follows the pull-down cell: the mux, the flip-flop, SQ taken before the
// gate, the transmission gate and the pull-down. The three gating transistors
// are written as their logic function. There is no reset: the cell has none,
// and the stored bit is undefined until it is loaded.
module scan_dff_pulldown (
  input  logic clk,
  input  logic d,
  input  logic sd,
  input  logic se,
  output logic q,
  output logic sq
);

  logic din;
  logic state;

  always_comb din = se ? sd : d;

  always_ff @(posedge clk) state <= din;

  assign sq = state;

  // Transmission gate closed (se=0): q follows the flip-flop.
  // Transmission gate open (se=1): the pull-down holds q at 0.
  always_comb q = se ? 1'b0 : state;

endmodule
