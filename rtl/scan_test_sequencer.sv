// Scan-enable sequencer for test-per-scan.
//
// While test_mode is high the sequencer repeats a period of CHAIN_LEN+1
// clocks: CHAIN_LEN clocks with se=1, which shift a whole new pattern into
// the chain (and the previous response out of it), then one clock with se=0,
// in which the loaded pattern reaches the combinational logic and the rising
// edge at its end captures the logic's response. One pattern is thus applied
// every m+1 clocks for an m-bit chain. While test_mode is low, se stays 0 and
// the flip-flops work as the functional registers of the design.
//
// Interface: test_mode is sampled on each rising clock edge; dropping it ends
// the test at the next edge, whatever the phase. se is the chain's scan
// enable. capture is high for the capture clock. shift_idx counts the shift
// clocks of the current load from 0 to CHAIN_LEN-1. rst_n is an asynchronous
// active-low reset into the functional phase. All outputs come from
// registers. Assertions state that a capture clock is followed by a fresh
// load and that se and capture are never high together.
//
// The m+1 period follows the description of test-per-scan; the phase
// machine, the reset and the test_mode handshake are this design's choices.
module scan_test_sequencer
  import lowleak_scan_pkg::*;
#(
  parameter int unsigned CHAIN_LEN = 207,
  localparam int unsigned CW = (CHAIN_LEN > 1) ? $clog2(CHAIN_LEN) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          test_mode,
  output logic          se,
  output logic          capture,
  output logic [CW-1:0] shift_idx
);

  seq_phase_e phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= SEQ_FUNCTIONAL;
      shift_idx <= '0;
    end else if (!test_mode) begin
      phase     <= SEQ_FUNCTIONAL;
      shift_idx <= '0;
    end else begin
      unique case (phase)
        SEQ_FUNCTIONAL, SEQ_CAPTURE: begin
          phase     <= SEQ_SHIFT;
          shift_idx <= '0;
        end
        SEQ_SHIFT: begin
          if (shift_idx == CW'(CHAIN_LEN - 1)) begin
            phase     <= SEQ_CAPTURE;
            shift_idx <= '0;
          end else begin
            shift_idx <= shift_idx + 1'b1;
          end
        end
        default: begin
          phase     <= SEQ_FUNCTIONAL;
          shift_idx <= '0;
        end
      endcase
    end
  end

  assign se      = (phase == SEQ_SHIFT);
  assign capture = (phase == SEQ_CAPTURE);

  // A capture clock always follows exactly CHAIN_LEN shift clocks.
  property p_capture_after_full_load;
    @(posedge clk) (capture && test_mode) |=> se && (shift_idx == '0);
  endproperty
  a_capture_after_full_load: assert property (p_capture_after_full_load);
  a_se_capture_exclusive: assert property (@(posedge clk) !(se && capture));

endmodule
