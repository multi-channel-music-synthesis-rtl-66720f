// Synchronizer and rising-edge detector for one slow external clock.
//
// The chip receives three slow clocks from the external decade counters
// (100 kHz, 100 Hz, 10 Hz). The original used them to clock latch
// flip-flops directly; this design samples each of them with two
// flip-flops on the chip clock and emits a one-clock pulse for every
// rising edge instead, so that all logic runs on one clock. This is the
// design's own choice, not part of the original circuit.
//
// Timing: edge_o goes high after the second rising clk edge that samples
// ext_i high and stays high for one clk cycle. ext_i must stay high and
// low for at least two clk periods each.
module ext_clk_sync (
  input  logic clk,
  input  logic ext_i,
  output logic edge_o
);

  logic [2:0] sync_q;

  always_ff @(posedge clk) sync_q <= {sync_q[1:0], ext_i};

  assign edge_o = sync_q[1] & ~sync_q[2];

endmodule
