// Implicit rest generator: silences a note near the end of its time slot.
//
// Each song entry lasts a sixteenth note. If its endnote bit is set, the
// channel is silenced once most of the slot has passed, so that a run of
// entries sounds as separate notes; with the bit clear the tone runs on
// into the next entry and several entries form one long note. The decision
// is a sum of products of the duration counter taps:
//   fast tempo (TEMPO=1): endnote AND duration bit 3 (8 x 10 ms = 80 ms of
//                         a 100 ms slot)
//   slow tempo (TEMPO=0): endnote AND DETECT (31 x 10 ms of a 400 ms slot)
// and is latched as IREST until the controller's active-low CLRN clears it
// at the next note. The gating and latch follow the original circuit. The
// latch sets while the product is high rather than on its rising edge;
// both are the same here because the taps are low right after a clear.
//
// Timing: irest_o rises one clk edge after the product goes high and falls
// on the first clk edge with clrn_n_i low.
module implicit_rest_gen (
  input  logic clk,
  input  logic tempo_i,     // TEMPO: 1 fast, 0 slow
  input  logic endnote_i,   // endnote bit, LSB of the channel input
  input  logic fast_tap_i,  // duration counter tap for the fast tempo
  input  logic detect_i,    // duration counter all-ones (slow tempo tap)
  input  logic clrn_n_i,    // CLRN, active low clear
  output logic irest_o      // IREST
);

  logic set;

  assign set = endnote_i & (tempo_i ? fast_tap_i : detect_i);

  always_ff @(posedge clk) begin
    if (!clrn_n_i) irest_o <= 1'b0;
    else if (set)  irest_o <= 1'b1;
  end

endmodule
