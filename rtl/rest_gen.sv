// Rest generator: the output gate of a channel.
//
// The controller toggles CHTOGGLE at the note frequency whether or not a
// note should sound. This block forces the channel output low in two
// cases: an explicit rest, recognised from the channel input word (the
// Count Map word of a rest is 20 hex), and an implicit rest (IREST). The
// rest decode looks only at bits 7..4 (bit 5 high, bits 7, 6 and 4 low),
// as in the original; no note word matches that pattern because every note
// word has bit 7 or bit 6 set.
//
// Purely combinational: out_o = CHTOGGLE AND NOT (REST OR IREST).
module rest_gen (
  input  logic [7:0] in_i,        // channel input word from the Count Map
  input  logic       irest_i,     // IREST
  input  logic       chtoggle_i,  // CHTOGGLE from the controller
  output logic       rest_o,      // REST
  output logic       out_o        // channel output to the speaker driver
);

  assign rest_o = in_i[5] & ~in_i[7] & ~in_i[6] & ~in_i[4];
  assign out_o  = chtoggle_i & ~(rest_o | irest_i);

endmodule
