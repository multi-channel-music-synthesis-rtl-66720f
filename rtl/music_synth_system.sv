// Music synthesis system: the chip together with its Count Map.
//
// The song memory holds one 6-bit entry per sixteenth note. The external
// address counter, driven by the chip's address select field, walks
// through it; each entry addresses the Count Map, whose 8-bit word is the
// chip's channel input. Four external decade counters divide a 100 kHz
// oscillator to 100 Hz and 10 Hz. The song memory, the address counter and
// the decade counters are standard parts, so they connect through the
// ports of this module: song_entry_i comes from the song memory, addr_o
// drives the address counter, and clk1_i/clk2_i/clk3_i come from the
// decade counters (10 Hz, 100 Hz) and the oscillator (100 kHz).
//
// The address select codes {ADDR2, ADDR1} are read here as: 3 = hold the
// address counter clear (start-up), 2 = run/hold, 0 then 1 = increment
// (one step per 0-to-1 sequence at a note change). The codes are those of
// the original controller; what each means to the counter is this
// design's reading.
//
// Timing: see music_synth_asic. The Count Map is combinational, so the
// word follows song_entry_i within the same clk cycle.
module music_synth_system
  import music_synth_pkg::*;
(
  input  logic       clk,           // chip clock (stands for PHI1/PHI2)
  input  logic       initial_i,     // INITIAL
  input  logic       tempo_i,       // TEMPO: 1 fast, 0 slow
  input  logic       clk1_i,        // 10 Hz note clock
  input  logic       clk2_i,        // 100 Hz duration clock
  input  logic       clk3_i,        // 100 kHz toggle clock
  input  logic [5:0] song_entry_i,  // {note code, endnote} from the song memory
  output logic [1:0] addr_o,        // address select {ADDR2, ADDR1}
  output logic [7:0] map_word_o,    // Count Map output (chip input pins)
  output logic       out_o          // square wave to the line driver
);

  count_map u_map (
    .addr_i (song_entry_i),
    .word_o (map_word_o)
  );

  music_synth_asic u_asic (
    .clk       (clk),
    .initial_i (initial_i),
    .tempo_i   (tempo_i),
    .clk1_i    (clk1_i),
    .clk2_i    (clk2_i),
    .clk3_i    (clk3_i),
    .in_i      (map_word_o),
    .out_o     (out_o),
    .addr_o    (addr_o)
  );

endmodule
