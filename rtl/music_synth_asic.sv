// Single-channel music synthesizer chip.
//
// The chip turns a stream of 8-bit count words, one per sixteenth note,
// into a square wave for a speaker. For each note the controller loads the
// word N into the frequency counter and counts it up to zero once per
// 100 kHz toggle clock, flipping the output at each wrap, which gives a
// tone of 100 kHz / (2 x (256 - N)). A note slot ends at the next note
// clock CN (every 10 Hz edge at fast tempo, every fourth at slow tempo);
// the controller then clears the note-timing logic and steps the external
// song address. Rests (word 20 hex) and implicit rests (endnote bit set and
// about 80 % of the slot gone) hold the output low while the controller
// keeps running.
//
// Structure, as in the original: controller, CT latch, tempo generator,
// shared duration counter, and one channel (frequency counter, implicit
// rest latch, rest gate).
//
// Pins: clk stands for the two-phase PHI1/PHI2 clock; this design uses one
// rising-edge clock, which must run at least about 8 times faster than the
// 100 kHz CLK3 so that the controller never misses a toggle-clock edge.
// initial_i is INITIAL (synchronous reset), tempo_i TEMPO, clk1_i the
// 10 Hz note clock, clk2_i the 100 Hz duration clock, clk3_i the 100 kHz
// toggle clock, in_i the Count Map word IN10..IN17, out_o the channel
// output OUT0, addr_o the address select field {ADDR2, ADDR1}.
module music_synth_asic
  import music_synth_pkg::*;
#(
  parameter int unsigned FAST_TAP_BIT = 3,  // duration bit ending a fast note
  parameter int unsigned SLOW_DIV     = 4   // CLK1 edges per slow note
) (
  input  logic             clk,
  input  logic             initial_i,
  input  logic             tempo_i,
  input  logic             clk1_i,
  input  logic             clk2_i,
  input  logic             clk3_i,
  input  logic [CNT_W-1:0] in_i,
  output logic             out_o,
  output logic [1:0]       addr_o
);

  ctrl_t             ctrl;
  state_t            state;
  logic              load, count;
  logic              ct, cn, chzero;
  logic [DUR_W-1:0]  dur;
  logic              detect;
  logic              irest, rest;
  logic [CNT_W-1:0]  cnt_q;

  controller_fsm u_fsm (
    .clk       (clk),
    .initial_i (initial_i),
    .ct_i      (ct),
    .cn_i      (cn),
    .chzero_i  (chzero),
    .ctrl_o    (ctrl),
    .load_o    (load),
    .count_o   (count),
    .state_o   (state)
  );

  ct_latch u_ct (
    .clk      (clk),
    .clk3_i   (clk3_i),
    .clrt_n_i (ctrl.clrt_n),
    .ct_o     (ct)
  );

  tempo_gen #(.SLOW_DIV(SLOW_DIV)) u_tempo (
    .clk      (clk),
    .clk1_i   (clk1_i),
    .tempo_i  (tempo_i),
    .clrn_n_i (ctrl.clrn_n),
    .cn_o     (cn)
  );

  duration_counter #(.WIDTH(DUR_W)) u_dur (
    .clk      (clk),
    .clk2_i   (clk2_i),
    .clrn_n_i (ctrl.clrn_n),
    .dur_o    (dur),
    .detect_o (detect)
  );

  channel_proc u_ch0 (
    .clk        (clk),
    .in_i       (in_i),
    .load_i     (load),
    .count_i    (count),
    .chtoggle_i (ctrl.chtoggle),
    .clrn_n_i   (ctrl.clrn_n),
    .tempo_i    (tempo_i),
    .fast_tap_i (dur[FAST_TAP_BIT]),
    .detect_i   (detect),
    .chzero_o   (chzero),
    .irest_o    (irest),
    .rest_o     (rest),
    .out_o      (out_o),
    .count_q_o  (cnt_q)
  );

  assign addr_o = ctrl.addr;

endmodule
