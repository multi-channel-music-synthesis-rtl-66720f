// One channel of the synthesizer: the block meant to be repeated per voice.
//
// It holds everything that belongs to a single voice: the frequency
// counter that measures each half period, the implicit rest latch that
// ends a note early when its endnote bit is set, and the output gate that
// silences rests. The controller, the CT latch, the tempo generator and the
// duration counter are outside and could be shared by several channels.
// The grouping follows the original, which shipped with one channel.
//
// Interface: in_i is the 8-bit Count Map word (LSB = endnote). load_i and
// count_i come from the controller (state being entered), chtoggle_i and
// clrn_n_i from its present state. fast_tap_i and detect_i come from the
// duration counter. chzero_o goes back to the controller and out_o to the
// output pin. Timing is that of the blocks inside.
module channel_proc
  import music_synth_pkg::*;
(
  input  logic             clk,
  input  logic [CNT_W-1:0] in_i,
  input  logic             load_i,
  input  logic             count_i,
  input  logic             chtoggle_i,
  input  logic             clrn_n_i,
  input  logic             tempo_i,
  input  logic             fast_tap_i,
  input  logic             detect_i,
  output logic             chzero_o,
  output logic             irest_o,
  output logic             rest_o,
  output logic             out_o,
  output logic [CNT_W-1:0] count_q_o
);

  freq_counter #(.WIDTH(CNT_W)) u_cnt (
    .clk      (clk),
    .load_i   (load_i),
    .count_i  (count_i),
    .d_i      (in_i),
    .q_o      (count_q_o),
    .chzero_o (chzero_o)
  );

  implicit_rest_gen u_irest (
    .clk        (clk),
    .tempo_i    (tempo_i),
    .endnote_i  (in_i[0]),
    .fast_tap_i (fast_tap_i),
    .detect_i   (detect_i),
    .clrn_n_i   (clrn_n_i),
    .irest_o    (irest_o)
  );

  rest_gen u_rest (
    .in_i       (in_i),
    .irest_i    (irest_o),
    .chtoggle_i (chtoggle_i),
    .rest_o     (rest_o),
    .out_o      (out_o)
  );

endmodule
