// Controller of the music synthesizer channel.
//
// An 11-state Moore machine that runs the square-wave generator. After
// INITIAL it holds the external song address cleared (S0) until the first
// note clock CN, removes the clear (S1), and then alternates two half
// periods: in S2/S9/S3 the output CHTOGGLE is low, in S4/S10/S5 it is high.
// Each half period loads the channel's count word, then increments the
// frequency counter once per toggle-clock event CT until the counter wraps
// to zero (CHZERO), at which point the other half starts. At the end of
// every full period (S6) the controller checks CN: if the note time has
// run out it clears the note-timing logic (CLRN low in S7, S8) and pulses
// the address select field (code 0 then 1) to step to the next note.
// The controller knows nothing of rests; those only gate the output.
//
// The state table, the output values of every state and the INITIAL
// override follow the original controller program exactly.
//
// Interface and timing: one clock clk (the chip's phase clock, here a
// single rising edge). initial_i is a synchronous reset: while it is high
// the outputs take the INITIAL values and the next state is S0. ct_i, cn_i
// and chzero_i are sampled on every rising edge. ctrl_o holds the Moore
// outputs of the present state. load_o and count_o are the LOAD and COUNT
// values of the state being entered: the frequency counter acts on them at
// the same edge that enters that state, so a count shows up in CHZERO
// while the counting state (S3 or S5) is present, as in the original where
// the counter was clocked by the rising COUNT line. This one-edge look-ahead
// is this design's choice to fit a single synchronous clock.
module controller_fsm
  import music_synth_pkg::*;
(
  input  logic   clk,
  input  logic   initial_i,   // INITIAL pin: synchronous reset to S0
  input  logic   ct_i,        // CT latch: a 100 kHz toggle-clock edge occurred
  input  logic   cn_i,        // CN latch: the note time has expired
  input  logic   chzero_i,    // frequency counter is zero
  output ctrl_t  ctrl_o,      // outputs of the present state
  output logic   load_o,      // LOAD of the state being entered
  output logic   count_o,     // COUNT of the state being entered
  output state_t state_o
);

  state_t state, next;

  always_comb begin
    next = state;
    if (initial_i) begin
      next = S0;
    end else begin
      unique case (state)
        S0:  next = cn_i     ? S1 : S0;
        S1:  next = S2;
        S2:  next = ct_i     ? S3 : S2;
        S3:  next = chzero_i ? S4 : S9;
        S4:  next = ct_i     ? S5 : S4;
        S5:  next = chzero_i ? S6 : S10;
        S6:  next = cn_i     ? S7 : S2;
        S7:  next = S8;
        S8:  next = S2;
        S9:  next = ct_i     ? S3 : S9;
        S10: next = ct_i     ? S5 : S10;
        default: next = S0;
      endcase
    end
  end

  always_ff @(posedge clk) state <= next;

  ctrl_t nctrl;
  always_comb begin
    ctrl_o  = state_outputs(state, initial_i);
    nctrl   = state_outputs(next, 1'b0);
    load_o  = nctrl.load;
    count_o = nctrl.count;
  end

  assign state_o = state;

  // The counter is never loaded and counted in the same clock.
  a_load_count_excl: assert property (@(posedge clk) !(load_o && count_o));
  // The counting states last exactly one clock.
  a_s3_one_cycle: assert property (@(posedge clk) disable iff (initial_i)
                                   (state == S3) |=> (state != S3));
  a_s5_one_cycle: assert property (@(posedge clk) disable iff (initial_i)
                                   (state == S5) |=> (state != S5));

endmodule
