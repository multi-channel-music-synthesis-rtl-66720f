// Shared types and constants of the single-channel music synthesizer.
//
// The controller is an 11-state Moore machine. Its outputs are grouped in
// ctrl_t so that the state decode is written once and reused both for the
// outputs of the present state and for the counter strobes of the state
// being entered (see controller_fsm). The active-low clears CLRN and CLRT
// keep their original polarity: 0 clears.
//
// Address select codes (ADDR2,ADDR1) follow the controller program: 3 in the
// start-up state, 2 while a note plays, then 0 followed by 1 at a note change.
// Their meaning for the external address counter (clear / remove clear or
// hold / increment) is this design's reading, given in music_synth_system.
package music_synth_pkg;

  // Frequency counter width and the constants of the channel data word.
  localparam int unsigned CNT_W    = 8;
  localparam int unsigned DUR_W    = 5;
  // Count Map word of a rest: only bit 5 set (20 hex).
  localparam logic [CNT_W-1:0] REST_WORD = 8'h20;

  typedef enum logic [3:0] {
    S0  = 4'd0,   // start-up: address counter held clear, wait for CN
    S1  = 4'd1,   // remove clear, clear CN latch
    S2  = 4'd2,   // low half: load count, wait for CT
    S3  = 4'd3,   // low half: count, test zero
    S4  = 4'd4,   // high half: load count, wait for CT
    S5  = 4'd5,   // high half: count, test zero
    S6  = 4'd6,   // end of period: test CN (note expired?)
    S7  = 4'd7,   // note change: clear, address code 0
    S8  = 4'd8,   // note change: address code 1 (increment)
    S9  = 4'd9,   // low half: wait for CT
    S10 = 4'd10   // high half: wait for CT
  } state_t;

  typedef struct packed {
    logic [1:0] addr;      // {ADDR2, ADDR1}
    logic       load;      // LOAD: parallel-load the frequency counter
    logic       count;     // COUNT: increment the frequency counter
    logic       chtoggle;  // CHTOGGLE: channel square wave before gating
    logic       clrn_n;    // CLRN: 0 clears CN, tempo, duration, IREST
    logic       clrt_n;    // CLRT: 0 clears the CT latch
  } ctrl_t;

  // Outputs of each state, and of INITIAL, as given by the controller program.
  function automatic ctrl_t state_outputs(input state_t s, input logic initial_i);
    ctrl_t c;
    if (initial_i) begin
      c = '{addr: 2'd3, load: 1'b0, count: 1'b0, chtoggle: 1'b0, clrn_n: 1'b0, clrt_n: 1'b0};
    end else begin
      unique case (s)
        S0:  c = '{addr: 2'd3, load: 1'b0, count: 1'b0, chtoggle: 1'b0, clrn_n: 1'b1, clrt_n: 1'b0};
        S1:  c = '{addr: 2'd2, load: 1'b0, count: 1'b0, chtoggle: 1'b0, clrn_n: 1'b0, clrt_n: 1'b0};
        S2:  c = '{addr: 2'd2, load: 1'b1, count: 1'b0, chtoggle: 1'b0, clrn_n: 1'b1, clrt_n: 1'b1};
        S3:  c = '{addr: 2'd2, load: 1'b0, count: 1'b1, chtoggle: 1'b0, clrn_n: 1'b1, clrt_n: 1'b0};
        S4:  c = '{addr: 2'd2, load: 1'b1, count: 1'b0, chtoggle: 1'b1, clrn_n: 1'b1, clrt_n: 1'b1};
        S5:  c = '{addr: 2'd2, load: 1'b0, count: 1'b1, chtoggle: 1'b1, clrn_n: 1'b1, clrt_n: 1'b0};
        S6:  c = '{addr: 2'd2, load: 1'b0, count: 1'b0, chtoggle: 1'b1, clrn_n: 1'b1, clrt_n: 1'b0};
        S7:  c = '{addr: 2'd0, load: 1'b0, count: 1'b0, chtoggle: 1'b1, clrn_n: 1'b0, clrt_n: 1'b0};
        S8:  c = '{addr: 2'd1, load: 1'b0, count: 1'b0, chtoggle: 1'b1, clrn_n: 1'b0, clrt_n: 1'b0};
        S9:  c = '{addr: 2'd2, load: 1'b0, count: 1'b0, chtoggle: 1'b0, clrn_n: 1'b1, clrt_n: 1'b1};
        S10: c = '{addr: 2'd2, load: 1'b0, count: 1'b0, chtoggle: 1'b1, clrn_n: 1'b1, clrt_n: 1'b1};
        default: c = '{addr: 2'd3, load: 1'b0, count: 1'b0, chtoggle: 1'b0, clrn_n: 1'b0, clrt_n: 1'b0};
      endcase
    end
    return c;
  endfunction

endpackage
