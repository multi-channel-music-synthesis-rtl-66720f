// Testbench of music_synth_asic.
//
// Runs the chip in real time with its real clock ratios: a 1 MHz chip
// clock (one time unit = 0.1 us), the 100 kHz toggle clock, the 100 Hz
// duration clock and the 10 Hz note clock. A small address counter and a
// word table in the testbench stand for the song memory and Count Map. The
// song checks:
//   - start-up: address held clear (code 3) until the first note clock;
//   - every full period of the output is 2 x (256 - N) toggle-clock
//     periods, for several words N;
//   - note slots last 100 ms at fast tempo and 400 ms at slow tempo;
//   - a rest word gives no output edges;
//   - a word with its endnote bit set falls silent after the fast tap
//     (8 duration edges) or the slow tap (31 edges) and stays silent to the
//     end of the slot; a word without it sounds to the end of the slot.
module tb_music_synth_asic;
  localparam longint T_CLK = 10;            // 1 us
  localparam longint T_CT  = 10 * T_CLK;    // 100 kHz
  localparam longint T_DUR = 10000 * T_CLK; // 100 Hz
  localparam longint T_NC  = 100000 * T_CLK; // 10 Hz

  logic       clk = 1'b0, clk1 = 1'b0, clk2 = 1'b0, clk3 = 1'b0;
  logic       initial_i, tempo;
  logic [7:0] in_w;
  logic       out;
  logic [1:0] addr;
  int         checks = 0, failures = 0;

  music_synth_asic dut (.clk(clk), .initial_i(initial_i), .tempo_i(tempo), .clk1_i(clk1),
                        .clk2_i(clk2), .clk3_i(clk3), .in_i(in_w), .out_o(out), .addr_o(addr));

  always #(T_CLK / 2) clk = ~clk;
  // The slow clocks start with an offset so that they are not in phase.
  initial begin #3; forever #(T_CT / 2) clk3 = ~clk3; end
  initial begin #17; forever #(T_DUR / 2) clk2 = ~clk2; end
  initial begin #(T_NC / 4); forever #(T_NC / 2) clk1 = ~clk1; end

  // Song: words and tempo of each slot.
  localparam int NOTES = 9;
  localparam logic [7:0] SONG  [NOTES] = '{8'hF0, 8'h9E, 8'h9F, 8'h20, 8'h40, 8'h41, 8'hCF, 8'h8D, 8'h8C};
  localparam logic       TEMPO [NOTES] = '{1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b0, 1'b0};

  // Address counter standing in for the external one.
  int unsigned idx;
  always_ff @(posedge clk) begin
    if (addr == 2'd3)      idx <= 0;
    else if (addr == 2'd1) idx <= idx + 1;
  end
  assign in_w = SONG[idx < NOTES ? idx : NOTES - 1];
  always_comb tempo = TEMPO[idx < NOTES ? idx : NOTES - 1];

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s", $time, msg); end
  endtask

  // Per-slot bookkeeping.
  longint slot_start = 0, last_rise = 0, prev_rise = 0;
  int     rises = 0, periods_ok = 0;
  int     cnt_irest_fast = 0, cnt_irest_slow = 0, cnt_rest = 0, cnt_cont = 0;
  int     cnt_slot_fast = 0, cnt_slot_slow = 0, cnt_period = 0;
  logic   started = 1'b0;
  int unsigned cur = 0;

  // At a note change the controller keeps CHTOGGLE high in S7 and S8 while
  // CLRN clears IREST, so a note that ended in an implicit rest gives one
  // short pulse there; it is counted apart and not taken as a tone edge.
  int cnt_change_pulse = 0;
  always @(posedge out) begin
    if (dut.u_fsm.state_o inside {music_synth_pkg::S7, music_synth_pkg::S8}) begin
      cnt_change_pulse++;
    end else begin
    if (rises > 0) begin
      longint per;
      per = $time - prev_rise;
      chk(per == 2 * (256 - longint'(in_w)) * T_CT,
          $sformatf("period %0d for word %02h, exp %0d", per, in_w, 2 * (256 - longint'(in_w)) * T_CT));
      cnt_period++;
    end
    prev_rise = $time;
    last_rise = $time;
    rises++;
    end
  end

  // Close a slot when the address moves on.
  task automatic close_slot(input int unsigned n, input longint t_end);
    logic [7:0] w;
    logic       tp;
    longint     len, per, since;
    w   = SONG[n];
    tp  = TEMPO[n];
    len = t_end - slot_start;
    per = 2 * (256 - longint'(w)) * T_CT;
    since = last_rise - slot_start;
    if (n > 0) begin
      // A slot ends at the first period end after the note clock.
      chk(len >= (tp ? 1 : 4) * T_NC - 2 * per - T_DUR && len <= (tp ? 1 : 4) * T_NC + 2 * per,
          $sformatf("slot %0d length %0d", n, len));
      if (tp) cnt_slot_fast++; else cnt_slot_slow++;
    end
    if (w == 8'h20) begin
      chk(rises == 0, $sformatf("rest slot %0d has %0d edges", n, rises));
      cnt_rest++;
    end else if (w[0]) begin
      // Silent after the tap: last edge before it, and a gap to the end.
      if (tp) begin
        chk(since <= 8 * T_DUR + per && since >= 7 * T_DUR - per, $sformatf("fast implicit rest at %0d", since));
        cnt_irest_fast++;
      end else begin
        chk(since <= 31 * T_DUR + per && since >= 30 * T_DUR - per, $sformatf("slow implicit rest at %0d", since));
        cnt_irest_slow++;
      end
      chk(t_end - last_rise > per + T_DUR, "silence to the end of the slot");
    end else begin
      chk(t_end - last_rise <= per + 10 * T_CLK, $sformatf("continuous note ends early, gap %0d", t_end - last_rise));
      cnt_cont++;
    end
  endtask

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    initial_i = 1'b1;
    repeat (20) @(posedge clk);
    #1 initial_i = 1'b0;
    // Start-up: address held clear until the first note clock.
    repeat (100) @(posedge clk);
    chk(addr == 2'd3 && dut.u_fsm.state_o == music_synth_pkg::S0, "start-up waits in S0");
    wait (addr != 2'd3);
    chk($time >= 3 * T_NC / 4 && $time <= 3 * T_NC / 4 + 10 * T_CLK, "first note at the first note clock");
    slot_start = $time; rises = 0;
    for (int n = 0; n < NOTES; n++) begin
      @(posedge clk iff addr == 2'd1);
      close_slot(n, $time);
      slot_start = $time; rises = 0;
    end
    chk(cnt_period > 100, $sformatf("periods checked: %0d", cnt_period));
    chk(cnt_rest > 0, "rest exercised");
    chk(cnt_irest_fast > 0, "fast implicit rest exercised");
    chk(cnt_irest_slow > 0, "slow implicit rest exercised");
    chk(cnt_cont > 0, "continuous note exercised");
    chk(cnt_slot_fast > 0 && cnt_slot_slow > 0, "both tempos exercised");
    $display("periods=%0d rests=%0d irest_fast=%0d irest_slow=%0d continuous=%0d slots fast=%0d slow=%0d",
             cnt_period, cnt_rest, cnt_irest_fast, cnt_irest_slow, cnt_cont, cnt_slot_fast, cnt_slot_slow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
