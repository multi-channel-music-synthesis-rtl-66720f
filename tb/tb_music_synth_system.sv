// End-to-end testbench of music_synth_system at its default (and only)
// size.
//
// Models of the external parts surround the design: a 100 kHz oscillator
// feeding four decade counters, the song address counter driven by the
// chip's address select lines, and a song memory programmed with a short
// tune. The chip clock runs at 1 MHz (one time unit = 0.1 us). For each
// song slot the testbench checks, from its own copy of the note table:
//   - every output period is 2 x (256 - N) x 10 us for the slot's count
//     word N, and the tone is within 5 % of the equal-tempered pitch;
//   - slot lengths of 100 ms (fast) and 400 ms (slow tempo);
//   - rests are silent; endnote slots fall silent after the fast or slow
//     tap; other slots sound to the end;
//   - the song address starts at zero and steps once per slot.
// It counts how often each mechanism happened and fails if one never did.
module tb_music_synth_system;
  localparam longint T_CLK = 10;
  localparam longint T_CT  = 100;
  localparam longint T_DUR = 1000 * T_CT;
  localparam longint T_NC  = 10000 * T_CT;

  logic       clk = 1'b0, osc = 1'b0;
  logic       initial_i, tempo;
  logic       f10k, f1k, f100, f10;
  logic [1:0] sel;
  logic [7:0] addr;
  logic [5:0] entry;
  logic [7:0] map_word;
  logic       out;
  logic       we = 1'b0;
  logic [7:0] waddr = '0;
  logic [5:0] wdata = '0;
  int         checks = 0, failures = 0;

  always #(T_CLK / 2) clk = ~clk;
  initial begin #3; forever #(T_CT / 2) osc = ~osc; end

  decade_counter_chain u_div (.osc_i(osc), .f10k_o(f10k), .f1k_o(f1k), .f100_o(f100), .f10_o(f10));
  address_counter #(.AW(8)) u_addr (.clk(clk), .sel_i(sel), .addr_o(addr));
  song_prom u_song (.clk(clk), .we_i(we), .waddr_i(waddr), .wdata_i(wdata), .addr_i(addr), .data_o(entry));

  music_synth_system dut (
    .clk          (clk),
    .initial_i    (initial_i),
    .tempo_i      (tempo),
    .clk1_i       (f10),
    .clk2_i       (f100),
    .clk3_i       (osc),
    .song_entry_i (entry),
    .addr_o       (sel),
    .map_word_o   (map_word),
    .out_o        (out)
  );

  // Note table (count word of each note code, endnote bit clear).
  localparam logic [7:0] NOTE_WORD [25] = '{
    8'h40, 8'h4A, 8'h54, 8'h5E, 8'h66, 8'h70, 8'h78, 8'h7E, 8'h86, 8'h8C,
    8'h94, 8'h9A, 8'h9E, 8'hA4, 8'hAA, 8'hAE, 8'hB2, 8'hB6, 8'hBA, 8'hBE,
    8'hC2, 8'hC6, 8'hC8, 8'hCC, 8'hCE};

  // Song: {code, endnote} and tempo per slot. Code 31 is a rest.
  localparam int SLOTS = 12;
  localparam logic [5:0] SONG [SLOTS] = '{
    {5'd4, 1'b0}, {5'd2, 1'b1}, {5'd0, 1'b1}, {5'd2, 1'b1}, {5'd4, 1'b0}, {5'd4, 1'b1},
    {5'd31, 1'b0}, {5'd19, 1'b1}, {5'd24, 1'b0}, {5'd9, 1'b1}, {5'd12, 1'b0}, {5'd31, 1'b0}};
  localparam logic TEMPO_OF [SLOTS] = '{1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1,
                                        1'b0, 1'b0, 1'b0};

  always_comb tempo = TEMPO_OF[int'(addr) < SLOTS ? int'(addr) : SLOTS - 1];

  function automatic logic [7:0] exp_word(input logic [5:0] e);
    if (e[5:1] == 5'd31) return 8'h20;
    return NOTE_WORD[e[5:1]] | {7'd0, e[0]};
  endfunction

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s", $time, msg); end
  endtask

  longint slot_start = 0, last_rise = 0, prev_rise = 0;
  int     rises = 0;
  int     cnt_period = 0, cnt_rest = 0, cnt_irest_fast = 0, cnt_irest_slow = 0, cnt_cont = 0;
  int     cnt_slot_fast = 0, cnt_slot_slow = 0, cnt_change_pulse = 0, cnt_tempo_switch = 0;

  // Tone edges; the short pulse at a note change after an implicit rest
  // (controller states S7/S8) is counted apart.
  always @(posedge out) begin
    if (dut.u_asic.u_fsm.state_o inside {music_synth_pkg::S7, music_synth_pkg::S8}) begin
      cnt_change_pulse++;
    end else begin
      if (rises > 0) begin
        longint per;
        per = $time - prev_rise;
        chk(per == 2 * (256 - longint'(map_word)) * T_CT,
            $sformatf("period %0d for word %02h", per, map_word));
        cnt_period++;
      end
      prev_rise = $time;
      last_rise = $time;
      rises++;
    end
  end

  task automatic close_slot(input int n, input longint t_end);
    logic [7:0] w;
    logic       tp;
    longint     len, per, since;
    real        f, ideal, err;
    w     = exp_word(SONG[n]);
    tp    = TEMPO_OF[n];
    len   = t_end - slot_start;
    per   = 2 * (256 - longint'(w)) * T_CT;
    since = last_rise - slot_start;
    if (n > 0) begin
      chk(len >= (tp ? 1 : 4) * T_NC - 2 * per - T_DUR && len <= (tp ? 1 : 4) * T_NC + 2 * per,
          $sformatf("slot %0d length %0d", n, len));
      if (tp) cnt_slot_fast++; else cnt_slot_slow++;
      if (tp != TEMPO_OF[n - 1]) cnt_tempo_switch++;
    end
    if (w == 8'h20) begin
      chk(rises == 0, $sformatf("rest slot %0d has %0d edges", n, rises));
      cnt_rest++;
    end else begin
      f = 1.0e5 / (2.0 * real'(256 - int'(w)));
      ideal = 261.6256 * (2.0 ** (real'(SONG[n][5:1]) / 12.0));
      err = (f > ideal) ? (f - ideal) / ideal : (ideal - f) / ideal;
      chk(err < 0.05, $sformatf("slot %0d pitch %f Hz against %f Hz", n, f, ideal));
      chk(rises > 10, $sformatf("slot %0d sounded (%0d edges)", n, rises));
      if (w[0]) begin
        if (tp) begin
          chk(since <= 8 * T_DUR + per && since >= 7 * T_DUR - per, $sformatf("fast implicit rest at %0d", since));
          cnt_irest_fast++;
        end else begin
          chk(since <= 31 * T_DUR + per && since >= 30 * T_DUR - per, $sformatf("slow implicit rest at %0d", since));
          cnt_irest_slow++;
        end
        chk(t_end - last_rise > per + T_DUR, "silence to the end of the slot");
      end else begin
        chk(t_end - last_rise <= per + 10 * T_CLK, $sformatf("slot %0d ends early", n));
        cnt_cont++;
      end
    end
  endtask

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    initial_i = 1'b1;
    // Program the song memory while INITIAL holds the chip.
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 8'(i); wdata = (i < SLOTS) ? SONG[i] : {5'd31, 1'b0};
    end
    @(negedge clk) we = 1'b0;
    repeat (10) @(posedge clk);
    chk(addr == 8'd0 && sel == 2'd3, "address held at zero during start-up");
    #1 initial_i = 1'b0;
    wait (sel != 2'd3);
    slot_start = $time; rises = 0;
    for (int n = 0; n < SLOTS - 1; n++) begin
      #1;
      chk(addr == 8'(n), $sformatf("song address %0d, exp %0d", addr, n));
      chk(map_word == exp_word(SONG[n]), $sformatf("map word %02h", map_word));
      @(posedge clk iff sel == 2'd1);
      close_slot(n, $time);
      slot_start = $time; rises = 0;
    end
    $display("periods=%0d rests=%0d irest_fast=%0d irest_slow=%0d continuous=%0d slots fast=%0d slow=%0d tempo_switches=%0d change_pulses=%0d",
             cnt_period, cnt_rest, cnt_irest_fast, cnt_irest_slow, cnt_cont, cnt_slot_fast,
             cnt_slot_slow, cnt_tempo_switch, cnt_change_pulse);
    chk(cnt_period > 100, "tone periods checked");
    chk(cnt_rest > 0, "rest happened");
    chk(cnt_irest_fast > 0, "fast implicit rest happened");
    chk(cnt_irest_slow > 0, "slow implicit rest happened");
    chk(cnt_cont > 0, "continuous note happened");
    chk(cnt_slot_fast > 0 && cnt_slot_slow > 0, "both tempos happened");
    chk(cnt_tempo_switch > 0, "tempo switch happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
