// Workload testbench: the whole note scale through music_synth_system.
//
// Plays every entry of the note table, C4 to C6 (codes 0 to 24), one
// sixteenth each at fast tempo with the endnote bit clear, then a rest.
// For each note it measures the output period in the middle of the slot,
// checks it against 2 x (256 - N) x 10 us for the note's count word, and
// reports the deviation from the equal-tempered pitch (C4 = 261.63 Hz).
// It checks that every note of the lower octave (C4 to C5) is within 3 %
// and every note within 5 %, that the pitch rises from note to note, and
// prints how many notes fall within 1 % and 3 %. The models of the song
// memory, address counter and decade counters are those of the end-to-end
// testbench.
module tb_note_scale;
  localparam longint T_CLK = 10;
  localparam longint T_CT  = 100;

  logic       clk = 1'b0, osc = 1'b0;
  logic       initial_i;
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
  initial begin #7; forever #(T_CT / 2) osc = ~osc; end

  decade_counter_chain u_div (.osc_i(osc), .f10k_o(f10k), .f1k_o(f1k), .f100_o(f100), .f10_o(f10));
  address_counter #(.AW(8)) u_addr (.clk(clk), .sel_i(sel), .addr_o(addr));
  song_prom u_song (.clk(clk), .we_i(we), .waddr_i(waddr), .wdata_i(wdata), .addr_i(addr), .data_o(entry));

  music_synth_system dut (.clk(clk), .initial_i(initial_i), .tempo_i(1'b1), .clk1_i(f10), .clk2_i(f100),
                          .clk3_i(osc), .song_entry_i(entry), .addr_o(sel), .map_word_o(map_word), .out_o(out));

  localparam logic [7:0] NOTE_WORD [25] = '{
    8'h40, 8'h4A, 8'h54, 8'h5E, 8'h66, 8'h70, 8'h78, 8'h7E, 8'h86, 8'h8C,
    8'h94, 8'h9A, 8'h9E, 8'hA4, 8'hAA, 8'hAE, 8'hB2, 8'hB6, 8'hBA, 8'hBE,
    8'hC2, 8'hC6, 8'hC8, 8'hCC, 8'hCE};

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s", $time, msg); end
  endtask

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, t1, per;
    real    f, ideal, err, prev_f;
    int     within1, within3;
    initial_i = 1'b1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 8'(i); wdata = (i < 25) ? {5'(i), 1'b0} : {5'd31, 1'b0};
    end
    @(negedge clk) we = 1'b0;
    repeat (10) @(posedge clk);
    #1 initial_i = 1'b0;
    prev_f = 0.0; within1 = 0; within3 = 0;
    for (int n = 0; n < 25; n++) begin
      wait (addr == 8'(n) && sel != 2'd3);
      // Measure one period well inside the slot.
      #(20000 * T_CLK);
      @(posedge out); t0 = $time;
      @(posedge out); t1 = $time;
      per = t1 - t0;
      chk(map_word == NOTE_WORD[n], $sformatf("note %0d word %02h", n, map_word));
      chk(per == 2 * (256 - longint'(NOTE_WORD[n])) * T_CT, $sformatf("note %0d period %0d", n, per));
      f = 1.0e9 / (real'(per) * 100.0);  // one time unit = 0.1 us
      ideal = 261.6256 * (2.0 ** (real'(n) / 12.0));
      err = (f > ideal) ? (f - ideal) / ideal : (ideal - f) / ideal;
      $display("note %2d word %02h: %8.2f Hz, equal-tempered %8.2f Hz, error %5.2f %%", n, map_word, f, ideal, 100.0 * err);
      if (err < 0.01) within1++;
      if (err < 0.03) within3++;
      chk(err < ((n <= 12) ? 0.03 : 0.05), $sformatf("note %0d pitch error", n));
      chk(f > prev_f, "pitch rises");
      prev_f = f;
    end
    $display("notes within 1 %%: %0d of 25, within 3 %%: %0d of 25", within1, within3);
    // The rest after the scale is silent.
    wait (addr == 8'd25);
    #(20000 * T_CLK);
    t0 = $time;
    fork
      begin @(posedge out); t1 = $time; end
      begin #(50000 * T_CLK); t1 = 0; end
    join_any
    disable fork;
    chk(t1 == 0, "rest after the scale is silent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
