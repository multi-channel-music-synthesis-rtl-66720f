// Workload testbench: whole notes at both tempos through music_synth_system.
//
// A whole note is sixteen song entries of the same note, the first fifteen
// with the endnote bit clear and the last with it set. The testbench plays
// an A4 whole note at fast tempo and a C5 whole note at slow tempo, each
// followed by a rest, and checks that the tone sounds without a gap for
// about 1.6 s (fast) and 6.4 s (slow): from the first tone edge to the
// last, the time must lie between 15 slots plus the fast implicit rest tap
// (7 to 8 duration-clock periods) or the slow tap (30 to 31), minus and
// plus the slot jitter of two tone periods, and no gap between tone edges
// may exceed one tone period.
module tb_whole_note;
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
  initial begin #7; forever #(T_CT / 2) osc = ~osc; end

  decade_counter_chain u_div (.osc_i(osc), .f10k_o(f10k), .f1k_o(f1k), .f100_o(f100), .f10_o(f10));
  address_counter #(.AW(8)) u_addr (.clk(clk), .sel_i(sel), .addr_o(addr));
  song_prom u_song (.clk(clk), .we_i(we), .waddr_i(waddr), .wdata_i(wdata), .addr_i(addr), .data_o(entry));

  music_synth_system dut (.clk(clk), .initial_i(initial_i), .tempo_i(tempo), .clk1_i(f10), .clk2_i(f100),
                          .clk3_i(osc), .song_entry_i(entry), .addr_o(sel), .map_word_o(map_word), .out_o(out));

  // Entries 0..15: A4 whole note; 16: rest; 17..32: C5 whole note; 33..: rest.
  function automatic logic [5:0] song(input int i);
    if (i < 16)  return {5'd9, (i == 15) ? 1'b1 : 1'b0};
    if (i == 16) return {5'd31, 1'b0};
    if (i < 33)  return {5'd12, (i == 32) ? 1'b1 : 1'b0};
    return {5'd31, 1'b0};
  endfunction

  always_comb tempo = (addr < 8'd17);

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s", $time, msg); end
  endtask

  longint first_rise = 0, last_rise = 0, max_gap = 0;
  int     rises = 0;
  always @(posedge out) begin
    if (!(dut.u_asic.u_fsm.state_o inside {music_synth_pkg::S7, music_synth_pkg::S8})) begin
      if (rises == 0) first_rise = $time;
      else if ($time - last_rise > max_gap) max_gap = $time - last_rise;
      last_rise = $time;
      rises++;
    end
  end

  task automatic measure(input int first, input int last_entry, input logic [7:0] w, input longint slot,
                         input longint tap_lo, input longint tap_hi, input string name);
    longint per, len;
    wait (addr == 8'(first) && sel != 2'd3);
    rises = 0; max_gap = 0;
    wait (addr == 8'(last_entry + 1));
    per = 2 * (256 - longint'(w)) * T_CT;
    len = last_rise - first_rise;
    $display("%s: tone for %0d us, %0d edges, longest gap %0d us", name, len / 10, rises, max_gap / 10);
    chk(len >= 15 * slot + tap_lo - 2 * per - T_DUR && len <= 15 * slot + tap_hi + 2 * per,
        $sformatf("%s length %0d", name, len));
    chk(max_gap == per, $sformatf("%s has a gap of %0d", name, max_gap));
  endtask

  initial begin
    repeat (9000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    initial_i = 1'b1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = 8'(i); wdata = song(i);
    end
    @(negedge clk) we = 1'b0;
    repeat (10) @(posedge clk);
    #1 initial_i = 1'b0;
    measure(0, 15, 8'h8C, T_NC, 7 * T_DUR, 8 * T_DUR, "fast whole note A4");
    measure(17, 32, 8'h9E, 4 * T_NC, 30 * T_DUR, 31 * T_DUR, "slow whole note C5");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
