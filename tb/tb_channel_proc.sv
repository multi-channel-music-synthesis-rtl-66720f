// Testbench of channel_proc.
//
// Plays the role of the controller: loads a word, pulses COUNT until
// CHZERO and checks the 256 - N count; checks that the output follows
// CHTOGGLE for a note, stays low for the rest word, and goes low once the
// fast or slow duration tap fires for a note with its endnote bit set but
// not for one without it; CLRN clears the implicit rest.
module tb_channel_proc;
  logic       clk = 1'b0;
  logic [7:0] in_i, q;
  logic       load, count, chtoggle, clrn_n, tempo, fast_tap, detect;
  logic       chzero, irest, rest, out;
  int         checks = 0, failures = 0;

  channel_proc dut (.clk(clk), .in_i(in_i), .load_i(load), .count_i(count), .chtoggle_i(chtoggle),
                    .clrn_n_i(clrn_n), .tempo_i(tempo), .fast_tap_i(fast_tap), .detect_i(detect),
                    .chzero_o(chzero), .irest_o(irest), .rest_o(rest), .out_o(out), .count_q_o(q));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s", $time, msg); end
  endtask

  task automatic new_note(input logic [7:0] w);
    @(negedge clk);
    clrn_n = 0; fast_tap = 0; detect = 0; in_i = w;
    @(negedge clk);
    clrn_n = 1;
  endtask

  task automatic half_period(input logic level);
    int n;
    chtoggle = level;
    load = 1; @(negedge clk); load = 0;
    n = 0;
    count = 1;
    do begin @(negedge clk); n++; end while (!chzero && n < 300);
    count = 0;
    chk(n == 256 - int'(in_i), $sformatf("half period %0d counts for word %02h", n, in_i));
    chk(out == (level && !rest && !irest), "output gate");
  endtask

  initial begin
    {load, count, chtoggle, tempo, fast_tap, detect} = '0;
    in_i = 8'h00; clrn_n = 0;
    repeat (3) @(negedge clk);
    // A plain note, fast tempo, no endnote: plays through both taps.
    tempo = 1;
    new_note(8'hCE);
    half_period(1); half_period(0);
    fast_tap = 1; detect = 1;
    half_period(1);
    chk(out && !irest, "no implicit rest without endnote");
    // Endnote at fast tempo: silenced by the fast tap only.
    new_note(8'hCF);
    detect = 1;
    half_period(1);
    chk(out, "slow tap ignored at fast tempo");
    fast_tap = 1;
    half_period(1);
    chk(irest && !out, "implicit rest at fast tempo");
    half_period(0); half_period(1);
    chk(!out, "implicit rest holds");
    // Endnote at slow tempo: silenced by DETECT only.
    tempo = 0;
    new_note(8'h9F);
    chk(!irest, "CLRN clears IREST");
    fast_tap = 1;
    half_period(1);
    chk(out, "fast tap ignored at slow tempo");
    detect = 1;
    half_period(1);
    chk(!out && irest, "implicit rest at slow tempo");
    // Rest word: silent, counter still runs.
    tempo = 1;
    new_note(8'h20);
    half_period(1);
    chk(rest && !out, "rest silences");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
