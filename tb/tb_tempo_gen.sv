// Testbench of tempo_gen.
//
// Fast tempo: every CLK1 rising edge sets CN. Slow tempo: only every
// fourth edge after a CLRN clear sets CN. CLRN low clears CN and restarts
// the slow count. CLK1 is a square wave of 20 clk cycles.
module tb_tempo_gen;
  logic clk = 1'b0;
  logic clk1 = 1'b0;
  logic tempo, clrn_n, cn;
  int   checks = 0, failures = 0;

  tempo_gen dut (.clk(clk), .clk1_i(clk1), .tempo_i(tempo), .clrn_n_i(clrn_n), .cn_o(cn));

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

  // One CLK1 period; returns whether CN was seen high by its end.
  task automatic clk1_period(output logic seen);
    @(negedge clk); clk1 = 1;
    repeat (10) @(negedge clk);
    clk1 = 0;
    repeat (10) @(negedge clk);
    seen = cn;
  endtask

  task automatic clear();
    @(negedge clk); clrn_n = 0;
    @(negedge clk); clrn_n = 1;
    chk(!cn, "CLRN clears CN");
  endtask

  initial begin
    logic seen;
    int   edges;
    tempo = 1; clrn_n = 0;
    repeat (5) @(negedge clk);
    clrn_n = 1;
    // Fast: each edge sets CN.
    for (int i = 0; i < 10; i++) begin
      clear();
      clk1_period(seen);
      chk(seen, "fast: CN after one edge");
    end
    // Slow: the fourth edge after a clear sets CN.
    tempo = 0;
    for (int i = 0; i < 10; i++) begin
      clear();
      edges = 0; seen = 0;
      while (!seen && edges < 8) begin clk1_period(seen); edges++; end
      chk(edges == 4, $sformatf("slow: CN after %0d edges", edges));
    end
    // Slow: a clear in the middle restarts the count of four.
    clear();
    clk1_period(seen); clk1_period(seen); clk1_period(seen);
    chk(!seen, "slow: no CN after three edges");
    clear();
    clk1_period(seen); clk1_period(seen); clk1_period(seen);
    chk(!seen, "slow: count restarted by CLRN");
    clk1_period(seen);
    chk(seen, "slow: CN on fourth edge after restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
