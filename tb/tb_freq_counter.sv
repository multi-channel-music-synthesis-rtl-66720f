// Testbench of freq_counter.
//
// Loads random words N, counts until CHZERO and checks that the wrap to
// zero comes after exactly 256 - N counts, that load wins over count, and
// that the value holds when neither strobe is high.
module tb_freq_counter;
  logic       clk = 1'b0;
  logic       load_i, count_i;
  logic [7:0] d_i, q_o;
  logic       chzero_o;
  int         checks = 0, failures = 0;

  freq_counter dut (.clk(clk), .load_i(load_i), .count_i(count_i), .d_i(d_i),
                    .q_o(q_o), .chzero_o(chzero_o));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s q=%0d", $time, msg, q_o); end
  endtask

  initial begin
    int n, counts;
    load_i = 0; count_i = 0; d_i = 0;
    @(negedge clk);
    for (int t = 0; t < 60; t++) begin
      n = (t < 3) ? (t == 0 ? 255 : (t == 1 ? 240 : 64)) : int'($urandom_range(255, 1));
      d_i = 8'(n); load_i = 1;
      @(negedge clk);
      load_i = 0;
      chk(q_o == 8'(n), "load");
      chk(!chzero_o, "no zero after load");
      counts = 0;
      count_i = 1;
      while (!chzero_o && counts < 300) begin
        @(negedge clk);
        counts++;
      end
      count_i = 0;
      chk(counts == 256 - n, $sformatf("wrap after %0d counts, N=%0d", counts, n));
      // Hold when idle.
      @(negedge clk);
      chk(q_o == 0 && chzero_o, "hold at zero");
    end
    // Load has priority over count.
    d_i = 8'h9E; load_i = 1; count_i = 1;
    @(negedge clk);
    chk(q_o == 8'h9E, "load priority");
    load_i = 0; count_i = 1;
    @(negedge clk);
    chk(q_o == 8'h9F, "increment");
    count_i = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
