// Testbench of ct_latch.
//
// A slow square wave on CLK3 (one period per 20 clk cycles) must set CT
// once per rising edge within four clk edges; CLRT low must clear it, and
// an edge that arrives while CLRT is held low must be lost.
module tb_ct_latch;
  logic clk = 1'b0;
  logic clk3 = 1'b0;
  logic clrt_n;
  logic ct;
  int   checks = 0, failures = 0;
  int   sets = 0;

  ct_latch dut (.clk(clk), .clk3_i(clk3), .clrt_n_i(clrt_n), .ct_o(ct));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s", $time, msg); end
  endtask

  initial begin
    int lat;
    clrt_n = 0;
    repeat (6) @(negedge clk);
    chk(!ct, "cleared");
    clrt_n = 1;
    for (int p = 0; p < 40; p++) begin
      // Rising edge of CLK3 between clk edges.
      @(negedge clk); clk3 = 1;
      lat = 0;
      while (!ct && lat < 10) begin @(negedge clk); lat++; end
      chk(ct && lat >= 2 && lat <= 4, $sformatf("CT latency %0d", lat));
      // Flag holds until cleared.
      repeat (5) @(negedge clk);
      chk(ct, "CT holds");
      clrt_n = 0; @(negedge clk); clrt_n = 1;
      chk(!ct, "CLRT clears");
      @(negedge clk); clk3 = 0;
      repeat (9) @(negedge clk);
      chk(!ct, "no set on falling edge");
    end
    // An edge while CLRT is held low is lost.
    clrt_n = 0;
    @(negedge clk); clk3 = 1;
    repeat (8) @(negedge clk);
    clrt_n = 1;
    repeat (8) @(negedge clk);
    chk(!ct, "edge during clear lost");
    clk3 = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
