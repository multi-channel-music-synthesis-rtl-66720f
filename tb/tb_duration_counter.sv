// Testbench of duration_counter.
//
// Counts CLK2 rising edges and compares with a reference count modulo 32,
// checks DETECT exactly at 31 and the CLRN clear.
module tb_duration_counter;
  logic       clk = 1'b0;
  logic       clk2 = 1'b0;
  logic       clrn_n;
  logic [4:0] dur;
  logic       detect;
  int         checks = 0, failures = 0;

  duration_counter dut (.clk(clk), .clk2_i(clk2), .clrn_n_i(clrn_n), .dur_o(dur), .detect_o(detect));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL t=%0t %s dur=%0d", $time, msg, dur); end
  endtask

  initial begin
    int ref_count;
    int detects;
    clrn_n = 0;
    repeat (5) @(negedge clk);
    clrn_n = 1;
    chk(dur == 0 && !detect, "cleared");
    ref_count = 0; detects = 0;
    for (int i = 0; i < 80; i++) begin
      @(negedge clk); clk2 = 1;
      repeat (8) @(negedge clk);
      clk2 = 0;
      repeat (8) @(negedge clk);
      ref_count = (ref_count + 1) % 32;
      chk(dur == 5'(ref_count), $sformatf("count exp %0d", ref_count));
      chk(detect == (ref_count == 31), "detect");
      if (detect) detects++;
      if (i == 40) begin
        @(negedge clk); clrn_n = 0; @(negedge clk); clrn_n = 1;
        ref_count = 0;
        chk(dur == 0, "CLRN clears");
      end
    end
    chk(detects == 2, $sformatf("DETECT seen %0d times", detects));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
